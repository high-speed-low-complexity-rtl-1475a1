// tb_filter_impulse: runs the four filter configurations of the polymorphic filter
// (5/3 low, 5/3 high, 9/7 high, 9/7 low) one after another on a unit impulse and checks
// that the outputs reproduce the filter taps, and that each configuration delivers its
// first output three cycles after the request and then one output per cycle.
// The impulse has the value 64 so that every tap k/64 comes out as the integer k:
//   5/3 low  [-8,16,48,16,-8]/64          5/3 high [-32,64,-32]/64
//   9/7 low  [1,0,-8,16,46,16,-8,0,1]/64  9/7 high [2,0,-18,32,-18,0,2]/64
module tb_filter_impulse;
  import dwt_pkg::*;
  localparam int DW = 16;

  logic clk = 0, rst_n;
  logic in_valid, in_emit, out_valid;
  logic signed [DW-1:0] in_data, out_data;
  band_t    in_band, out_band;
  wavelet_t in_mode;

  poly_dwt_filter dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  const int C_L53[9] = '{0, 0, -8, 16, 48, 16, -8, 0, 0};
  const int C_H53[9] = '{0, 0, 0, -32, 64, -32, 0, 0, 0};
  const int C_L97[9] = '{1, 0, -8, 16, 46, 16, -8, 0, 1};
  const int C_H97[9] = '{0, 2, 0, -18, 32, -18, 0, 2, 0};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input band_t b, input wavelet_t m, input string name);
    int got [9];
    int first, n, cyc;
    rst_n = 0; in_valid = 0; in_emit = 0; in_data = '0; in_band = b; in_mode = m;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0; first = -1; cyc = 0;
    // samples 0..16, impulse at sample 8, outputs requested for samples 8..16
    for (int s = 0; s < 24; s++) begin
      in_valid = (s < 17);
      in_data  = (s == 8) ? DW'(64) : '0;
      in_emit  = (s >= 8 && s < 17);
      @(posedge clk); #1;
      cyc++;
      if (out_valid) begin
        if (first < 0) first = cyc;
        if (n < 9) got[n] = int'(out_data);
        n++;
        checks++;
        if (out_band != b) begin failures++; $display("FAIL %s band", name); end
      end
    end
    checks++;
    // request for sample 8 is made in loop cycle 9; its output is seen 3 cycles later
    if (n != 9 || first != 11) begin
      failures++;
      $display("FAIL %s: %0d outputs, first in cycle %0d (expected 9 from cycle 11)", name, n, first);
    end
    for (int k = 0; k < 9 && k < n; k++) begin
      int e;
      if (m == WAV_53) e = (b == BAND_LOW) ? C_L53[k] : C_H53[k];
      else             e = (b == BAND_LOW) ? C_L97[k] : C_H97[k];
      checks++;
      if (got[k] != e) begin
        failures++;
        $display("FAIL %s tap %0d = %0d, expected %0d", name, k, got[k], e);
      end
    end
    $display("%s: impulse response checked, first output %0d cycles after the request", name, first - 8);
  endtask

  initial begin
    run(BAND_LOW,  WAV_53, "5/3 low");
    run(BAND_HIGH, WAV_53, "5/3 high");
    run(BAND_HIGH, WAV_97, "9/7 high");
    run(BAND_LOW,  WAV_97, "9/7 low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
