// tb_poly_dwt_filter: streams random samples into the folded filter with random gaps,
// random output requests and the band and wavelet selects switching from sample to
// sample, and compares every output with a direct convolution by the filter taps:
//   5/3 low  [-1,2,6,2,-1]/8          5/3 high [-1,2,-1]/2
//   9/7 low  [1,0,-8,16,46,16,-8,0,1]/64
//   9/7 high [1,0,-9,16,-9,0,1]/32 (half scale)
// rounded to nearest, ties upward. It also checks that each output comes exactly three
// cycles after its request and that no unrequested output appears.
module tb_poly_dwt_filter;
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
  int hist [9];                     // hist[0] newest sample
  int exp_q[$], band_q[$], cyc_q[$];
  int cycle = 0;
  int n_low = 0, n_high = 0, n_53 = 0, n_97 = 0, n_switch = 0;

  const int C_L53[9] = '{0, 0, -8, 16, 48, 16, -8, 0, 0};
  const int C_H53[9] = '{0, 0, 0, -32, 64, -32, 0, 0, 0};
  const int C_L97[9] = '{1, 0, -8, 16, 46, 16, -8, 0, 1};
  const int C_H97[9] = '{0, 2, 0, -18, 32, -18, 0, 2, 0};

  function automatic int ref_out(input band_t b, input wavelet_t m);
    int acc = 0;
    for (int k = 0; k < 9; k++) begin
      if (m == WAV_53) acc += (b == BAND_LOW ? C_L53[k] : C_H53[k]) * hist[k];
      else             acc += (b == BAND_LOW ? C_L97[k] : C_H97[k]) * hist[k];
    end
    return (acc + 32) >>> 6;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // output checker
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unrequested output %0d", out_data);
      end else begin
        int e, b, c;
        e = exp_q.pop_front(); b = band_q.pop_front(); c = cyc_q.pop_front();
        if (int'(out_data) != e || int'(out_band) != b || cycle != c + 3) begin
          failures++;
          $display("FAIL out=%0d band=%0d cycle=%0d, expected %0d band %0d cycle %0d",
                   out_data, out_band, cycle, e, b, c + 3);
        end
      end
    end
  end

  initial begin
    wavelet_t last_mode;
    rst_n = 0; in_valid = 0; in_emit = 0; in_data = '0;
    in_band = BAND_LOW; in_mode = WAV_53; last_mode = WAV_53;
    for (int k = 0; k < 9; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      in_emit  = ($urandom_range(0, 3) != 0);
      in_data  = DW'(int'($urandom_range(0, 8191)) - 4096);
      in_band  = band_t'($urandom_range(0, 1));
      in_mode  = (i < 1000) ? wavelet_t'((i / 100) % 2) : wavelet_t'($urandom_range(0, 1));
      if (in_valid) begin
        for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(in_data);
        if (in_emit) begin
          exp_q.push_back(ref_out(in_band, in_mode) <<< 16 >>> 16);
          band_q.push_back(int'(in_band));
          cyc_q.push_back(cycle);
          if (in_band == BAND_LOW) n_low++; else n_high++;
          if (in_mode == WAV_53) n_53++; else n_97++;
          if (in_mode != last_mode) n_switch++;
          last_mode = in_mode;
        end
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    #3;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_low == 0 || n_high == 0 || n_53 == 0 || n_97 == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a select setting was never exercised");
    end
    $display("low=%0d high=%0d 5/3=%0d 9/7=%0d switches=%0d", n_low, n_high, n_53, n_97, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
