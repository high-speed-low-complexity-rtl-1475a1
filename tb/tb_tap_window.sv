// tb_tap_window: shifts random samples into the 9-tap delay line, sometimes holding, and
// compares every tap with a queue model; also checks that reset clears the line.
module tb_tap_window;
  localparam int DW = 16, TAPS = 9;
  logic clk = 0, rst_n, shift;
  logic [DW-1:0] din;
  logic [TAPS-1:0][DW-1:0] taps;
  logic [DW-1:0] model [TAPS];
  int checks = 0, failures = 0;

  tap_window #(.DW(DW), .TAPS(TAPS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; shift = 0; din = '0;
    @(posedge clk); @(posedge clk); #1;
    for (int k = 0; k < TAPS; k++) begin
      model[k] = '0;
      checks++;
      if (taps[k] !== '0) begin failures++; $display("FAIL tap %0d not reset", k); end
    end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      shift = ($urandom_range(0, 3) != 0);
      din   = DW'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = TAPS - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (taps[k] !== model[k]) begin
          failures++;
          $display("FAIL step %0d tap %0d = %h, expected %h", i, k, taps[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
