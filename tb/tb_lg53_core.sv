// tb_lg53_core: drives the 5/3 core with random centre samples and pair sums and checks
// the 64x-scaled result: 48x + 16w1 - 8w2 (low), 64x - 32w1 (5/3 high) and 32x - 16w1
// (9/7 high, the halved base).
module tb_lg53_core;
  import dwt_pkg::*;
  localparam int W = 24;
  band_t    band;
  wavelet_t mode;
  logic signed [W-1:0] x0, w1, w2, base;
  int checks = 0, failures = 0;

  lg53_core #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 1000; i++) begin
      x0 = W'(int'($urandom_range(0, 8191)) - 4096);
      w1 = W'(int'($urandom_range(0, 16383)) - 8192);
      w2 = W'(int'($urandom_range(0, 16383)) - 8192);
      band = band_t'(i % 2);
      mode = wavelet_t'((i / 2) % 2);
      if (band == BAND_LOW)   exp = 48 * int'(x0) + 16 * int'(w1) - 8 * int'(w2);
      else if (mode == WAV_53) exp = 64 * int'(x0) - 32 * int'(w1);
      else                     exp = 32 * int'(x0) - 16 * int'(w1);
      #1;
      checks++;
      if (int'(base) != exp) begin
        failures++;
        $display("FAIL band=%0d mode=%0d x0=%0d w1=%0d w2=%0d base=%0d exp=%0d",
                 band, mode, x0, w1, w2, base, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
