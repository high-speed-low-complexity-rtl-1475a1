// tb_cdf97_correction: checks the 9/7 correction with random inputs: low adds
// w4 - 2x, high adds 2w3 - 2w1 (64x scale), and 5/3 mode passes the base unchanged.
module tb_cdf97_correction;
  import dwt_pkg::*;
  localparam int W = 24;
  band_t    band;
  wavelet_t mode;
  logic signed [W-1:0] x0, w1, w3, w4, base, y;
  int checks = 0, failures = 0;

  cdf97_correction #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 1000; i++) begin
      x0   = W'(int'($urandom_range(0, 8191)) - 4096);
      w1   = W'(int'($urandom_range(0, 16383)) - 8192);
      w3   = W'(int'($urandom_range(0, 16383)) - 8192);
      w4   = W'(int'($urandom_range(0, 16383)) - 8192);
      base = W'(int'($urandom_range(0, 1000000)) - 500000);
      band = band_t'(i % 2);
      mode = wavelet_t'((i / 2) % 2);
      if (mode == WAV_53)       exp = int'(base);
      else if (band == BAND_LOW) exp = int'(base) + int'(w4) - 2 * int'(x0);
      else                       exp = int'(base) + 2 * int'(w3) - 2 * int'(w1);
      #1;
      checks++;
      if (int'(y) != exp) begin
        failures++;
        $display("FAIL band=%0d mode=%0d y=%0d exp=%0d", band, mode, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
