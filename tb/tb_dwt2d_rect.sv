// tb_dwt2d_rect: the end-to-end test of tb_dwt2d on a small non-square image (10 rows,
// 16 columns), so that an exchange of rows and columns anywhere in the controller shows.
// A random 8-bit image is loaded through the host port and transformed twice, first with
// the 9/7 filter and then, after reloading, with the 5/3 filter. Every coefficient read
// back is compared with a reference computed here: row filtering then column filtering by
// direct convolution with the filter taps, whole-sample symmetric extension at the edges,
// low-pass outputs in the first half and high-pass outputs in the second half of each
// line, each output rounded to nearest (ties upward) at 4 fractional bits.
// It also checks the frame time, busy and done, and counts the mechanisms of the design:
// both passes, both bands, both wavelets and the switch between them, and the boundary
// extension at both ends of a line.
module tb_dwt2d_rect;
  import dwt_pkg::*;
  localparam int R = 10, C = 16, NPIX = R * C, ADDRW = $clog2(NPIX);

  logic clk = 0, rst_n, start, busy, done, host_we;
  wavelet_t mode;
  logic [ADDRW-1:0] host_addr, host_raddr;
  logic [PIXEL_W-1:0] host_pixel;
  logic signed [DATA_W-1:0] host_rdata;

  dwt2d #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [R][C];
  int tmp [R][C];
  int res [R][C];
  int n_row_pass = 0, n_col_pass = 0, n_low = 0, n_high = 0;
  int n_left_ext = 0, n_right_ext = 0, n_53 = 0, n_97 = 0, n_switch = 0;

  const int C_L53[9] = '{0, 0, -8, 16, 48, 16, -8, 0, 0};
  const int C_H53[9] = '{0, 0, 0, -32, 64, -32, 0, 0, 0};
  const int C_L97[9] = '{1, 0, -8, 16, 46, 16, -8, 0, 1};
  const int C_H97[9] = '{0, 2, 0, -18, 32, -18, 0, 2, 0};

  function automatic int mirror(input int i, input int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  function automatic int tap(input int k, input int band, input wavelet_t m);
    if (m == WAV_53) return band == 0 ? C_L53[k] : C_H53[k];
    return band == 0 ? C_L97[k] : C_H97[k];
  endfunction

  // 16-bit wrap, as the hardware word
  function automatic int w16(input int v);
    return int'(signed'(16'(v)));
  endfunction

  task automatic reference(input wavelet_t m);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int acc = 0;
        for (int k = 0; k < 9; k++) acc += tap(k, c % 2, m) * img[r][mirror(c + k - 4, C)];
        tmp[r][(c % 2) ? C / 2 + c / 2 : c / 2] = w16((acc + 32) >>> 6);
      end
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin
        int acc = 0;
        for (int k = 0; k < 9; k++) acc += tap(k, r % 2, m) * tmp[mirror(r + k - 4, R)][c];
        res[(r % 2) ? R / 2 + r / 2 : r / 2][c] = w16((acc + 32) >>> 6);
      end
  endtask

  // mechanism counters, sampled from the controller
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (dut.feeding && dut.f_step < 4) n_left_ext++;
      if (dut.feeding && dut.f_step > dut.n_len + 3) n_right_ext++;
      if (dut.f_out_valid) begin
        if (dut.f_out_band == BAND_LOW) n_low++; else n_high++;
        if (dut.col_pass) n_col_pass++; else n_row_pass++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_image();
    for (int a = 0; a < NPIX; a++) begin
      host_we = 1; host_addr = ADDRW'(a); host_pixel = PIXEL_W'(img[a / C][a % C] >> FRAC_BITS);
      @(posedge clk); #1;
    end
    host_we = 0;
  endtask

  task automatic run_frame(input wavelet_t m);
    int cycles = 0, expected_max, expected_min;
    mode = m; start = 1;
    @(posedge clk); #1;
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy still high after done"); end
    expected_min = R * (C + 8) + C * (R + 8);
    expected_max = expected_min + 10;
    checks++;
    if (cycles < expected_min || cycles > expected_max) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d..%0d", cycles, expected_min, expected_max);
    end
    $display("frame (%s) took %0d cycles", m == WAV_97 ? "9/7" : "5/3", cycles);
    if (m == WAV_53) n_53++; else n_97++;
  endtask

  task automatic compare(input wavelet_t m);
    int bad = 0;
    reference(m);
    for (int a = 0; a < NPIX; a++) begin
      host_raddr = ADDRW'(a);
      @(posedge clk); #1;
      checks++;
      if (int'(host_rdata) != res[a / C][a % C]) begin
        failures++;
        if (bad++ < 10)
          $display("FAIL %s coefficient (%0d,%0d) = %0d, expected %0d",
                   m == WAV_97 ? "9/7" : "5/3", a / C, a % C, host_rdata, res[a / C][a % C]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; mode = WAV_53; host_we = 0;
    host_addr = '0; host_raddr = '0; host_pixel = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        img[r][c] = int'($urandom_range(0, 255)) << FRAC_BITS;
    // a few hard edges and extremes
    for (int c = 0; c < C; c++) begin img[0][c] = 255 << FRAC_BITS; img[R-1][c] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    load_image();
    run_frame(WAV_97);
    compare(WAV_97);

    load_image();
    run_frame(WAV_53);
    n_switch++;
    compare(WAV_53);

    $display("row-pass outputs=%0d column-pass outputs=%0d low=%0d high=%0d",
             n_row_pass, n_col_pass, n_low, n_high);
    $display("left extensions=%0d right extensions=%0d 9/7 frames=%0d 5/3 frames=%0d switches=%0d",
             n_left_ext, n_right_ext, n_97, n_53, n_switch);
    checks++;
    if (n_row_pass != 2 * NPIX || n_col_pass != 2 * NPIX || n_low == 0 || n_high == 0 ||
        n_left_ext == 0 || n_right_ext == 0 || n_53 == 0 || n_97 == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised the expected number of times");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
