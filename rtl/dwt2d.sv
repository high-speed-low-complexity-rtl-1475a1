// dwt2d: one level of a two-dimensional polymorphic wavelet transform (5/3 or 9/7).
//
// An image of ROWS x COLS 8-bit pixels is loaded into frame buffer A through the host
// port. On start the controller streams every row of A serially through the single
// poly_dwt_filter and writes each row's low-pass outputs to the left half and its
// high-pass outputs to the right half of the same row of frame buffer B. It then streams
// every column of B through the same filter and writes the low-pass outputs to the top
// half and the high-pass outputs to the bottom half of the same column of A. A then holds
// the LL, HL (top right), LH (bottom left) and HH subbands, readable through the host port.
// The wavelet (5/3 or 9/7) is taken from `mode` at start and holds for the whole frame, so
// frames may alternate between the two filters without any change to the hardware.
//
// Each line of N samples is fed as x(4) x(3) x(2) x(1) x(0) x(1) ... x(N-1) x(N-2) ...
// x(N-5): whole-sample symmetric extension by four samples at each end, the reach of the
// longest filter. Outputs are requested for centres 0 .. N-1; even centres are low-pass,
// odd centres high-pass. Lines follow each other without gaps; a pass ends when its last
// output is written, then the next pass starts. A frame takes
// ROWS*(COLS+8) + COLS*(ROWS+8) + 8 cycles from start to done.
//
// Interface: start is a one-cycle pulse accepted while busy is low; done pulses for one
// cycle at the end. Host writes (host_we, host_addr, host_pixel) and reads (host_raddr,
// host_rdata one cycle later) reach frame buffer A and are only allowed while busy is
// low. Sample words are signed DATA_W-bit fixed point with FRAC_BITS fractional bits; a
// pixel p is stored as p * 2**FRAC_BITS. Addresses are row * COLS + column.
//
// Row filtering first, then column filtering, with the same filter for both passes,
// follows the design. The image size, the two-buffer organisation, the boundary
// extension and the host port are this design's choices.
module dwt2d
  import dwt_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned NPIX  = ROWS * COLS,
  parameter int unsigned ADDRW = $clog2(NPIX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  wavelet_t                 mode,
  output logic                     busy,
  output logic                     done,
  input  logic                     host_we,
  input  logic [ADDRW-1:0]         host_addr,
  input  logic [PIXEL_W-1:0]       host_pixel,
  input  logic [ADDRW-1:0]         host_raddr,
  output logic signed [DATA_W-1:0] host_rdata
);

  localparam int unsigned MAXN = (ROWS > COLS) ? ROWS : COLS;
  localparam int unsigned CW   = $clog2(MAXN + 8) + 1;

  if (ROWS % 2 != 0 || COLS % 2 != 0 || ROWS < 6 || COLS < 6) begin : g_size_check
    $error("dwt2d: ROWS and COLS must be even and at least 6");
  end

  typedef enum logic [2:0] {
    PH_IDLE,
    PH_ROW_FEED,
    PH_ROW_DRAIN,
    PH_COL_FEED,
    PH_COL_DRAIN
  } phase_t;

  phase_t   phase;
  wavelet_t mode_q;
  logic     col_pass;           // pass being written back
  logic     feeding;

  assign col_pass = (phase == PH_COL_FEED) || (phase == PH_COL_DRAIN);
  assign feeding  = (phase == PH_ROW_FEED) || (phase == PH_COL_FEED);
  assign busy     = (phase != PH_IDLE);

  // line length and number of lines of the current pass
  logic [CW-1:0] n_len, n_lines;
  assign n_len   = col_pass ? CW'(ROWS) : CW'(COLS);
  assign n_lines = col_pass ? CW'(COLS) : CW'(ROWS);

  // symmetric extension: feed step s reads sample index |s-4| folded at N-1
  function automatic logic [CW-1:0] mirror(input logic [CW-1:0] s, input logic [CW-1:0] n);
    if (s < CW'(4))            return CW'(4) - s;
    else if (s > n + CW'(3))   return (n << 1) + CW'(2) - s;
    else                       return s - CW'(4);
  endfunction

  // ---------------------------------------------------------------- feed side
  logic [CW-1:0]    f_line, f_step, f_idx;
  logic [ADDRW-1:0] rd_addr;
  logic             last_step, last_line;

  assign f_idx     = mirror(f_step, n_len);
  assign last_step = (f_step == n_len + CW'(7));
  assign last_line = (f_line == n_lines - CW'(1));
  assign rd_addr   = col_pass ? ADDRW'(f_idx * COLS + f_line)
                              : ADDRW'(f_line * COLS + f_idx);

  // one cycle of memory read latency before the sample reaches the filter
  logic          d_valid;
  logic [CW-1:0] d_step;

  // ---------------------------------------------------------------- write-back side
  logic [CW-1:0]    w_line, w_cnt, w_idx;
  logic [ADDRW-1:0] wr_addr;
  logic             f_out_valid, wb_last;
  band_t            f_out_band;
  logic signed [DATA_W-1:0] f_out_data;

  assign w_idx   = (f_out_band == BAND_HIGH) ? (n_len >> 1) + (w_cnt >> 1) : (w_cnt >> 1);
  assign wr_addr = col_pass ? ADDRW'(w_idx * COLS + w_line)
                            : ADDRW'(w_line * COLS + w_idx);
  assign wb_last = f_out_valid && (w_cnt == n_len - CW'(1)) && (w_line == n_lines - CW'(1));

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      mode_q  <= WAV_53;
      f_line  <= '0;
      f_step  <= '0;
      d_valid <= 1'b0;
      d_step  <= '0;
      w_line  <= '0;
      w_cnt   <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      d_valid <= feeding;
      d_step  <= f_step;

      if (feeding) begin
        if (last_step) begin
          f_step <= '0;
          f_line <= f_line + CW'(1);
        end else begin
          f_step <= f_step + CW'(1);
        end
      end

      if (f_out_valid) begin
        if (w_cnt == n_len - CW'(1)) begin
          w_cnt  <= '0;
          w_line <= w_line + CW'(1);
        end else begin
          w_cnt  <= w_cnt + CW'(1);
        end
      end

      unique case (phase)
        PH_IDLE: if (start) begin
          phase  <= PH_ROW_FEED;
          mode_q <= mode;
          f_line <= '0;
          f_step <= '0;
          w_line <= '0;
          w_cnt  <= '0;
        end
        PH_ROW_FEED:  if (last_step && last_line) phase <= PH_ROW_DRAIN;
        PH_ROW_DRAIN: if (wb_last) begin
          phase  <= PH_COL_FEED;
          f_line <= '0;
          f_step <= '0;
          w_line <= '0;
          w_cnt  <= '0;
        end
        PH_COL_FEED:  if (last_step && last_line) phase <= PH_COL_DRAIN;
        PH_COL_DRAIN: if (wb_last) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- frame buffers
  logic              a_we, b_we;
  logic [ADDRW-1:0]  a_waddr, a_raddr;
  logic [DATA_W-1:0] a_wdata, a_rdata, b_rdata;

  assign a_we    = busy ? (col_pass && f_out_valid) : host_we;
  assign a_waddr = busy ? wr_addr : host_addr;
  assign a_wdata = busy ? f_out_data : DATA_W'({host_pixel, FRAC_BITS'(0)});
  assign a_raddr = busy ? rd_addr : host_raddr;
  assign b_we    = !col_pass && busy && f_out_valid;

  frame_buffer #(.DW(DATA_W), .DEPTH(NPIX), .ADDRW(ADDRW)) u_buf_a (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .raddr(a_raddr), .rdata(a_rdata)
  );

  frame_buffer #(.DW(DATA_W), .DEPTH(NPIX), .ADDRW(ADDRW)) u_buf_b (
    .clk(clk), .we(b_we), .waddr(wr_addr), .wdata(f_out_data),
    .raddr(rd_addr), .rdata(b_rdata)
  );

  assign host_rdata = a_rdata;

  // ---------------------------------------------------------------- the filter
  // the window completed by feed step s is centred on sample s-8: even centres are
  // low-pass, odd centres high-pass
  logic  f_emit;
  band_t f_band;

  assign f_emit = (d_step >= CW'(8));
  assign f_band = d_step[0] ? BAND_HIGH : BAND_LOW;

  poly_dwt_filter #(.DW(DATA_W), .AW(ACC_W)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (d_valid),
    .in_data  (col_pass ? b_rdata : a_rdata),
    .in_emit  (f_emit),
    .in_band  (f_band),
    .in_mode  (mode_q),
    .out_valid(f_out_valid),
    .out_band (f_out_band),
    .out_data (f_out_data)
  );

  // the write-back order must match the band the filter reports
  always_ff @(posedge clk) begin
    if (rst_n && f_out_valid) begin
      assert (f_out_band == (w_cnt[0] ? BAND_HIGH : BAND_LOW))
        else $error("dwt2d: output band out of order");
    end
  end

endmodule
