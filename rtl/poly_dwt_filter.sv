// poly_dwt_filter: reconfigurable, folded 5/3 - 9/7 analysis filter with serial input.
//
// Samples enter one per clock. For each sample the caller says whether the window it
// completes should produce an output (in_emit), and for which band (in_band) and wavelet
// (in_mode). The window is centred four samples behind the newest one, so an output for
// centre sample x(n) is requested together with sample x(n+4). In a discrete wavelet
// transform even centres give low-pass and odd centres give high-pass outputs, so the band
// select alternates and the same adders serve both bands on alternate cycles (folding).
// The wavelet select may change with any sample: the 5/3 result is always computed and
// the 9/7 correction is added only when it is selected.
//
// Datapath, scheduled by data availability and adder delay so that the 9/7 terms are
// formed beside the 5/3 terms instead of after them:
//   stage 0  tap_window (9 samples)
//   stage 1  pair adders  A1: w1 = x(n-1)+x(n+1)
//                         A2: w2 (low) or w3 (high), one folded adder
//                         A3: w4 = x(n-4)+x(n+4)
//   stage 2  lg53_core (A4..A6) and cdf97_correction (A7, A8), then the rounding adder
// Nine adders in all, no multipliers. Every intermediate value is exact at 64 times
// scale; the output is rounded to nearest (ties upward) back to the input format and
// keeps its DW bits, which is enough for two passes over 8-bit pixels with 4 fractional
// bits (largest gain per pass is 2).
//
// Timing: an emitted window requested with in_valid in cycle c appears on out_valid in
// cycle c+3, in order; the pipeline never stalls. The number of adders, the folding and
// the scheduling idea follow the design; the pipeline cut, the word widths and the
// rounding are this design's choices.
module poly_dwt_filter
  import dwt_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  input  logic                 in_emit,
  input  band_t                in_band,
  input  wavelet_t             in_mode,
  output logic                 out_valid,
  output band_t                out_band,
  output logic signed [DW-1:0] out_data
);

  typedef struct packed {
    logic     valid;
    band_t    band;
    wavelet_t mode;
  } ctl_t;

  // ---------------------------------------------------------------- stage 0: window
  logic [TAPS-1:0][DW-1:0] taps;
  ctl_t                    ctl0;

  tap_window #(.DW(DW), .TAPS(TAPS)) u_window (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(in_valid),
    .din  (in_data),
    .taps (taps)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctl0 <= '{valid: 1'b0, band: BAND_LOW, mode: WAV_53};
    end else begin
      ctl0 <= '{valid: in_valid & in_emit, band: in_band, mode: in_mode};
    end
  end

  // taps[4] is the centre x(n); taps[4-k] = x(n+k), taps[4+k] = x(n-k)
  function automatic logic signed [AW-1:0] sx(input logic [DW-1:0] v);
    return AW'(signed'(v));
  endfunction

  // ---------------------------------------------------------------- stage 1: pair sums
  logic signed [AW-1:0] p_w1, p_w23, p_w4;
  logic                 slot0;

  assign slot0 = (ctl0.band == BAND_HIGH);

  folded_adder #(.W(AW)) u_a1 (
    .slot(slot0),
    .a0(sx(taps[3])), .b0(sx(taps[5])), .sub0(1'b0),
    .a1(sx(taps[3])), .b1(sx(taps[5])), .sub1(1'b0),
    .y(p_w1)
  );

  folded_adder #(.W(AW)) u_a2 (
    .slot(slot0),
    .a0(sx(taps[2])), .b0(sx(taps[6])), .sub0(1'b0),
    .a1(sx(taps[1])), .b1(sx(taps[7])), .sub1(1'b0),
    .y(p_w23)
  );

  folded_adder #(.W(AW)) u_a3 (
    .slot(slot0),
    .a0(sx(taps[0])), .b0(sx(taps[8])), .sub0(1'b0),
    .a1(sx(taps[0])), .b1(sx(taps[8])), .sub1(1'b0),
    .y(p_w4)
  );

  ctl_t                 ctl1;
  logic signed [AW-1:0] s1_x0, s1_w1, s1_w23, s1_w4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctl1   <= '{valid: 1'b0, band: BAND_LOW, mode: WAV_53};
      s1_x0  <= '0;
      s1_w1  <= '0;
      s1_w23 <= '0;
      s1_w4  <= '0;
    end else begin
      ctl1   <= ctl0;
      s1_x0  <= sx(taps[4]);
      s1_w1  <= p_w1;
      s1_w23 <= p_w23;
      s1_w4  <= p_w4;
    end
  end

  // ---------------------------------------------------------------- stage 2: filters
  logic signed [AW-1:0] base, full, rounded;

  lg53_core #(.W(AW)) u_core (
    .band(ctl1.band),
    .mode(ctl1.mode),
    .x0  (s1_x0),
    .w1  (s1_w1),
    .w2  (s1_w23),
    .base(base)
  );

  cdf97_correction #(.W(AW)) u_corr (
    .band(ctl1.band),
    .mode(ctl1.mode),
    .x0  (s1_x0),
    .w1  (s1_w1),
    .w3  (s1_w23),
    .w4  (s1_w4),
    .base(base),
    .y   (full)
  );

  // rounding adder: nearest, ties toward +infinity, then drop the 64x scale
  assign rounded = (full + AW'(1 << (COEF_SHIFT - 1))) >>> COEF_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_band  <= BAND_LOW;
      out_data  <= '0;
    end else begin
      out_valid <= ctl1.valid;
      out_band  <= ctl1.band;
      out_data  <= rounded[DW-1:0];
    end
  end

  // the rounded value must fit the output word
  always_ff @(posedge clk) begin
    if (rst_n && ctl1.valid) begin
      assert (rounded == AW'(signed'(rounded[DW-1:0])))
        else $error("poly_dwt_filter: output overflows %0d bits", DW);
    end
  end

endmodule
