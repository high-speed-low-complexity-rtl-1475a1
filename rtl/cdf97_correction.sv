// cdf97_correction: turns the shared 5/3 result into the 9/7 (alpha = -2) result.
//
// With alpha = -2 the rational 9/7 analysis pair is
//   low  [1,0,-8,16,46,16,-8,0,1]/64
//   high [1,0,-9,16,-9,0,1]/16, delivered at half scale: [1,0,-9,16,-9,0,1]/32
// and it differs from the 5/3 pair by
//   low97  = low53      - x(n)/32 + w4/64
//   high97 = high53 / 2 - w1/32   + w3/32
// with wk = x(n-k) + x(n+k). At the 64x scale of the datapath the correction is
// w4 - 2 x(n) (low) or 2 w3 - 2 w1 (high); adder A7 forms it and adder A8 adds it to the
// 5/3 base (already halved for the high-pass by lg53_core). In 5/3 mode the correction
// is switched off and the 5/3 base passes unchanged, so the filter can change on the fly.
// Interface: W-bit signed values, combinational. The correction terms follow the design's
// equations; the adder sharing between the bands is this design's schedule.
module cdf97_correction
  import dwt_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  band_t               band,
  input  wavelet_t            mode,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] w1,
  input  logic signed [W-1:0] w3,
  input  logic signed [W-1:0] w4,
  input  logic signed [W-1:0] base,
  output logic signed [W-1:0] y
);

  logic                slot;
  logic signed [W-1:0] corr, corr_sel;

  assign slot = (band == BAND_HIGH);

  // A7: w4 - 2 x(n) (low), 2 w3 - 2 w1 (high)
  folded_adder #(.W(W)) u_a7 (
    .slot(slot),
    .a0(w4),      .b0(x0 <<< 1), .sub0(1'b1),
    .a1(w3 <<< 1), .b1(w1 <<< 1), .sub1(1'b1),
    .y(corr)
  );

  // filter switch: the correction only takes part in 9/7 mode
  assign corr_sel = (mode == WAV_97) ? corr : '0;

  // A8: final sum, the same operation in both slots
  folded_adder #(.W(W)) u_a8 (
    .slot(slot),
    .a0(base), .b0(corr_sel), .sub0(1'b0),
    .a1(base), .b1(corr_sel), .sub1(1'b0),
    .y(y)
  );

endmodule
