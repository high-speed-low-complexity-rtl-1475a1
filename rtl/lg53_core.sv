// lg53_core: the 5/3 part of the polymorphic datapath, shared by the 5/3 and 9/7 filters.
//
// The 9/7 filter pair with free factor alpha = -2 differs from Le Gall's 5/3 pair only by
// a few power-of-two terms, so the 5/3 result is computed once and the 9/7 result is
// derived from it (see cdf97_correction). All values are 64 times the true filter output:
//   low  (band 0):  64*low53  = 48 x(n) + 16 w1 - 8 w2        taps [-1,2,6,2,-1]/8
//   high (band 1):  64*high53 = 64 x(n) - 32 w1               taps [-1/2,1,-1/2]
// where wk = x(n-k) + x(n+k). In 9/7 mode the high-pass base is halved (32 x(n) - 16 w1),
// because the 9/7 high-pass output is formed as high53/2 plus correction terms.
// Multiplications are shifts; three folded adders do the additions:
//   A4: low 2x+x      high 2x-w1
//   A5: low 16*A4+16*w1   high 16*A4 or 32*A4 (+0)
//   A6: low A5-8*w2   high A5-0
// Interface: W-bit signed operands, combinational. The tap values and the halving follow
// the 5/3 table and the 9/7 high-pass equation of the design; the adder split is this
// design's schedule.
module lg53_core
  import dwt_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  band_t               band,
  input  wavelet_t            mode,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] w1,
  input  logic signed [W-1:0] w2,
  output logic signed [W-1:0] base
);

  logic                slot;
  logic signed [W-1:0] a4, a5, hi_scaled;
  logic signed [W-1:0] zero;

  assign slot = (band == BAND_HIGH);
  assign zero = '0;

  // A4: 3 x(n) for the low-pass, 2 x(n) - w1 for the high-pass
  folded_adder #(.W(W)) u_a4 (
    .slot(slot),
    .a0(x0 <<< 1), .b0(x0), .sub0(1'b0),
    .a1(x0 <<< 1), .b1(w1), .sub1(1'b1),
    .y(a4)
  );

  // 16*(2x - w1) = 32 x - 16 w1 (9/7, halved) or 32*(2x - w1) = 64 x - 32 w1 (5/3)
  assign hi_scaled = (mode == WAV_97) ? (a4 <<< 4) : (a4 <<< 5);

  // A5: 16*(3x + w1) for the low-pass
  folded_adder #(.W(W)) u_a5 (
    .slot(slot),
    .a0(a4 <<< 4), .b0(w1 <<< 4), .sub0(1'b0),
    .a1(hi_scaled), .b1(zero),    .sub1(1'b0),
    .y(a5)
  );

  // A6: subtract 8 w2 for the low-pass
  folded_adder #(.W(W)) u_a6 (
    .slot(slot),
    .a0(a5), .b0(w2 <<< 3), .sub0(1'b1),
    .a1(a5), .b1(zero),     .sub1(1'b1),
    .y(base)
  );

endmodule
