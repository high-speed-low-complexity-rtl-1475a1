// folded_adder: one add/subtract unit shared by two operations.
//
// Folding maps several additions of the data-flow graph onto one functional unit, each in
// its own time slot. Here the fold factor is two: the filter produces a low-pass output and
// a high-pass output for every pair of input samples, and both are computed by the same
// adders on alternate cycles. The slot input selects which operation the unit performs
// this cycle: slot 0 computes a0 +/- b0 (low-pass), slot 1 computes a1 +/- b1 (high-pass).
// Operands arrive already scaled by powers of two, so the coefficients need no multipliers.
//
// Timing: combinational, the result follows the operands in the same cycle; the filter
// that uses the unit places its pipeline registers. Sharing an adder between the two
// output bands follows the folding idea of the design; the two-slot form is this design's.
module folded_adder #(
  parameter int unsigned W = 24
) (
  input  logic                slot,
  input  logic signed [W-1:0] a0,
  input  logic signed [W-1:0] b0,
  input  logic                sub0,
  input  logic signed [W-1:0] a1,
  input  logic signed [W-1:0] b1,
  input  logic                sub1,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] a, b;
  logic                sub;

  always_comb begin
    a   = slot ? a1   : a0;
    b   = slot ? b1   : b0;
    sub = slot ? sub1 : sub0;
    y   = sub ? (a - b) : (a + b);
  end

endmodule
