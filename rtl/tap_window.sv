// tap_window: serial-input delay line that presents the filter window.
//
// Image samples reach the filter one per clock. Each accepted sample shifts the line by
// one place, so after a shift taps[0] holds the newest sample and taps[TAPS-1] the oldest.
// With TAPS = 9 the window is x(n+4) ... x(n-4) around the centre sample x(n) = taps[4],
// enough for the 9-tap low-pass of the 9/7 filter; the shorter filters use its inner taps.
//
// Timing: a sample presented with shift = 1 appears on taps[0] after the next rising edge.
// Reset (active low, synchronous) clears every tap to zero; reset values are this design's
// choice.
module tap_window #(
  parameter int unsigned DW   = 16,
  parameter int unsigned TAPS = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift,
  input  logic [DW-1:0]            din,
  output logic [TAPS-1:0][DW-1:0]  taps
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (shift) begin
      taps <= {taps[TAPS-2:0], din};
    end
  end

endmodule
