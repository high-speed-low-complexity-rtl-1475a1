// frame_buffer: single-frame image memory between the passes of the 2-D transform.
//
// The row pass writes its low-pass and high-pass outputs here and the column pass reads
// them back in column order, so the same filter can be used for both passes. One write
// port and one read port, both synchronous: read data appears the cycle after the address
// is presented; a write and a read of the same word in one cycle return the old word.
// Contents are not reset. The memory organisation is this design's choice.
module frame_buffer #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned ADDRW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ADDRW-1:0] waddr,
  input  logic [DW-1:0]    wdata,
  input  logic [ADDRW-1:0] raddr,
  output logic [DW-1:0]    rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
