// tb_frame_buffer: fills the memory with random words, reads them back in a shuffled
// order with the one-cycle read latency, and checks read-during-write returns the old word.
module tb_frame_buffer;
  localparam int DW = 16, DEPTH = 256, ADDRW = 8;
  logic clk = 0, we;
  logic [ADDRW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer #(.DW(DW), .DEPTH(DEPTH), .ADDRW(ADDRW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = DW'($urandom);
      @(negedge clk);
      we = 1; waddr = ADDRW'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      raddr = ADDRW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
      end
    end
    // read and write the same word in one cycle: old data comes out
    @(negedge clk);
    we = 1; waddr = 8'd17; wdata = ~model[17]; raddr = 8'd17;
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[17]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata !== ~model[17]) begin failures++; $display("FAIL write not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
