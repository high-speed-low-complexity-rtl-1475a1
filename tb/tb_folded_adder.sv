// tb_folded_adder: checks the shared add/subtract unit in both time slots with random
// operands, both senses and signed extremes, against plain integer arithmetic.
module tb_folded_adder;
  localparam int W = 24;
  logic                slot, sub0, sub1;
  logic signed [W-1:0] a0, b0, a1, b1, y;
  int checks = 0, failures = 0;

  folded_adder #(.W(W)) dut (.*);

  task automatic check(input logic signed [W-1:0] exp);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL slot=%0d a0=%0d b0=%0d sub0=%0d a1=%0d b1=%0d sub1=%0d y=%0d exp=%0d",
               slot, a0, b0, sub0, a1, b1, sub1, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a0 = W'($urandom_range(0, 2000000)) - W'(1000000);
      b0 = W'($urandom_range(0, 2000000)) - W'(1000000);
      a1 = W'($urandom_range(0, 2000000)) - W'(1000000);
      b1 = W'($urandom_range(0, 2000000)) - W'(1000000);
      sub0 = 1'($urandom);
      sub1 = 1'($urandom);
      slot = 1'(i);
      if (slot) check(sub1 ? a1 - b1 : a1 + b1);
      else      check(sub0 ? a0 - b0 : a0 + b0);
    end
    // both slots of one operand set
    a0 = 24'sd100; b0 = 24'sd7; sub0 = 1'b1; a1 = -24'sd5; b1 = 24'sd9; sub1 = 1'b0;
    slot = 1'b0; check(24'sd93);
    slot = 1'b1; check(24'sd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
