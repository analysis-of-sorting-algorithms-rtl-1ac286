// tb_comparator: self-checking test of the magnitude comparator.
// Checks gt/eq/lt for the corner values and for random pairs, with a
// separate case for equal operands.
module tb_comparator;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b;
  logic gt, eq, lt;
  int checks = 0, failures = 0;

  comparator #(.W(W)) dut (.*);

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    a = x; b = y; #1;
    checks++;
    if (gt !== (x > y) || eq !== (x == y) || lt !== (x < y)) begin
      failures++;
      if (failures < 10) $display("a=%0d b=%0d gt=%b eq=%b lt=%b", x, y, gt, eq, lt);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0); check('1, '1); check('0, '1); check('1, '0);
    check(16'h8000, 16'h7fff); check(16'h7fff, 16'h8000);
    for (int k = 0; k < 2000; k++) begin
      logic [W-1:0] x;
      x = W'($urandom);
      check(x, W'($urandom));
      check(x, x);
      check(x, x + W'(1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
