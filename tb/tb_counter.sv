// tb_counter: self-checking test of the loadable up/down counter.
// Applies random clear / load / increment / decrement commands (often several
// at once, to exercise the priority order) and compares the count with a
// model after every clock edge, including wrap-around at both ends.
module tb_counter;
  localparam int unsigned W = 5;
  logic clk = 0, rst_n = 0;
  logic clr, load, inc, dec;
  logic [W-1:0] load_val, q;
  int checks = 0, failures = 0;
  int unsigned model;

  counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clr, load, inc, dec} = '0;
    load_val = '0;
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q !== '0) begin failures++; $display("reset value %0d", q); end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      clr  = ($urandom_range(0, 15) == 0);
      load = ($urandom_range(0, 7) == 0);
      inc  = $urandom_range(0, 1);
      dec  = $urandom_range(0, 1);
      load_val = W'($urandom);
      if (clr)       model = 0;
      else if (load) model = load_val;
      else if (inc)  model = (model + 1) % (1 << W);
      else if (dec)  model = (model + (1 << W) - 1) % (1 << W);
      @(posedge clk); #1;
      checks++;
      if (q !== W'(model)) begin
        failures++;
        if (failures < 10) $display("k=%0d q=%0d expected %0d", k, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
