// tb_uart_tx: self-checking test of the serial transmitter.
// Offers random bytes with random gaps, decodes txd by sampling each bit at
// its middle, and checks the byte, the start and stop bits, that ready is low
// for the whole frame, and that a frame lasts 10 bit times.
module tb_uart_tx;
  localparam int unsigned CPB = 12;
  logic clk = 0, rst_n = 0;
  logic [7:0] data;
  logic valid, ready, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cycles;
    valid = 0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (txd !== 1'b1 || ready !== 1'b1) begin failures++; $display("idle state wrong"); end
    for (int k = 0; k < 200; k++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      b = 8'($urandom);
      @(negedge clk);
      checks++; if (!ready) begin failures++; $display("not ready when idle"); end
      data = b; valid = 1;
      @(posedge clk); #1;            // byte taken at this edge; start bit begins
      valid = 0; data = 8'($urandom);
      busy_cycles = 0;
      // middle of the start bit
      repeat (CPB / 2) begin @(posedge clk); #1; busy_cycles++; end
      checks++; if (txd !== 1'b0) begin failures++; $display("start bit high"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) begin @(posedge clk); #1; busy_cycles++; end
        got[i] = txd;
      end
      repeat (CPB) begin @(posedge clk); #1; busy_cycles++; end
      checks++; if (txd !== 1'b1) begin failures++; $display("stop bit low"); end
      checks++; if (got !== b) begin failures++; $display("sent %h decoded %h", b, got); end
      // ready returns after the stop bit: 10 bit times after the accept edge
      while (!ready) begin @(posedge clk); #1; busy_cycles++; end
      checks++;
      if (busy_cycles != 10 * CPB) begin failures++; $display("frame took %0d cycles", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
