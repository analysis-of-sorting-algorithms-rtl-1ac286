// tb_uart_rx: self-checking test of the serial receiver.
// Sends random bytes as 8N1 frames with a short bit time and checks the
// delivered byte, that valid pulses exactly once per frame, and that it does
// so at the middle of the stop bit (9.5 bit times after the start edge, plus
// the two-flop synchroniser). Frames with a low stop bit must raise
// frame_err instead of valid, and a short glitch must deliver nothing.
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  longint unsigned cyc = 0, last_valid_cyc = 0, last_err_cyc = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin n_valid++; last_valid_cyc = cyc; end
    if (frame_err) begin n_err++; last_err_cyc = cyc; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one frame starting at a falling clock edge; returns the start cycle
  task automatic send(input logic [7:0] b, input logic stop, output longint unsigned t0);
    @(negedge clk);
    t0 = cyc;
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int k = 0; k < 8; k++) begin rxd = b[k]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    longint unsigned t0;
    int before_v, before_e;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      b = 8'($urandom);
      if (k == 0) b = 8'h00;
      if (k == 1) b = 8'hff;
      before_v = n_valid; before_e = n_err;
      send(b, 1'b1, t0);
      checks++;
      if (n_valid != before_v + 1 || n_err != before_e) begin
        failures++; $display("frame %0d: %0d valid pulses", k, n_valid - before_v);
      end
      checks++;
      if (data !== b) begin failures++; $display("frame %0d: got %h expected %h", k, data, b); end
      // sampled at the middle of the stop bit: 9.5 bits after the start edge,
      // plus the synchroniser delay; allow +-2 cycles
      checks++;
      if (last_valid_cyc < t0 + 9 * CPB + CPB / 2 || last_valid_cyc > t0 + 9 * CPB + CPB / 2 + 4) begin
        failures++; $display("frame %0d: valid at %0d, start at %0d", k, last_valid_cyc, t0);
      end
    end
    // framing error
    for (int k = 0; k < 10; k++) begin
      before_v = n_valid; before_e = n_err;
      send(8'($urandom), 1'b0, t0);
      checks++;
      if (n_err != before_e + 1 || n_valid != before_v) begin
        failures++; $display("framing error not flagged");
      end
    end
    // glitch shorter than half a bit: nothing delivered
    before_v = n_valid; before_e = n_err;
    @(negedge clk); rxd = 0; repeat (CPB / 4) @(negedge clk); rxd = 1;
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (n_valid != before_v || n_err != before_e) begin failures++; $display("glitch accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
