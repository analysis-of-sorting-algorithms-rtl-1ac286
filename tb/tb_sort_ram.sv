// tb_sort_ram: self-checking test of the buffer memory.
// Fills every word, reads all back through the asynchronous read port, then
// mixes random writes and reads against a model array. Also checks that a
// read shows the new word right after the write edge.
module tb_sort_ram;
  localparam int unsigned DEPTH = 40, DW = 16, AW = 6;
  logic clk = 0;
  logic [AW-1:0] addr;
  logic we;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sort_ram #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      addr = AW'(k); we = 1; wdata = DW'($urandom); model[k] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < DEPTH; k++) begin
      addr = AW'(k); #1;
      checks++; if (rdata !== model[k]) begin failures++; $display("addr %0d %h vs %h", k, rdata, model[k]); end
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      addr = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      wdata = DW'($urandom);
      if (!we) begin
        #1; checks++;
        if (rdata !== model[addr]) begin failures++; if (failures < 10) $display("rd %0d", addr); end
      end else begin
        model[addr] = wdata;
        @(posedge clk); #1;
        checks++;
        if (rdata !== wdata) begin failures++; if (failures < 10) $display("rd after wr %0d", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
