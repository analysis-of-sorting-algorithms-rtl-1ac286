// tb_sort_ctrl: self-checking test of the main controller.
// The serial receiver and transmitter are replaced by byte-level handshakes
// and the two sorters by testbench processes that stay busy for a chosen
// number of cycles and rearrange the testbench memories (ascending for the
// insertion side, descending for the bubble side, so the two are told
// apart). Checks, per round: every reading is assembled from its bytes and
// written at the right address; one start pulse with the right count; the
// run-time counters equal the busy times; the bytes sent are the readings of
// the memory chosen by tx_sel, in order, most significant byte first, under
// random transmitter back-pressure; round_done pulses once. Rounds use
// n_cfg values inside the range, 0 and above DEPTH (both meaning DEPTH).
module tb_sort_ctrl;
  localparam int unsigned DEPTH = 8, DW = 16, AW = 3, CW = 4;
  logic clk = 0, rst_n = 0;
  logic [CW-1:0] n_cfg;
  logic tx_sel;
  logic rx_valid;
  logic [7:0] rx_data;
  logic tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [AW-1:0] mem_addr;
  logic mem_we;
  logic [DW-1:0] mem_wdata, ins_rdata, bub_rdata;
  logic sort_start, sorting;
  logic [CW-1:0] sort_n;
  logic ins_busy = 0, ins_done = 0, bub_busy = 0, bub_done = 0;
  logic [31:0] ins_cycles, bub_cycles;
  logic round_done;
  int checks = 0, failures = 0;

  sort_ctrl #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] ins_mem [DEPTH], bub_mem [DEPTH];
  logic [DW-1:0] sent [DEPTH];
  assign ins_rdata = ins_mem[mem_addr];
  assign bub_rdata = bub_mem[mem_addr];

  int n_start, n_round_done, n_write, bad_write;
  logic [7:0] txq [$];
  always @(posedge clk) begin
    if (mem_we) begin
      n_write++;
      ins_mem[mem_addr] <= mem_wdata;
      bub_mem[mem_addr] <= mem_wdata;
      if (sorting) bad_write++;
    end
    if (sort_start) n_start++;
    if (round_done) n_round_done++;
    if (tx_valid && tx_ready) txq.push_back(tx_data);
  end

  // transmitter back-pressure
  always @(negedge clk) tx_ready <= ($urandom_range(0, 3) == 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fake sorter: busy for len cycles, done in the last one
  task automatic fake_sort(input int len, input bit is_ins);
    for (int c = 0; c < len; c++) begin
      if (is_ins) begin ins_busy = 1; ins_done = (c == len - 1); end
      else        begin bub_busy = 1; bub_done = (c == len - 1); end
      @(negedge clk);
    end
    if (is_ins) begin ins_busy = 0; ins_done = 0; end
    else        begin bub_busy = 0; bub_done = 0; end
  endtask

  task automatic round(input int cfg, input bit sel);
    int n, len_i, len_b;
    logic [DW-1:0] tmp;
    logic [DW-1:0] exp_mem [DEPTH];
    n = (cfg == 0 || cfg > DEPTH) ? DEPTH : cfg;
    n_cfg = CW'(cfg); tx_sel = sel;
    n_start = 0; n_round_done = 0; n_write = 0; bad_write = 0;
    txq.delete();
    for (int k = 0; k < n; k++) begin
      sent[k] = DW'($urandom);
      for (int b = DW / 8 - 1; b >= 0; b--) begin
        repeat ($urandom_range(1, 6)) @(negedge clk);
        rx_data = sent[k][8 * b +: 8]; rx_valid = 1;
        @(negedge clk); rx_valid = 0;
      end
    end
    while (!sort_start) @(negedge clk);
    checks++;
    if (sort_n != CW'(n)) begin failures++; $display("sort_n %0d expected %0d", sort_n, n); end
    checks++;
    if (n_write != n) begin failures++; $display("%0d writes, expected %0d", n_write, n); end
    for (int k = 0; k < n; k++) begin
      checks++;
      if (ins_mem[k] !== sent[k] || bub_mem[k] !== sent[k]) begin
        failures++; $display("word %0d stored %h/%h expected %h", k, ins_mem[k], bub_mem[k], sent[k]);
      end
    end
    // a byte arriving while the sorters run is dropped
    rx_data = 8'hA5; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    // sorters: rearrange memories, then report busy for chosen times
    for (int a = 0; a < n; a++)
      for (int b = a + 1; b < n; b++) begin
        if (ins_mem[b] < ins_mem[a]) begin tmp = ins_mem[a]; ins_mem[a] = ins_mem[b]; ins_mem[b] = tmp; end
        if (bub_mem[b] > bub_mem[a]) begin tmp = bub_mem[a]; bub_mem[a] = bub_mem[b]; bub_mem[b] = tmp; end
      end
    len_i = $urandom_range(1, 60);
    len_b = $urandom_range(1, 60);
    fork
      fake_sort(len_i, 1'b1);
      fake_sort(len_b, 1'b0);
    join
    for (int k = 0; k < n; k++) exp_mem[k] = sel ? bub_mem[k] : ins_mem[k];
    while (!round_done) @(negedge clk);
    checks++;
    if (ins_cycles != 32'(len_i) || bub_cycles != 32'(len_b)) begin
      failures++; $display("cycles %0d/%0d expected %0d/%0d", ins_cycles, bub_cycles, len_i, len_b);
    end
    checks++;
    if (n_start != 1 || bad_write != 0) begin failures++; $display("starts %0d, writes while sorting %0d", n_start, bad_write); end
    checks++;
    if (txq.size() != n * DW / 8) begin failures++; $display("sent %0d bytes", txq.size()); end
    else
      for (int k = 0; k < n; k++) begin
        checks++;
        if ({txq[2 * k], txq[2 * k + 1]} !== exp_mem[k]) begin
          failures++; $display("tx word %0d %h%h expected %h", k, txq[2 * k], txq[2 * k + 1], exp_mem[k]);
        end
      end
    @(negedge clk);
    checks++;
    if (n_round_done != 1) begin failures++; $display("round_done %0d", n_round_done); end
  endtask

  initial begin
    n_cfg = '0; tx_sel = 0; rx_valid = 0; rx_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    round(5, 0);
    round(5, 1);
    round(0, 0);
    round(12, 1);
    round(1, 0);
    for (int r = 0; r < 10; r++) round($urandom_range(1, DEPTH), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
