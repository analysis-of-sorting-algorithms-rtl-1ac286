// tb_co2_sort_top: end-to-end test of the whole sorting system at its
// default parameters (40 readings of 16 bits, 50 MHz clock, 115200 baud).
// The testbench plays the radio receiver: it sends each round's readings as
// 8N1 serial bytes, most significant byte first, on uart_rxd, and decodes
// uart_txd. Each round checks that the readings come back sorted (from the
// sorter chosen by tx_sel) and that the run times reported for the insertion
// and bubble sorters equal the cycle counts of reference models of both
// algorithms; it also prints them in microseconds at 50 MHz.
// Mechanisms that must each happen at least once, else a failure is counted:
// swaps by each sorter, both sorters busy in the same cycle, a byte with a
// bad stop bit (flagged and dropped), result read back from each sorter, and
// a round with fewer readings than the memory holds (n_cfg below 40).
module tb_co2_sort_top;
  localparam int unsigned N = 40;
  localparam int unsigned CPB = 50_000_000 / 115_200;
  localparam int unsigned DW = 16;
  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [5:0] n_cfg;
  logic tx_sel;
  logic [31:0] ins_cycles, bub_cycles;
  logic sorting, round_done, rx_frame_err;
  int checks = 0, failures = 0;

  co2_sort_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  // mechanism counters
  int m_ins_swap = 0, m_bub_swap = 0, m_overlap = 0, m_frame_err = 0;
  int m_sel_ins = 0, m_sel_bub = 0, m_partial = 0, m_rounds = 0;
  always @(posedge clk) begin
    if (dut.u_ins.swap) m_ins_swap++;
    if (dut.u_bub.swap) m_bub_swap++;
    if (dut.u_ins.busy && dut.u_bub.busy) m_overlap++;
    if (rx_frame_err) m_frame_err++;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial receiver model on uart_txd
  logic [7:0] rxq [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (uart_txd !== 1'b0) continue;
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      if (uart_txd !== 1'b1) begin failures++; $display("bad stop bit from DUT"); end
      rxq.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b, input logic stop);
    @(negedge clk);
    uart_rxd = 0; repeat (CPB) @(negedge clk);
    for (int k = 0; k < 8; k++) begin uart_rxd = b[k]; repeat (CPB) @(negedge clk); end
    uart_rxd = stop; repeat (CPB) @(negedge clk);
    uart_rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  // cycle models of the two sorters (see the sorter headers)
  function automatic int ins_model(input logic [DW-1:0] d [N], input int n);
    logic [DW-1:0] a [N];
    logic [DW-1:0] t;
    int c = 1;
    a = d;
    for (int i = 0; i + 1 < n; i++) begin
      c += 1;
      for (int j = i + 1; j < n; j++) begin
        c += 2;
        if (a[j] < a[i]) begin t = a[i]; a[i] = a[j]; a[j] = t; c += 2; end
      end
    end
    return c;
  endfunction

  function automatic int bub_model(input logic [DW-1:0] d [N], input int n);
    logic [DW-1:0] a [N];
    logic [DW-1:0] t;
    int c = 1;
    a = d;
    if (n >= 2)
      for (int p = 0; p < n; p++)
        for (int i = 0; i + 1 < n; i++) begin
          c += 3;
          if (a[i + 1] < a[i]) begin t = a[i]; a[i] = a[i + 1]; a[i + 1] = t; c += 2; end
        end
    return c;
  endfunction

  task automatic round(input int cfg, input bit sel, input bit inject_err, input int kind);
    logic [DW-1:0] d [N];
    logic [DW-1:0] s [N];
    logic [DW-1:0] t;
    int n, exp_i, exp_b;
    n = (cfg == 0 || cfg > N) ? N : cfg;
    n_cfg = 6'(cfg); tx_sel = sel;
    for (int k = 0; k < N; k++) d[k] = '0;
    for (int k = 0; k < n; k++)
      d[k] = (kind == 0) ? DW'($urandom_range(350, 5000))    // CO2 in ppm
                         : DW'($urandom_range(400, 404));    // many equal readings
    rxq.delete();
    for (int k = 0; k < n; k++) begin
      send_byte(d[k][15:8], 1'b1);
      if (inject_err && k == n / 2) send_byte(8'h3C, 1'b0);  // corrupted frame
      send_byte(d[k][7:0], 1'b1);
    end
    while (!round_done) @(posedge clk);
    m_rounds++;
    if (sel) m_sel_bub++; else m_sel_ins++;
    if (n < N) m_partial++;
    exp_i = ins_model(d, n);
    exp_b = bub_model(d, n);
    $display("round %0d: n=%0d insertion %0d cycles (%0.2f us), bubble %0d cycles (%0.2f us)",
             m_rounds, n, ins_cycles, real'(ins_cycles) / 50.0, bub_cycles, real'(bub_cycles) / 50.0);
    checks++;
    if (ins_cycles != 32'(exp_i)) begin failures++; $display("insertion cycles expected %0d", exp_i); end
    checks++;
    if (bub_cycles != 32'(exp_b)) begin failures++; $display("bubble cycles expected %0d", exp_b); end
    // wait for the receiver model to finish the last byte
    repeat (12 * CPB) @(posedge clk);
    s = d;
    for (int a = 0; a < n; a++)
      for (int b = a + 1; b < n; b++)
        if (s[b] < s[a]) begin t = s[a]; s[a] = s[b]; s[b] = t; end
    checks++;
    if (rxq.size() != 2 * n) begin failures++; $display("received %0d bytes, expected %0d", rxq.size(), 2 * n); end
    else
      for (int k = 0; k < n; k++) begin
        checks++;
        if ({rxq[2 * k], rxq[2 * k + 1]} !== s[k]) begin
          failures++;
          if (failures < 10) $display("word %0d: %h%h expected %h", k, rxq[2 * k], rxq[2 * k + 1], s[k]);
        end
      end
  endtask

  initial begin
    n_cfg = '0; tx_sel = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    round(40, 0, 0, 0);     // full network, insertion result
    round(10, 1, 1, 0);     // 10 sensors, bubble result, one corrupted byte
    round(0, 1, 0, 1);      // n_cfg = 0 means all 40, repeated values
    checks++; if (m_ins_swap == 0)  begin failures++; $display("no insertion swap"); end
    checks++; if (m_bub_swap == 0)  begin failures++; $display("no bubble swap"); end
    checks++; if (m_overlap == 0)   begin failures++; $display("sorters never ran together"); end
    checks++; if (m_frame_err == 0) begin failures++; $display("no framing error seen"); end
    checks++; if (m_sel_ins == 0 || m_sel_bub == 0) begin failures++; $display("a result path unused"); end
    checks++; if (m_partial == 0)   begin failures++; $display("no partial round"); end
    $display("mechanisms: ins swaps %0d, bub swaps %0d, overlap cycles %0d, frame errors %0d, rounds %0d (ins %0d, bub %0d, partial %0d)",
             m_ins_swap, m_bub_swap, m_overlap, m_frame_err, m_rounds, m_sel_ins, m_sel_bub, m_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
