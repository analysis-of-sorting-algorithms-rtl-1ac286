// tb_workloads: runs the network sizes evaluated for the design through the
// whole system and reports the sorters' run times.
// Sizes: 10, 20, 28 and 40 sensors (one round each, random CO2 readings in
// ppm) and 250 readings, the largest structure for which resources are
// compared. To hold 250 readings the top is built with N_MAX = 250, and the
// serial link runs at 5 Mbaud to keep the simulation short; neither changes
// the sorters' cycle counts, which depend only on the number of readings and
// their order. Each round checks the returned data is sorted and that both
// run times equal the cycle models of the two algorithms, and prints the
// times in microseconds at 50 MHz, with the ratio bubble/insertion.
module tb_workloads;
  localparam int unsigned NMAX = 250;
  localparam int unsigned CPB = 50_000_000 / 5_000_000;
  localparam int unsigned DW = 16;
  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [7:0] n_cfg;
  logic tx_sel;
  logic [31:0] ins_cycles, bub_cycles;
  logic sorting, round_done, rx_frame_err;
  int checks = 0, failures = 0;

  co2_sort_top #(.N_MAX(NMAX), .BAUD_RATE(5_000_000)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] rxq [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (uart_txd !== 1'b0) continue;
      for (int k = 0; k < 8; k++) begin repeat (CPB) @(posedge clk); b[k] = uart_txd; end
      repeat (CPB) @(posedge clk);
      rxq.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk);
    uart_rxd = 0; repeat (CPB) @(negedge clk);
    for (int k = 0; k < 8; k++) begin uart_rxd = b[k]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  task automatic run(input int n);
    logic [DW-1:0] a [NMAX];
    logic [DW-1:0] t;
    int ci, cb;
    for (int k = 0; k < n; k++) a[k] = DW'($urandom_range(350, 5000));
    n_cfg = 8'(n); tx_sel = 1'($urandom);
    rxq.delete();
    for (int k = 0; k < n; k++) begin send_byte(a[k][15:8]); send_byte(a[k][7:0]); end
    while (!round_done) @(posedge clk);
    repeat (12 * CPB) @(posedge clk);
    // models (both also sort the local copy)
    begin
      logic [DW-1:0] b [NMAX];
      b = a;
      ci = 1;
      for (int i = 0; i + 1 < n; i++) begin
        ci += 1;
        for (int j = i + 1; j < n; j++) begin
          ci += 2;
          if (b[j] < b[i]) begin t = b[i]; b[i] = b[j]; b[j] = t; ci += 2; end
        end
      end
      cb = 1;
      for (int p = 0; p < n; p++)
        for (int i = 0; i + 1 < n; i++) begin
          cb += 3;
          if (a[i + 1] < a[i]) begin t = a[i]; a[i] = a[i + 1]; a[i + 1] = t; cb += 2; end
        end
    end
    $display("n=%0d: insertion %0d cycles = %0.2f us, bubble %0d cycles = %0.2f us, ratio %0.2f",
             n, ins_cycles, real'(ins_cycles) / 50.0, bub_cycles, real'(bub_cycles) / 50.0,
             real'(bub_cycles) / real'(ins_cycles));
    checks++; if (ins_cycles != 32'(ci)) begin failures++; $display("insertion model %0d", ci); end
    checks++; if (bub_cycles != 32'(cb)) begin failures++; $display("bubble model %0d", cb); end
    checks++;
    if (rxq.size() != 2 * n) begin failures++; $display("received %0d bytes", rxq.size()); end
    else for (int k = 0; k < n; k++) begin
      checks++;
      if ({rxq[2 * k], rxq[2 * k + 1]} !== a[k]) begin failures++; if (failures < 10) $display("n=%0d word %0d wrong", n, k); end
    end
  endtask

  initial begin
    n_cfg = '0; tx_sel = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run(10); run(20); run(28); run(40); run(250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
