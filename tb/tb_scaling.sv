// tb_scaling: both sorters on a large network, side by side, without the
// serial link. Each sorter has its own memory of NS words, both loaded with
// the same random readings by the testbench; both are started in the same
// cycle. At the end the testbench checks both memories are sorted, that the
// run times equal the cycle models of the two algorithms, and prints them
// in seconds at 50 MHz. NS = 5000 keeps the run near one minute; with
// NS = 10000 (AW = CW = 14), the largest network whose run time the
// evaluation extrapolates, it passes in about three minutes of simulation.
module tb_scaling;
  localparam int unsigned NS = 5000, DW = 16, AW = 13, CW = 13;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [CW-1:0] n;
  logic ib, id, isw, bb, bd, bsw;
  logic [AW-1:0] ia, ba, ta;
  logic iwe, bwe, twe;
  logic [DW-1:0] iwd, bwd, twd, ird, brd;
  int checks = 0, failures = 0;

  insertion_sort_fsm #(.DEPTH(NS), .DATA_W(DW)) u_ins (
    .clk, .rst_n, .start, .n, .busy(ib), .done(id), .swap(isw),
    .mem_addr(ia), .mem_we(iwe), .mem_wdata(iwd), .mem_rdata(ird));
  bubble_sort_fsm #(.DEPTH(NS), .DATA_W(DW)) u_bub (
    .clk, .rst_n, .start, .n, .busy(bb), .done(bd), .swap(bsw),
    .mem_addr(ba), .mem_we(bwe), .mem_wdata(bwd), .mem_rdata(brd));
  sort_ram #(.DEPTH(NS), .DATA_W(DW)) u_iram (
    .clk, .addr(ib ? ia : ta), .we(ib ? iwe : twe), .wdata(ib ? iwd : twd), .rdata(ird));
  sort_ram #(.DEPTH(NS), .DATA_W(DW)) u_bram (
    .clk, .addr(bb ? ba : ta), .we(bb ? bwe : twe), .wdata(bb ? bwd : twd), .rdata(brd));

  always #10 clk = ~clk;

  longint unsigned icyc = 0, bcyc = 0, iswaps = 0, bswaps = 0;
  always @(posedge clk) begin
    if (ib) icyc++;
    if (bb) bcyc++;
    if (isw) iswaps++;
    if (bsw) bswaps++;
  end

  initial begin
    repeat (600_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] a [NS];
  initial begin
    longint unsigned inv, ci, cb;
    start = 0; n = CW'(NS); ta = '0; twe = 0; twd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      a[k] = DW'($urandom_range(350, 5000));
      @(negedge clk); ta = AW'(k); twe = 1; twd = a[k];
    end
    @(negedge clk); twe = 0;
    icyc = 0; bcyc = 0; iswaps = 0; bswaps = 0;
    start = 1; @(negedge clk); start = 0;
    fork
      begin while (!id) @(negedge clk); end
      begin while (!bd) @(negedge clk); end
    join
    @(negedge clk);
    // bubble sort swaps exactly once per inversion of the input
    inv = 0;
    for (int i = 0; i < NS; i++)
      for (int j = i + 1; j < NS; j++)
        if (a[j] < a[i]) inv++;
    cb = 1 + 3 * longint'(NS) * (NS - 1) + 2 * inv;
    ci = 1 + (NS - 1) + longint'(NS) * (NS - 1) + 2 * iswaps;
    $display("n=%0d: insertion %0d cycles (%0d swaps) = %0.3f s, bubble %0d cycles (%0d swaps, %0d inversions) = %0.3f s",
             NS, icyc, iswaps, real'(icyc) / 50.0e6, bcyc, bswaps, inv, real'(bcyc) / 50.0e6);
    checks++; if (bcyc != cb || bswaps != inv) begin failures++; $display("bubble model %0d", cb); end
    checks++; if (icyc != ci) begin failures++; $display("insertion cycle model %0d", ci); end
    a.sort();
    for (int k = 0; k < NS; k++) begin
      ta = AW'(k); #1;
      checks++;
      if (ird !== a[k] || brd !== a[k]) begin
        failures++; if (failures < 10) $display("word %0d: %0d / %0d expected %0d", k, ird, brd, a[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
