// tb_bubble_sort_fsm: self-checking test of the bubble sorter.
// The sorter is connected to a sort_ram; the testbench loads the memory
// while the sorter is idle, starts it, and when done pulses checks that the
// memory holds the input in ascending order, that the number of busy cycles
// and of swaps equal those of a reference model of the bubble sort of Algorithm 2, and that
// done pulses exactly once. Data sets: random, sorted, reversed, all equal,
// few distinct values, and sizes 1, 2, 10, 20, 28 and DEPTH.
module tb_bubble_sort_fsm;
  localparam int unsigned DEPTH = 40, DW = 16, AW = 6, CW = 6;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [CW-1:0] n;
  logic busy, done, swap;
  logic [AW-1:0] s_addr, t_addr, addr;
  logic s_we, t_we, we;
  logic [DW-1:0] s_wdata, t_wdata, wdata, rdata;
  int checks = 0, failures = 0;

  bubble_sort_fsm #(.DEPTH(DEPTH), .DATA_W(DW)) dut (
    .clk, .rst_n, .start, .n, .busy, .done, .swap,
    .mem_addr(s_addr), .mem_we(s_we), .mem_wdata(s_wdata), .mem_rdata(rdata)
  );

  always_comb begin
    addr  = busy ? s_addr  : t_addr;
    we    = busy ? s_we    : t_we;
    wdata = busy ? s_wdata : t_wdata;
  end

  sort_ram #(.DEPTH(DEPTH), .DATA_W(DW)) u_ram (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  int busy_cnt, done_cnt, swap_cnt;
  always @(posedge clk) begin
    if (busy) busy_cnt++;
    if (done) done_cnt++;
    if (swap) swap_cnt++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_a [DEPTH];

  task automatic run(input int nn, input int kind);
    logic [DW-1:0] tmp;
    int cyc_exp, swaps_exp;
    int n_;
    n_ = nn;
    swaps_exp = 0;
    for (int k = 0; k < n_; k++) begin
      unique case (kind)
        0: ref_a[k] = DW'($urandom);
        1: ref_a[k] = DW'(k * 3);
        2: ref_a[k] = DW'(1000 - k);
        3: ref_a[k] = 16'h1234;
        default: ref_a[k] = DW'($urandom_range(0, 3));
      endcase
    end
    // load memory (sorter idle, testbench owns the port)
    for (int k = 0; k < n_; k++) begin
      @(negedge clk); t_addr = AW'(k); t_we = 1; t_wdata = ref_a[k];
    end
    @(negedge clk); t_we = 0;
    begin : model
      int n;
      n = n_;
      // reference: bubble sort of Algorithm 2 (n passes), counting cycles
      cyc_exp = 1;
      if (n >= 2)
        for (int p = 0; p < n; p++)
          for (int i = 0; i + 1 < n; i++) begin
            cyc_exp += 3;
            if (ref_a[i + 1] < ref_a[i]) begin
              tmp = ref_a[i]; ref_a[i] = ref_a[i + 1]; ref_a[i + 1] = tmp;
              cyc_exp += 2; swaps_exp++;
            end
          end
    end
    busy_cnt = 0; done_cnt = 0; swap_cnt = 0;
    n = CW'(n_); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy_cnt != cyc_exp) begin
      failures++; $display("n=%0d kind=%0d: %0d cycles, expected %0d", n_, kind, busy_cnt, cyc_exp);
    end
    checks++;
    if (swap_cnt != swaps_exp) begin
      failures++; $display("n=%0d kind=%0d: %0d swaps, expected %0d", n_, kind, swap_cnt, swaps_exp);
    end
    checks++;
    if (done_cnt != 1 || busy) begin failures++; $display("done pulsed %0d times", done_cnt); end
    for (int k = 0; k < n_; k++) begin
      t_addr = AW'(k); #1;
      checks++;
      if (rdata !== ref_a[k]) begin
        failures++;
        if (failures < 10) $display("n=%0d kind=%0d: mem[%0d]=%0d expected %0d", n_, kind, k, rdata, ref_a[k]);
      end
      if (k > 0) begin
        checks++;
        if (ref_a[k] < ref_a[k - 1]) begin failures++; $display("reference not sorted"); end
      end
    end
  endtask

  initial begin
    start = 0; n = '0; t_addr = '0; t_we = 0; t_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(1, 0);
    run(2, 0); run(2, 2);
    run(10, 0); run(20, 0); run(28, 0); run(40, 0);
    for (int kind = 1; kind < 5; kind++) run(DEPTH, kind);
    for (int r = 0; r < 30; r++) run($urandom_range(2, DEPTH), $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
