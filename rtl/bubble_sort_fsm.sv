// bubble_sort_fsm: in-place sorter following the bubble-sort algorithm.
//
// After start the controller sets i = 0, j = 1 and a pass counter to n. In a
// pass it reads Regi = Ram(i) and Regj = Ram(j) for each adjacent pair,
// swaps the two words in memory when Regj < Regi, and steps i and j by one
// until j reaches n-1. The pass counter then counts down and a new pass
// starts at i = 0, j = 1, until the counter reaches zero: n passes in all, as
// the algorithm prescribes (the last one finds nothing to swap). The indices
// and the pass counter are counter instances; "Regj < Regi", "j+1 < n" and
// "passes left > 1" are comparator instances.
//
// The memory port is single and asynchronous-read (see sort_ram). Reading
// both words afresh for every pair follows the algorithm as written.
//
// Timing, counted from the cycle after start is seen to the done pulse
// inclusive (the cycles in which busy is high):
//   1 + n*(n-1)*3 + 2*(number of swaps)
// i.e. three cycles per comparison (read i, read j, compare), two more per
// swap, and one for the done state. With n < 2 the sort takes one cycle.
// Interface: start is a one-cycle request ignored while busy; n is the number
// of words to sort (2..DEPTH); done pulses for one cycle at the end.
module bubble_sort_fsm #(
  parameter int unsigned DEPTH  = 40,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  parameter int unsigned CNT_W  = (DEPTH < 2) ? 1 : $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  n,
  output logic              busy,
  output logic              done,
  output logic              swap,      // high in the first cycle of each swap
  // memory port
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD_I, S_RD_J, S_CMP, S_WR_I, S_WR_J, S_DONE} state_t;

  state_t            state;
  logic [DATA_W-1:0] regi, regj;
  logic [CNT_W-1:0]  i, j, passes;
  logic [CNT_W-1:0]  n_q;

  logic ij_clr, ij_inc, j_one, p_load, p_dec;

  counter #(.W(CNT_W)) u_cnt_i (
    .clk, .rst_n, .clr(ij_clr), .load(1'b0), .load_val('0),
    .inc(ij_inc), .dec(1'b0), .q(i)
  );
  counter #(.W(CNT_W)) u_cnt_j (
    .clk, .rst_n, .clr(1'b0), .load(j_one), .load_val(CNT_W'(1)),
    .inc(ij_inc), .dec(1'b0), .q(j)
  );
  counter #(.W(CNT_W)) u_cnt_pass (
    .clk, .rst_n, .clr(1'b0), .load(p_load), .load_val(n),
    .inc(1'b0), .dec(p_dec), .q(passes)
  );

  logic data_lt, j_more, p_more;
  logic unused_gt0, unused_eq0, unused_gt1, unused_eq1, unused_lt2, unused_eq2;

  comparator #(.W(DATA_W)) u_cmp_data (
    .a(regj), .b(regi), .gt(unused_gt0), .eq(unused_eq0), .lt(data_lt)
  );
  comparator #(.W(CNT_W + 1)) u_cmp_j (
    .a({1'b0, j} + (CNT_W + 1)'(1)), .b({1'b0, n_q}),
    .gt(unused_gt1), .eq(unused_eq1), .lt(j_more)
  );
  comparator #(.W(CNT_W)) u_cmp_pass (
    .a(passes), .b(CNT_W'(1)),
    .gt(p_more), .eq(unused_eq2), .lt(unused_lt2)
  );

  state_t adv_state;
  always_comb begin
    if (j_more)      adv_state = S_RD_I;
    else if (p_more) adv_state = S_RD_I;
    else             adv_state = S_DONE;
  end

  // one pair finished: step along the pass, or start the next pass
  logic adv;
  always_comb begin
    adv       = 1'b0;
    ij_clr    = 1'b0;
    ij_inc    = 1'b0;
    j_one     = 1'b0;
    p_load    = 1'b0;
    p_dec     = 1'b0;
    mem_addr  = '0;
    mem_we    = 1'b0;
    mem_wdata = regj;
    unique case (state)
      S_IDLE: if (start) begin ij_clr = 1'b1; j_one = 1'b1; p_load = 1'b1; end
      S_RD_I: mem_addr = ADDR_W'(i);
      S_RD_J: mem_addr = ADDR_W'(j);
      S_CMP:  adv = !data_lt;
      S_WR_I: begin mem_addr = ADDR_W'(i); mem_we = 1'b1; mem_wdata = regj; end
      S_WR_J: begin mem_addr = ADDR_W'(j); mem_we = 1'b1; mem_wdata = regi; adv = 1'b1; end
      default: ;
    endcase
    if (adv) begin
      if (j_more) ij_inc = 1'b1;
      else begin
        p_dec  = 1'b1;
        ij_clr = 1'b1;
        j_one  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      regi  <= '0;
      regj  <= '0;
      n_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
                  n_q   <= n;
                  state <= (n < CNT_W'(2)) ? S_DONE : S_RD_I;
                end
        S_RD_I: begin regi <= mem_rdata; state <= S_RD_J; end
        S_RD_J: begin regj <= mem_rdata; state <= S_CMP; end
        S_CMP:  state <= data_lt ? S_WR_I : adv_state;
        S_WR_I: state <= S_WR_J;
        S_WR_J: state <= adv_state;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign swap = (state == S_WR_I);

  property p_addr_in_range;
    @(posedge clk) disable iff (!rst_n)
      (state inside {S_RD_I, S_RD_J, S_WR_I, S_WR_J}) |-> (32'(mem_addr) < 32'(n_q));
  endproperty
  a_addr_in_range: assert property (p_addr_in_range);

endmodule
