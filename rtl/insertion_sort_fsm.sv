// insertion_sort_fsm: in-place sorter following the "insertion" algorithm.
//
// For every position i from 0 to n-2 the controller holds Regi = Ram(i) and
// walks j from i+1 to n-1. For each j it reads Regj = Ram(j); if Regj < Regi
// the two words are swapped in memory, and the smaller value becomes the new
// Regi. Position i then holds the minimum of positions i..n-1, and the array
// ends up in ascending order. The two loop indices are counter instances, and
// the tests "Regj < Regi", "j+1 < n" and "i+2 < n" are comparator instances.
//
// The memory port is single and asynchronous-read (see sort_ram): one read or
// one write per cycle. Updating Regi after a swap is this design's reading of
// the algorithm; without it the inner loop would compare against a stale copy.
//
// Timing, counted from the cycle after start is seen to the done pulse
// inclusive (the cycles in which busy is high):
//   1 + sum over i of ( 1 + sum over j of ( 2 + 2*swap(i,j) ) )
// i.e. one cycle to read Regi, two per comparison, two more per swap, and
// one for the done state. With n < 2 the sort takes one cycle.
// Interface: start is a one-cycle request ignored while busy; n is the number
// of words to sort (2..DEPTH); done pulses for one cycle at the end.
module insertion_sort_fsm #(
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
  logic [CNT_W-1:0]  i, j;
  logic [CNT_W-1:0]  n_q;

  // counter controls
  logic i_clr, i_inc, j_load, j_inc;

  counter #(.W(CNT_W)) u_cnt_i (
    .clk, .rst_n, .clr(i_clr), .load(1'b0), .load_val('0),
    .inc(i_inc), .dec(1'b0), .q(i)
  );
  counter #(.W(CNT_W)) u_cnt_j (
    .clk, .rst_n, .clr(1'b0), .load(j_load), .load_val(i + CNT_W'(1)),
    .inc(j_inc), .dec(1'b0), .q(j)
  );

  // comparators
  logic data_lt, j_more, i_more;
  logic unused_gt0, unused_eq0, unused_gt1, unused_eq1, unused_gt2, unused_eq2;

  comparator #(.W(DATA_W)) u_cmp_data (
    .a(regj), .b(regi), .gt(unused_gt0), .eq(unused_eq0), .lt(data_lt)
  );
  comparator #(.W(CNT_W + 1)) u_cmp_j (
    .a({1'b0, j} + (CNT_W + 1)'(1)), .b({1'b0, n_q}),
    .gt(unused_gt1), .eq(unused_eq1), .lt(j_more)
  );
  comparator #(.W(CNT_W + 1)) u_cmp_i (
    .a({1'b0, i} + (CNT_W + 1)'(2)), .b({1'b0, n_q}),
    .gt(unused_gt2), .eq(unused_eq2), .lt(i_more)
  );

  // next step after a comparison (with or without swap)
  state_t adv_state;
  always_comb begin
    if (j_more)      adv_state = S_RD_J;
    else if (i_more) adv_state = S_RD_I;
    else             adv_state = S_DONE;
  end

  // datapath controls and memory port
  always_comb begin
    i_clr     = 1'b0;
    i_inc     = 1'b0;
    j_load    = 1'b0;
    j_inc     = 1'b0;
    mem_addr  = '0;
    mem_we    = 1'b0;
    mem_wdata = regj;
    unique case (state)
      S_IDLE: i_clr = start;
      S_RD_I: begin mem_addr = ADDR_W'(i); j_load = 1'b1; end
      S_RD_J: mem_addr = ADDR_W'(j);
      S_CMP:  if (!data_lt) begin
                j_inc = j_more;
                i_inc = !j_more && i_more;
              end
      S_WR_I: begin mem_addr = ADDR_W'(i); mem_we = 1'b1; mem_wdata = regj; end
      S_WR_J: begin
                mem_addr = ADDR_W'(j); mem_we = 1'b1; mem_wdata = regi;
                j_inc = j_more;
                i_inc = !j_more && i_more;
              end
      default: ;
    endcase
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
        S_WR_J: begin regi <= regj; state <= adv_state; end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign swap = (state == S_WR_I);

  // memory accesses stay inside the words being sorted
  property p_addr_in_range;
    @(posedge clk) disable iff (!rst_n)
      (state inside {S_RD_I, S_RD_J, S_WR_I, S_WR_J}) |-> (32'(mem_addr) < 32'(n_q));
  endproperty
  a_addr_in_range: assert property (p_addr_in_range);

endmodule
