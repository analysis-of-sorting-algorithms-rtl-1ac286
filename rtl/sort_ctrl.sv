// sort_ctrl: main controller of the sorting system.
//
// It runs the round the system is built for: receive, sort, send.
//   RECV  Bytes from the serial receiver are gathered into readings of
//         DATA_W bits, most significant byte first. Each complete reading
//         is written at the next address of both memories at once (one per
//         sorter, so both sorters can work on the same data at the same
//         time). When n_cfg readings are stored the round moves on. n_cfg is
//         sampled at the first byte of a round; 0 or more than DEPTH means
//         DEPTH.
//   START One-cycle start pulse to both sorters together; their run-time
//         counters are cleared.
//   SORT  While a sorter is busy its run-time counter counts clock cycles.
//         The controller waits until both have finished. In this state the
//         sorters own the memory ports (sorting is high).
//   SEND  The sorted readings of the memory chosen by tx_sel (0: insertion
//         sorter, 1: bubble sorter, sampled on entry) are sent out through
//         the serial transmitter, most significant byte first, address 0
//         first. Then round_done pulses and a new round begins.
// The byte order, the separate memory per sorter, the run-time counters and
// sending the result back are this design's own choices.
module sort_ctrl #(
  parameter int unsigned DEPTH  = 40,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  parameter int unsigned CNT_W  = (DEPTH < 2) ? 1 : $clog2(DEPTH + 1),
  parameter int unsigned TIME_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  n_cfg,
  input  logic              tx_sel,
  // serial receiver
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  // serial transmitter
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  // memory side (used while sorting is low)
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] ins_rdata,
  input  logic [DATA_W-1:0] bub_rdata,
  // sorters
  output logic              sort_start,
  output logic [CNT_W-1:0]  sort_n,
  output logic              sorting,
  input  logic              ins_busy,
  input  logic              ins_done,
  input  logic              bub_busy,
  input  logic              bub_done,
  // status
  output logic [TIME_W-1:0] ins_cycles,
  output logic [TIME_W-1:0] bub_cycles,
  output logic              round_done
);

  localparam int unsigned NB = DATA_W / 8;                 // bytes per reading
  localparam int unsigned BW = (NB < 2) ? 1 : $clog2(NB);

  typedef enum logic [1:0] {S_RECV, S_START, S_SORT, S_SEND} state_t;

  state_t            state;
  logic [CNT_W-1:0]  n_q;
  logic [CNT_W-1:0]  widx;       // reading index (receive and send)
  logic [BW-1:0]     bidx;       // byte index within a reading
  logic [DATA_W-1:0] word;       // reading being assembled
  logic              wr_pend;    // a complete reading waits to be written
  logic              ins_fin, bub_fin;
  logic              sel_q;

  // effective number of readings for a new round
  logic [CNT_W-1:0] n_eff;
  always_comb begin
    if (n_cfg == '0 || 32'(n_cfg) > DEPTH) n_eff = CNT_W'(DEPTH);
    else                                   n_eff = n_cfg;
  end

  logic [DATA_W-1:0] rd_word;
  assign rd_word = sel_q ? bub_rdata : ins_rdata;

  always_comb begin
    mem_we    = wr_pend;
    mem_wdata = word;
    mem_addr  = ADDR_W'(widx);
    tx_valid  = (state == S_SEND);
    tx_data   = rd_word[DATA_W - 1 - 8 * int'(bidx) -: 8];
  end

  assign sort_start = (state == S_START);
  assign sort_n     = n_q;
  assign sorting    = (state == S_START) || (state == S_SORT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RECV;
      n_q        <= CNT_W'(DEPTH);
      widx       <= '0;
      bidx       <= '0;
      word       <= '0;
      wr_pend    <= 1'b0;
      ins_fin    <= 1'b0;
      bub_fin    <= 1'b0;
      sel_q      <= 1'b0;
      ins_cycles <= '0;
      bub_cycles <= '0;
      round_done <= 1'b0;
    end else begin
      round_done <= 1'b0;
      unique case (state)
        S_RECV: begin
          if (wr_pend) begin
            // the reading is written this cycle
            wr_pend <= 1'b0;
            if (widx + CNT_W'(1) == n_q) begin
              widx  <= '0;
              state <= S_START;
            end else widx <= widx + CNT_W'(1);
          end else if (rx_valid) begin
            if (widx == '0 && bidx == '0) n_q <= n_eff;
            word <= DATA_W'({word, rx_data});   // shift in, MSB first
            if (32'(bidx) == NB - 1) begin
              bidx    <= '0;
              wr_pend <= 1'b1;
            end else bidx <= bidx + BW'(1);
          end
        end
        S_START: begin
          ins_cycles <= '0;
          bub_cycles <= '0;
          ins_fin    <= 1'b0;
          bub_fin    <= 1'b0;
          state      <= S_SORT;
        end
        S_SORT: begin
          if (ins_busy) ins_cycles <= ins_cycles + TIME_W'(1);
          if (bub_busy) bub_cycles <= bub_cycles + TIME_W'(1);
          if (ins_done) ins_fin <= 1'b1;
          if (bub_done) bub_fin <= 1'b1;
          if ((ins_fin || ins_done) && (bub_fin || bub_done)) begin
            sel_q <= tx_sel;
            widx  <= '0;
            bidx  <= '0;
            state <= S_SEND;
          end
        end
        S_SEND: begin
          if (tx_ready) begin
            if (32'(bidx) == NB - 1) begin
              bidx <= '0;
              if (widx + CNT_W'(1) == n_q) begin
                widx       <= '0;
                round_done <= 1'b1;
                state      <= S_RECV;
              end else widx <= widx + CNT_W'(1);
            end else bidx <= bidx + BW'(1);
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

  // a reading must never be written while the sorters own the memories
  a_no_write_while_sorting: assert property (@(posedge clk) disable iff (!rst_n)
    sorting |-> !mem_we);

endmodule
