// co2_sort_top: programmable-logic top of the CO2 sensor sorting system.
//
// Readings from the sensor network arrive on one serial line (uart_rxd) from
// the radio receiver module. The main controller (sort_ctrl) stores each
// reading in two memories at the same address, one per sorter. When a round
// of n_cfg readings is stored, it starts the insertion sorter and the bubble
// sorter in the same cycle; each sorts its own memory in place and its run
// time in clock cycles is captured in ins_cycles / bub_cycles (divide by the
// clock frequency in MHz for microseconds). The sorted readings of the memory
// chosen by tx_sel are then sent back on uart_txd, and round_done pulses.
//
// Memory port ownership: while `sorting` is high each memory is driven by its
// sorter, otherwise by the controller (writes while receiving, reads while
// sending). Readings are DATA_W bits, sent as DATA_W/8 bytes, most
// significant first, 8N1 framing at BAUD. rx_frame_err pulses for a received
// byte whose stop bit was low; such a byte is dropped.
// The structure (controller, memory, two sorters side by side) follows the
// architecture of the design; the serial framing, widths, the memory per
// sorter and the cycle counters are this design's own choices.
module co2_sort_top
  import sort_pkg::*;
#(
  parameter int unsigned N_MAX   = sort_pkg::N_SENSORS,
  parameter int unsigned D_W     = sort_pkg::DATA_W,
  parameter int unsigned CLK_FREQ = sort_pkg::CLK_HZ,
  parameter int unsigned BAUD_RATE = sort_pkg::BAUD,
  parameter int unsigned CNT_W   = sort_pkg::cnt_width(N_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             uart_rxd,
  output logic             uart_txd,
  input  logic [CNT_W-1:0] n_cfg,        // readings per round, 0 = N_MAX
  input  logic             tx_sel,       // 0: send insertion result, 1: bubble
  output logic [31:0]      ins_cycles,
  output logic [31:0]      bub_cycles,
  output logic             sorting,
  output logic             round_done,
  output logic             rx_frame_err
);

  localparam int unsigned ADDR_W       = sort_pkg::addr_width(N_MAX);
  localparam int unsigned CLKS_PER_BIT = CLK_FREQ / BAUD_RATE;

  // serial link
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid),
    .frame_err(rx_frame_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready),
    .txd(uart_txd)
  );

  // controller
  logic [ADDR_W-1:0] c_addr;
  logic              c_we;
  logic [D_W-1:0]    c_wdata;
  logic [D_W-1:0]    ins_rdata, bub_rdata;
  logic              sort_start;
  logic [CNT_W-1:0]  sort_n;
  logic              ins_busy, ins_done, ins_swap;
  logic              bub_busy, bub_done, bub_swap;

  sort_ctrl #(.DEPTH(N_MAX), .DATA_W(D_W), .TIME_W(32)) u_ctrl (
    .clk, .rst_n, .n_cfg, .tx_sel,
    .rx_valid, .rx_data,
    .tx_valid, .tx_data, .tx_ready,
    .mem_addr(c_addr), .mem_we(c_we), .mem_wdata(c_wdata),
    .ins_rdata, .bub_rdata,
    .sort_start, .sort_n, .sorting,
    .ins_busy, .ins_done, .bub_busy, .bub_done,
    .ins_cycles, .bub_cycles, .round_done
  );

  // insertion sorter and its memory
  logic [ADDR_W-1:0] is_addr, im_addr;
  logic              is_we, im_we;
  logic [D_W-1:0]    is_wdata, im_wdata;

  insertion_sort_fsm #(.DEPTH(N_MAX), .DATA_W(D_W)) u_ins (
    .clk, .rst_n, .start(sort_start), .n(sort_n),
    .busy(ins_busy), .done(ins_done), .swap(ins_swap),
    .mem_addr(is_addr), .mem_we(is_we), .mem_wdata(is_wdata),
    .mem_rdata(ins_rdata)
  );

  always_comb begin
    im_addr  = sorting ? is_addr  : c_addr;
    im_we    = sorting ? is_we    : c_we;
    im_wdata = sorting ? is_wdata : c_wdata;
  end

  sort_ram #(.DEPTH(N_MAX), .DATA_W(D_W)) u_ins_ram (
    .clk, .addr(im_addr), .we(im_we), .wdata(im_wdata), .rdata(ins_rdata)
  );

  // bubble sorter and its memory
  logic [ADDR_W-1:0] bs_addr, bm_addr;
  logic              bs_we, bm_we;
  logic [D_W-1:0]    bs_wdata, bm_wdata;

  bubble_sort_fsm #(.DEPTH(N_MAX), .DATA_W(D_W)) u_bub (
    .clk, .rst_n, .start(sort_start), .n(sort_n),
    .busy(bub_busy), .done(bub_done), .swap(bub_swap),
    .mem_addr(bs_addr), .mem_we(bs_we), .mem_wdata(bs_wdata),
    .mem_rdata(bub_rdata)
  );

  always_comb begin
    bm_addr  = sorting ? bs_addr  : c_addr;
    bm_we    = sorting ? bs_we    : c_we;
    bm_wdata = sorting ? bs_wdata : c_wdata;
  end

  sort_ram #(.DEPTH(N_MAX), .DATA_W(D_W)) u_bub_ram (
    .clk, .addr(bm_addr), .we(bm_we), .wdata(bm_wdata), .rdata(bub_rdata)
  );

  // the swap strobes are observed by testbenches through hierarchy only
  logic unused_swaps;
  assign unused_swaps = ins_swap ^ bub_swap;

endmodule
