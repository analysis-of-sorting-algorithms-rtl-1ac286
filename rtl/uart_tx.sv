// uart_tx: serial transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// Handshake: a byte is taken when valid and ready are both high at a clock
// edge. ready is high only while the transmitter is idle. The frame is one
// low start bit, eight data bits least significant first and one high stop
// bit, each CLKS_PER_BIT clock cycles long; txd rises to idle at the end of
// the stop bit and ready returns high in the next cycle. txd idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] tick;
  logic [3:0]    bitn;    // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]    frame;
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      tick  <= '0;
      bitn  <= '0;
      frame <= '1;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        frame <= {1'b1, data, 1'b0};
        txd   <= 1'b0;
        busy  <= 1'b1;
        tick  <= '0;
        bitn  <= '0;
      end
    end else begin
      if (32'(tick) == CLKS_PER_BIT - 1) begin
        tick <= '0;
        if (bitn == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bitn <= bitn + 4'd1;
          txd  <= frame[bitn + 4'd1];
        end
      end else tick <= tick + CW'(1);
    end
  end

endmodule
