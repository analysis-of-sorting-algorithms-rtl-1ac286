// uart_rx: serial receiver, 8 data bits, no parity, one stop bit (8N1).
//
// The line is passed through a two-flop synchroniser. A falling edge starts
// a frame; the start bit is re-checked at its middle, then each data bit is
// sampled at its middle, least significant bit first, CLKS_PER_BIT clock
// cycles apart. At the middle of the stop bit the byte is delivered: valid is
// high for one cycle with the byte on data. If the stop bit was low,
// frame_err is high instead and valid stays low, so the byte is dropped; the
// receiver then waits for the line to go high before it looks for the next
// start bit. A glitch shorter than half a bit on an idle
// line is ignored.
// Baud rate, framing and the error flag are this design's own choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {IDLE, START, BITS, STOP, BREAK} state_t;

  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      tick      <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          tick <= '0;
          if (!line) state <= START;
        end
        START: begin
          if (32'(tick) == CLKS_PER_BIT / 2 - 1) begin
            tick  <= '0;
            bitn  <= '0;
            state <= line ? IDLE : BITS;   // false start: back to idle
          end else tick <= tick + CW'(1);
        end
        BITS: begin
          if (32'(tick) == CLKS_PER_BIT - 1) begin
            tick  <= '0;
            shreg <= {line, shreg[7:1]};
            bitn  <= bitn + 3'd1;
            if (bitn == 3'd7) state <= STOP;
          end else tick <= tick + CW'(1);
        end
        STOP: begin
          if (32'(tick) == CLKS_PER_BIT - 1) begin
            tick      <= '0;
            data      <= shreg;
            valid     <= line;
            frame_err <= !line;
            state     <= line ? IDLE : BREAK;
          end else tick <= tick + CW'(1);
        end
        BREAK: if (line) state <= IDLE;   // wait for the line to return high
        default: state <= IDLE;
      endcase
    end
  end

endmodule
