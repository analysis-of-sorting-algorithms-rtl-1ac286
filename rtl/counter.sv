// counter: loadable up/down counter.
//
// The sorting controllers keep their loop indices (i, j) and the bubble-sort
// pass counter in instances of this block. One operation takes effect per
// clock edge, in priority order: clear, load, increment, decrement. With no
// command the count holds. Asynchronous active-low reset clears it. The count
// wraps modulo 2**W; the controllers never let it wrap.
module counter #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,       // q <= 0
  input  logic         load,      // q <= load_val
  input  logic [W-1:0] load_val,
  input  logic         inc,       // q <= q + 1
  input  logic         dec,       // q <= q - 1
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= load_val;
    else if (inc)  q <= q + W'(1);
    else if (dec)  q <= q - W'(1);
  end

endmodule
