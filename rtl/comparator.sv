// comparator: unsigned magnitude comparator.
//
// Purely combinational. Exactly one of gt, eq and lt is high: a > b, a == b
// or a < b. The sorters use it both to compare two readings from memory and
// to test whether a loop counter has reached its limit.
module comparator #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq,
  output logic         lt
);

  always_comb begin
    gt = (a > b);
    eq = (a == b);
    lt = (a < b);
  end

endmodule
