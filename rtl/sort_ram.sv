// sort_ram: single-port buffer memory for the sensor readings.
//
// Modelled as distributed (LUT) memory: the write is synchronous, the read is
// asynchronous, so rdata shows mem[addr] in the same cycle the address is
// applied. One port serves both writes and reads; the sorter that owns the
// memory reads one word per cycle and writes one word per cycle. Contents are
// not reset: every word is written before it is read.
module sort_ram #(
  parameter int unsigned DEPTH  = 40,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(addr) < DEPTH)) mem[addr] <= wdata;
  end

  assign rdata = (32'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
