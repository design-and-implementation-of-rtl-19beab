// line_mem -- working line memory of the pyramid reduction filter.
//
// Two of these sit beside the reduction filter: line memory A keeps the
// last three horizontally filtered and decimated lines for the vertical
// FIR, line memory B keeps the previous vertically filtered line for the
// vertical decimation. Each is a simple dual-port RAM: one write port and
// one read port, both on the same clock, so the filter can store a result
// and fetch a neighbour in the same cycle. Sizes and the port arrangement
// are this design's own choices; the memory is written as an array so a
// synthesis tool can map it to block RAM.
//
// Interface: we/waddr/wdata write on the rising edge; re/raddr read with
// one cycle of latency, rdata then holds until the next read. Reading an
// address in the same cycle it is written returns the old contents.
module line_mem #(
  parameter int unsigned DEPTH = 533,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
