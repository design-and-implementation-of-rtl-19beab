// sync_fifo -- DMA input and output FIFO buffers of the pyramid processor.
//
// The source DMA fills the input FIFO with the 32-bit words of the image
// that the reduction filter then takes apart into pixels; the output FIFO
// collects packed result words for the destination DMA. Both move 16
// pixels (four words) per bus burst, so a depth of eight words lets one
// burst be in flight while the filter works on the previous one. The depth
// and the first-word-fall-through read are this design's own choices.
//
// Interface: push/wdata write when not full; rdata always shows the oldest
// word, pop removes it when not empty. count is the number of words held.
// Pushing into a full FIFO or popping an empty one is an error (asserted).
// Timing: a pushed word can be read in the next cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  assign full  = (count == (AW + 1)'(DEPTH));
  assign empty = (count == '0);
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (pop && !empty) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW + 1)'(push && !full) - (AW + 1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
