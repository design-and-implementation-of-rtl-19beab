// dst_dma -- AHB master destination DMA of the pyramid processor.
//
// Writes the reduced image from the DMA output FIFO back to external
// memory, 16 pixels (four 32-bit words, one INCR4 burst) at a time. A burst
// starts only when the FIFO already holds all four words, so the master
// never has to stall the bus for data. Bursts follow one another from the
// base address upward until nbursts have been written.
//
// Bus: AMBA AHB-Lite master, word transfers, INCR4 bursts, no bus request.
// The write data of a beat is the FIFO's head word, driven during the
// beat's data phase; the word is popped when the data phase completes
// (hready high). The base address must be 16-byte aligned. Error responses
// are not handled. The bus width, burst type, alignment rule and the
// absence of error handling are this design's own choices; the 16-pixel
// transfer unit is the DMA's.
//
// Interface: start (one cycle, while not busy) with base and nbursts;
// done pulses one cycle after the last data beat.
// Timing: one burst takes 5 cycles without wait states plus one idle cycle
// before the next burst; N bursts take 6N+2 cycles from start to done.
module dst_dma
  import gpp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [31:0]       nbursts,
  output logic              busy,
  output logic              done,
  // output FIFO read side
  input  logic [CW-1:0]     fifo_count,
  input  logic [DATA_W-1:0] fifo_rdata,
  output logic              fifo_pop,
  // AHB-Lite master
  output logic [ADDR_W-1:0] haddr,
  output htrans_e           htrans,
  output logic              hwrite,
  output logic [2:0]        hsize,
  output logic [2:0]        hburst,
  output logic [DATA_W-1:0] hwdata,
  input  logic [DATA_W-1:0] hrdata,
  input  logic              hready,
  input  logic              hresp
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_BURST} state_e;
  state_e state;

  logic [ADDR_W-1:0] baddr;
  logic [31:0]       left;
  logic [2:0]        a_cnt;
  logic [2:0]        d_cnt;
  logic              dphase;

  logic addr_valid;
  assign addr_valid = (state == S_BURST) && (a_cnt < 3'(BURST_BEATS));

  always_comb begin
    htrans = addr_valid ? ((a_cnt == 3'd0) ? HTRANS_NONSEQ : HTRANS_SEQ) : HTRANS_IDLE;
    haddr  = baddr + ADDR_W'({a_cnt[1:0], 2'b00});
    hwrite = 1'b1;
    hsize  = HSIZE_WORD;
    hburst = HBURST_INCR4;
    hwdata = fifo_rdata;
  end

  assign fifo_pop = dphase && hready;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      baddr  <= '0;
      left   <= '0;
      a_cnt  <= '0;
      d_cnt  <= '0;
      dphase <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (hready) begin
        dphase <= addr_valid;
        if (addr_valid) a_cnt <= a_cnt + 3'd1;
        if (dphase) d_cnt <= d_cnt + 3'd1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          baddr <= base;
          left  <= nbursts;
          if (nbursts == 0) done <= 1'b1;
          else state <= S_WAIT;
        end
        S_WAIT: if (32'(fifo_count) >= 32'(BURST_BEATS)) begin
          a_cnt <= '0;
          d_cnt <= '0;
          state <= S_BURST;
        end
        S_BURST: if (hready && dphase && d_cnt == 3'(BURST_BEATS - 1)) begin
          baddr <= baddr + ADDR_W'(BURST_PIX);
          left  <= left - 1;
          if (left == 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AHB: address-phase signals stay put while the slave inserts wait states.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (htrans != HTRANS_IDLE && !hready) |=> ($stable(haddr) && $stable(htrans)));
  // Data is never taken from an empty FIFO.
  a_data: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_pop |-> (fifo_count != '0));

endmodule
