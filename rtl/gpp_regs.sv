// gpp_regs -- host interface registers of the Gaussian pyramid processor.
//
// The host processor sets up a pyramid and starts it through these
// registers on the APB peripheral bus. It gives the source image's base
// address and size, the base address of the first reduced level and the
// number of pyramid levels. It then writes 1 to CTRL.start and polls
// STATUS, or waits for irq. Images of different sizes and pyramids of
// different depths need no change to the hardware.
//
// Register map (byte offsets, 32-bit registers, see gpp_pkg):
//   0x00 CTRL    [0] start: write 1 to start (ignored while busy)
//   0x04 STATUS  [0] busy  [1] done, sticky, write 1 to clear
//                [12:8] pyramid levels finished so far, the source included
//   0x08 SRC     source image base address (16-byte aligned)
//   0x0C DST     base address of the first reduced level (16-byte aligned);
//                every level follows the previous one, rounded up to 16 bytes
//   0x10 SIZE    [11:0] width, [27:16] height of the source image
//   0x14 LEVELS  [4:0] number of pyramid levels, the source included
// After reset SIZE is 320 x 240 and LEVELS is 13. irq is the done flag.
// The APB attachment, the register map and the reset values are this
// design's own choices.
//
// Timing: APB without wait states (pready is always 1, pslverr always 0);
// start pulses for one cycle after the access phase of the CTRL write.
module gpp_regs
  import gpp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // APB slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // to and from the level sequencer
  output logic              start,
  output logic [ADDR_W-1:0] src_base,
  output logic [ADDR_W-1:0] dst_base,
  output dim_t              width,
  output dim_t              height,
  output logic [4:0]        levels,
  input  logic              busy,
  input  logic              done,
  input  logic [4:0]        level_now,
  output logic              irq
);

  logic done_flag;
  logic wr;

  assign wr      = psel && penable && pwrite;
  assign pready  = 1'b1;
  assign pslverr = 1'b0;
  assign irq     = done_flag;

  always_comb begin
    unique case (paddr)
      REG_STATUS: prdata = {19'd0, level_now, 6'd0, done_flag, busy};
      REG_SRC:    prdata = src_base;
      REG_DST:    prdata = dst_base;
      REG_SIZE:   prdata = {4'd0, height, 4'd0, width};
      REG_LEVELS: prdata = {27'd0, levels};
      default:    prdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      src_base  <= '0;
      dst_base  <= '0;
      width     <= dim_t'(320);
      height    <= dim_t'(240);
      levels    <= 5'd13;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (wr) begin
        unique case (paddr)
          REG_CTRL: if (pwdata[0] && !busy) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
          REG_STATUS: if (pwdata[1]) done_flag <= 1'b0;
          REG_SRC:    src_base <= pwdata;
          REG_DST:    dst_base <= pwdata;
          REG_SIZE: begin
            width  <= pwdata[11:0];
            height <= pwdata[27:16];
          end
          REG_LEVELS: levels <= pwdata[4:0];
          default: ;
        endcase
      end
    end
  end

endmodule
