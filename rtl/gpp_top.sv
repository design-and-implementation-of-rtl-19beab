// gpp_top -- Gaussian pyramid processor (GPP).
//
// A bus peripheral that builds a Gaussian image pyramid in external memory.
// Each level is the previous one low-pass filtered with a separable
// [1 2 1]/4 kernel and shrunk by 5/6 in each direction, so a 320 x 240
// source gives 266 x 200, 221 x 166, ... down to 34 x 26 at the 13th level.
//
// Inside:
//   gpp_regs   host registers on the APB (size, addresses, levels, start)
//   gpp_ctrl   level sequencer, one REDUCE step per level
//   src_dma    AHB master, reads the source level in 16-pixel bursts
//   sync_fifo  DMA input FIFO (8 words)
//   prf        pyramid reduction filter: hfir, hdec, vfir, vdec
//   line_mem   line memory A (3 decimated lines) and line memory B (1 line)
//   sync_fifo  DMA output FIFO (8 words)
//   dst_dma    AHB master, writes the reduced level in 16-pixel bursts
//
// Interface: an APB slave for the registers, two AHB-Lite master ports
// (source reads, destination writes) and irq (the sticky done flag). In a
// system with a single AHB the two masters sit behind the bus arbiter.
// Pixels are 8 bits, four to a 32-bit word, the lowest address in the
// lowest byte; an image is stored row after row without gaps.
// MAX_W is the widest image the line memories can hold (640 by default,
// so that 160 x 120, 320 x 240 and 640 x 480 cameras are all served).
module gpp_top
  import gpp_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB slave: registers
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  output logic              irq,
  // AHB-Lite master: source DMA
  output logic [ADDR_W-1:0] src_haddr,
  output htrans_e           src_htrans,
  output logic              src_hwrite,
  output logic [2:0]        src_hsize,
  output logic [2:0]        src_hburst,
  output logic [DATA_W-1:0] src_hwdata,
  input  logic [DATA_W-1:0] src_hrdata,
  input  logic              src_hready,
  input  logic              src_hresp,
  // AHB-Lite master: destination DMA
  output logic [ADDR_W-1:0] dst_haddr,
  output htrans_e           dst_htrans,
  output logic              dst_hwrite,
  output logic [2:0]        dst_hsize,
  output logic [2:0]        dst_hburst,
  output logic [DATA_W-1:0] dst_hwdata,
  input  logic [DATA_W-1:0] dst_hrdata,
  input  logic              dst_hready,
  input  logic              dst_hresp
);

  localparam int unsigned MAX_WO = 32'(reduced_size(dim_t'(MAX_W)));
  localparam int unsigned LMA_DEPTH = 3 * MAX_WO;
  localparam int unsigned LMA_AW = $clog2(LMA_DEPTH);
  localparam int unsigned LMB_AW = (MAX_WO > 1) ? $clog2(MAX_WO) : 1;
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // registers <-> sequencer
  logic              cfg_start, seq_busy, seq_done;
  logic [ADDR_W-1:0] cfg_src, cfg_dst;
  dim_t              cfg_w, cfg_h;
  logic [4:0]        cfg_levels, level_now;

  // sequencer <-> step units
  logic              step_start;
  logic [ADDR_W-1:0] step_src, step_dst;
  dim_t              step_w, step_h;
  logic [31:0]       src_nbursts, dst_nbursts;
  logic              src_done, prf_done, dst_done;
  logic              src_busy, prf_busy, dst_busy;

  // FIFOs
  logic              if_push, if_pop, if_full, if_empty;
  logic [DATA_W-1:0] if_wdata, if_rdata;
  logic [CW-1:0]     if_count;
  logic              of_push, of_pop, of_full, of_empty;
  logic [DATA_W-1:0] of_wdata, of_rdata;
  logic [CW-1:0]     of_count;

  // line memories
  logic              lma_we, lma_re, lmb_we, lmb_re;
  logic [LMA_AW-1:0] lma_waddr, lma_raddr;
  logic [LMB_AW-1:0] lmb_waddr, lmb_raddr;
  pix_t              lma_wdata, lma_rdata, lmb_wdata, lmb_rdata;

  gpp_regs u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .start(cfg_start), .src_base(cfg_src), .dst_base(cfg_dst),
    .width(cfg_w), .height(cfg_h), .levels(cfg_levels),
    .busy(seq_busy), .done(seq_done), .level_now, .irq
  );

  gpp_ctrl u_ctrl (
    .clk, .rst_n,
    .start(cfg_start), .src_base(cfg_src), .dst_base(cfg_dst),
    .width(cfg_w), .height(cfg_h), .levels(cfg_levels),
    .busy(seq_busy), .done(seq_done), .level_now,
    .step_start, .step_src, .step_dst, .step_w, .step_h, .src_nbursts, .dst_nbursts,
    .src_done, .prf_done, .dst_done
  );

  src_dma #(.FIFO_DEPTH(FIFO_DEPTH)) u_src_dma (
    .clk, .rst_n,
    .start(step_start), .base(step_src), .nbursts(src_nbursts),
    .busy(src_busy), .done(src_done),
    .fifo_count(if_count), .fifo_push(if_push), .fifo_wdata(if_wdata),
    .haddr(src_haddr), .htrans(src_htrans), .hwrite(src_hwrite), .hsize(src_hsize),
    .hburst(src_hburst), .hwdata(src_hwdata), .hrdata(src_hrdata),
    .hready(src_hready), .hresp(src_hresp)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push(if_push), .wdata(if_wdata), .full(if_full),
    .pop(if_pop), .rdata(if_rdata), .empty(if_empty), .count(if_count)
  );

  prf #(.MAX_W(MAX_W)) u_prf (
    .clk, .rst_n,
    .start(step_start), .width(step_w), .height(step_h),
    .busy(prf_busy), .done(prf_done),
    .if_rdata, .if_empty, .if_pop,
    .of_wdata, .of_full, .of_push,
    .lma_we, .lma_waddr, .lma_wdata, .lma_re, .lma_raddr, .lma_rdata,
    .lmb_we, .lmb_waddr, .lmb_wdata, .lmb_re, .lmb_raddr, .lmb_rdata
  );

  line_mem #(.DEPTH(LMA_DEPTH), .WIDTH(PIX_W)) u_lma (
    .clk, .we(lma_we), .waddr(lma_waddr), .wdata(lma_wdata),
    .re(lma_re), .raddr(lma_raddr), .rdata(lma_rdata)
  );

  line_mem #(.DEPTH(MAX_WO), .WIDTH(PIX_W)) u_lmb (
    .clk, .we(lmb_we), .waddr(lmb_waddr), .wdata(lmb_wdata),
    .re(lmb_re), .raddr(lmb_raddr), .rdata(lmb_rdata)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .push(of_push), .wdata(of_wdata), .full(of_full),
    .pop(of_pop), .rdata(of_rdata), .empty(of_empty), .count(of_count)
  );

  dst_dma #(.FIFO_DEPTH(FIFO_DEPTH)) u_dst_dma (
    .clk, .rst_n,
    .start(step_start), .base(step_dst), .nbursts(dst_nbursts),
    .busy(dst_busy), .done(dst_done),
    .fifo_count(of_count), .fifo_rdata(of_rdata), .fifo_pop(of_pop),
    .haddr(dst_haddr), .htrans(dst_htrans), .hwrite(dst_hwrite), .hsize(dst_hsize),
    .hburst(dst_hburst), .hwdata(dst_hwdata), .hrdata(dst_hrdata),
    .hready(dst_hready), .hresp(dst_hresp)
  );

  // a step's units only work while the sequencer does, and every word
  // pushed into a FIFO lands
  a_units_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !seq_busy |-> !(src_busy || prf_busy || dst_busy));
  a_in_room: assert property (@(posedge clk) disable iff (!rst_n) if_push |-> !if_full);
  a_out_data: assert property (@(posedge clk) disable iff (!rst_n) of_pop |-> !of_empty);

endmodule
