// gpp_pkg -- shared constants and types of the Gaussian pyramid processor.
//
// The processor builds an image pyramid in which every level is a low-pass
// filtered copy of the previous one, shrunk by 5/6 in each direction.
// This package holds what several modules share:
//  * pixel and dimension widths,
//  * the four interpolation weights of the 6-to-5 decimation filters
//    (51, 102, 154 and 205 out of 256, i.e. 0.2, 0.4, 0.6 and 0.8),
//  * the AMBA AHB transfer encodings used by the two DMA masters,
//  * the register map of the host (APB) interface,
//  * the function that gives the size of a reduced image.
// The weights are the ones of the decimation filters; the widths, the
// register map and the output-size rule are this design's own choices.
package gpp_pkg;

  localparam int unsigned PIX_W = 8;    // pixel width (u8 in the datapath)
  localparam int unsigned DIM_W = 12;   // width of an image dimension
  localparam int unsigned ADDR_W = 32;  // AHB address width
  localparam int unsigned DATA_W = 32;  // AHB data width
  localparam int unsigned PIX_PER_WORD = DATA_W / PIX_W;  // 4
  localparam int unsigned BURST_PIX = 16;                 // pixels per DMA burst
  localparam int unsigned BURST_BEATS = BURST_PIX / PIX_PER_WORD;  // 4 (INCR4)

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [DIM_W-1:0] dim_t;

  // Interpolation weights of the 6-to-5 decimation filters, indexed by the
  // two-bit coefficient select: 51, 102, 154, 205 (x/256).
  function automatic logic [7:0] dec_coef(input logic [1:0] idx);
    case (idx)
      2'd0: return 8'd51;
      2'd1: return 8'd102;
      2'd2: return 8'd154;
      default: return 8'd205;
    endcase
  endfunction

  // Size of a reduced line: output k sits at input position 1.2*k and is
  // produced only when every input it needs exists, giving
  // floor(5*(n-1)/6)+1 outputs for n inputs (n >= 1).
  function automatic dim_t reduced_size(input dim_t n);
    logic [DIM_W+2:0] t;
    t = (DIM_W + 3)'(n - 1) * 5;
    return dim_t'(t / (DIM_W + 3)'(6) + (DIM_W + 3)'(1));
  endfunction

  // AHB transfer type and burst encodings.
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic [2:0] HBURST_INCR4 = 3'b011;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // Host register map (byte offsets on the APB).
  localparam logic [7:0] REG_CTRL   = 8'h00;  // [0] start (write 1), reads 0
  localparam logic [7:0] REG_STATUS = 8'h04;  // [0] busy, [1] done (sticky, write 1 clears)
  localparam logic [7:0] REG_SRC    = 8'h08;  // source image base address
  localparam logic [7:0] REG_DST    = 8'h0C;  // base address of the first reduced level
  localparam logic [7:0] REG_SIZE   = 8'h10;  // [11:0] width, [27:16] height
  localparam logic [7:0] REG_LEVELS = 8'h14;  // [4:0] pyramid levels, source included

  // Bytes one level occupies in memory: rounded up to whole 16-pixel bursts.
  function automatic logic [ADDR_W-1:0] level_bytes(input dim_t w, input dim_t h);
    logic [ADDR_W-1:0] n;
    n = ADDR_W'(w) * ADDR_W'(h);
    return (n + ADDR_W'(BURST_PIX - 1)) & ~ADDR_W'(BURST_PIX - 1);
  endfunction

endpackage
