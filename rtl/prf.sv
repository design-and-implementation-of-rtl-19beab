// prf -- pyramid reduction filter: data and control path of one REDUCE step.
//
// Turns one image of W x H pixels, arriving as packed 32-bit words from the
// DMA input FIFO, into the image of the next pyramid level, about 5/6 of
// the size in each direction, leaving as packed words in the DMA output
// FIFO. The 2-D low-pass filter is split into two 1-D passes:
//
//  1. Horizontal pass, one line at a time: the words are taken apart into
//     pixels (lowest byte first), filtered by hfir ([1 2 1]/4), shrunk
//     6-to-5 by hdec and written into line memory A. Line memory A is a
//     ring of three lines.
//  2. Vertical pass: as soon as lines r-1, r and r+1 are in line memory A,
//     row r is filtered column by column. For each column the three pixels
//     are read into vfir, and the previous filtered row's pixel is read
//     from line memory B into vdec. vdec then interpolates between that
//     pixel and vfir's result, and the result is written back into line
//     memory B for the next row. vdec's output is packed four pixels per
//     word into the output FIFO.
//
// The two passes alternate: one line in, then one row out. A line never
// overwrites a line that the vertical pass still needs. At the image
// edges the edge line is used again in place of the missing neighbour. The
// output is padded with zero pixels to a whole 16-pixel burst. Input words
// beyond the image (the source DMA reads whole bursts) are read and
// dropped. The order of passes, the edge rule and the padding are this
// design's own choices; the filter chain follows the reduction filter.
//
// Interface: start (one cycle, while not busy) with width and height
// (1..MAX_W, 1..4095); done pulses once the whole level is in the output
// FIFO and the input is drained. FIFO and line-memory ports connect to
// sync_fifo and line_mem instances.
// Timing: about 5 cycles per input pixel in the horizontal pass and about
// 10 cycles per pixel of a decimated line in the vertical pass.
module prf
  import gpp_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  localparam int unsigned MAX_WO = 32'(reduced_size(dim_t'(MAX_W))),
  localparam int unsigned LMA_DEPTH = 3 * MAX_WO,
  localparam int unsigned LMA_AW = $clog2(LMA_DEPTH),
  localparam int unsigned LMB_AW = (MAX_WO > 1) ? $clog2(MAX_WO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dim_t              width,
  input  dim_t              height,
  output logic              busy,
  output logic              done,
  // DMA input FIFO
  input  logic [DATA_W-1:0] if_rdata,
  input  logic              if_empty,
  output logic              if_pop,
  // DMA output FIFO
  output logic [DATA_W-1:0] of_wdata,
  input  logic              of_full,
  output logic              of_push,
  // line memory A
  output logic              lma_we,
  output logic [LMA_AW-1:0] lma_waddr,
  output pix_t              lma_wdata,
  output logic              lma_re,
  output logic [LMA_AW-1:0] lma_raddr,
  input  pix_t              lma_rdata,
  // line memory B
  output logic              lmb_we,
  output logic [LMB_AW-1:0] lmb_waddr,
  output pix_t              lmb_wdata,
  output logic              lmb_re,
  output logic [LMB_AW-1:0] lmb_raddr,
  input  pix_t              lmb_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_H, S_VCOL, S_VWAIT, S_PAD, S_FIN} state_e;
  state_e state;

  // image geometry of this level
  dim_t w, h, wo;
  logic [31:0] pix_total, words_total;

  // horizontal pass
  logic [31:0] px_cnt, words_popped;
  logic [1:0]  bi;              // byte of the head word to take next
  dim_t        x_in;            // pixels of the current line taken
  dim_t        xo;              // outputs of the current line written
  dim_t        rows_in;         // lines complete in line memory A
  logic [1:0]  slot_in;         // ring slot of the line being written

  // vertical pass
  dim_t        r;               // row being filtered
  logic [1:0]  slot_r;          // ring slot of row r
  logic [2:0]  phase_r;         // r mod 6
  dim_t        j;               // column
  logic [1:0]  cc;              // read step within a column
  logic        lma_re_q, lmb_re_q;

  // output packing
  logic [23:0] pk_word;
  logic [1:0]  pk_bi;
  logic [3:0]  pk_cnt16;        // output pixels mod 16

  // filter chain
  logic hf_in_valid, hf_in_ready, hf_in_last;
  pix_t hf_in_pix;
  logic hf_out_valid, hf_out_ready, hf_out_last;
  pix_t hf_out_pix;
  logic hd_out_valid, hd_line_done;
  pix_t hd_out_pix;
  logic vf_out_valid;
  pix_t vf_out_pix;
  logic vd_cur_valid, vd_cur_ready, vd_out_valid, vd_out_ready, vd_done;
  pix_t vd_out_pix;

  hfir u_hfir (
    .clk, .rst_n,
    .in_valid(hf_in_valid), .in_ready(hf_in_ready), .in_pix(hf_in_pix), .in_last(hf_in_last),
    .out_valid(hf_out_valid), .out_ready(hf_out_ready), .out_pix(hf_out_pix), .out_last(hf_out_last)
  );

  hdec u_hdec (
    .clk, .rst_n,
    .in_valid(hf_out_valid), .in_ready(hf_out_ready), .in_pix(hf_out_pix), .in_last(hf_out_last),
    .out_valid(hd_out_valid), .out_ready(1'b1), .out_pix(hd_out_pix), .line_done(hd_line_done)
  );

  vfir u_vfir (
    .clk, .rst_n,
    .in_valid(lma_re_q), .in_pix(lma_rdata),
    .out_valid(vf_out_valid), .out_pix(vf_out_pix)
  );

  vdec u_vdec (
    .clk, .rst_n,
    .prev_load(lmb_re_q), .prev_pix(lmb_rdata),
    .cur_valid(vd_cur_valid), .cur_pix(vf_out_pix), .phase(phase_r), .cur_ready(vd_cur_ready),
    .out_valid(vd_out_valid), .out_ready(vd_out_ready), .out_pix(vd_out_pix), .done(vd_done)
  );

  function automatic logic [1:0] slot_prev(input logic [1:0] s);
    return (s == 2'd0) ? 2'd2 : s - 2'd1;
  endfunction
  function automatic logic [1:0] slot_next(input logic [1:0] s);
    return (s == 2'd2) ? 2'd0 : s + 2'd1;
  endfunction
  function automatic logic [LMA_AW-1:0] lma_addr(input logic [1:0] s, input dim_t col);
    return LMA_AW'(s) * LMA_AW'(MAX_WO) + LMA_AW'(col);
  endfunction

  // ---- horizontal pass: unpack, filter, decimate, store in line memory A
  logic hf_take, drain_pop;
  always_comb begin
    hf_in_valid = (state == S_H) && (x_in < w) && !if_empty;
    hf_in_pix   = if_rdata[8*bi +: 8];
    hf_in_last  = (x_in == w - 1'b1);
    hf_take     = hf_in_valid && hf_in_ready;
    drain_pop   = (px_cnt == pix_total) && (words_popped < words_total) && !if_empty
                  && (state != S_IDLE);
    if_pop      = (hf_take && (bi == 2'd3 || px_cnt == pix_total - 1)) || drain_pop;
  end

  assign lma_we    = hd_out_valid;
  assign lma_waddr = lma_addr(slot_in, xo);
  assign lma_wdata = hd_out_pix;

  // ---- vertical pass: three reads of line memory A and one of B per column
  logic [1:0] rd_slot;
  always_comb begin
    unique case (cc)
      2'd0:    rd_slot = (r == 0) ? slot_r : slot_prev(slot_r);
      2'd1:    rd_slot = slot_r;
      default: rd_slot = (r == h - 1'b1) ? slot_r : slot_next(slot_r);
    endcase
    lma_re    = (state == S_VCOL) && (cc != 2'd3);
    lma_raddr = lma_addr(rd_slot, j);
    lmb_re    = (state == S_VCOL) && (cc == 2'd0);
    lmb_raddr = LMB_AW'(j);
    vd_cur_valid = (state == S_VWAIT) && vf_out_valid;
    lmb_we    = vd_cur_valid;
    lmb_waddr = LMB_AW'(j);
    lmb_wdata = vf_out_pix;
  end

  // ---- output packing, with zero padding to a whole burst at the end
  logic pk_valid, pk_take;
  pix_t pk_pix;
  always_comb begin
    pk_valid     = (state == S_PAD) ? (pk_cnt16 != 4'd0) : vd_out_valid;
    pk_pix       = (state == S_PAD) ? '0 : vd_out_pix;
    pk_take      = pk_valid && !(pk_bi == 2'd3 && of_full);
    vd_out_ready = (state != S_PAD) && !(pk_bi == 2'd3 && of_full);
    of_push      = pk_take && (pk_bi == 2'd3);
    of_wdata     = {pk_pix, pk_word};
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0;
      w <= '0; h <= '0; wo <= '0;
      pix_total <= '0; words_total <= '0;
      px_cnt <= '0; words_popped <= '0; bi <= '0;
      x_in <= '0; xo <= '0; rows_in <= '0; slot_in <= '0;
      r <= '0; slot_r <= '0; phase_r <= '0; j <= '0; cc <= '0;
      lma_re_q <= 1'b0; lmb_re_q <= 1'b0;
      pk_word <= '0; pk_bi <= '0; pk_cnt16 <= '0;
    end else begin
      done     <= 1'b0;
      lma_re_q <= lma_re;
      lmb_re_q <= lmb_re;

      if (if_pop) words_popped <= words_popped + 1;
      if (hf_take) begin
        px_cnt <= px_cnt + 1;
        bi     <= bi + 2'd1;
        x_in   <= x_in + 1'b1;
      end
      if (hd_out_valid) xo <= xo + 1'b1;

      if (pk_take) begin
        pk_bi    <= pk_bi + 2'd1;
        pk_cnt16 <= pk_cnt16 + 4'd1;
        unique case (pk_bi)
          2'd0: pk_word[7:0]   <= pk_pix;
          2'd1: pk_word[15:8]  <= pk_pix;
          2'd2: pk_word[23:16] <= pk_pix;
          default: ;
        endcase
      end

      unique case (state)
        S_IDLE: if (start) begin
          w <= width;
          h <= height;
          wo <= reduced_size(width);
          pix_total <= 32'(width) * 32'(height);
          words_total <= level_bytes(width, height) >> 2;
          px_cnt <= '0; words_popped <= '0; bi <= '0;
          x_in <= '0; xo <= '0; rows_in <= '0; slot_in <= '0;
          r <= '0; slot_r <= '0; phase_r <= '0; j <= '0; cc <= '0;
          pk_bi <= '0; pk_cnt16 <= '0;
          state <= S_H;
        end
        S_H: if (hd_line_done) begin
          x_in    <= '0;
          xo      <= '0;
          rows_in <= rows_in + 1'b1;
          slot_in <= slot_next(slot_in);
          // row r can be filtered once row r+1 is in, or at the last row
          if (r < rows_in || rows_in + 1'b1 == h) begin
            state <= S_VCOL;
            j <= '0;
            cc <= '0;
          end
        end
        S_VCOL: begin
          cc <= cc + 2'd1;
          if (cc == 2'd3) state <= S_VWAIT;
        end
        S_VWAIT: if (vd_done) begin
          cc <= '0;
          if (j == wo - 1'b1) begin
            j       <= '0;
            r       <= r + 1'b1;
            slot_r  <= slot_next(slot_r);
            phase_r <= (phase_r == 3'd5) ? 3'd0 : phase_r + 3'd1;
            if (r == h - 1'b1) state <= S_PAD;
            else if (rows_in == h) state <= S_VCOL;
            else state <= S_H;
          end else begin
            j     <= j + 1'b1;
            state <= S_VCOL;
          end
        end
        S_PAD: if (pk_cnt16 == 4'd0 && !pk_take) state <= S_FIN;
        S_FIN: if (words_popped == words_total) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // vdec must be idle whenever vfir hands it a column.
  a_vdec_ready: assert property (@(posedge clk) disable iff (!rst_n)
    vd_cur_valid |-> vd_cur_ready);

  // The line memory A ring must never overwrite a line still needed.
  a_ring_safe: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_H) |-> (rows_in <= r + 1'b1));

endmodule
