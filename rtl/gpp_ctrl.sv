// gpp_ctrl -- level sequencer of the Gaussian pyramid processor.
//
// Builds a pyramid of LEVELS levels, the source image counting as the first,
// by running one REDUCE step per further level: g[l] = REDUCE(g[l-1]). For
// each step it starts the source DMA, the reduction filter and the
// destination DMA together, and waits until all three report done. The
// level just written then becomes the next step's source. Each level is
// stored right after the previous one, rounded up to a whole 16-byte
// burst. Running the level loop in hardware, rather than from the host, is
// this design's own choice; with LEVELS = 2 the host can still drive every
// step itself.
//
// Interface: start (one cycle) with the values of gpp_regs; busy while
// working; done pulses after the last level is in memory. level_now counts
// the levels finished, the source included. Per step it gives the
// addresses, the size and the burst counts to prf, src_dma and dst_dma;
// step_start pulses for one cycle at the beginning of each step.
// Timing: one cycle between the done of a step and the start of the next.
module gpp_ctrl
  import gpp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] src_base,
  input  logic [ADDR_W-1:0] dst_base,
  input  dim_t              width,
  input  dim_t              height,
  input  logic [4:0]        levels,
  output logic              busy,
  output logic              done,
  output logic [4:0]        level_now,
  // per-step commands
  output logic              step_start,
  output logic [ADDR_W-1:0] step_src,
  output logic [ADDR_W-1:0] step_dst,
  output dim_t              step_w,
  output dim_t              step_h,
  output logic [31:0]       src_nbursts,
  output logic [31:0]       dst_nbursts,
  input  logic              src_done,
  input  logic              prf_done,
  input  logic              dst_done
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} state_e;
  state_e state;

  logic [4:0] target;
  logic got_src, got_prf, got_dst;
  dim_t wo, ho;

  always_comb begin
    wo          = reduced_size(step_w);
    ho          = reduced_size(step_h);
    src_nbursts = level_bytes(step_w, step_h) >> 4;
    dst_nbursts = level_bytes(wo, ho) >> 4;
    step_start  = (state == S_START);
    busy        = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0;
      level_now <= '0;
      target <= '0;
      step_src <= '0;
      step_dst <= '0;
      step_w <= '0;
      step_h <= '0;
      got_src <= 1'b0;
      got_prf <= 1'b0;
      got_dst <= 1'b0;
    end else begin
      done <= 1'b0;
      if (src_done) got_src <= 1'b1;
      if (prf_done) got_prf <= 1'b1;
      if (dst_done) got_dst <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          step_src  <= src_base;
          step_dst  <= dst_base;
          step_w    <= width;
          step_h    <= height;
          target    <= levels;
          level_now <= 5'd1;
          if (levels <= 5'd1 || width == '0 || height == '0) done <= 1'b1;
          else state <= S_START;
        end
        S_START: begin
          got_src <= 1'b0;
          got_prf <= 1'b0;
          got_dst <= 1'b0;
          state   <= S_RUN;
        end
        S_RUN: if (got_src && got_prf && got_dst) begin
          level_now <= level_now + 5'd1;
          step_src  <= step_dst;
          step_dst  <= step_dst + level_bytes(wo, ho);
          step_w    <= wo;
          step_h    <= ho;
          if (level_now + 5'd1 == target) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
