// hdec -- horizontal 6-to-5 decimation filter of the pyramid reduction filter.
//
// Shrinks a line by 5/6 with linear interpolation: output k sits at input
// position 1.2*k. Within each group of six inputs x0..x5 the five outputs
// are
//   y0 = x0
//   y1 = (205*x1 + 51*x2) >> 8     y2 = (154*x2 + 102*x3) >> 8
//   y3 = (102*x3 + 154*x4) >> 8    y4 = (51*x4 + 205*x5) >> 8
// The weights of each pair add up to 256, so a flat image stays flat.
//
// Structure (after the horizontal decimation filter of the reduction
// filter): one input register (hd_load[0]) feeds an 8x8 multiplier whose
// other operand is one of the four weights 51/102/154/205 (hd_sel[1:0]).
// The product is added to 0 or to the accumulator (hd_sel[2]); a second
// mux (hd_sel[3]) instead loads the pixel shifted left by 8 (weight 256).
// The 16-bit accumulator (hd_load[1]) is shifted right by 8 for the result.
// The order of the operations, the line handling and the handshakes are
// this design's own choices.
//
// Interface: valid/ready pixel stream in with in_last at the line end;
// valid/ready pixel stream out. A partial group at the line end is cut:
// an output whose right-hand neighbour does not exist is not produced, so
// a line of W inputs gives floor(5*(W-1)/6)+1 outputs. line_done pulses
// once the line's last input has been fully used.
// Timing: an input of phase 0 or 2..5 presents its output 2 cycles after
// it is accepted; the pre-multiply for the next output and the phase
// update take one cycle each after that. At most 5 cycles per input when
// the output is always ready.
module hdec
  import gpp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  input  logic in_last,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix,
  output logic line_done
);

  typedef enum logic [2:0] {S_IN, S_LOAD0, S_MAC, S_MUL, S_OUT, S_END} state_e;
  state_e state;

  pix_t        hd_reg;     // input register
  logic [15:0] acc;        // accumulator, u16
  logic [2:0]  phase;      // position of hd_reg in its group of six
  logic        last;       // hd_reg is the line's last pixel

  logic [1:0] hd_load;
  logic [3:0] hd_sel;

  logic [15:0] prod;
  logic [15:0] acc_in;
  logic [15:0] sum;
  logic [15:0] acc_d;

  always_comb begin
    prod   = 16'(hd_reg) * 16'(dec_coef(hd_sel[1:0]));
    acc_in = hd_sel[2] ? 16'd0 : acc;
    sum    = acc_in + prod;
    acc_d  = hd_sel[3] ? {hd_reg, 8'd0} : sum;
  end

  always_comb begin
    hd_load = 2'b00;
    hd_sel  = 4'b0000;
    hd_load[0] = (state == S_IN) && in_valid;
    case (state)
      S_LOAD0: begin hd_load[1] = 1'b1; hd_sel[3] = 1'b1; end
      // second product of a pair: weight 51,102,154,205 for phase 2..5
      S_MAC: begin hd_load[1] = 1'b1; hd_sel[1:0] = 2'(phase - 3'd2); end
      // first product of the next pair: weight 205,154,102,51 for phase 1..4
      S_MUL: begin hd_load[1] = 1'b1; hd_sel[2] = 1'b1; hd_sel[1:0] = 2'(3'd4 - phase); end
      default: ;
    endcase
  end

  assign in_ready  = (state == S_IN);
  assign out_valid = (state == S_OUT);
  assign out_pix   = acc[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
      hd_reg    <= '0;
      acc       <= '0;
      phase     <= '0;
      last      <= 1'b0;
      line_done <= 1'b0;
    end else begin
      line_done <= 1'b0;
      if (hd_load[0]) hd_reg <= in_pix;
      if (hd_load[1]) acc <= acc_d;
      case (state)
        S_IN: if (in_valid) begin
          last <= in_last;
          unique case (phase)
            3'd0:    state <= S_LOAD0;
            3'd1:    state <= in_last ? S_END : S_MUL;
            default: state <= S_MAC;
          endcase
        end
        S_LOAD0: state <= S_OUT;
        S_MAC:   state <= S_OUT;
        S_MUL:   state <= S_END;
        S_OUT: if (out_ready) begin
          state <= (phase >= 3'd2 && phase <= 3'd4 && !last) ? S_MUL : S_END;
        end
        S_END: begin
          if (last) begin
            phase     <= '0;
            line_done <= 1'b1;
          end else begin
            phase <= (phase == 3'd5) ? 3'd0 : phase + 3'd1;
          end
          state <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end

endmodule
