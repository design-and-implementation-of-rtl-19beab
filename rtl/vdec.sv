// vdec -- vertical 6-to-5 decimation filter of the pyramid reduction filter.
//
// Shrinks the image height by 5/6 with linear interpolation between two
// vertically filtered rows: row k of the output sits at input row 1.2*k.
// For each column it combines the pixel of the previous filtered row
// (kept in line memory B) with the pixel of the current filtered row
// (straight from the vertical FIR). By the phase p = r mod 6 of the current
// row r:
//   p = 0: out = cur                      p = 1: no output
//   p = 2: (205*prev +  51*cur) >> 8      p = 3: (154*prev + 102*cur) >> 8
//   p = 4: (102*prev + 154*cur) >> 8      p = 5: ( 51*prev + 205*cur) >> 8
//
// Structure (after the vertical decimation filter of the reduction
// filter): a register (vd_load[0]) holds the pixel read from line memory B;
// a mux (vd_sel[0]) picks it or the current FIR result as the multiplier
// operand; the weight is one of 51/102/154/205 (vd_sel[2:1]); the adder
// adds the product to 0 or to the accumulator (vd_sel[3]); a mux
// (vd_sel[4]) instead loads the operand shifted left by 8. The 16-bit
// accumulator (vd_load[1]) is shifted right by 8. The sequencing and the
// handshakes are this design's own choices.
//
// Interface: prev_load strobes prev_pix (line memory B read data) into the
// register. cur_valid starts one column with cur_pix and phase; cur_pix
// must hold until done. The result leaves on a valid/ready stream; done
// pulses when the column is finished, whether or not it gave an output.
// Timing: phase 0 presents its output 2 cycles after cur_valid, phases 2..5
// after 3 cycles; done follows the accepted output by one cycle, and comes
// 1 cycle after cur_valid for phase 1.
module vdec
  import gpp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prev_load,
  input  pix_t       prev_pix,
  input  logic       cur_valid,
  input  pix_t       cur_pix,
  input  logic [2:0] phase,
  output logic       cur_ready,
  output logic       out_valid,
  input  logic       out_ready,
  output pix_t       out_pix,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD0, S_MUL, S_MAC, S_OUT, S_DONE} state_e;
  state_e state;

  pix_t        vd_reg;
  logic [15:0] acc;        // accumulator, u16
  logic [2:0]  ph;         // phase of the column in progress

  logic [1:0] vd_load;
  logic [4:0] vd_sel;

  pix_t        opnd;
  logic [15:0] prod;
  logic [15:0] sum;

  always_comb begin
    vd_load = 2'b00;
    vd_sel  = 5'b00000;
    vd_load[0] = prev_load;
    case (state)
      S_LOAD0: begin vd_load[1] = 1'b1; vd_sel[0] = 1'b1; vd_sel[4] = 1'b1; end
      // prev weight: 205, 154, 102, 51 for phase 2..5
      S_MUL: begin vd_load[1] = 1'b1; vd_sel[3] = 1'b1; vd_sel[2:1] = 2'(3'd5 - ph); end
      // cur weight: 51, 102, 154, 205 for phase 2..5
      S_MAC: begin vd_load[1] = 1'b1; vd_sel[0] = 1'b1; vd_sel[2:1] = 2'(ph - 3'd2); end
      default: ;
    endcase
  end

  always_comb begin
    opnd = vd_sel[0] ? cur_pix : vd_reg;
    prod = 16'(opnd) * 16'(dec_coef(vd_sel[2:1]));
    sum  = (vd_sel[3] ? 16'd0 : acc) + prod;
  end

  assign cur_ready = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_pix   = acc[15:8];
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      vd_reg <= '0;
      acc    <= '0;
      ph     <= '0;
    end else begin
      if (vd_load[0]) vd_reg <= prev_pix;
      if (vd_load[1]) acc <= vd_sel[4] ? {opnd, 8'd0} : sum;
      case (state)
        S_IDLE: if (cur_valid) begin
          ph <= phase;
          unique case (phase)
            3'd0:    state <= S_LOAD0;
            3'd1:    state <= S_DONE;
            default: state <= S_MUL;
          endcase
        end
        S_LOAD0: state <= S_OUT;
        S_MUL:   state <= S_MAC;
        S_MAC:   state <= S_OUT;
        S_OUT:   if (out_ready) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
