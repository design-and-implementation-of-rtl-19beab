// vfir -- vertical 3-tap low-pass FIR filter of the pyramid reduction filter.
//
// For one column it takes the three pixels of rows r-1, r and r+1, read
// one after the other from line memory A, and computes
// (p[r-1] + 2*p[r] + p[r+1]) >> 2, the [1 2 1]/4 kernel.
//
// Structure (after the vertical FIR of the reduction filter): a register
// (v_load[0]) takes the pixel read from line memory A; an optional x2
// (v_sel[1]) doubles the centre tap; one adder adds it to 0 or to the
// accumulator (v_sel[2]); the 10-bit accumulator (v_load[1]) is shifted
// right by 2. The edge rows (r-1 or r+1 outside the image) are handled by
// the caller, which then reads the edge row twice. The tap counting and
// the handshake are this design's own choices.
//
// Interface: in_valid marks a pixel of the column, in the order r-1, r,
// r+1; a new pixel may come every cycle. out_valid pulses for one cycle
// with the result on out_pix. out_pix then holds its value until the first
// tap of the next column has been accumulated, so a consumer may read it
// for several cycles.
// Timing: out_valid comes 2 cycles after the third tap's in_valid.
module vfir
  import gpp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output logic out_valid,
  output pix_t out_pix
);

  pix_t       v_reg;
  logic [9:0] acc;          // accumulator, u10
  logic [1:0] tap_in;       // tap index of the next input
  logic       reg_valid;    // v_reg holds a tap not yet accumulated
  logic [1:0] reg_tap;      // tap index of v_reg

  logic [1:0] v_load;
  logic [2:1] v_sel;

  logic [8:0] tap_x;
  logic [9:0] acc_in;

  always_comb begin
    v_load[0] = in_valid;
    v_load[1] = reg_valid;
    v_sel[1]  = (reg_tap == 2'd1);   // double the centre row
    v_sel[2]  = (reg_tap == 2'd0);   // start a new sum
    tap_x     = v_sel[1] ? {v_reg, 1'b0} : {1'b0, v_reg};
    acc_in    = v_sel[2] ? 10'd0 : acc;
  end

  assign out_pix = acc[9:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_reg     <= '0;
      acc       <= '0;
      tap_in    <= '0;
      reg_valid <= 1'b0;
      reg_tap   <= '0;
      out_valid <= 1'b0;
    end else begin
      reg_valid <= v_load[0];
      if (v_load[0]) begin
        v_reg   <= in_pix;
        reg_tap <= tap_in;
        tap_in  <= (tap_in == 2'd2) ? 2'd0 : tap_in + 2'd1;
      end
      if (v_load[1]) acc <= acc_in + 10'(tap_x);
      out_valid <= v_load[1] && (reg_tap == 2'd2);
    end
  end

endmodule
