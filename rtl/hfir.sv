// hfir -- horizontal 3-tap low-pass FIR filter of the pyramid reduction filter.
//
// Computes out[i] = (x[i-1] + 2*x[i] + x[i+1]) >> 2 along one image line,
// the [1 2 1]/4 Gaussian-like kernel, with the edge pixel repeated past both
// ends of the line (x[-1] = x[0], x[W] = x[W-1]).
//
// Structure (after the horizontal FIR of the reduction filter): three
// pixel registers form a shift chain loaded by h_load[0]; a 3-input mux
// (h_sel[1:0]) picks one tap, an optional x2 (h_sel[2]) doubles the centre
// tap, and one adder adds it to the accumulator or to 0 (h_sel[3]). The
// 10-bit accumulator (h_load[1]) is shifted right by 2 to give the 8-bit
// result. One output therefore takes three accumulate cycles. The edge
// handling, the stream handshakes and the control sequence are this
// design's own choices.
//
// Interface: valid/ready pixel stream in, with in_last on the last pixel of
// a line; valid/ready pixel stream out, with out_last on the last output of
// the line. Every input line of W pixels gives W outputs.
// Timing: an input is accepted in the IN state; the output for pixel i-1
// follows 4 cycles after pixel i is accepted, the last output of a line 4
// cycles after the previous one is taken. Throughput is one pixel every 5
// cycles when the output is always ready.
module hfir
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
  output logic out_last
);

  typedef enum logic [2:0] {S_IN, S_ACC0, S_ACC1, S_ACC2, S_OUT, S_FLUSH} state_e;
  state_e state;

  pix_t tap [3];          // tap[0] newest, tap[2] oldest
  logic [9:0] acc;        // accumulator, u10
  logic first;            // next input starts a line
  logic pend_last;        // the line's last pixel has been taken
  logic flushing;         // current output is the replicated-edge one

  // Control word, named after the datapath's select and load signals.
  logic [1:0] h_load;
  logic [3:0] h_sel;

  // Datapath: tap mux, optional doubling, adder with 0/feedback mux.
  pix_t       tap_mux;
  logic [8:0] tap_x;
  logic [9:0] acc_in;
  logic [9:0] sum;

  always_comb begin
    tap_mux = tap[h_sel[1:0] == 2'd0 ? 0 : (h_sel[1:0] == 2'd1 ? 1 : 2)];
    tap_x   = h_sel[2] ? {tap_mux, 1'b0} : {1'b0, tap_mux};
    acc_in  = h_sel[3] ? 10'd0 : acc;
    sum     = acc_in + 10'(tap_x);
  end

  always_comb begin
    h_load = 2'b00;
    h_sel  = 4'b0000;
    case (state)
      S_ACC0: begin h_load[1] = 1'b1; h_sel = 4'b1_0_10; end  // acc = tap2
      S_ACC1: begin h_load[1] = 1'b1; h_sel = 4'b0_1_01; end  // acc += 2*tap1
      S_ACC2: begin h_load[1] = 1'b1; h_sel = 4'b0_0_00; end  // acc += tap0
      default: ;
    endcase
    if (state == S_IN && in_valid) h_load[0] = 1'b1;
    if (state == S_FLUSH) h_load[0] = 1'b1;
  end

  assign in_ready  = (state == S_IN);
  assign out_valid = (state == S_OUT);
  assign out_pix   = acc[9:2];
  assign out_last  = flushing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
      tap       <= '{default: '0};
      acc       <= '0;
      first     <= 1'b1;
      pend_last <= 1'b0;
      flushing  <= 1'b0;
    end else begin
      if (h_load[1]) acc <= sum;
      case (state)
        S_IN: if (h_load[0]) begin
          pend_last <= in_last;
          if (first) begin
            // first pixel of a line: it also stands for x[-1]
            tap   <= '{in_pix, in_pix, in_pix};
            first <= 1'b0;
            state <= in_last ? S_FLUSH : S_IN;
          end else begin
            tap   <= '{in_pix, tap[0], tap[1]};
            state <= S_ACC0;
          end
        end
        S_FLUSH: begin
          // repeat the last pixel as x[W]
          tap      <= '{tap[0], tap[0], tap[1]};
          flushing <= 1'b1;
          state    <= S_ACC0;
        end
        S_ACC0: state <= S_ACC1;
        S_ACC1: state <= S_ACC2;
        S_ACC2: state <= S_OUT;
        S_OUT: if (out_ready) begin
          if (flushing) begin
            flushing  <= 1'b0;
            pend_last <= 1'b0;
            first     <= 1'b1;
            state     <= S_IN;
          end else if (pend_last) begin
            state <= S_FLUSH;
          end else begin
            state <= S_IN;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

endmodule
