// ahb_mem -- behavioural model of external memory behind two AHB-Lite ports.
//
// Stands in for the SDRAM and its controller in testbenches. Port A and
// port B each accept AHB-Lite word transfers (address phase, then data
// phase) on one shared word array, little-endian. While a data phase is
// in progress, a port may hold hready low for a random number of cycles
// (WAIT_PCT percent chance per cycle, changeable per port at run time), which exercises the masters' wait
// state handling. Read data is driven during the data phase; write data is
// taken at its end. Testbenches load and inspect the contents through the
// mem array directly. Counts the wait states it inserts.
module ahb_mem #(
  parameter int MEM_WORDS = 65536,
  parameter int WAIT_PCT = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a_haddr,
  input  logic [1:0]  a_htrans,
  input  logic        a_hwrite,
  input  logic [31:0] a_hwdata,
  output logic [31:0] a_hrdata,
  output logic        a_hready,
  input  logic [31:0] b_haddr,
  input  logic [1:0]  b_htrans,
  input  logic        b_hwrite,
  input  logic [31:0] b_hwdata,
  output logic [31:0] b_hrdata,
  output logic        b_hready
);

  logic [31:0] mem [MEM_WORDS];
  int wait_states = 0;
  int wait_pct_a = WAIT_PCT;  // may be changed by the testbench
  int wait_pct_b = WAIT_PCT;

  logic        a_dp, b_dp, a_dw, b_dw;
  logic [31:0] a_da, b_da;

  assign a_hrdata = (a_dp && !a_dw) ? mem[(a_da >> 2) % MEM_WORDS] : 32'h0;
  assign b_hrdata = (b_dp && !b_dw) ? mem[(b_da >> 2) % MEM_WORDS] : 32'h0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_dp <= 0; b_dp <= 0; a_dw <= 0; b_dw <= 0; a_da <= 0; b_da <= 0;
      a_hready <= 1; b_hready <= 1;
    end else begin
      if (a_hready) begin
        if (a_dp && a_dw) mem[(a_da >> 2) % MEM_WORDS] <= a_hwdata;
        a_dp <= a_htrans[1];
        a_dw <= a_hwrite;
        a_da <= a_haddr;
        a_hready <= !(a_htrans[1] && $urandom_range(0, 99) < wait_pct_a);
      end else begin
        a_hready <= !($urandom_range(0, 99) < wait_pct_a);
      end
      if (b_hready) begin
        if (b_dp && b_dw) mem[(b_da >> 2) % MEM_WORDS] <= b_hwdata;
        b_dp <= b_htrans[1];
        b_dw <= b_hwrite;
        b_da <= b_haddr;
        b_hready <= !(b_htrans[1] && $urandom_range(0, 99) < wait_pct_b);
      end else begin
        b_hready <= !($urandom_range(0, 99) < wait_pct_b);
      end
      if (!a_hready) wait_states++;
      if (!b_hready) wait_states++;
    end
  end

endmodule
