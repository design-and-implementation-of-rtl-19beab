// line_mem_tb -- self-checking testbench of the line memory.
//
// Writes random data at random addresses while reading others, and checks
// every read (one cycle of latency) against a model array kept here,
// including a read of the address written in the same cycle (old data),
// and that rdata holds while re is low.
module line_mem_tb;
  localparam int DEPTH = 533;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [DEPTH];
  int expv;
  bit pending;

  always #5 clk = ~clk;

  line_mem #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; pending = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== 8'(expv)) begin failures++; $display("read got %0d want %0d", rdata, expv); end
      end
      we = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = 8'($urandom);
      re = $urandom_range(0, 3) != 0;
      raddr = (n % 7 == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      if (re) begin expv = model[raddr]; pending = 1; end
      if (we) model[waddr] = wdata;
    end
    @(negedge clk);
    we = 0; re = 0;
    @(negedge clk);
    checks++;
    if (rdata !== 8'(expv)) begin failures++; $display("rdata not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
