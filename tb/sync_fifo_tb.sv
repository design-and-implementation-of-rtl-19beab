// sync_fifo_tb -- self-checking testbench of the DMA FIFO.
//
// Pushes and pops at random, never into a full or from an empty FIFO,
// and checks the order of the words against a queue kept here, as well as
// full, empty and count on every cycle. Runs a phase biased to fill the
// FIFO and one biased to empty it, so both ends are reached.
module sync_fifo_tb;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [31:0] wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [31:0] q[$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      // check the state left by the previous cycle
      checks += 3;
      if (count !== ($clog2(DEPTH)+1)'(q.size())) begin failures++; $display("count %0d want %0d", count, q.size()); end
      if (full !== (q.size() == DEPTH)) begin failures++; $display("full wrong"); end
      if (empty !== (q.size() == 0)) begin failures++; $display("empty wrong"); end
      if (full) n_full++;
      if (empty) n_empty++;
      bias = (n / 500) % 2 == 0 ? 3 : 1;
      push = !full && ($urandom_range(0, 3) < bias);
      pop  = !empty && ($urandom_range(0, 3) >= bias);
      wdata = $urandom;
      if (pop) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("data %h want %h", rdata, q[0]); end
        void'(q.pop_front());
      end
      if (push) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full/empty never reached"); end
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
