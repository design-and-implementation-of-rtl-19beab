// hfir_tb -- self-checking testbench of the horizontal 3-tap FIR.
//
// Sends lines of random width (1..24) and random pixels, with random gaps
// on the input and random back-pressure on the output, and compares every
// output with (x[i-1] + 2*x[i] + x[i+1]) >> 2 computed here with the edge
// pixel repeated, and out_last with the line end. A last line with no
// gaps checks the rate of one pixel every 5 cycles. Inputs are driven and
// outputs sampled on the falling clock edge.
module hfir_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  pix_t in_pix, out_pix;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hfir dut (.*);

  typedef struct packed { pix_t pix; logic last; } exp_t;
  exp_t expq[$];
  bit   bp_en = 1;
  int   n_out = 0;
  longint t_first = 0, t_last = 0;

  task automatic send_line(input int w, input bit gaps);
    pix_t x[];
    x = new[w];
    foreach (x[i]) x[i] = pix_t'($urandom);
    for (int i = 0; i < w; i++) begin
      int l, r;
      l = (i == 0) ? int'(x[0]) : int'(x[i-1]);
      r = (i == w-1) ? int'(x[w-1]) : int'(x[i+1]);
      expq.push_back('{pix_t'((l + 2*int'(x[i]) + r) >> 2), i == w-1});
    end
    for (int i = 0; i < w; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_pix = x[i]; in_last = (i == w-1);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // output checker with random back-pressure, on the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (out_valid && out_ready) begin
        exp_t e;
        checks++;
        n_out++;
        if (n_out == 1) t_first = $time;
        t_last = $time;
        if (expq.size() == 0) begin
          failures++; $display("unexpected output %0d", out_pix);
        end else begin
          e = expq.pop_front();
          if (out_pix !== e.pix || out_last !== e.last) begin
            failures++;
            $display("%0t mismatch: got %0d/%0b want %0d/%0b", $time, out_pix, out_last, e.pix, e.last);
          end
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_pix = 0; in_last = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) send_line($urandom_range(1, 24), 1);
    wait (expq.size() == 0);
    repeat (10) @(negedge clk);
    // rate check: one line of 40 pixels, no gaps, output always ready
    bp_en = 0;
    @(negedge clk);
    n_out = 0;
    send_line(40, 0);
    wait (expq.size() == 0);
    repeat (2) @(negedge clk);
    checks++;
    if ((t_last - t_first) / 10 != 39 * 5) begin
      failures++;
      $display("rate: %0d cycles for 39 output intervals, want %0d", (t_last - t_first) / 10, 39 * 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
