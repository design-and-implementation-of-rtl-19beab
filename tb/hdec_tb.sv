// hdec_tb -- self-checking testbench of the horizontal 6-to-5 decimator.
//
// Sends lines of random width (1..40) with random gaps and random output
// back-pressure. The expected line is worked out here from the output
// positions: output k = 5g+m lies at input 6g + 1.2m, and is x[6g] for
// m = 0, otherwise the two neighbours weighted 0.8/0.2, 0.6/0.4, 0.4/0.6
// or 0.2/0.8 in 1/256 steps (205/51, 154/102, 102/154, 51/205), giving
// floor(5*(W-1)/6)+1 outputs. Also checks one line_done per line and,
// without gaps, the rate: 26 cycles per 6 inputs.
module hdec_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, line_done;
  pix_t in_pix, out_pix;
  int checks = 0, failures = 0;
  int lines_sent = 0, lines_done = 0;

  always #5 clk = ~clk;

  hdec dut (.*);

  pix_t expq[$];
  bit   bp_en = 1;
  longint t_acc[$];

  function automatic int ip(input int a, input int wa, input int b, input int wb);
    return (a * wa + b * wb) >> 8;
  endfunction

  task automatic send_line(input int w, input bit gaps);
    pix_t x[];
    int wo;
    x = new[w];
    foreach (x[i]) x[i] = pix_t'($urandom);
    wo = (5 * (w - 1)) / 6 + 1;
    for (int k = 0; k < wo; k++) begin
      int b, m;
      b = 6 * (k / 5);
      m = k % 5;
      case (m)
        0: expq.push_back(x[b]);
        1: expq.push_back(pix_t'(ip(x[b+1], 205, x[b+2], 51)));
        2: expq.push_back(pix_t'(ip(x[b+2], 154, x[b+3], 102)));
        3: expq.push_back(pix_t'(ip(x[b+3], 102, x[b+4], 154)));
        default: expq.push_back(pix_t'(ip(x[b+4], 51, x[b+5], 205)));
      endcase
    end
    lines_sent++;
    for (int i = 0; i < w; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_pix = x[i]; in_last = (i == w-1);
      while (!in_ready) @(negedge clk);
      t_acc.push_back($time);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (out_valid && out_ready) begin
        pix_t e;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected output %0d", out_pix);
        end else begin
          e = expq.pop_front();
          if (out_pix !== e) begin
            failures++;
            $display("%0t mismatch: got %0d want %0d", $time, out_pix, e);
          end
        end
      end
      if (line_done) lines_done++;
    end
  end

  initial begin
    in_valid = 0; in_pix = 0; in_last = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 80; n++) send_line($urandom_range(1, 40), 1);
    wait (lines_done == lines_sent);
    repeat (5) @(negedge clk);
    // rate: two lines of 36, no gaps, output always ready
    bp_en = 0;
    t_acc.delete();
    send_line(36, 0);
    send_line(36, 0);
    wait (lines_done == lines_sent);
    repeat (5) @(negedge clk);
    checks++;
    if ((t_acc[36] - t_acc[0]) / 10 != 26 * 6) begin
      failures++;
      $display("rate: %0d cycles for 36 inputs, want %0d", (t_acc[36] - t_acc[0]) / 10, 26 * 6);
    end
    checks++;
    if (expq.size() != 0 || lines_done != lines_sent) begin
      failures++;
      $display("left over: %0d outputs, %0d/%0d lines", expq.size(), lines_done, lines_sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
