// vfir_tb -- self-checking testbench of the vertical 3-tap FIR.
//
// Feeds columns of three random pixels (rows r-1, r, r+1), back to back
// and with random gaps, and compares each result with
// (a + 2*b + c) >> 2 worked out here. Checks that out_valid comes exactly
// 2 cycles after the third tap and that the result holds until the next
// column's first tap is accumulated.
module vfir_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  pix_t in_pix, out_pix;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vfir dut (.*);

  int     expq[$];
  longint t3[$];
  int     hold_val = -1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      longint t;
      checks += 2;
      e = expq.pop_front();
      t = t3.pop_front();
      if (out_pix !== pix_t'(e)) begin
        failures++; $display("%0t mismatch: got %0d want %0d", $time, out_pix, e);
      end
      if (($time - t) / 10 != 2) begin
        failures++; $display("latency %0d cycles, want 2", ($time - t) / 10);
      end
      hold_val = e;
    end
  end

  initial begin
    in_valid = 0; in_pix = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int a, b, c;
      a = $urandom_range(0, 255); b = $urandom_range(0, 255); c = $urandom_range(0, 255);
      expq.push_back((a + 2 * b + c) >> 2);
      for (int k = 0; k < 3; k++) begin
        if (n % 2 == 1) while ($urandom_range(0, 2) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        in_pix = pix_t'(k == 0 ? a : (k == 1 ? b : c));
        if (k == 2) t3.push_back($time);
      end
      @(negedge clk);
      in_valid = 0;
      // the result must still be there a few cycles later
      repeat ($urandom_range(2, 4)) @(negedge clk);
      checks++;
      if (out_pix !== pix_t'(hold_val)) begin
        failures++; $display("result not held: %0d vs %0d", out_pix, hold_val);
      end
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
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
