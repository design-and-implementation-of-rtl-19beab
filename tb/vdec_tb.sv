// vdec_tb -- self-checking testbench of the vertical 6-to-5 decimator.
//
// For random (prev, cur, phase) columns it checks the output against the
// interpolation worked out here from the row positions: for phase p >= 2
// the output row lies 0.2*(p-1) of a row below the previous row, so the
// current row gets weight round(256*0.2*(p-1)) and the previous row the
// rest; phase 0 passes the current row, phase 1 gives no output. Checks
// the latency (2 cycles for phase 0, 3 for phases 2..5), that done comes
// once per column, and random output back-pressure.
module vdec_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prev_load, cur_valid, cur_ready, out_valid, out_ready, done;
  pix_t prev_pix, cur_pix, out_pix;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int n_done = 0, n_out = 0;
  longint t_start;
  int exp_lat;

  always #5 clk = ~clk;

  vdec dut (.*);

  int expv;
  bit exp_out;
  bit first_valid;

  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = ($urandom_range(0, 3) != 0);
      if (out_valid && first_valid) begin
        first_valid = 0;
        checks++;
        if (($time - t_start) / 10 != exp_lat) begin
          failures++; $display("latency %0d, want %0d", ($time - t_start) / 10, exp_lat);
        end
      end
      if (out_valid && out_ready) begin
        checks++;
        n_out++;
        if (!exp_out || out_pix !== pix_t'(expv)) begin
          failures++; $display("%0t mismatch: got %0d want %0d (expected output %0b)", $time, out_pix, expv, exp_out);
        end
      end
      if (done) n_done++;
    end
  end

  initial begin
    prev_load = 0; cur_valid = 0; prev_pix = 0; cur_pix = 0; phase = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int p, pv, cv, wc, outs_before;
      p  = n % 6;
      pv = $urandom_range(0, 255);
      cv = $urandom_range(0, 255);
      if (n % 50 == 7) begin pv = 255; cv = 255; end
      wc = (512 * (p - 1) + 5) / 10;   // round(256 * 0.2 * (p-1))
      exp_out = (p != 1);
      expv = (p == 0) ? cv : ((256 - wc) * pv + wc * cv) >> 8;
      exp_lat = (p == 0) ? 2 : 3;
      outs_before = n_out;
      @(negedge clk);
      prev_load = 1; prev_pix = pix_t'(pv);
      @(negedge clk);
      prev_load = 0;
      while (!cur_ready) @(negedge clk);
      cur_valid = 1; cur_pix = pix_t'(cv); phase = 3'(p);
      t_start = $time;
      first_valid = 1;
      @(negedge clk);
      cur_valid = 0;
      while (n_done <= n) @(negedge clk);
      checks++;
      if (n_out - outs_before != (exp_out ? 1 : 0)) begin
        failures++; $display("column %0d: %0d outputs", n, n_out - outs_before);
      end
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
