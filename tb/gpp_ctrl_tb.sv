// gpp_ctrl_tb -- self-checking testbench of the level sequencer.
//
// Plays the two DMAs and the reduction filter: after every step_start it
// answers with src_done, prf_done and dst_done, each after its own random
// delay and in random order. For random image sizes and level counts it
// checks, step by step, the source and destination addresses (each level
// right after the previous one, rounded up to 16 bytes), the image size
// (floor(5(n-1)/6)+1 per step), the burst counts, level_now, that exactly
// LEVELS-1 steps run, that done pulses once and busy drops with it, and
// that a step starts one cycle after the last of the three dones has been
// registered. LEVELS of 0 or 1 and an empty image finish at once.
module gpp_ctrl_tb;
  import gpp_pkg::*;
  import gpp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [31:0] src_base = 0, dst_base = 0;
  dim_t width = 0, height = 0;
  logic [4:0] levels = 0;
  logic busy, done;
  logic [4:0] level_now;
  logic step_start;
  logic [31:0] step_src, step_dst, src_nbursts, dst_nbursts;
  dim_t step_w, step_h;
  logic src_done = 0, prf_done = 0, dst_done = 0;

  int checks = 0, failures = 0, n_done = 0, n_steps = 0;

  gpp_ctrl dut (.clk, .rst_n, .start, .src_base, .dst_base, .width, .height, .levels,
    .busy, .done, .level_now, .step_start, .step_src, .step_dst, .step_w, .step_h,
    .src_nbursts, .dst_nbursts, .src_done, .prf_done, .dst_done);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: %0h want %0h", what, got, want); end
  endtask

  function automatic logic [31:0] lbytes(input int w, input int h);
    return 32'((w * h + 15) / 16 * 16);
  endfunction

  // One pyramid: drive start, answer every step, check against a model.
  task automatic pyramid(input logic [31:0] sb, input logic [31:0] db, input int w, input int h,
                         input int lv);
    int ew, eh, nsteps, d_src, d_prf, d_dst, t, last;
    logic [31:0] es, ed;
    ew = w; eh = h; es = sb; ed = db;
    nsteps = (lv <= 1 || w == 0 || h == 0) ? 0 : lv - 1;
    src_base = sb; dst_base = db; width = dim_t'(w); height = dim_t'(h); levels = 5'(lv);
    start = 1; @(negedge clk); start = 0;
    for (int s = 0; s < nsteps; s++) begin
      t = 0;
      while (!step_start) begin
        @(negedge clk); t++;
        if (t > 100) begin failures++; $display("no step_start"); return; end
      end
      checks++;
      if (!busy) begin failures++; $display("not busy during a step"); end
      check("step_src", step_src, es);
      check("step_dst", step_dst, ed);
      check("step_w", 32'(step_w), 32'(ew));
      check("step_h", 32'(step_h), 32'(eh));
      check("src_nbursts", src_nbursts, lbytes(ew, eh) / 16);
      check("dst_nbursts", dst_nbursts, lbytes(red_size(ew), red_size(eh)) / 16);
      check("level_now", 32'(level_now), 32'(s + 1));
      n_steps++;
      d_src = $urandom_range(1, 30); d_prf = $urandom_range(1, 30); d_dst = $urandom_range(1, 30);
      last = d_src > d_prf ? d_src : d_prf;
      last = last > d_dst ? last : d_dst;
      @(negedge clk);
      for (int c = 1; c <= last; c++) begin
        src_done = (c == d_src); prf_done = (c == d_prf); dst_done = (c == d_dst);
        @(negedge clk);
        src_done = 0; prf_done = 0; dst_done = 0;
        if (c < last) begin
          checks++;
          if (step_start || done) begin failures++; $display("moved on before all dones"); end
        end
      end
      // the last done is registered at this edge's posedge, the state moves
      // at the next one
      if (s + 1 < nsteps) begin
        @(negedge clk);
        check("next step one cycle after the dones", 32'(step_start), 1);
      end else begin
        @(negedge clk);
        check("done after the last step", 32'(done), 1);
      end
      es = ed;
      ed = ed + lbytes(red_size(ew), red_size(eh));
      ew = red_size(ew); eh = red_size(eh);
    end
    if (nsteps == 0) check("done at once", 32'(done), 1);
    @(negedge clk);
    check("done one cycle", 32'(done), 0);
    check("idle after done", 32'(busy), 0);
    check("level_now at the end", 32'(level_now), 32'(nsteps + 1));
    repeat (3) @(negedge clk);
  endtask

  always @(negedge clk) if (rst_n && done) n_done++;

  int nd0, ns0, nsteps_want;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", 32'(busy), 0);
    nd0 = 0; ns0 = 0; nsteps_want = 0;
    pyramid(32'h1000, 32'h2_0000, 320, 240, 13); nsteps_want += 12;
    pyramid(32'h0, 32'h100, 7, 5, 4);            nsteps_want += 3;
    pyramid(32'h40, 32'h80, 1, 1, 31);           nsteps_want += 30;
    pyramid(32'h40, 32'h80, 64, 48, 1);
    pyramid(32'h40, 32'h80, 64, 48, 0);
    pyramid(32'h40, 32'h80, 0, 48, 5);
    pyramid(32'h40, 32'h80, 64, 0, 5);
    for (int i = 0; i < 20; i++) begin
      int w, h, lv;
      w = $urandom_range(1, 640); h = $urandom_range(1, 480); lv = $urandom_range(2, 16);
      pyramid($urandom_range(0, 1 << 20) << 4, $urandom_range(0, 1 << 20) << 4, w, h, lv);
      nsteps_want += lv - 1;
    end
    check("steps", 32'(n_steps), 32'(nsteps_want));
    check("done pulses", 32'(n_done), 27);
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
