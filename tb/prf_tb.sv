// prf_tb -- self-checking testbench of the pyramid reduction filter.
//
// Connects the filter to two FIFOs and two line memories as in the
// processor and plays both DMAs: it packs source images four pixels to a
// word (plus the words of the last, partly used 16-pixel burst) into the
// input FIFO at a random rate, and drains the output FIFO at a random
// rate. Every output pixel and the zero padding are compared with the
// reference model, for sizes from 1x1 up to a line of the full 640 pixels,
// and done must come once per image after the input is drained.
module prf_tb;
  import gpp_pkg::*;
  import gpp_ref_pkg::*;

  localparam int MAX_W = 640;
  localparam int MAX_WO = (5 * (MAX_W - 1)) / 6 + 1;
  localparam int LMA_AW = $clog2(3 * MAX_WO);
  localparam int LMB_AW = $clog2(MAX_WO);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  dim_t width, height;
  logic if_push, if_pop, if_full, if_empty, of_push, of_pop, of_full, of_empty;
  logic [31:0] if_wdata, if_rdata, of_wdata, of_rdata;
  logic [3:0] if_count, of_count;
  logic lma_we, lma_re, lmb_we, lmb_re;
  logic [LMA_AW-1:0] lma_waddr, lma_raddr;
  logic [LMB_AW-1:0] lmb_waddr, lmb_raddr;
  pix_t lma_wdata, lma_rdata, lmb_wdata, lmb_rdata;

  int checks = 0, failures = 0, n_done = 0;

  prf #(.MAX_W(MAX_W)) dut (.*);

  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_if (.clk, .rst_n, .push(if_push), .wdata(if_wdata),
    .full(if_full), .pop(if_pop), .rdata(if_rdata), .empty(if_empty), .count(if_count));
  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_of (.clk, .rst_n, .push(of_push), .wdata(of_wdata),
    .full(of_full), .pop(of_pop), .rdata(of_rdata), .empty(of_empty), .count(of_count));
  line_mem #(.DEPTH(3 * MAX_WO), .WIDTH(8)) u_lma (.clk, .we(lma_we), .waddr(lma_waddr),
    .wdata(lma_wdata), .re(lma_re), .raddr(lma_raddr), .rdata(lma_rdata));
  line_mem #(.DEPTH(MAX_WO), .WIDTH(8)) u_lmb (.clk, .we(lmb_we), .waddr(lmb_waddr),
    .wdata(lmb_wdata), .re(lmb_re), .raddr(lmb_raddr), .rdata(lmb_rdata));

  always @(negedge clk) if (rst_n && done) n_done++;

  // drain the output FIFO into a queue at a random rate
  byte unsigned outq[$];
  int drain_pct = 70;
  always @(negedge clk) begin
    if (rst_n) begin
      of_pop = !of_empty && ($urandom_range(0, 99) < drain_pct);
      if (of_pop) for (int b = 0; b < 4; b++) outq.push_back(of_rdata[8*b +: 8]);
    end
  end

  task automatic run(input int w, input int h);
    img_t img, ref_img;
    int nwords, nw, nh, bad, done0;
    img = new[w * h];
    foreach (img[i]) img[i] = 8'($urandom);
    ref_img = reduce_2d(img, w, h);
    nw = red_size(w); nh = red_size(h);
    nwords = gpp_ref_pkg::level_bytes(w, h) / 4;
    outq.delete();
    done0 = n_done;
    @(negedge clk);
    width = dim_t'(w); height = dim_t'(h); start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < nwords; k++) begin
      logic [31:0] wd;
      for (int b = 0; b < 4; b++)
        wd[8*b +: 8] = (4 * k + b < w * h) ? img[4 * k + b] : 8'hA5;  // junk past the image
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      while (if_full) @(negedge clk);
      if_push = 1; if_wdata = wd;
      @(negedge clk);
      if_push = 0;
    end
    while (n_done == done0) @(negedge clk);
    repeat (5) @(negedge clk);
    while (!of_empty) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (outq.size() != gpp_ref_pkg::level_bytes(nw, nh)) begin
      failures++; $display("%0dx%0d: %0d bytes out, want %0d", w, h, outq.size(), gpp_ref_pkg::level_bytes(nw, nh));
    end else begin
      bad = 0;
      for (int i = 0; i < outq.size(); i++) begin
        checks++;
        if (outq[i] != ((i < nw * nh) ? ref_img[i] : 8'd0)) begin
          bad++; failures++;
        end
      end
      if (bad != 0) $display("%0dx%0d: %0d bytes differ", w, h, bad);
    end
    checks++;
    if (n_done != done0 + 1 || busy || !if_empty) begin
      failures++; $display("%0dx%0d: done %0d busy %0b input left %0b", w, h, n_done - done0, busy, !if_empty);
    end
  endtask

  initial begin
    start = 0; width = 0; height = 0; if_push = 0; if_wdata = 0; of_pop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 1);
    run(2, 3);
    run(7, 7);
    run(12, 13);
    run(31, 17);
    drain_pct = 5;    // slow consumer: output FIFO back-pressure
    run(25, 14);
    drain_pct = 70;
    run(640, 8);      // a full-width line
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
