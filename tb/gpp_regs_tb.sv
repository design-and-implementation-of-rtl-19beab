// gpp_regs_tb -- self-checking testbench of the host interface registers.
//
// Drives APB reads and writes (setup and access phase, no wait states)
// and plays the level sequencer's busy, done and level_now. Checks the
// reset values (320 x 240, 13 levels), that every register reads back what
// was written with unused bits zero, the field outputs to the sequencer,
// that a CTRL write of bit 0 gives exactly one start pulse one cycle after
// the access phase, that start is ignored while busy, that done sets the
// sticky STATUS.done and irq, and that writing 1 to STATUS.done or a new
// start clears it. pready must always be 1 and pslverr always 0.
module gpp_regs_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  logic start;
  logic [31:0] src_base, dst_base;
  dim_t width, height;
  logic [4:0] levels, level_now = 0;
  logic busy = 0, done = 0, irq;

  int checks = 0, failures = 0, n_start = 0;

  gpp_regs dut (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .pready, .pslverr, .start, .src_base, .dst_base, .width, .height, .levels,
    .busy, .done, .level_now, .irq);

  always @(negedge clk) if (rst_n) begin
    if (start) n_start++;
    checks++;
    if (!pready || pslverr) begin failures++; $display("pready/pslverr"); end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: %h want %h", what, got, want); end
  endtask

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  logic [31:0] r, v;
  int s0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    apb_read(REG_SIZE, r);   check("reset SIZE", r, {4'd0, 12'd240, 4'd0, 12'd320});
    apb_read(REG_LEVELS, r); check("reset LEVELS", r, 32'd13);
    apb_read(REG_STATUS, r); check("reset STATUS", r, 32'd0);
    apb_read(REG_CTRL, r);   check("CTRL reads 0", r, 32'd0);
    check("irq after reset", 32'(irq), 0);

    for (int i = 0; i < 50; i++) begin
      v = $urandom & 32'hFFFF_FFF0;
      apb_write(REG_SRC, v); apb_read(REG_SRC, r); check("SRC", r, v); check("src_base", src_base, v);
      v = $urandom & 32'hFFFF_FFF0;
      apb_write(REG_DST, v); apb_read(REG_DST, r); check("DST", r, v); check("dst_base", dst_base, v);
      v = $urandom;
      apb_write(REG_SIZE, v); apb_read(REG_SIZE, r); check("SIZE", r, v & 32'h0FFF_0FFF);
      check("width", 32'(width), 32'(v[11:0])); check("height", 32'(height), 32'(v[27:16]));
      v = $urandom;
      apb_write(REG_LEVELS, v); apb_read(REG_LEVELS, r); check("LEVELS", r, v & 32'h1F);
      check("levels", 32'(levels), 32'(v[4:0]));
    end

    // status fields
    busy = 1; level_now = 5'd7;
    apb_read(REG_STATUS, r); check("STATUS busy", r, 32'h0000_0701);

    // start ignored while busy
    s0 = n_start;
    apb_write(REG_CTRL, 1);
    @(negedge clk);
    check("start while busy", 32'(n_start - s0), 0);
    busy = 0;

    // start pulse: one cycle, right after the access phase
    psel = 1; penable = 0; pwrite = 1; paddr = REG_CTRL; pwdata = 1;
    @(negedge clk); penable = 1;
    check("no early start", 32'(start), 0);
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
    check("start pulse", 32'(start), 1);
    @(negedge clk);
    check("start one cycle", 32'(start), 0);
    // bit 0 clear: no start
    s0 = n_start;
    apb_write(REG_CTRL, 32'hFFFF_FFFE);
    repeat (2) @(negedge clk);
    check("no start without bit 0", 32'(n_start - s0), 0);

    // done sets the sticky flag and irq
    busy = 1;
    repeat (3) @(negedge clk);
    done = 1; @(negedge clk); done = 0; busy = 0;
    check("irq", 32'(irq), 1);
    repeat (5) @(negedge clk);
    apb_read(REG_STATUS, r); check("done sticky", 32'(r[1:0]), 32'h2);
    apb_write(REG_STATUS, 32'h1);   // bit 1 not set: stays
    apb_read(REG_STATUS, r); check("done kept", 32'(r[1]), 1);
    apb_write(REG_STATUS, 32'h2);
    apb_read(REG_STATUS, r); check("done cleared", 32'(r[1]), 0);
    check("irq cleared", 32'(irq), 0);
    // a new start clears the flag too
    done = 1; @(negedge clk); done = 0;
    check("irq again", 32'(irq), 1);
    apb_write(REG_CTRL, 1);
    check("start clears done", 32'(irq), 0);

    // reads without psel change nothing and writes need penable
    psel = 1; pwrite = 1; paddr = REG_SRC; pwdata = 32'h1234_5670; penable = 0;
    @(negedge clk); psel = 0; pwrite = 0;
    apb_read(REG_SRC, r); check("write needs penable", 32'(r == 32'h1234_5670), 0);

    // reset restores the defaults
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    apb_read(REG_SIZE, r); check("SIZE after reset", r, {4'd0, 12'd240, 4'd0, 12'd320});
    apb_read(REG_LEVELS, r); check("LEVELS after reset", r, 32'd13);

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
