// gpp_top_tb -- end-to-end testbench of the Gaussian pyramid processor.
//
// Puts the processor (default parameters) between an APB host and a
// two-port AHB memory model with random wait states. For several image
// sizes and pyramid depths it writes a source image into memory, programs
// the registers, starts the run, waits for irq and compares every level in
// memory, padding included, with the reference model. It also checks the
// status register and that a one-level pyramid finishes without touching
// memory. It counts how often each mechanism happened (DMA bursts, bus
// wait states, input FIFO full, output FIFO full, edge repetition, every
// vertical decimation phase, zero padding, input drain, level chaining)
// and fails on any that never did.
module gpp_top_tb;
  import gpp_pkg::*;
  import gpp_ref_pkg::*;

  localparam int MEM_WORDS = 1 << 16;
  localparam logic [31:0] SRC = 32'h0000_1000;
  localparam logic [31:0] DST = 32'h0000_8000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic psel, penable, pwrite, pready, pslverr, irq;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic [31:0] src_haddr, dst_haddr, src_hwdata, dst_hwdata, src_hrdata, dst_hrdata;
  htrans_e src_htrans, dst_htrans;
  logic src_hwrite, dst_hwrite, src_hready, dst_hready;
  logic [2:0] src_hsize, dst_hsize, src_hburst, dst_hburst;

  int checks = 0, failures = 0;

  gpp_top dut (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr, .irq,
    .src_haddr, .src_htrans, .src_hwrite, .src_hsize, .src_hburst, .src_hwdata,
    .src_hrdata, .src_hready, .src_hresp(1'b0),
    .dst_haddr, .dst_htrans, .dst_hwrite, .dst_hsize, .dst_hburst, .dst_hwdata,
    .dst_hrdata, .dst_hready, .dst_hresp(1'b0)
  );

  ahb_mem #(.MEM_WORDS(MEM_WORDS), .WAIT_PCT(30)) u_mem (
    .clk, .rst_n,
    .a_haddr(src_haddr), .a_htrans(src_htrans), .a_hwrite(src_hwrite), .a_hwdata(src_hwdata),
    .a_hrdata(src_hrdata), .a_hready(src_hready),
    .b_haddr(dst_haddr), .b_htrans(dst_htrans), .b_hwrite(dst_hwrite), .b_hwdata(dst_hwdata),
    .b_hrdata(dst_hrdata), .b_hready(dst_hready)
  );

  // ---- mechanism counters
  int n_src_burst = 0, n_dst_burst = 0, n_if_full = 0, n_of_full = 0, n_flush = 0;
  int n_pad = 0, n_drain = 0, n_steps = 0, n_dst_writes = 0;
  int n_phase [6] = '{default: 0};

  always @(posedge clk) if (rst_n) begin
    if (src_htrans == HTRANS_NONSEQ && src_hready) n_src_burst++;
    if (dst_htrans == HTRANS_NONSEQ && dst_hready) n_dst_burst++;
    if (dst_htrans != HTRANS_IDLE && dst_hready) n_dst_writes++;
    if (dut.if_full) n_if_full++;
    if (dut.u_prf.vd_out_valid && !dut.u_prf.vd_out_ready) n_of_full++;
    if (dut.u_prf.u_hfir.out_valid && dut.u_prf.u_hfir.out_last && dut.u_prf.u_hfir.out_ready) n_flush++;
    if (dut.u_prf.pk_take && dut.u_prf.state == 3'd4) n_pad++;
    if (dut.u_prf.drain_pop) n_drain++;
    if (dut.u_prf.vd_cur_valid) n_phase[dut.u_prf.phase_r]++;
    if (dut.step_start) n_steps++;
  end

  // ---- APB host
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  function automatic byte unsigned mem_byte(input int addr);
    logic [31:0] wd;
    wd = u_mem.mem[(addr >> 2) % MEM_WORDS];
    return wd[8 * (addr % 4) +: 8];
  endfunction

  task automatic put_byte(input int addr, input byte unsigned v);
    u_mem.mem[(addr >> 2) % MEM_WORDS][8 * (addr % 4) +: 8] = v;
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // one complete pyramid run, checked level by level
  task automatic run_pyramid(input int w, input int h, input int levels);
    img_t img;
    int cw, ch, base, cycles, steps0;
    logic [31:0] st;
    // source: smooth pattern plus noise
    img = new[w * h];
    for (int i = 0; i < w * h; i++)
      img[i] = 8'(((i % w) * 7 + (i / w) * 5) + $urandom_range(0, 40));
    for (int i = 0; i < w * h; i++) put_byte(SRC + i, img[i]);
    // poison the destination area
    for (int i = 0; i < 4 * 4096; i++) u_mem.mem[(DST >> 2) + i] = 32'hDEAD_BEEF;
    steps0 = n_steps;
    apb_write(REG_SRC, SRC);
    apb_write(REG_DST, DST);
    apb_write(REG_SIZE, {4'd0, 12'(h), 4'd0, 12'(w)});
    apb_write(REG_LEVELS, 32'(levels));
    apb_write(REG_CTRL, 32'h1);
    cycles = 0;
    while (!irq && cycles < 2_000_000) begin @(negedge clk); cycles++; end
    check(irq, $sformatf("%0dx%0d/%0d: no irq", w, h, levels));
    apb_read(REG_STATUS, st);
    check(st[1] && !st[0] && st[12:8] == 5'(levels < 1 ? 1 : levels),
          $sformatf("%0dx%0d/%0d: status %h", w, h, levels, st));
    check(n_steps - steps0 == (levels > 1 ? levels - 1 : 0),
          $sformatf("%0dx%0d/%0d: %0d steps", w, h, levels, n_steps - steps0));
    $display("pyramid %0dx%0d, %0d levels: %0d cycles", w, h, levels, cycles);
    cw = w; ch = h; base = DST;
    for (int l = 1; l < levels; l++) begin
      int nw, nh, bad;
      img = reduce_2d(img, cw, ch);
      nw = red_size(cw); nh = red_size(ch);
      bad = 0;
      for (int i = 0; i < nw * nh; i++) if (mem_byte(base + i) != img[i]) bad++;
      check(bad == 0, $sformatf("%0dx%0d level %0d (%0dx%0d): %0d pixels differ", w, h, l, nw, nh, bad));
      for (int i = nw * nh; i < gpp_ref_pkg::level_bytes(nw, nh); i++)
        check(mem_byte(base + i) == 0, $sformatf("level %0d padding byte %0d", l, i));
      base += gpp_ref_pkg::level_bytes(nw, nh);
      cw = nw; ch = nh;
    end
    // nothing written past the last level
    check(u_mem.mem[base >> 2] == 32'hDEAD_BEEF, "write past the last level");
    apb_write(REG_STATUS, 32'h2);
    apb_read(REG_STATUS, st);
    check(st[1] == 0 && irq == 0, "done flag not cleared");
  endtask

  initial begin
    logic [31:0] rv;
    int wr0;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values: 320 x 240, 13 levels
    apb_read(REG_SIZE, rv);
    check(rv == {4'd0, 12'd240, 4'd0, 12'd320}, $sformatf("SIZE after reset %h", rv));
    apb_read(REG_LEVELS, rv);
    check(rv == 32'd13, $sformatf("LEVELS after reset %0d", rv));
    run_pyramid(37, 29, 5);
    run_pyramid(6, 6, 2);
    run_pyramid(1, 1, 3);
    run_pyramid(13, 2, 3);
    run_pyramid(64, 48, 6);
    // a very slow write port: the output FIFO fills and stalls the filter
    u_mem.wait_pct_b = 97;
    run_pyramid(40, 30, 3);
    u_mem.wait_pct_b = 30;
    // one level only: nothing to do
    wr0 = n_dst_writes;
    apb_write(REG_LEVELS, 32'd1);
    apb_write(REG_CTRL, 32'h1);
    repeat (5) @(negedge clk);
    check(irq && n_dst_writes == wr0, "one-level pyramid");
    apb_write(REG_STATUS, 32'h2);

    $display("mechanisms: src bursts %0d, dst bursts %0d, wait states %0d, input FIFO full %0d, output FIFO full %0d",
             n_src_burst, n_dst_burst, u_mem.wait_states, n_if_full, n_of_full);
    $display("            edge repeats %0d, padding pixels %0d, drained words %0d, steps %0d",
             n_flush, n_pad, n_drain, n_steps);
    $display("            vertical phases %0d %0d %0d %0d %0d %0d",
             n_phase[0], n_phase[1], n_phase[2], n_phase[3], n_phase[4], n_phase[5]);
    check(n_src_burst > 0, "no source burst");
    check(n_dst_burst > 0, "no destination burst");
    check(u_mem.wait_states > 0, "no wait state");
    check(n_if_full > 0, "input FIFO never full");
    check(n_of_full > 0, "output FIFO never full");
    check(n_flush > 0, "no edge repetition");
    check(n_pad > 0, "no zero padding");
    check(n_drain > 0, "no input drain");
    check(n_steps > 5, "no level chaining");
    foreach (n_phase[p]) check(n_phase[p] > 0, $sformatf("vertical phase %0d never seen", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
