// gpp_full_tb -- full-size run of the Gaussian pyramid processor.
//
// The processor at its default parameters builds the 13-level pyramid of a
// 320 x 240 image (320x240, 266x200, 221x166, ... 34x26) in a memory model
// with 10 % random wait states on each port. Every level is compared with
// the reference model. The run must also finish within 4.8 million clock
// cycles, the cycle budget for this workload (0.16 s at 30 MHz).
module gpp_full_tb;
  import gpp_pkg::*;
  import gpp_ref_pkg::*;

  localparam int MEM_WORDS = 1 << 17;
  localparam logic [31:0] SRC = 32'h0000_0000;
  localparam logic [31:0] DST = 32'h0002_0000;
  localparam int W = 320, H = 240, LEVELS = 13;
  localparam int CYCLE_BUDGET = 4_800_000;

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

  ahb_mem #(.MEM_WORDS(MEM_WORDS), .WAIT_PCT(10)) u_mem (
    .clk, .rst_n,
    .a_haddr(src_haddr), .a_htrans(src_htrans), .a_hwrite(src_hwrite), .a_hwdata(src_hwdata),
    .a_hrdata(src_hrdata), .a_hready(src_hready),
    .b_haddr(dst_haddr), .b_htrans(dst_htrans), .b_hwrite(dst_hwrite), .b_hwdata(dst_hwdata),
    .b_hrdata(dst_hrdata), .b_hready(dst_hready)
  );

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  function automatic byte unsigned mem_byte(input int addr);
    logic [31:0] wd;
    wd = u_mem.mem[(addr >> 2) % MEM_WORDS];
    return wd[8 * (addr % 4) +: 8];
  endfunction

  initial begin
    img_t img;
    int cw, ch, base, cycles;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    img = new[W * H];
    // a scene: two gradients and a bright square, plus noise
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x * 3 + y) / 3 + $urandom_range(0, 30);
        if (x > 100 && x < 180 && y > 60 && y < 140) v = 230 + $urandom_range(0, 20);
        img[y * W + x] = 8'(v);
        u_mem.mem[(SRC + y * W + x) >> 2][8 * ((y * W + x) % 4) +: 8] = 8'(v);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values already select 320 x 240 and 13 levels
    apb_write(REG_SRC, SRC);
    apb_write(REG_DST, DST);
    apb_write(REG_CTRL, 32'h1);
    cycles = 0;
    while (!irq && cycles < 2 * CYCLE_BUDGET) begin @(negedge clk); cycles++; end
    checks++;
    if (!irq) begin failures++; $display("no irq"); end
    $display("13-level pyramid of 320x240: %0d cycles (%0.3f s at 30 MHz), %0d wait states",
             cycles, real'(cycles) / 30.0e6, u_mem.wait_states);
    checks++;
    if (cycles > CYCLE_BUDGET) begin
      failures++; $display("over the cycle budget of %0d", CYCLE_BUDGET);
    end
    cw = W; ch = H; base = DST;
    for (int l = 1; l < LEVELS; l++) begin
      int nw, nh, bad;
      img = reduce_2d(img, cw, ch);
      nw = red_size(cw); nh = red_size(ch);
      bad = 0;
      for (int i = 0; i < nw * nh; i++) if (mem_byte(base + i) != img[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("level %0d: %0d pixels differ", l, bad); end
      $display("level %0d: %0dx%0d at 0x%05h", l, nw, nh, base);
      base += gpp_ref_pkg::level_bytes(nw, nh);
      cw = nw; ch = nh;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
