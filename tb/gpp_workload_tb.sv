// gpp_workload_tb -- the processor on the other camera sizes: 640 x 480 and
// 160 x 120.
//
// The processor at its default parameters builds a 13-level pyramid of a
// 640 x 480 image, then, programmed again through the registers, one of a
// 160 x 120 image. The memory model inserts 10 % random wait states on each
// port. Every level is compared with the reference model, and the padding
// bytes up to each 16-byte boundary must be zero. The level count of 13 for
// these sizes is this testbench's choice. Cycle budgets are only known for
// 320 x 240 (4.8 million cycles); here the budget is scaled by the pixel
// count, 19.2 and 1.2 million cycles, and the run must stay inside it.
module gpp_workload_tb;
  import gpp_pkg::*;
  import gpp_ref_pkg::*;

  localparam int MEM_WORDS = 1 << 19;
  localparam logic [31:0] SRC = 32'h0000_0000;
  localparam logic [31:0] DST = 32'h0004_B000;   // right after a 640 x 480 image
  localparam int LEVELS = 13;
  localparam int BUDGET_PER_PIXEL_X1000 = 62_500; // 4.8 M cycles / (320 * 240)

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

  task automatic pyramid(input int W, input int H);
    img_t img;
    int cw, ch, base, cycles, budget;
    budget = int'(longint'(W) * H * BUDGET_PER_PIXEL_X1000 / 1000);
    img = new[W * H];
    // a scene: two gradients and a bright square, plus noise
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x * 3 + y) / 3 + $urandom_range(0, 30);
        if (x > W / 3 && x < W / 2 && y > H / 4 && y < H / 2) v = 230 + $urandom_range(0, 20);
        img[y * W + x] = 8'(v);
        u_mem.mem[(SRC + y * W + x) >> 2][8 * ((y * W + x) % 4) +: 8] = 8'(v);
      end
    // words past the source image and the whole pyramid area start non-zero,
    // so that the padding check means something
    for (int a = int'(DST >> 2); a < MEM_WORDS; a++) u_mem.mem[a] = 32'hA5A5_A5A5;
    apb_write(REG_SRC, SRC);
    apb_write(REG_DST, DST);
    apb_write(REG_SIZE, {4'd0, 12'(H), 4'd0, 12'(W)});
    apb_write(REG_LEVELS, LEVELS);
    apb_write(REG_STATUS, 32'h2);
    apb_write(REG_CTRL, 32'h1);
    cycles = 0;
    while (!irq && cycles < 2 * budget) begin @(negedge clk); cycles++; end
    checks++;
    if (!irq) begin failures++; $display("no irq"); end
    $display("13-level pyramid of %0dx%0d: %0d cycles (%0.3f s at 30 MHz)",
             W, H, cycles, real'(cycles) / 30.0e6);
    checks++;
    if (cycles > budget) begin
      failures++; $display("over the cycle budget of %0d", budget);
    end
    cw = W; ch = H; base = DST;
    for (int l = 1; l < LEVELS; l++) begin
      int nw, nh, bad, badpad;
      img = reduce_2d(img, cw, ch);
      nw = red_size(cw); nh = red_size(ch);
      bad = 0; badpad = 0;
      for (int i = 0; i < nw * nh; i++) if (mem_byte(base + i) != img[i]) bad++;
      for (int i = nw * nh; i < gpp_ref_pkg::level_bytes(nw, nh); i++) if (mem_byte(base + i) != 0) badpad++;
      checks += 2;
      if (bad != 0) begin failures++; $display("level %0d: %0d pixels differ", l, bad); end
      if (badpad != 0) begin failures++; $display("level %0d: %0d padding bytes not zero", l, badpad); end
      base += gpp_ref_pkg::level_bytes(nw, nh);
      cw = nw; ch = nh;
    end
    checks++;
    if (mem_byte(base) != 8'hA5) begin failures++; $display("write past the last level"); end
  endtask

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pyramid(640, 480);
    pyramid(160, 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (45_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
