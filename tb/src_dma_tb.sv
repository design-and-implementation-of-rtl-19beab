// src_dma_tb -- self-checking testbench of the source DMA.
//
// The DMA reads from the memory model into an input FIFO that the
// testbench empties at a random rate. Checks that the words arrive in
// address order with the memory's contents, that every burst is
// NONSEQ-SEQ-SEQ-SEQ INCR4 on consecutive word addresses, that no more
// than nbursts bursts are made, that done comes once, and with no wait
// states and a fast consumer that N bursts take 6N+2 cycles (start to done:
// one cycle to leave idle, six per burst, one for the registered done).
module src_dma_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [31:0] base, nbursts;
  logic [3:0] fifo_count;
  logic fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic [31:0] fifo_wdata, fifo_rdata;
  logic [31:0] haddr, hwdata, hrdata;
  htrans_e htrans;
  logic hwrite, hready;
  logic [2:0] hsize, hburst;
  logic [31:0] b_hrdata;
  logic b_hready;

  int checks = 0, failures = 0, n_done = 0;
  int pop_pct = 60;

  src_dma #(.FIFO_DEPTH(8)) dut (.clk, .rst_n, .start, .base, .nbursts, .busy, .done,
    .fifo_count, .fifo_push, .fifo_wdata, .haddr, .htrans, .hwrite, .hsize, .hburst,
    .hwdata, .hrdata, .hready, .hresp(1'b0));

  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_fifo (.clk, .rst_n, .push(fifo_push), .wdata(fifo_wdata),
    .full(fifo_full), .pop(fifo_pop), .rdata(fifo_rdata), .empty(fifo_empty), .count(fifo_count));

  ahb_mem #(.MEM_WORDS(4096), .WAIT_PCT(30)) u_mem (.clk, .rst_n,
    .a_haddr(haddr), .a_htrans(htrans), .a_hwrite(hwrite), .a_hwdata(hwdata),
    .a_hrdata(hrdata), .a_hready(hready),
    .b_haddr(32'h0), .b_htrans(2'b00), .b_hwrite(1'b0), .b_hwdata(32'h0),
    .b_hrdata(b_hrdata), .b_hready(b_hready));

  logic [31:0] got[$];
  int n_bursts = 0;
  logic [31:0] last_addr;
  int beat = 0;

  // bus protocol checks, sampled on the rising edge
  always @(posedge clk) if (rst_n && hready && htrans != HTRANS_IDLE) begin
    checks++;
    if (hwrite || hsize != HSIZE_WORD || hburst != HBURST_INCR4) begin
      failures++; $display("bad control signals");
    end
    if (htrans == HTRANS_NONSEQ) begin
      if (beat != 0) begin failures++; $display("burst cut short"); end
      if (haddr[3:0] != 0) begin failures++; $display("unaligned burst %h", haddr); end
      n_bursts++;
      beat = 1;
    end else begin
      if (htrans != HTRANS_SEQ || haddr != last_addr + 4 || beat == 0) begin
        failures++; $display("bad SEQ beat at %h", haddr);
      end
      beat = (beat == 3) ? 0 : beat + 1;
    end
    last_addr = haddr;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      fifo_pop = !fifo_empty && ($urandom_range(0, 99) < pop_pct);
      if (fifo_pop) got.push_back(fifo_rdata);
      if (done) n_done++;
    end
  end

  task automatic run(input logic [31:0] b, input int n, input int check_rate);
    int t0, cycles, d0, nb0;
    for (int i = 0; i < 4 * n; i++) u_mem.mem[(b >> 2) + i] = $urandom;
    got.delete();
    d0 = n_done;
    nb0 = n_bursts;
    @(negedge clk);
    base = b; nbursts = n; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (n_done == d0) begin @(negedge clk); cycles++; end
    while (!fifo_empty) @(negedge clk);
    repeat (20) @(negedge clk);
    checks += 3;
    if (got.size() != 4 * n) begin failures++; $display("%0d words, want %0d", got.size(), 4 * n); end
    if (n_bursts - nb0 != n) begin failures++; $display("%0d bursts, want %0d", n_bursts - nb0, n); end
    if (n_done != d0 + 1) begin failures++; $display("done count"); end
    for (int i = 0; i < got.size() && i < 4 * n; i++) begin
      checks++;
      if (got[i] != u_mem.mem[(b >> 2) + i]) begin failures++; $display("word %0d wrong", i); end
    end
    if (check_rate) begin
      checks++;
      if (cycles != 6 * n + 2) begin failures++; $display("rate: %0d cycles for %0d bursts", cycles, n); end
    end
  endtask

  initial begin
    start = 0; base = 0; nbursts = 0; fifo_pop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32'h100, 1, 0);
    run(32'h400, 7, 0);
    pop_pct = 10;              // slow consumer: the DMA waits for room
    run(32'h800, 9, 0);
    pop_pct = 100;
    u_mem.wait_pct_a = 0;      // no wait states: check the rate
    run(32'h2000, 10, 1);
    run(32'h0, 0, 0);
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
