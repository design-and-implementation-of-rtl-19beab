// dst_dma_tb -- self-checking testbench of the destination DMA.
//
// The testbench fills the output FIFO with random words at a random rate;
// the DMA writes them to the memory model, which inserts random wait
// states. Checks the memory contents and that nothing outside the target
// area is written, the INCR4 burst form on the bus, that a burst only
// starts with four words in the FIFO, one done per run, and with no wait
// states and a full FIFO that N bursts take 6N+2 cycles (start to done:
// one cycle to leave idle, six per burst, one for the registered done).
module dst_dma_tb;
  import gpp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [31:0] base, nbursts;
  logic [3:0] fifo_count;
  logic fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic [31:0] fifo_wdata, fifo_rdata;
  logic [31:0] haddr, hwdata, hrdata, a_hrdata;
  htrans_e htrans;
  logic hwrite, hready, a_hready;
  logic [2:0] hsize, hburst;

  int checks = 0, failures = 0, n_done = 0;
  int push_pct = 60;

  dst_dma #(.FIFO_DEPTH(8)) dut (.clk, .rst_n, .start, .base, .nbursts, .busy, .done,
    .fifo_count, .fifo_rdata, .fifo_pop, .haddr, .htrans, .hwrite, .hsize, .hburst,
    .hwdata, .hrdata, .hready, .hresp(1'b0));

  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_fifo (.clk, .rst_n, .push(fifo_push), .wdata(fifo_wdata),
    .full(fifo_full), .pop(fifo_pop), .rdata(fifo_rdata), .empty(fifo_empty), .count(fifo_count));

  ahb_mem #(.MEM_WORDS(4096), .WAIT_PCT(30)) u_mem (.clk, .rst_n,
    .a_haddr(32'h0), .a_htrans(2'b00), .a_hwrite(1'b0), .a_hwdata(32'h0),
    .a_hrdata(a_hrdata), .a_hready(a_hready),
    .b_haddr(haddr), .b_htrans(htrans), .b_hwrite(hwrite), .b_hwdata(hwdata),
    .b_hrdata(hrdata), .b_hready(hready));

  int n_bursts = 0, beat = 0;
  logic [31:0] last_addr;

  always @(posedge clk) if (rst_n && hready && htrans != HTRANS_IDLE) begin
    checks++;
    if (!hwrite || hsize != HSIZE_WORD || hburst != HBURST_INCR4) begin
      failures++; $display("bad control signals");
    end
    if (htrans == HTRANS_NONSEQ) begin
      if (beat != 0) begin failures++; $display("burst cut short"); end
      if (fifo_count < 4) begin failures++; $display("burst started with %0d words", fifo_count); end
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

  always @(negedge clk) if (rst_n && done) n_done++;

  task automatic run(input logic [31:0] b, input int n, input bit prefill, input bit check_rate);
    logic [31:0] words[$];
    int d0, nb0, cycles, k;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = 32'hDEAD_BEEF;
    for (int i = 0; i < 4 * n; i++) words.push_back($urandom);
    d0 = n_done; nb0 = n_bursts; k = 0;
    if (prefill) begin
      while (k < 8 && k < 4 * n) begin
        @(negedge clk); fifo_push = 1; fifo_wdata = words[k]; k++;
      end
      @(negedge clk); fifo_push = 0;
    end
    @(negedge clk);
    base = b; nbursts = n; start = 1;
    fork
      begin
        @(negedge clk); start = 0;
        cycles = 1;
        while (n_done == d0) begin @(negedge clk); cycles++; end
      end
      begin
        while (k < 4 * n) begin
          @(negedge clk);
          fifo_push = !fifo_full && (prefill || $urandom_range(0, 99) < push_pct);
          if (fifo_push) begin fifo_wdata = words[k]; k++; end
        end
        @(negedge clk); fifo_push = 0;
      end
    join
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_bursts - nb0 != n) begin failures++; $display("%0d bursts, want %0d", n_bursts - nb0, n); end
    if (n_done != d0 + 1) begin failures++; $display("done count"); end
    for (int i = 0; i < 4096; i++) begin
      int rel;
      rel = i - int'(b >> 2);
      if (rel >= 0 && rel < 4 * n) begin
        checks++;
        if (u_mem.mem[i] != words[rel]) begin failures++; $display("word %0d: %h want %h", rel, u_mem.mem[i], words[rel]); end
      end else if (u_mem.mem[i] != 32'hDEAD_BEEF) begin
        checks++; failures++; $display("stray write at word %0d", i);
      end
    end
    if (check_rate) begin
      checks++;
      if (cycles != 6 * n + 2) begin failures++; $display("rate: %0d cycles for %0d bursts", cycles, n); end
    end
  endtask

  initial begin
    start = 0; base = 0; nbursts = 0; fifo_push = 0; fifo_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32'h100, 1, 0, 0);
    run(32'h400, 7, 0, 0);
    push_pct = 10;
    run(32'h800, 5, 0, 0);
    u_mem.wait_pct_b = 0;
    run(32'h2000, 6, 1, 1);
    run(32'h0, 0, 0, 0);
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
