// tb_axi_master: self-checking testbench for axi_master against a behavioural
// AXI memory with random wait states (FIFO depth reduced to 8).
//
// Each transfer reads a random number of words from a random, sometimes
// 4 KB-straddling, address through the read FIFO - popped at random by the
// testbench and compared with memory - and writes as many random words
// through the write FIFO to a second area, compared with memory once wr_done
// pulses. The memory model checks the burst rules. The test counts and
// requires: bursts split at a 4 KB boundary, read beats held back by a full
// read FIFO (RREADY low), write beats waiting for data, and a zero-length
// write completing at once.
module tb_axi_master;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        start, wr_done, busy, rd_pop, rd_empty, wr_push, wr_full;
  logic [31:0] src_addr, dst_addr, rd_words, wr_words, rd_data, wr_data;
  logic [31:0] araddr, rdata, awaddr, wdata;
  logic [7:0]  arlen, awlen;
  logic [2:0]  arsize, awsize;
  logic [1:0]  arburst, awburst, rresp, bresp;
  logic        arvalid, arready, rlast, rvalid, rready, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [3:0]  wstrb;

  axi_master #(.FIFO_DEPTH(8), .MAX_BURST(16)) dut (
    .clk, .rst_n, .start, .src_addr, .rd_words, .dst_addr, .wr_words, .wr_done, .busy,
    .rd_pop, .rd_data, .rd_empty, .wr_push, .wr_data, .wr_full,
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready)
  );

  tb_axi_mem #(.WORDS(16384), .STALL_PCT(30)) mem (
    .clk, .rst_n, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata, .rresp, .rlast,
    .rvalid, .rready, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready, .wdata, .wstrb,
    .wlast, .wvalid, .wready, .bresp, .bvalid, .bready
  );

  int n_rfull = 0, n_done = 0;
  always @(posedge clk) begin
    if (rvalid && dut.rfifo_full) n_rfull++;
    if (wr_done) n_done++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic transfer(logic [31:0] src, logic [31:0] dst, int nr, int nw, int pop_pct, int push_pct);
    logic [31:0] wvals [$];
    int got = 0, pushed = 0, done_before = n_done, timeout = 0;
    @(negedge clk);
    src_addr = src; dst_addr = dst; rd_words = 32'(nr); wr_words = 32'(nw);
    start = 1;
    @(negedge clk);
    start = 0;
    while ((got < nr || n_done == done_before) && timeout < 100000) begin
      rd_pop  = !rd_empty && ($urandom_range(0, 99) < pop_pct);
      if (rd_pop) begin
        chk("read data", rd_data, mem.mem[((src >> 2) + got) % 16384]);
        got++;
      end
      wr_push = (pushed < nw) && !wr_full && ($urandom_range(0, 99) < push_pct);
      wr_data = $urandom;
      if (wr_push) begin wvals.push_back(wr_data); pushed++; end
      timeout++;
      @(negedge clk);
    end
    rd_pop = 0; wr_push = 0;
    chk("words read", 32'(got), 32'(nr));
    chk("one wr_done", 32'(n_done - done_before), 1);
    foreach (wvals[i]) chk("written", mem.mem[((dst >> 2) + i) % 16384], wvals[i]);
    repeat (3) @(negedge clk);
    chk("idle", 32'(busy), 0);
  endtask

  initial begin
    start = 0; rd_pop = 0; wr_push = 0; wr_data = 0; src_addr = 0; dst_addr = 0; rd_words = 0; wr_words = 0;
    for (int i = 0; i < 16384; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    transfer(32'h0000_0FF0, 32'h0000_2FF8, 12, 2, 90, 90);      // both straddle 4 KB
    transfer(32'h0000_0100, 32'h0000_8000, 100, 40, 10, 90);    // slow consumer: read FIFO full
    transfer(32'h0000_1FC0, 32'h0000_9FE0, 200, 100, 60, 15);   // slow producer: write waits
    transfer(32'h0000_4000, 32'h0000_A000, 3, 0, 100, 100);     // zero-length write
    for (int t = 0; t < 20; t++)
      transfer({18'd0, 12'($urandom_range(0, 4095)), 2'b00} & 32'h3FFC,
               32'h0000_8000 + {18'd0, 12'($urandom_range(0, 4095)), 2'b00},
               $urandom_range(1, 300), $urandom_range(1, 150), $urandom_range(10, 100), $urandom_range(10, 100));
    chk("protocol errors", 32'(mem.errors), 0);
    $display("axi_master: AR %0d, AW %0d, 4K splits %0d, RREADY-low %0d, W waits %0d",
             mem.n_ar, mem.n_aw, mem.n_4k_split, n_rfull, mem.n_wwait);
    checks++; if (mem.n_4k_split == 0) begin failures++; $display("FAIL no 4 KB split"); end
    checks++; if (n_rfull == 0)        begin failures++; $display("FAIL read FIFO never full"); end
    checks++; if (mem.n_wwait == 0)    begin failures++; $display("FAIL no write wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
