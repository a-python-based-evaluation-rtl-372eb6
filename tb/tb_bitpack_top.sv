// tb_bitpack_top: end-to-end test of bitpack_top at its default parameters
// (bit_addmul as user circuit, 6 SNGs, 2 counters).
//
// A behavioural processor programs the core over AXI4-Lite and a behavioural
// memory with random wait states serves its AXI4 master. The workload is the
// framework's first example: inputs A = {0.9, 0.8, 0.7, 0.6}, SEL = {0.5, 0.5},
// bitstream length 10,000, five runs each with fresh random seeds. Per run the
// two output words must equal an exact bit-level reference model, the
// bitstream must be enabled for exactly 10,000 clocks, and the estimates must
// be close to the exact product 0.3024 and mean 0.75. The input array is
// placed across a 4 KB boundary so that the read is split into two bursts.
module tb_bitpack_top;
  import bitpack_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NSRC = 6, NDST = 2, LEN = 10000, RUNS = 5;
  localparam logic [31:0] SRC = 32'h0000_0FE8, DST = 32'h0000_2000;

  logic ACLK = 1'b0;
  logic ARESETN = 1'b0;
  int checks = 0, failures = 0;
  always #5 ACLK = ~ACLK;

  logic [5:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready, s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] araddr, rdata, awaddr, wdata;
  logic [7:0]  arlen, awlen;
  logic [2:0]  arsize, awsize;
  logic [1:0]  arburst, awburst, rresp, bresp;
  logic        arvalid, arready, rlast, rvalid, rready, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [3:0]  wstrb;

  bitpack_top dut (
    .ACLK, .ARESETN,
    .s_axil_awaddr(s_awaddr), .s_axil_awvalid(s_awvalid), .s_axil_awready(s_awready),
    .s_axil_wdata(s_wdata), .s_axil_wstrb(s_wstrb), .s_axil_wvalid(s_wvalid), .s_axil_wready(s_wready),
    .s_axil_bresp(s_bresp), .s_axil_bvalid(s_bvalid), .s_axil_bready(s_bready),
    .s_axil_araddr(s_araddr), .s_axil_arvalid(s_arvalid), .s_axil_arready(s_arready),
    .s_axil_rdata(s_rdata), .s_axil_rresp(s_rresp), .s_axil_rvalid(s_rvalid), .s_axil_rready(s_rready),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready)
  );

  tb_axil_master cpu (
    .clk(ACLK), .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready), .wdata(s_wdata),
    .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready), .bresp(s_bresp), .bvalid(s_bvalid),
    .bready(s_bready), .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready)
  );

  tb_axi_mem #(.WORDS(4096), .STALL_PCT(30)) mem (
    .clk(ACLK), .rst_n(ARESETN), .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata,
    .rresp, .rlast, .rvalid, .rready, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready
  );

  int en_cycles = 0;
  always @(posedge ACLK) if (dut.u_wrap.proc_en) en_cycles++;

  initial begin
    repeat (200000) @(posedge ACLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic chk_near(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s %f not within %f of %f", what, got, tol, exp);
    end
  endtask

  initial begin
    logic [31:0] d, vals [], seeds [];
    int scfg [], dcfg [], exp [];
    real prod, avg, prod_sum = 0.0, avg_sum = 0.0;
    int en0, ar0;
    vals  = new[NSRC];
    seeds = new[NSRC];
    scfg  = new[NSRC];
    dcfg  = new[NDST];
    foreach (scfg[k]) scfg[k] = 0;
    foreach (dcfg[j]) dcfg[j] = 0;
    vals = '{uni_word(0.9), uni_word(0.8), uni_word(0.7), uni_word(0.6), uni_word(0.5), uni_word(0.5)};
    repeat (4) @(posedge ACLK);
    ARESETN = 1;
    cpu.read32(REG_NUM_SRC, d); chk("NUM_SRC", d, NSRC);
    cpu.read32(REG_NUM_DST, d); chk("NUM_DST", d, NDST);
    cpu.write32(REG_CYCLE, LEN);
    cpu.write32(REG_SRC, SRC);
    cpu.write32(REG_DST, DST);
    cpu.read32(REG_CYCLE, d); chk("CYCLE", d, LEN);
    for (int r = 0; r < RUNS; r++) begin
      // new seeds, then the {value, seed} array in memory
      for (int k = 0; k < NSRC; k++) begin
        seeds[k] = $urandom;
        mem.mem[(SRC >> 2) + 2 * k]     = vals[k];
        mem.mem[(SRC >> 2) + 2 * k + 1] = seeds[k];
      end
      mem.mem[DST >> 2] = 32'hFFFF_FFFF;
      mem.mem[(DST >> 2) + 1] = 32'hFFFF_FFFF;
      run_ref(0, 4, NSRC, NDST, scfg, dcfg, vals, seeds, LEN, exp);
      en0 = en_cycles;
      ar0 = mem.n_ar;
      cpu.write32(REG_CTRL, 32'h1);
      do cpu.read32(REG_CTRL, d); while (d[1] == 1'b0);
      chk("busy cleared", 32'(d[0]), 0);
      chk("bitstream clocks", 32'(en_cycles - en0), LEN);
      chk("read split at 4 KB", 32'(mem.n_ar - ar0), 2);
      chk("PROD count", mem.mem[DST >> 2], 32'(exp[0]));
      chk("AVG count", mem.mem[(DST >> 2) + 1], 32'(exp[1]));
      prod = real'(mem.mem[DST >> 2]) / LEN;
      avg  = real'(mem.mem[(DST >> 2) + 1]) / LEN;
      chk_near("product", prod, 0.3024, 0.03);
      chk_near("mean", avg, 0.75, 0.03);
      prod_sum += prod;
      avg_sum  += avg;
      $display("run %0d: product %.4f mean %.4f", r, prod, avg);
    end
    $display("average of %0d runs: product %.4f (exact 0.3024), mean %.4f (exact 0.75)",
             RUNS, prod_sum / RUNS, avg_sum / RUNS);
    chk_near("average product", prod_sum / RUNS, 0.3024, 0.015);
    chk_near("average mean", avg_sum / RUNS, 0.75, 0.015);
    chk("AXI protocol errors", 32'(mem.errors), 0);
    chk("AXI-Lite response errors", 32'(cpu.resp_errors), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
