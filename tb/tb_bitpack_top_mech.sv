// tb_bitpack_top_mech: end-to-end test of bitpack_top in a configuration
// chosen to make every mechanism of the core happen: sc_eprod with N = 8 as
// user circuit (8 SNGs, 4 counters), unipolar, bipolar and two-line encodings
// mixed on SNGs and counters, 2-word FIFOs and at most 4 beats per burst.
//
// Twelve runs with random values, seeds and bitstream lengths (including 0)
// are checked word for word against an exact bit-level reference model. The
// test counts and requires at least once: a read split at a 4 KB boundary, a
// read in several bursts, the wrapper waiting on an empty read FIFO, the
// wrapper waiting on a full write FIFO, a write beat waiting for data, a start
// written while busy being ignored, and each of the three encodings.
module tb_bitpack_top_mech;
  import bitpack_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NSRC = 8, NDST = 4, RUNS = 12;
  localparam logic [31:0] SRC = 32'h0000_0FF8, DST = 32'h0000_1FF8;
  localparam sn_cfg_e S_CFG [NSRC] = '{SN_UNIPOLAR, SN_BIPOLAR, SN_TWOLINE, SN_UNIPOLAR,
                                       SN_BIPOLAR, SN_UNIPOLAR, SN_TWOLINE, SN_UNIPOLAR};
  localparam sn_cfg_e D_CFG [NDST] = '{SN_UNIPOLAR, SN_BIPOLAR, SN_TWOLINE, SN_BIPOLAR};

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

  bitpack_top #(
    .USER(UC_EPROD), .N(8), .FIFO_DEPTH(2), .MAX_BURST(4), .SRC_CFG(S_CFG), .DST_CFG(D_CFG)
  ) dut (
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

  int load_waits = 0, unload_waits = 0;
  always @(posedge ACLK) begin
    if (dut.u_wrap.state == 2'd1 && dut.rd_empty) load_waits++;
    if (dut.u_wrap.state == 2'd3 && dut.wr_full) unload_waits++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
    $display("%-28s %0d", what, n);
  endtask

  initial begin
    logic [31:0] d, vals [], seeds [];
    int scfg [], dcfg [], exp [];
    int en0, ar0, len, ignored = 0, splits = 0, multi = 0;
    int used [4] = '{0, 0, 0, 0};
    vals  = new[NSRC];
    seeds = new[NSRC];
    scfg  = new[NSRC];
    dcfg  = new[NDST];
    foreach (scfg[k]) begin scfg[k] = int'(S_CFG[k]); used[scfg[k]]++; end
    foreach (dcfg[j]) begin dcfg[j] = int'(D_CFG[j]); used[dcfg[j]]++; end
    repeat (4) @(posedge ACLK);
    ARESETN = 1;
    cpu.read32(REG_NUM_SRC, d); chk("NUM_SRC", d, NSRC);
    cpu.read32(REG_NUM_DST, d); chk("NUM_DST", d, NDST);
    cpu.write32(REG_SRC, SRC);
    cpu.write32(REG_DST, DST);
    for (int r = 0; r < RUNS; r++) begin
      len = (r == 3) ? 0 : $urandom_range(1, 2000);
      cpu.write32(REG_CYCLE, 32'(len));
      for (int k = 0; k < NSRC; k++) begin
        vals[k]  = $urandom;
        seeds[k] = $urandom;
        mem.mem[(SRC >> 2) + 2 * k]     = vals[k];
        mem.mem[(SRC >> 2) + 2 * k + 1] = seeds[k];
      end
      for (int j = 0; j < NDST; j++) mem.mem[(DST >> 2) + j] = 32'hFFFF_FFFF;
      run_ref(2, 8, NSRC, NDST, scfg, dcfg, vals, seeds, len, exp);
      en0 = en_cycles;
      ar0 = mem.n_ar;
      cpu.write32(REG_CTRL, 32'h1);
      if (len > 100) begin
        // a second start while the run is going must be ignored
        cpu.read32(REG_CTRL, d);
        if (d[0]) begin
          cpu.write32(REG_CTRL, 32'h1);
          ignored++;
        end
      end
      do cpu.read32(REG_CTRL, d); while (d[1] == 1'b0);
      chk("bitstream clocks", 32'(en_cycles - en0), 32'(len));
      if (mem.n_ar - ar0 > 1) multi++;
      if (mem.n_ar - ar0 > (2 * NSRC) / 4) splits++;
      for (int j = 0; j < NDST; j++)
        chk($sformatf("run %0d count %0d", r, j), mem.mem[(DST >> 2) + j], 32'(exp[j]));
    end
    chk("AXI protocol errors", 32'(mem.errors), 0);
    chk("AXI-Lite response errors", 32'(cpu.resp_errors), 0);
    need("read split at 4 KB", splits);
    need("read in several bursts", multi);
    need("wait on empty read FIFO", load_waits);
    need("wait on full write FIFO", unload_waits);
    need("write beat waits for data", mem.n_wwait);
    need("start ignored while busy", ignored);
    need("unipolar encoding", used[0]);
    need("bipolar encoding", used[1]);
    need("two-line encoding", used[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
