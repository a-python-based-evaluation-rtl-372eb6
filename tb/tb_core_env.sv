// tb_core_env: one bitpack_top with its behavioural processor and memory,
// running one checked run on its own. Used by tb_bitpack_top_eval to run many
// configurations side by side. After ARESETN rises it programs a bitstream
// length of LEN, fills the input array with random values and seeds, starts
// the core, waits for done, and compares every output word with the exact
// bit-level reference model; `finished` then rises with the check counts.
module tb_core_env
  import bitpack_pkg::*;
  import tb_sc_ref_pkg::*;
#(
  parameter user_circuit_e USER = UC_PROD,
  parameter int            N    = 4,
  parameter int            LEN  = 256
) (
  input  logic ACLK,
  input  logic ARESETN,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int NSRC = num_src(USER, N), NDST = num_dst(USER, N);
  localparam logic [31:0] SRC = 32'h0000_0F00, DST = 32'h0000_3000;


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

  bitpack_top #(.USER(USER), .N(N)) dut (
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

  tb_axi_mem #(.WORDS(16384), .STALL_PCT(20)) mem (
    .clk(ACLK), .rst_n(ARESETN), .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata,
    .rresp, .rlast, .rvalid, .rready, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready
  );

  initial begin
    logic [31:0] d, vals [], seeds [];
    int scfg [], dcfg [], exp [];
    finished = 0; checks = 0; failures = 0;
    vals = new[NSRC]; seeds = new[NSRC]; scfg = new[NSRC]; dcfg = new[NDST];
    foreach (scfg[k]) scfg[k] = 0;
    foreach (dcfg[j]) dcfg[j] = 0;
    @(posedge ARESETN);
    cpu.read32(REG_NUM_SRC, d);
    checks++; if (d != NSRC) failures++;
    cpu.read32(REG_NUM_DST, d);
    checks++; if (d != NDST) failures++;
    cpu.write32(REG_CYCLE, LEN);
    cpu.write32(REG_SRC, SRC);
    cpu.write32(REG_DST, DST);
    for (int k = 0; k < NSRC; k++) begin
      // values near 1 so that long products stay observable
      vals[k]  = 32'hE000_0000 | ($urandom & 32'h1FFF_FFFF);
      seeds[k] = $urandom;
      mem.mem[(SRC >> 2) + 2 * k]     = vals[k];
      mem.mem[(SRC >> 2) + 2 * k + 1] = seeds[k];
    end
    for (int j = 0; j < NDST; j++) mem.mem[(DST >> 2) + j] = 32'hFFFF_FFFF;
    run_ref(int'(USER), N, NSRC, NDST, scfg, dcfg, vals, seeds, LEN, exp);
    cpu.write32(REG_CTRL, 32'h1);
    do cpu.read32(REG_CTRL, d); while (d[1] == 1'b0);
    for (int j = 0; j < NDST; j++) begin
      checks++;
      if (mem.mem[(DST >> 2) + j] != 32'(exp[j])) begin
        failures++;
        $display("FAIL %s N=%0d output %0d: %0d, expected %0d", USER.name(), N, j,
                 mem.mem[(DST >> 2) + j], exp[j]);
      end
    end
    checks++; if (mem.errors != 0) failures++;
    $display("%s N=%0d: %0d SNGs, %0d counters, outputs %s", USER.name(), N, NSRC, NDST,
             (failures == 0) ? "match" : "MISMATCH");
    finished = 1;
  end
endmodule
