// tb_axil_ctrl: self-checking testbench for axil_ctrl through a behavioural
// AXI4-Lite master. Checks write/read-back of CYCLE, SRC and DST (with byte
// strobes), the read-only size registers, that a start write gives exactly one
// start pulse and is ignored while busy, and that done is sticky until the
// next start.
module tb_axil_ctrl;
  import bitpack_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        start, busy, done;
  logic [31:0] cycles, src_addr, dst_addr;
  int          starts = 0;

  axil_ctrl #(.NUM_SRC(6), .NUM_DST(2)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .start, .cycles, .src_addr, .dst_addr, .busy, .done
  );

  tb_axil_master bfm (
    .clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp, .bvalid, .bready,
    .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d, c, s, t;
    busy = 0; done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bfm.read32(6'h00, d); chk("ctrl after reset", d, 0);
    for (int i = 0; i < 10; i++) begin
      c = $urandom; s = $urandom; t = $urandom;
      bfm.write32(6'h04, c);
      bfm.write32(6'h08, s);
      bfm.write32(6'h0C, t);
      bfm.read32(6'h04, d); chk("cycle", d, c); chk("cycles port", cycles, c);
      bfm.read32(6'h08, d); chk("src", d, s);   chk("src port", src_addr, s);
      bfm.read32(6'h0C, d); chk("dst", d, t);   chk("dst port", dst_addr, t);
    end
    bfm.write32(6'h04, 32'hAABBCCDD);
    bfm.write32(6'h04, 32'h11223344, 4'b0101);
    bfm.read32(6'h04, d); chk("strobes", d, 32'hAA22CC44);
    bfm.read32(6'h10, d); chk("num_src", d, 6);
    bfm.read32(6'h14, d); chk("num_dst", d, 2);
    bfm.read32(6'h3C, d); chk("unmapped", d, 0);
    bfm.write32(6'h10, 32'h55);
    bfm.read32(6'h10, d); chk("num_src ro", d, 6);
    // start / busy / done
    bfm.write32(6'h00, 32'h1);
    repeat (2) @(posedge clk);
    chk("one start", 32'(starts), 1);
    busy = 1;
    bfm.read32(6'h00, d); chk("busy bit", d, 32'h1);
    bfm.write32(6'h00, 32'h1);
    repeat (2) @(posedge clk);
    chk("start ignored while busy", 32'(starts), 1);
    @(negedge clk); busy = 0; done = 1; @(negedge clk); done = 0;
    bfm.read32(6'h00, d); chk("done set", d, 32'h2);
    bfm.read32(6'h00, d); chk("done sticky", d, 32'h2);
    bfm.write32(6'h00, 32'h0);
    chk("zero write no start", 32'(starts), 1);
    bfm.write32(6'h00, 32'h1);
    repeat (2) @(posedge clk);
    chk("second start", 32'(starts), 2);
    bfm.read32(6'h00, d); chk("done cleared", d, 32'h0);
    chk("resp errors", 32'(bfm.resp_errors), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
