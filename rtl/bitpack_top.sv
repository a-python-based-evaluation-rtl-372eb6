// bitpack_top: evaluation core for stochastic-computing (SC) circuits on an
// FPGA SoC.
//
// An SC circuit works on bitstreams, so it cannot be exercised on its own: its
// inputs must be turned into bitstreams by stochastic number generators and
// its outputs counted back into binary. This core does both around a user
// circuit and lets a processor run it through two AXI ports:
//   * axil_ctrl  (AXI4-Lite slave, processor's general-purpose port) holds the
//                bitstream length and the input/output array addresses, and
//                starts a run;
//   * axi_master (AXI4 master, processor's high-performance port) reads the
//                input array - one {value, seed} pair of 32-bit words per SNG -
//                into its read FIFO and writes the counter values from its
//                write FIFO to the output array;
//   * user_wrapper takes the pairs from the read FIFO into the SNGs, runs the
//                user circuit for the programmed number of clocks and shifts
//                the counters out into the write FIFO.
// A run: the processor writes CYCLE, SRC and DST, writes 1 to CTRL, and polls
// CTRL until bit 1 (done) is set; the output array then holds one 32-bit count
// per user-circuit output bit, to be divided by the bitstream length.
// Reads, bitstream generation and writes overlap only at the FIFOs: the write
// address of the first burst may go out before its data exists.
//
// The three-part structure, the two ports and what travels over each follow
// the framework; the register map, word order and handshakes are this design's
// choices (see the sub-blocks). Interconnect, processor and reset generator
// are outside this core: ACLK/ARESETN and both AXI ports are its pins.
// The wrapper's proc_en (bitstream enable) is left unconnected here on
// purpose: nothing outside the wrapper needs it. The run-tracking flops use
// the asynchronous reset while the FIFO assertions below use it to disable
// themselves; lint reports that mix, and it is intended.
module bitpack_top
  import bitpack_pkg::*;
#(
  parameter user_circuit_e USER       = UC_ADDMUL,
  parameter int            N          = 4,
  parameter int            FIFO_DEPTH = 512,
  parameter int            MAX_BURST  = 16,
  parameter int            NUM_SRC    = num_src(USER, N),
  parameter int            NUM_DST    = num_dst(USER, N),
  parameter sn_cfg_e       SRC_CFG [NUM_SRC] = '{default: SN_UNIPOLAR},
  parameter sn_cfg_e       DST_CFG [NUM_DST] = '{default: SN_UNIPOLAR}
) (
  input  logic        ACLK,
  input  logic        ARESETN,
  // AXI4-Lite control slave
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [5:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4 data master
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready
);

  logic        start;
  logic [31:0] cycles, src_addr, dst_addr;
  logic        running, run_done;
  logic        wrap_done, wrap_seen, wr_done, wr_seen;
  logic        wrap_busy, dma_busy;
  logic        rd_pop, rd_empty, wr_push, wr_full;
  logic [31:0] rd_data, wr_data;

  axil_ctrl #(.NUM_SRC(NUM_SRC), .NUM_DST(NUM_DST)) u_axil (
    .clk            (ACLK),
    .rst_n          (ARESETN),
    .s_axil_awaddr  (s_axil_awaddr),
    .s_axil_awvalid (s_axil_awvalid),
    .s_axil_awready (s_axil_awready),
    .s_axil_wdata   (s_axil_wdata),
    .s_axil_wstrb   (s_axil_wstrb),
    .s_axil_wvalid  (s_axil_wvalid),
    .s_axil_wready  (s_axil_wready),
    .s_axil_bresp   (s_axil_bresp),
    .s_axil_bvalid  (s_axil_bvalid),
    .s_axil_bready  (s_axil_bready),
    .s_axil_araddr  (s_axil_araddr),
    .s_axil_arvalid (s_axil_arvalid),
    .s_axil_arready (s_axil_arready),
    .s_axil_rdata   (s_axil_rdata),
    .s_axil_rresp   (s_axil_rresp),
    .s_axil_rvalid  (s_axil_rvalid),
    .s_axil_rready  (s_axil_rready),
    .start          (start),
    .cycles         (cycles),
    .src_addr       (src_addr),
    .dst_addr       (dst_addr),
    .busy           (running),
    .done           (run_done)
  );

  // A run ends when the wrapper has unloaded and the last write is answered.
  always_ff @(posedge ACLK or negedge ARESETN) begin
    if (!ARESETN) begin
      running   <= 1'b0;
      wrap_seen <= 1'b0;
      wr_seen   <= 1'b0;
    end else if (start) begin
      running   <= 1'b1;
      wrap_seen <= 1'b0;
      wr_seen   <= 1'b0;
    end else if (run_done) begin
      running   <= 1'b0;
    end else begin
      if (wrap_done) wrap_seen <= 1'b1;
      if (wr_done)   wr_seen   <= 1'b1;
    end
  end
  assign run_done = running && (wrap_seen || wrap_done) && (wr_seen || wr_done)
                    && !wrap_busy && !dma_busy;

  axi_master #(.FIFO_DEPTH(FIFO_DEPTH), .MAX_BURST(MAX_BURST)) u_axi (
    .clk           (ACLK),
    .rst_n         (ARESETN),
    .start         (start),
    .src_addr      (src_addr),
    .rd_words      (32'(2 * NUM_SRC)),
    .dst_addr      (dst_addr),
    .wr_words      (32'(NUM_DST)),
    .wr_done       (wr_done),
    .busy          (dma_busy),
    .rd_pop        (rd_pop),
    .rd_data       (rd_data),
    .rd_empty      (rd_empty),
    .wr_push       (wr_push),
    .wr_data       (wr_data),
    .wr_full       (wr_full),
    .m_axi_araddr  (m_axi_araddr),
    .m_axi_arlen   (m_axi_arlen),
    .m_axi_arsize  (m_axi_arsize),
    .m_axi_arburst (m_axi_arburst),
    .m_axi_arvalid (m_axi_arvalid),
    .m_axi_arready (m_axi_arready),
    .m_axi_rdata   (m_axi_rdata),
    .m_axi_rresp   (m_axi_rresp),
    .m_axi_rlast   (m_axi_rlast),
    .m_axi_rvalid  (m_axi_rvalid),
    .m_axi_rready  (m_axi_rready),
    .m_axi_awaddr  (m_axi_awaddr),
    .m_axi_awlen   (m_axi_awlen),
    .m_axi_awsize  (m_axi_awsize),
    .m_axi_awburst (m_axi_awburst),
    .m_axi_awvalid (m_axi_awvalid),
    .m_axi_awready (m_axi_awready),
    .m_axi_wdata   (m_axi_wdata),
    .m_axi_wstrb   (m_axi_wstrb),
    .m_axi_wlast   (m_axi_wlast),
    .m_axi_wvalid  (m_axi_wvalid),
    .m_axi_wready  (m_axi_wready),
    .m_axi_bresp   (m_axi_bresp),
    .m_axi_bvalid  (m_axi_bvalid),
    .m_axi_bready  (m_axi_bready)
  );

  user_wrapper #(
    .USER    (USER),
    .N       (N),
    .NUM_SRC (NUM_SRC),
    .NUM_DST (NUM_DST),
    .SRC_CFG (SRC_CFG),
    .DST_CFG (DST_CFG)
  ) u_wrap (
    .clk      (ACLK),
    .rst_n    (ARESETN),
    .start    (start),
    .cycles   (cycles),
    .busy     (wrap_busy),
    .done     (wrap_done),
    .proc_en  (),
    .rd_pop   (rd_pop),
    .rd_data  (rd_data),
    .rd_empty (rd_empty),
    .wr_push  (wr_push),
    .wr_data  (wr_data),
    .wr_full  (wr_full)
  );

endmodule
