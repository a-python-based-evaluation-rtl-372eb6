// axi_master: AXI4 master that moves the core's arrays between memory and two
// FIFOs.
//
// On `start` two independent engines begin. The read engine fetches rd_words
// 32-bit words from src_addr into the read FIFO; the wrapper takes them from
// the FIFO's output. The write engine takes wr_words words from the write FIFO,
// filled by the wrapper, and stores them at dst_addr; `wr_done` pulses once the
// last write response has arrived. Both FIFOs sit inside this block, as in the
// framework's block diagram; the burst policy is this design's choice:
//   * INCR bursts of 32-bit beats, at most MAX_BURST beats (16 keeps the
//     bursts legal for AXI3 ports), never crossing a 4 KB boundary;
//   * one read burst and one write burst outstanding at a time;
//   * RREADY is low while the read FIFO is full (back-pressure on the memory);
//   * WVALID is low while the write FIFO is empty (the write address of a
//     burst may be issued before its data exists);
//   * addresses must be 4-byte aligned; response codes are not checked.
// AXI IDs, cache and protection attributes are left to the interconnect.
// The FIFOs' assertions are disabled by rst_n, which lint reports as a
// synchronous use of the asynchronous reset; that is intended.
module axi_master
  import bitpack_pkg::*;
#(
  parameter int FIFO_DEPTH = 512,
  parameter int MAX_BURST  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        start,
  input  logic [31:0] src_addr,
  input  logic [31:0] rd_words,
  input  logic [31:0] dst_addr,
  input  logic [31:0] wr_words,
  output logic        wr_done,
  output logic        busy,
  // read FIFO, output side
  input  logic        rd_pop,
  output logic [31:0] rd_data,
  output logic        rd_empty,
  // write FIFO, input side
  input  logic        wr_push,
  input  logic [31:0] wr_data,
  output logic        wr_full,
  // AXI4 master
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

  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;

  rstate_e     rstate;
  wstate_e     wstate;
  logic [31:0] rd_ptr, rd_left, wr_ptr, wr_left;
  logic [8:0]  rd_blen, wr_blen;
  logic [8:0]  wr_beats;
  logic        rfifo_full, wfifo_empty;
  logic [31:0] wfifo_dout;

  // Beats of the next burst: limited by MAX_BURST, by what is left and by the
  // next 4 KB boundary.
  function automatic logic [8:0] burst_len(logic [31:0] addr, logic [31:0] left);
    logic [31:0] to_4k;
    logic [31:0] n;
    to_4k = (32'h1000 - {20'd0, addr[11:0]}) >> 2;
    n     = 32'(MAX_BURST);
    if (left < n)  n = left;
    if (to_4k < n) n = to_4k;
    return n[8:0];
  endfunction

  assign rd_blen = burst_len(rd_ptr, rd_left);
  assign wr_blen = burst_len(wr_ptr, wr_left);

  // ---------------- read engine ----------------
  assign m_axi_araddr  = rd_ptr;
  assign m_axi_arlen   = 8'(rd_blen - 9'd1);
  assign m_axi_arsize  = 3'd2;
  assign m_axi_arburst = AXI_BURST_INCR;
  assign m_axi_arvalid = (rstate == R_ADDR);
  assign m_axi_rready  = (rstate == R_DATA) && !rfifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate  <= R_IDLE;
      rd_ptr  <= '0;
      rd_left <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (start) begin
          rd_ptr  <= src_addr;
          rd_left <= rd_words;
          if (rd_words != '0) rstate <= R_ADDR;
        end
        R_ADDR: if (m_axi_arready) begin
          rd_ptr  <= rd_ptr + {21'd0, rd_blen, 2'b00};
          rd_left <= rd_left - 32'(rd_blen);
          rstate  <= R_DATA;
        end
        R_DATA: if (m_axi_rvalid && m_axi_rready && m_axi_rlast)
          rstate <= (rd_left != '0) ? R_ADDR : R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_rfifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (m_axi_rvalid && m_axi_rready),
    .din   (m_axi_rdata),
    .full  (rfifo_full),
    .pop   (rd_pop),
    .dout  (rd_data),
    .empty (rd_empty)
  );

  // ---------------- write engine ----------------
  assign m_axi_awaddr  = wr_ptr;
  assign m_axi_awlen   = 8'(wr_blen - 9'd1);
  assign m_axi_awsize  = 3'd2;
  assign m_axi_awburst = AXI_BURST_INCR;
  assign m_axi_awvalid = (wstate == W_ADDR);
  assign m_axi_wvalid  = (wstate == W_DATA) && !wfifo_empty;
  assign m_axi_wdata   = wfifo_dout;
  assign m_axi_wstrb   = 4'hF;
  assign m_axi_wlast   = (wr_beats == 9'd1);
  assign m_axi_bready  = (wstate == W_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate   <= W_IDLE;
      wr_ptr   <= '0;
      wr_left  <= '0;
      wr_beats <= '0;
      wr_done  <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      unique case (wstate)
        W_IDLE: if (start) begin
          wr_ptr  <= dst_addr;
          wr_left <= wr_words;
          if (wr_words != '0) wstate <= W_ADDR;
          else                wr_done <= 1'b1;
        end
        W_ADDR: if (m_axi_awready) begin
          wr_ptr   <= wr_ptr + {21'd0, wr_blen, 2'b00};
          wr_left  <= wr_left - 32'(wr_blen);
          wr_beats <= wr_blen;
          wstate   <= W_DATA;
        end
        W_DATA: if (m_axi_wvalid && m_axi_wready) begin
          wr_beats <= wr_beats - 9'd1;
          if (m_axi_wlast) wstate <= W_RESP;
        end
        W_RESP: if (m_axi_bvalid) begin
          if (wr_left != '0) wstate <= W_ADDR;
          else begin
            wstate  <= W_IDLE;
            wr_done <= 1'b1;
          end
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (wr_push),
    .din   (wr_data),
    .full  (wr_full),
    .pop   (m_axi_wvalid && m_axi_wready),
    .dout  (wfifo_dout),
    .empty (wfifo_empty)
  );

  assign busy = (rstate != R_IDLE) || (wstate != W_IDLE);

  // AXI rule: a raised VALID stays up, with stable payload, until READY.
  logic        arv_q, awv_q;
  logic [31:0] ara_q, awa_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arv_q <= 1'b0;
      awv_q <= 1'b0;
      ara_q <= '0;
      awa_q <= '0;
    end else begin
      arv_q <= m_axi_arvalid && !m_axi_arready;
      awv_q <= m_axi_awvalid && !m_axi_awready;
      ara_q <= m_axi_araddr;
      awa_q <= m_axi_awaddr;
      if (arv_q) assert (m_axi_arvalid && m_axi_araddr == ara_q)
        else $error("axi_master: AR dropped or changed before ARREADY");
      if (awv_q) assert (m_axi_awvalid && m_axi_awaddr == awa_q)
        else $error("axi_master: AW dropped or changed before AWREADY");
    end
  end

endmodule
