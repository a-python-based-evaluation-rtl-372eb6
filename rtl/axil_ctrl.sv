// axil_ctrl: AXI4-Lite slave holding the control registers of the core.
//
// The processor programs the bitstream length and the byte addresses of the
// input and output arrays, then writes 1 to bit 0 of CTRL to start a run; it
// polls bit 1 (done) of CTRL to see the run end. That these three values are
// set over the control port follows the framework; the register map below,
// the start/done protocol and the read-only size registers are this design's
// choice.
//   0x00 CTRL    W: bit0 = start (ignored while busy)  R: bit0 busy, bit1 done
//   0x04 CYCLE   R/W bitstream length l
//   0x08 SRC     R/W byte address of the input array (bin, seed pairs)
//   0x0C DST     R/W byte address of the output array (counter values)
//   0x10 NUM_SRC R   number of SNGs
//   0x14 NUM_DST R   number of counters
// done is set by a `done` pulse from the core and cleared by the next start.
//
// Handshake: the write address and write data are accepted independently;
// the write happens, and BVALID rises, once both are held. One read is served
// at a time, RVALID rising the clock after the address handshake. Responses
// are always OKAY; unknown offsets read as 0 and ignore writes.
module axil_ctrl
  import bitpack_pkg::*;
#(
  parameter int NUM_SRC = 6,
  parameter int NUM_DST = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // to / from the core
  output logic        start,
  output logic [31:0] cycles,
  output logic [31:0] src_addr,
  output logic [31:0] dst_addr,
  input  logic        busy,
  input  logic        done
);

  logic        aw_held, w_held;
  logic [5:0]  aw_addr;
  logic [31:0] w_data;
  logic [3:0]  w_strb;
  logic        done_q;
  logic        do_write;

  assign s_axil_awready = !aw_held && !s_axil_bvalid;
  assign s_axil_wready  = !w_held && !s_axil_bvalid;
  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_bresp   = AXI_RESP_OKAY;
  assign s_axil_rresp   = AXI_RESP_OKAY;
  assign do_write       = aw_held && w_held && !s_axil_bvalid;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] strb);
    for (int i = 0; i < 4; i++)
      if (strb[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held       <= 1'b0;
      w_held        <= 1'b0;
      aw_addr       <= '0;
      w_data        <= '0;
      w_strb        <= '0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      cycles        <= '0;
      src_addr      <= '0;
      dst_addr      <= '0;
      start         <= 1'b0;
      done_q        <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_axil_awvalid && s_axil_awready) begin
        aw_held <= 1'b1;
        aw_addr <= s_axil_awaddr;
      end
      if (s_axil_wvalid && s_axil_wready) begin
        w_held <= 1'b1;
        w_data <= s_axil_wdata;
        w_strb <= s_axil_wstrb;
      end
      if (do_write) begin
        aw_held       <= 1'b0;
        w_held        <= 1'b0;
        s_axil_bvalid <= 1'b1;
        case ({aw_addr[5:2], 2'b00})
          REG_CTRL:  if (w_strb[0] && w_data[0] && !busy) begin
                       start  <= 1'b1;
                       done_q <= 1'b0;
                     end
          REG_CYCLE: cycles   <= merge(cycles,   w_data, w_strb);
          REG_SRC:   src_addr <= merge(src_addr, w_data, w_strb);
          REG_DST:   dst_addr <= merge(dst_addr, w_data, w_strb);
          default: ;
        endcase
      end else if (s_axil_bvalid && s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
      if (done)
        done_q <= 1'b1;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        case ({s_axil_araddr[5:2], 2'b00})
          REG_CTRL:    s_axil_rdata <= {30'd0, done_q, busy};
          REG_CYCLE:   s_axil_rdata <= cycles;
          REG_SRC:     s_axil_rdata <= src_addr;
          REG_DST:     s_axil_rdata <= dst_addr;
          REG_NUM_SRC: s_axil_rdata <= 32'(NUM_SRC);
          REG_NUM_DST: s_axil_rdata <= 32'(NUM_DST);
          default:     s_axil_rdata <= '0;
        endcase
      end else if (s_axil_rvalid && s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

endmodule
