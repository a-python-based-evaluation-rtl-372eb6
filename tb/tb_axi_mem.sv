// tb_axi_mem: behavioural AXI4 memory slave for the testbenches (stands for
// the processor's memory behind its high-performance port).
//
// One read burst and one write burst are served at a time. ARREADY, AWREADY,
// WREADY and the raising of RVALID are gated by random draws, so the master
// sees wait states (about STALL_PCT percent of cycles). It checks the protocol
// rules the master must keep - INCR bursts of 4-byte beats, at most 16 beats,
// no 4 KB crossing, WLAST on the last beat only - and counts violations in
// `errors`. Statistics for the testbenches: bursts, read beats stalled by a
// low RREADY, write beats delayed by a low WVALID.
module tb_axi_mem #(
  parameter int WORDS     = 16384,
  parameter int STALL_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [31:0] mem [WORDS];
  int errors = 0, n_ar = 0, n_aw = 0, n_rstall = 0, n_wwait = 0, n_4k_split = 0;

  logic        g_ar, g_aw, g_w, g_r;
  logic        r_busy, w_busy;
  logic [31:0] r_addr, w_addr;
  logic [8:0]  r_left, w_left;

  assign rresp   = 2'b00;
  assign bresp   = 2'b00;
  assign arready = !r_busy && g_ar;
  assign awready = !w_busy && !bvalid && g_aw;
  assign wready  = w_busy && g_w;
  assign rdata   = mem[r_addr[31:2] % WORDS];
  assign rlast   = (r_left == 9'd1);

  function automatic bit burst_ok(logic [31:0] a, logic [7:0] len, logic [2:0] sz, logic [1:0] bt);
    return (sz == 3'd2) && (bt == 2'b01) && (len <= 8'd15) && (a[1:0] == 2'b00)
           && ({20'd0, a[11:0]} + 32'(len + 1) * 4 <= 32'h1000);
  endfunction

  always_ff @(posedge clk) begin
    g_ar <= ($urandom_range(0, 99) >= STALL_PCT);
    g_aw <= ($urandom_range(0, 99) >= STALL_PCT);
    g_w  <= ($urandom_range(0, 99) >= STALL_PCT);
    g_r  <= ($urandom_range(0, 99) >= STALL_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_busy <= 1'b0; w_busy <= 1'b0; rvalid <= 1'b0; bvalid <= 1'b0;
      r_addr <= '0; w_addr <= '0; r_left <= '0; w_left <= '0;
    end else begin
      // read address
      if (arvalid && arready) begin
        n_ar <= n_ar + 1;
        if (!burst_ok(araddr, arlen, arsize, arburst)) errors <= errors + 1;
        if ({20'd0, araddr[11:0]} + 32'(arlen + 1) * 4 == 32'h1000 && arlen != 8'd15)
          n_4k_split <= n_4k_split + 1;
        r_busy <= 1'b1;
        r_addr <= araddr;
        r_left <= 9'(arlen) + 9'd1;
      end
      // read data
      if (rvalid && !rready) n_rstall <= n_rstall + 1;
      if (rvalid && rready) begin
        r_addr <= r_addr + 32'd4;
        r_left <= r_left - 9'd1;
        if (r_left == 9'd1) r_busy <= 1'b0;
        rvalid <= (r_left > 9'd1) && g_r;
      end else if (!rvalid) begin
        rvalid <= r_busy && g_r;
      end
      // write address
      if (awvalid && awready) begin
        n_aw <= n_aw + 1;
        if (!burst_ok(awaddr, awlen, awsize, awburst)) errors <= errors + 1;
        w_busy <= 1'b1;
        w_addr <= awaddr;
        w_left <= 9'(awlen) + 9'd1;
      end
      // write data
      if (w_busy && !wvalid) n_wwait <= n_wwait + 1;
      if (wvalid && wready) begin
        if (wstrb != 4'hF || (wlast != (w_left == 9'd1))) errors <= errors + 1;
        mem[w_addr[31:2] % WORDS] <= wdata;
        w_addr <= w_addr + 32'd4;
        w_left <= w_left - 9'd1;
        if (w_left == 9'd1) begin
          w_busy <= 1'b0;
          bvalid <= 1'b1;
        end
      end
      if (bvalid && bready) bvalid <= 1'b0;
    end
  end
endmodule
