// tb_axil_master: behavioural AXI4-Lite master for the testbenches (stands for
// the processor's general-purpose port). write32/read32 perform one transfer;
// address and data of a write are offered with independent random delays.
module tb_axil_master (
  input  logic        clk,
  output logic [5:0]  awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [5:0]  araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);
  int resp_errors = 0;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  task automatic write32(input logic [5:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    bit aw_done = 0, w_done = 0;
    int aw_delay = $urandom_range(0, 2), w_delay = $urandom_range(0, 2);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s;
    while (!(aw_done && w_done)) begin
      awvalid = !aw_done && (aw_delay == 0);
      wvalid  = !w_done && (w_delay == 0);
      if (aw_delay > 0) aw_delay--;
      if (w_delay > 0) w_delay--;
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready) w_done = 1;
      @(negedge clk);
    end
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    if (bresp != 2'b00) resp_errors++;
    @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read32(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0; rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    if (rresp != 2'b00) resp_errors++;
    @(posedge clk);
    @(negedge clk);
    rready = 0;
  endtask
endmodule
