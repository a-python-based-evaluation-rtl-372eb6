// sync_fifo: single-clock first-in first-out buffer with first-word
// fall-through output.
//
// The storage is an array with one write port and one registered read port, so
// it maps onto block RAM. A prefetch register in front of the read port holds
// the oldest word: `dout` is valid whenever `empty` is low, and `pop` removes
// it in the same clock. Capacity is DEPTH words in the array plus one in the
// prefetch register. `push` while `full` and `pop` while `empty` are ignored
// (and flagged by assertions). The framework states that its AXI interface
// buffers data in FIFOs held in block RAM; depth and structure here are this
// design's choice. The reset also disables the two assertions, which lint
// reports as rst_n being used both asynchronously and synchronously; that is
// intended.
module sync_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   stored;       // words in the array, not yet prefetched
  logic          dvalid;
  logic          do_push, do_pop, fetch;

  assign full    = (stored == (AW+1)'(DEPTH));
  assign empty   = !dvalid;
  assign do_push = push && !full;
  assign do_pop  = pop && dvalid;
  assign fetch   = (stored != '0) && (!dvalid || do_pop);

  always_ff @(posedge clk) begin
    if (do_push)
      mem[wptr] <= din;
    if (fetch)
      dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      rptr   <= '0;
      stored <= '0;
      dvalid <= 1'b0;
    end else begin
      if (do_push)
        wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (fetch)
        rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      stored <= stored + (AW+1)'(do_push) - (AW+1)'(fetch);
      dvalid <= fetch || (dvalid && !do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");

endmodule
