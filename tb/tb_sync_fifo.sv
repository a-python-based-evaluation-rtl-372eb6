// tb_sync_fifo: self-checking testbench for sync_fifo (DEPTH 8 and 512).
// Random push/pop traffic is checked against a queue model: output data and
// order, `empty`, and `full` at the exact capacity (DEPTH + 1 words, counting
// the output register). Phases with heavy pushing fill the FIFO, phases with
// heavy popping drain it.
module tb_sync_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;

  always #5 clk = ~clk;

  logic        push8, pop8, full8, empty8;
  logic [31:0] din8, dout8;
  sync_fifo #(.W(32), .DEPTH(8)) dut8 (.clk, .rst_n, .push(push8), .din(din8), .full(full8),
                                       .pop(pop8), .dout(dout8), .empty(empty8));
  logic        push5, pop5, full5, empty5;
  logic [31:0] din5, dout5;
  sync_fifo dut512 (.clk, .rst_n, .push(push5), .din(din5), .full(full5),
                    .pop(pop5), .dout(dout5), .empty(empty5));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // Random traffic on one FIFO, checked against a queue model. A pushed word
  // reaches the output two clocks later (array write, then prefetch), so the
  // model tracks each word's age; the head is visible once its age is 2.
  // Capacity is DEPTH + 1: full must be high at DEPTH + 1 words and may only be
  // high from DEPTH words on.
  task automatic traffic(int depth, int push_pct, int pop_pct, int n);
    logic [31:0] q [$];
    int age [$];
    bit vis, f, e, drain;
    logic [31:0] d;
    for (int i = 0; i < n + 4 * depth + 20; i++) begin
      drain = (i >= n);
      @(negedge clk);
      foreach (age[j]) age[j]++;
      vis = (q.size() != 0) && (age[0] >= 2);
      f = (depth == 8) ? full8 : full5;
      e = (depth == 8) ? empty8 : empty5;
      d = (depth == 8) ? dout8 : dout5;
      chk("empty", 32'(e), 32'(!vis));
      checks++;
      if ((q.size() == depth + 1 && !f) || (f && q.size() < depth)) begin
        failures++;
        if (failures < 10) $display("FAIL full=%0d with %0d words", f, q.size());
      end
      if (vis) chk("dout", d, q[0]);
      if (f) fulls++;
      if (e) empties++;
      if (depth == 8) begin
        push8 = !drain && ($urandom_range(0, 99) < push_pct) && !f;
        pop8  = (drain || ($urandom_range(0, 99) < pop_pct)) && !e;
        din8  = $urandom;
        if (pop8) begin void'(q.pop_front()); void'(age.pop_front()); end
        if (push8) begin q.push_back(din8); age.push_back(0); end
      end else begin
        push5 = !drain && ($urandom_range(0, 99) < push_pct) && !f;
        pop5  = (drain || ($urandom_range(0, 99) < pop_pct)) && !e;
        din5  = $urandom;
        if (pop5) begin void'(q.pop_front()); void'(age.pop_front()); end
        if (push5) begin q.push_back(din5); age.push_back(0); end
      end
    end
    chk("drained", 32'(q.size()), 0);
    @(negedge clk);
    push8 = 0; push5 = 0; pop8 = 0; pop5 = 0;
  endtask

  initial begin
    push8 = 0; pop8 = 0; din8 = 0; push5 = 0; pop5 = 0; din5 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    traffic(8, 80, 30, 2000);
    traffic(8, 30, 80, 2000);
    traffic(8, 100, 100, 500);
    traffic(512, 90, 20, 3000);
    traffic(512, 100, 0, 600);
    traffic(512, 50, 50, 3000);
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL full (%0d) or empty (%0d) never reached", fulls, empties);
    end
    $display("fifo: full seen %0d, empty seen %0d", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
