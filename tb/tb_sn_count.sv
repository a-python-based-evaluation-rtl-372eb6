// tb_sn_count: self-checking testbench for sn_count.
//
// Three counters (unipolar, bipolar, two-line) are fed the same random
// bitstreams with random enable gaps; a reference count kept here must match
// after every clock. Then clear, and a shift through a three-counter chain
// (shift_in of one is the value of the next) is checked.
module tb_sn_count;
  import bitpack_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, en, shift;
  logic [1:0] sn;
  logic [31:0] shift_in, v_u, v_b, v_t;
  logic [31:0] c0, c1, c2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sn_count #(.CFG(SN_UNIPOLAR)) dut_u (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in, .value(v_u));
  sn_count #(.CFG(SN_BIPOLAR))  dut_b (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in, .value(v_b));
  sn_count #(.CFG(SN_TWOLINE))  dut_t (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in, .value(v_t));

  // chain of three unipolar counters
  sn_count #(.CFG(SN_UNIPOLAR)) ch0 (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in(c1),    .value(c0));
  sn_count #(.CFG(SN_UNIPOLAR)) ch1 (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in(c2),    .value(c1));
  sn_count #(.CFG(SN_UNIPOLAR)) ch2 (.clk, .rst_n, .clear, .en, .sn, .shift, .shift_in(32'd7), .value(c2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  initial begin
    int ru, rb, rt;
    clear = 0; en = 0; shift = 0; sn = 0; shift_in = 32'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset", v_u, 0);
    for (int rep = 0; rep < 3; rep++) begin
      clear = 1; @(negedge clk); clear = 0;
      check("clear u", v_u, 0); check("clear b", v_b, 0); check("clear t", v_t, 0);
      ru = 0; rb = 0; rt = 0;
      for (int i = 0; i < 3000; i++) begin
        en = ($urandom_range(0, 4) != 0);
        sn = 2'($urandom);
        if (en) begin
          ru += sn[0];
          rb += sn[0] ? 1 : -1;
          rt += int'(sn[0]) - int'(sn[1]);
        end
        @(negedge clk);
        check("uni", v_u, ru); check("bip", v_b, rb); check("two", v_t, rt);
      end
      en = 0;
    end
    // shift chain: counts 1 each, then shift three times
    clear = 1; @(negedge clk); clear = 0;
    sn = 2'b01; en = 1;
    repeat (5) @(negedge clk);
    en = 0;
    check("ch pre", c0, 5);
    shift = 1; en = 1;   // shift wins over count
    @(negedge clk);
    check("ch s1 c0", c0, 5); check("ch s1 c2", c2, 7);
    @(negedge clk);
    check("ch s2 c0", c0, 5); check("ch s2 c1", c1, 7);
    @(negedge clk);
    check("ch s3 c0", c0, 7);
    shift = 0; en = 0;
    clear = 1; en = 1; @(negedge clk); clear = 0; en = 0;   // clear wins
    check("clr wins", c0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
