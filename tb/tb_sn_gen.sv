// tb_sn_gen: self-checking testbench for sn_gen.
//
// Four generators (unipolar, bipolar, two-line, and the reserved code, which
// must behave as unipolar) are loaded with random values
// and seeds and run for a random number of cycles; every cycle their output is
// compared with a reference computed here from the LFSR recurrence
// s' = {s[30:0], s[31]^s[21]^s[1]^s[0]} and the encodings documented in
// sn_gen. Corner cases: zero seed, value 0, full-scale values, -1 in the
// two-line encoding, and `en` low (the LFSR must hold). A long unipolar run
// also checks that the '1' density matches the value.
module tb_sn_gen;
  import bitpack_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load_bin, load_seed, en;
  logic [31:0] din;
  logic [1:0] sn_u, sn_b, sn_t, sn_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sn_gen #(.CFG(SN_UNIPOLAR)) dut_u (.clk, .rst_n, .load_bin, .load_seed, .din, .en, .sn(sn_u));
  sn_gen #(.CFG(SN_BIPOLAR))  dut_b (.clk, .rst_n, .load_bin, .load_seed, .din, .en, .sn(sn_b));
  sn_gen #(.CFG(SN_TWOLINE))  dut_t (.clk, .rst_n, .load_bin, .load_seed, .din, .en, .sn(sn_t));
  sn_gen #(.CFG(SN_RESERVED)) dut_r (.clk, .rst_n, .load_bin, .load_seed, .din, .en, .sn(sn_r));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_next(logic [31:0] s);
    logic fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[30:0], fb};
  endfunction

  function automatic logic [1:0] ref_sn(int cfg, logic [31:0] s, logic [31:0] bin);
    longint unsigned thr;
    longint mag;
    logic hit;
    case (cfg)
      1: thr = longint'(bin) + 64'h8000_0000 - (bin[31] ? 64'h1_0000_0000 : 0);
      2: begin
        mag = bin[31] ? (64'h1_0000_0000 - longint'(bin)) : longint'(bin);
        thr = 2 * mag;
        if (thr > 64'hFFFF_FFFF) thr = 64'hFFFF_FFFF;
      end
      default: thr = longint'(bin);
    endcase
    hit = (longint'(s) < thr);
    if (cfg == 2) return bin[31] ? {hit, 1'b0} : {1'b0, hit};
    return {1'b0, hit};
  endfunction

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  task automatic run(logic [31:0] bin, logic [31:0] seed, int len, bit gaps);
    logic [31:0] s;
    @(negedge clk);
    din = bin;  load_bin = 1; @(negedge clk); load_bin = 0;
    din = seed; load_seed = 1; @(negedge clk); load_seed = 0;
    s = (seed == 0) ? 32'h1 : seed;
    for (int i = 0; i < len; i++) begin
      en = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      check("uni", sn_u, ref_sn(0, s, bin));
      check("bip", sn_b, ref_sn(1, s, bin));
      check("two", sn_t, ref_sn(2, s, bin));
      check("reserved", sn_r, ref_sn(0, s, bin));
      if (en) s = ref_next(s);
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    int ones;
    load_bin = 0; load_seed = 0; en = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h0, 32'h1234_5678, 50, 0);
    run(32'hFFFF_FFFF, 32'h0, 50, 0);
    run(32'h8000_0000, 32'hDEAD_BEEF, 50, 1);
    run(32'h7FFF_FFFF, 32'h0BAD_F00D, 50, 1);
    for (int t = 0; t < 40; t++)
      run($urandom, $urandom, 200, t[0]);
    // density: value 0.3 unipolar over 20000 cycles
    @(negedge clk);
    din = 32'(longint'(0.3 * 4294967296.0)); load_bin = 1; @(negedge clk); load_bin = 0;
    din = 32'hACE1_2345; load_seed = 1; @(negedge clk); load_seed = 0;
    en = 1; ones = 0;
    for (int i = 0; i < 20000; i++) begin
      #1 ones += sn_u[0];
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (ones < 5700 || ones > 6300) begin
      failures++;
      $display("FAIL density %0d of 20000 for 0.3", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
