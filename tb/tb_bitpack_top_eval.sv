// tb_bitpack_top_eval: runs the core with the two user circuits used to
// measure its size - an n-input AND (prod) and n/2 two-input ANDs (eprod) -
// at every evaluated port count n = 4, 8, 16, 24 and 32. Ten complete cores
// run side by side, each through its own behavioural processor and memory,
// and each output word is checked against the exact reference model. An
// eleventh core runs eprod with n = 610 (610 SNGs, 305 counters), the size
// estimated to be the largest that fits the target FPGA; its 1,220-word input
// array does not fit the 512-word read FIFO at once and streams through it.
module tb_bitpack_top_eval;
  import bitpack_pkg::*;

  localparam int NS = 5;
  localparam int SIZES [NS] = '{4, 8, 16, 24, 32};

  logic ACLK = 1'b0;
  logic ARESETN = 1'b0;
  always #5 ACLK = ~ACLK;

  logic fin [2][NS];
  int   chk [2][NS], fail [2][NS];

  for (genvar i = 0; i < NS; i++) begin : g_size
    tb_core_env #(.USER(UC_PROD), .N(SIZES[i]), .LEN(300)) prod_env (
      .ACLK, .ARESETN, .finished(fin[0][i]), .checks(chk[0][i]), .failures(fail[0][i]));
    tb_core_env #(.USER(UC_EPROD), .N(SIZES[i]), .LEN(300)) eprod_env (
      .ACLK, .ARESETN, .finished(fin[1][i]), .checks(chk[1][i]), .failures(fail[1][i]));
  end

  logic fin_big;
  int   chk_big, fail_big;
  tb_core_env #(.USER(UC_EPROD), .N(610), .LEN(300)) big_env (
    .ACLK, .ARESETN, .finished(fin_big), .checks(chk_big), .failures(fail_big));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge ACLK);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    repeat (4) @(posedge ACLK);
    ARESETN = 1;
    do begin
      @(posedge ACLK);
      all = fin_big;
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < NS; i++) all &= fin[c][i];
    end while (!all);
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < NS; i++) begin
        checks += chk[c][i];
        failures += fail[c][i];
      end
    checks += chk_big;
    failures += fail_big;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
