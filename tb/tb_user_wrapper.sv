// tb_user_wrapper: self-checking testbench for user_wrapper.
//
// Two wrappers are tested: the default one around bit_addmul (6 SNGs, 2
// counters, unipolar) and one around sc_eprod with N = 8 and mixed encodings
// (unipolar, bipolar and two-line SNGs and counters). The testbench plays the
// two FIFOs: it offers {value, seed} words with random gaps (read FIFO empty)
// and accepts output words with random refusals (write FIFO full). Each run's
// output words are compared with an exact bit-level reference model, proc_en
// must be high for exactly the programmed length, and the run must take
// exactly load + length + unload cycles when no gaps are inserted.
module tb_user_wrapper;
  import bitpack_pkg::*;
  import tb_sc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int load_stalls = 0, unload_stalls = 0;
  always #5 clk = ~clk;

  localparam sn_cfg_e E_SRC [8] = '{SN_UNIPOLAR, SN_BIPOLAR, SN_TWOLINE, SN_UNIPOLAR,
                                    SN_BIPOLAR, SN_UNIPOLAR, SN_TWOLINE, SN_UNIPOLAR};
  localparam sn_cfg_e E_DST [4] = '{SN_UNIPOLAR, SN_BIPOLAR, SN_TWOLINE, SN_BIPOLAR};

  logic        start [2], busy [2], done [2], proc_en [2], rd_pop [2], rd_empty [2], wr_push [2], wr_full [2];
  logic [31:0] cycles [2], rd_data [2], wr_data [2];

  user_wrapper w0 (
    .clk, .rst_n, .start(start[0]), .cycles(cycles[0]), .busy(busy[0]), .done(done[0]),
    .proc_en(proc_en[0]), .rd_pop(rd_pop[0]), .rd_data(rd_data[0]), .rd_empty(rd_empty[0]),
    .wr_push(wr_push[0]), .wr_data(wr_data[0]), .wr_full(wr_full[0])
  );
  user_wrapper #(.USER(UC_EPROD), .N(8), .SRC_CFG(E_SRC), .DST_CFG(E_DST)) w1 (
    .clk, .rst_n, .start(start[1]), .cycles(cycles[1]), .busy(busy[1]), .done(done[1]),
    .proc_en(proc_en[1]), .rd_pop(rd_pop[1]), .rd_data(rd_data[1]), .rd_empty(rd_empty[1]),
    .wr_push(wr_push[1]), .wr_data(wr_data[1]), .wr_full(wr_full[1])
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic run(int w, int len, int gap_pct, int full_pct, logic [31:0] vals[], logic [31:0] seeds[]);
    int uc   = (w == 0) ? 0 : 2;
    int n    = (w == 0) ? 4 : 8;
    int nsrc = (w == 0) ? 6 : 8;
    int ndst = (w == 0) ? 2 : 4;
    int scfg [], dcfg [], exp [];
    logic [31:0] words [$];
    int got = 0, en_cycles = 0, clocks = 0;
    scfg = new[nsrc]; dcfg = new[ndst];
    for (int k = 0; k < nsrc; k++) scfg[k] = (w == 0) ? 0 : int'(E_SRC[k]);
    for (int j = 0; j < ndst; j++) dcfg[j] = (w == 0) ? 0 : int'(E_DST[j]);
    run_ref(uc, n, nsrc, ndst, scfg, dcfg, vals, seeds, len, exp);
    for (int k = 0; k < nsrc; k++) begin words.push_back(vals[k]); words.push_back(seeds[k]); end
    @(negedge clk);
    cycles[w] = 32'(len);
    start[w] = 1;
    rd_empty[w] = 1;
    wr_full[w] = 1;
    @(negedge clk);
    start[w] = 0;
    while (!done[w] && clocks < 100000) begin
      rd_empty[w] = (words.size() == 0) || ($urandom_range(0, 99) < gap_pct);
      rd_data[w]  = (words.size() != 0) ? words[0] : 32'hDEAD_BEEF;
      wr_full[w]  = ($urandom_range(0, 99) < full_pct);
      #1;
      if (busy[w] && rd_empty[w] && words.size() != 0) load_stalls++;
      if (rd_pop[w]) void'(words.pop_front());
      if (proc_en[w]) en_cycles++;
      if (wr_full[w] && ((w == 0) ? (w0.state == w0.S_UNLOAD) : (w1.state == w1.S_UNLOAD)))
        unload_stalls++;
      if (wr_push[w]) begin
        if (got < ndst) chk($sformatf("w%0d count %0d", w, got), wr_data[w], 32'(exp[got]));
        got++;
      end
      clocks++;
      @(negedge clk);
    end
    rd_empty[w] = 1; wr_full[w] = 1;
    chk("words out", 32'(got), 32'(ndst));
    chk("proc_en cycles", 32'(en_cycles), 32'(len));
    chk("words left", 32'(words.size()), 0);
    // start..done: 1 (start) + 2*nsrc (load) + len + 1 (run exit) + ndst (unload)
    if (gap_pct == 0 && full_pct == 0) chk("latency", 32'(clocks), 32'(2 * nsrc + len + 1 + ndst));
  endtask

  initial begin
    logic [31:0] b [], s [];
    for (int w = 0; w < 2; w++) begin
      start[w] = 0; cycles[w] = 0; rd_data[w] = 0; rd_empty[w] = 1; wr_full[w] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the example of the framework: 0.9, 0.8, 0.7, 0.6 and selects 0.5
    b = new[6]; s = new[6];
    b = '{uni_word(0.9), uni_word(0.8), uni_word(0.7), uni_word(0.6), uni_word(0.5), uni_word(0.5)};
    for (int k = 0; k < 6; k++) s[k] = $urandom;
    run(0, 10000, 0, 0, b, s);
    for (int t = 0; t < 8; t++) begin
      for (int k = 0; k < 6; k++) begin b[k] = $urandom; s[k] = (t == 0 && k == 0) ? 0 : $urandom; end
      run(0, $urandom_range(0, 700), 30, 40, b, s);
    end
    b = new[8]; s = new[8];
    for (int t = 0; t < 8; t++) begin
      for (int k = 0; k < 8; k++) begin b[k] = $urandom; s[k] = $urandom; end
      run(1, $urandom_range(1, 700), (t < 2) ? 0 : 25, (t < 2) ? 0 : 50, b, s);
    end
    checks++; if (load_stalls == 0)   begin failures++; $display("FAIL no load stall"); end
    checks++; if (unload_stalls == 0) begin failures++; $display("FAIL no unload stall"); end
    $display("wrapper: load stalls %0d, unload stalls %0d", load_stalls, unload_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
