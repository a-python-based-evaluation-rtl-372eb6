// tb_sc_prod: checks sc_prod at N = 4 exhaustively and at N = 32 with random
// and all-ones patterns against a reference AND reduction.
module tb_sc_prod;
  logic [3:0] a4;
  logic [31:0] a32;
  logic p4, p32;
  int checks = 0, failures = 0;

  sc_prod dut4 (.A(a4), .P(p4));
  sc_prod #(.N(32)) dut32 (.A(a32), .P(p32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v); #1;
      checks++;
      if (p4 !== (v == 15)) begin failures++; $display("FAIL N=4 A=%b P=%b", a4, p4); end
    end
    for (int t = 0; t < 200; t++) begin
      a32 = (t % 4 == 0) ? 32'hFFFF_FFFF : (t % 4 == 1) ? ~(32'h1 << (t % 32)) : $urandom;
      #1;
      e = 1'b1;
      for (int i = 0; i < 32; i++) e &= a32[i];
      checks++;
      if (p32 !== e) begin failures++; $display("FAIL N=32 A=%h P=%b", a32, p32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
