// tb_sc_eprod: checks sc_eprod at N = 4 exhaustively and at N = 32 with random
// patterns, element by element, against a reference AND.
module tb_sc_eprod;
  logic [1:0] a2, b2, c2;
  logic [15:0] a16, b16, c16;
  int checks = 0, failures = 0;

  sc_eprod dut4 (.A(a2), .B(b2), .C(c2));
  sc_eprod #(.N(32)) dut32 (.A(a16), .B(b16), .C(c16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = 4'(v); #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (c2[i] !== (a2[i] && b2[i])) begin failures++; $display("FAIL N=4 %b %b %b", a2, b2, c2); end
      end
    end
    for (int t = 0; t < 200; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (c16[i] !== (a16[i] && b16[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
