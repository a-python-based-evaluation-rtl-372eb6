// tb_bit_addmul: exhaustive check of bit_addmul (all 64 input combinations)
// against the product and multiplexer-tree truth table, plus a bitstream test:
// inputs 0.9, 0.8, 0.7, 0.6 and selects 0.5 as independent random bitstreams
// of 20000 bits should give PROD near 0.3024 and AVG near 0.75.
module tb_bit_addmul;
  logic CLK = 1'b0;
  logic [3:0] A;
  logic [1:0] SEL;
  logic PROD, AVG;
  int checks = 0, failures = 0;

  bit_addmul dut (.CLK, .A, .SEL, .PROD, .AVG);

  always #5 CLK = ~CLK;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, na;
    real pa [4] = '{0.9, 0.8, 0.7, 0.6};
    logic e_prod, e_avg;
    for (int v = 0; v < 64; v++) begin
      {SEL, A} = 6'(v);
      #1;
      e_prod = (A == 4'hF);
      case (SEL)
        2'b00: e_avg = A[0];
        2'b01: e_avg = A[1];
        2'b10: e_avg = A[2];
        default: e_avg = A[3];
      endcase
      checks++;
      if (PROD !== e_prod || AVG !== e_avg) begin
        failures++;
        $display("FAIL A=%b SEL=%b PROD=%b AVG=%b", A, SEL, PROD, AVG);
      end
    end
    np = 0; na = 0;
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < 4; k++) A[k] = ($urandom_range(0, 9999) < int'(pa[k] * 10000));
      SEL = 2'($urandom);
      #1;
      np += PROD; na += AVG;
    end
    checks++;
    if (np < 5748 || np > 6348) begin failures++; $display("FAIL PROD density %0d", np); end
    checks++;
    if (na < 14700 || na > 15300) begin failures++; $display("FAIL AVG density %0d", na); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
