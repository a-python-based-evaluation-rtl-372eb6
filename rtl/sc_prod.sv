// sc_prod: N-input AND gate, the product of N unipolar stochastic numbers.
// One of the two user circuits used to measure how the core grows with the
// number of ports (N inputs, one output). Combinational.
module sc_prod #(
  parameter int N = 4
) (
  input  logic [N-1:0] A,
  output logic         P
);
  assign P = &A;
endmodule
