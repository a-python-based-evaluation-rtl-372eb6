// sc_eprod: element-wise product of two vectors of N/2 unipolar stochastic
// numbers, as N/2 two-input AND gates (C[i] = A[i] & B[i]). One of the two
// user circuits used to measure how the core grows with the number of ports
// (N inputs, N/2 outputs). Combinational.
module sc_eprod #(
  parameter int N = 4
) (
  input  logic [N/2-1:0] A,
  input  logic [N/2-1:0] B,
  output logic [N/2-1:0] C
);
  assign C = A & B;
endmodule
