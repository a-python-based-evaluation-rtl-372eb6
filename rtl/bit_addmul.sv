// bit_addmul: example stochastic-computing circuit with four data inputs.
//
// PROD is the AND of A[0..3], i.e. the product of the four unipolar values.
// AVG is a tree of 2:1 multiplexers: SEL[0] picks between A[0]/A[1] and between
// A[2]/A[3], SEL[1] picks between the two results. With SEL[0] and SEL[1] both
// carrying the value 0.5, AVG carries (A0 + A1 + A2 + A3) / 4.
// The gate structure and the port list follow the framework's example circuit;
// which multiplexer input a '1' on a select line picks is this design's choice
// (either gives the same mean when the selects carry 0.5).
//
// The circuit is combinational. CLK is part of the port list only to show how
// a clock input of a user circuit is connected; it is deliberately unused.
module bit_addmul (
  input  logic       CLK,
  input  logic [3:0] A,
  input  logic [1:0] SEL,
  output logic       PROD,
  output logic       AVG
);

  logic m01, m23;

  always_comb begin
    PROD = &A;
    m01  = SEL[0] ? A[1] : A[0];
    m23  = SEL[0] ? A[3] : A[2];
    AVG  = SEL[1] ? m23 : m01;
  end

endmodule
