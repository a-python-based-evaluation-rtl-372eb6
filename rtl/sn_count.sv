// sn_count: counter that converts a stochastic number back to binary.
//
// While `en` is high the counter accumulates the incoming bitstream; dividing
// its final value by the bitstream length l gives the represented value. The
// accumulate-into-a-register structure follows the framework; the per-encoding
// step below is this design's choice, made so that value / l is the result in
// every encoding (the value is a two's complement 32-bit integer):
//   CFG = SN_UNIPOLAR (and SN_RESERVED): +1 for every '1' on sn[0].
//   CFG = SN_BIPOLAR : +1 for a '1' and -1 for a '0' on sn[0], i.e. 2*ones - l.
//   CFG = SN_TWOLINE : +1 for a '1' on sn[0] (positive line) and -1 for a '1'
//                      on sn[1] (negative line).
//
// To unload, the counters of a wrapper are chained: with `shift` high each
// counter takes the value of its neighbour (shift_in), so the chain behaves as
// a shift register whose end is read through `value`.
// Priority per clock: clear, then shift, then count.
module sn_count
  import bitpack_pkg::*;
#(
  parameter sn_cfg_e CFG = SN_UNIPOLAR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [1:0]        sn,
  input  logic              shift,
  input  logic [WORD_W-1:0] shift_in,
  output logic [WORD_W-1:0] value
);

  logic [WORD_W-1:0] step;

  always_comb begin
    unique case (CFG)
      SN_BIPOLAR: step = sn[0] ? WORD_W'(1) : '1;               // +1 / -1
      SN_TWOLINE: step = WORD_W'(sn[0]) - WORD_W'(sn[1]);
      default:    step = WORD_W'(sn[0]);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      value <= '0;
    else if (clear)
      value <= '0;
    else if (shift)
      value <= shift_in;
    else if (en)
      value <= value + step;
  end

endmodule
