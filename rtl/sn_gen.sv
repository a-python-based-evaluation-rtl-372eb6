// sn_gen: stochastic number generator (SNG).
//
// A binary input held in a register is compared against the state of a 32-bit
// linear feedback shift register; the comparison is the stochastic bit of the
// current cycle, so a value is turned into a bitstream in which '1' appears
// with the value's probability. The comparator-plus-LFSR structure follows the
// framework; the LFSR polynomial, the number encodings and the zero-seed
// handling are this design's own choices.
//
// Encodings of the 32-bit binary input `din` (loaded with load_bin):
//   CFG = SN_UNIPOLAR : unsigned, p = din / 2^32. sn[0] = (lfsr < din).
//   CFG = SN_BIPOLAR  : signed, v = din / 2^31 in [-1, 1), p = (v + 1) / 2.
//                       The threshold is din with its sign bit inverted.
//   CFG = SN_TWOLINE  : signed as above. One comparison against 2*|din|
//                       (saturated) drives sn[0] (positive line, "_p") when
//                       din >= 0 and sn[1] (negative line, "_m") when din < 0;
//                       the other line stays 0.
//   CFG = SN_RESERVED : treated as unipolar (placeholder for a user encoding).
// sn[1] is 0 for the single-line encodings.
//
// Timing: load_seed writes the LFSR, load_bin writes the input register. sn
// is combinational from the two registers. While `en` is high the LFSR steps
// once per clock, so the bit seen in the k-th enabled cycle is produced by the
// k-th LFSR state, starting with the seed itself.
module sn_gen
  import bitpack_pkg::*;
#(
  parameter sn_cfg_e CFG = SN_UNIPOLAR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_bin,
  input  logic              load_seed,
  input  logic [WORD_W-1:0] din,
  input  logic              en,
  output logic [1:0]        sn
);

  logic [31:0] lfsr_q;
  logic [31:0] bin_q;
  logic [31:0] thr;
  logic [31:0] mag;
  logic        hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= LFSR_ZERO_SEED;
      bin_q  <= '0;
    end else begin
      if (load_seed)
        lfsr_q <= (din == '0) ? LFSR_ZERO_SEED : din;
      else if (en)
        lfsr_q <= lfsr_next(lfsr_q);
      if (load_bin)
        bin_q <= din;
    end
  end

  always_comb begin
    mag = bin_q[31] ? (~bin_q + 32'd1) : bin_q;   // |v| * 2^31, 2^31 for v = -1
    unique case (CFG)
      SN_BIPOLAR: thr = {~bin_q[31], bin_q[30:0]};
      SN_TWOLINE: thr = mag[31] ? 32'hFFFF_FFFF : {mag[30:0], 1'b0};
      default:    thr = bin_q;
    endcase
    hit = (lfsr_q < thr);
    if (CFG == SN_TWOLINE)
      sn = bin_q[31] ? {hit, 1'b0} : {1'b0, hit};
    else
      sn = {1'b0, hit};
  end

endmodule
