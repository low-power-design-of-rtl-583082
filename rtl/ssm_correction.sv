// ssm_correction: correction term for the static segmented multiplier.
//
// When an operand is reduced to its high segment, its low N-M bits are
// dropped; on average they are worth half a unit of the segment's LSB. The
// missing part of the product is estimated from a few operand bits and
// added to the M x M segment product (in units of that product's LSB):
//
//   sel = {alpha_a, alpha_b}
//   00  both operands exact           corr = 0
//   10  A high, B low segment         corr = b_lmsb ? 3 * 2^(M-3) : 0
//   01  A low, B high segment         corr = a_lmsb ? 3 * 2^(M-3) : 0
//   11  both high segments            corr = (a_top + b_top + 1) * 2^(M-4)
//
// a_top/b_top are the three most significant operand bits (a[N-1:N-3]) and
// a_lmsb/b_lmsb the MSB of the low segment (a[M-1]); these are the inputs the
// published block diagram feeds to its correction box. In case 11 the missing
// part is about (H_A + H_B)/2, and H is estimated from its top three bits. In
// the mixed cases it is about L/2 for the low-segment operand; it is estimated
// as 3/4 * 2^(M-1) when the low segment's MSB is set and as zero otherwise, so
// that a zero operand always gives a zero product. The formulas are this
// design's own: the document names the correction and its inputs only.
// The term is below 2^M, so the corrected product still fits in 2*M bits.
// Purely combinational.
module ssm_correction #(
  parameter int unsigned M = 8
) (
  input  logic [1:0]   sel,     // {alpha_a, alpha_b}
  input  logic [2:0]   a_top,   // a[N-1:N-3]
  input  logic [2:0]   b_top,   // b[N-1:N-3]
  input  logic         a_lmsb,  // a[M-1]
  input  logic         b_lmsb,  // b[M-1]
  output logic [M-1:0] corr
);

  initial begin
    assert (M >= 4) else $error("ssm_correction: M must be at least 4");
  end

  localparam logic [M-1:0] MIXED = M'(3) << (M - 3);

  always_comb begin
    unique case (sel)
      2'b00: corr = '0;
      2'b10: corr = b_lmsb ? MIXED : '0;
      2'b01: corr = a_lmsb ? MIXED : '0;
      2'b11: corr = (M'(a_top) + M'(b_top) + M'(1)) << (M - 4);
      default: corr = '0;
    endcase
  end

endmodule
