// softxor_cri: CRI-approximated soft-XOR of two LLRs in sign-magnitude form.
//
// The exact soft-XOR splits into a sign part (XOR of the signs) and a
// magnitude part Min*(|a|,|b|). Min* is approximated by one step of centred
// recursive interpolation: the two tangents y = |a| and y = |b| are joined by
// a third line (|a|+|b|)/2 - 0.8, and the result is the minimum of the three:
//
//   y_mag  = min(a_mag, b_mag, (a_mag + b_mag)/2 - OFFSET)
//   y_sign = a_sign ^ b_sign
//
// The subtraction is done in MAG_BITS unsigned arithmetic without an absolute
// value: when (a+b)/2 < OFFSET the difference wraps to a large number and the
// third term drops out of the minimum, as the approximation intends. The
// formula, the offset 0.8 and the missing absolute value follow the source
// design; the halving by truncation and rounding 0.8 to the LSB grid are this
// design's choices.
//
// The halving drops bit 0 of the sum, so lint reports that bit as unused.
//
// Purely combinational: two comparators and two adders.
module softxor_cri #(
  parameter int MAG_BITS = 6,
  parameter int OFFSET   = 13      // 0.8 with 4 fraction bits
) (
  input  logic                a_sign,
  input  logic [MAG_BITS-1:0] a_mag,
  input  logic                b_sign,
  input  logic [MAG_BITS-1:0] b_mag,
  output logic                y_sign,
  output logic [MAG_BITS-1:0] y_mag
);

  logic [MAG_BITS:0]   sum;
  logic [MAG_BITS-1:0] avg, line, m_ab;

  always_comb begin
    sum    = {1'b0, a_mag} + {1'b0, b_mag};
    avg    = sum[MAG_BITS:1];
    line   = avg - MAG_BITS'(OFFSET);
    m_ab   = (a_mag < b_mag) ? a_mag : b_mag;
    y_mag  = (line < m_ab) ? line : m_ab;
    y_sign = a_sign ^ b_sign;
  end

endmodule
