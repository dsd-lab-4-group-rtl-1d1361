// frac_to_digits: shows a 14-bit binary fraction as two base-100 digits.
//
// frac is the fraction f = frac / 2^14. Multiplying by 100 gives a 7.14
// product whose integer part is the first pair of decimals, floor(100 f),
// and whose fraction part is what is left. Multiplying that fraction part
// by 100 again gives the second pair of decimals in its integer part. Two
// small multipliers by 100 are used instead of one multiplier by 10000, as
// in the original circuit. Truncation, not rounding, is used throughout:
// 0.30658 shows as 30 65. Purely combinational.
module frac_to_digits
  import lab4_pkg::*;
(
  input  logic [NR_FRAC_W-1:0] frac,
  output digit_t               dec12,  // first and second decimal places
  output digit_t               dec34   // third and fourth decimal places
);

  localparam int unsigned P_W = NR_FRAC_W + DIGIT_W;   // fraction * 100 fits

  logic [P_W-1:0] p_first;    // 100 * f, 7.14
  logic [P_W-1:0] p_second;   // 100 * (fraction part of p_first), 7.14

  always_comb begin
    p_first  = P_W'(frac) * P_W'(100);
    p_second = P_W'(p_first[NR_FRAC_W-1:0]) * P_W'(100);
    dec12    = p_first[P_W-1:NR_FRAC_W];
    dec34    = p_second[P_W-1:NR_FRAC_W];
  end

endmodule
