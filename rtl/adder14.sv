// adder14: correction step of a base-100 shift-and-add converter.
//
// A 7-bit digit register holds a base-100 digit 0..99. Before the digit is
// shifted left (doubled), any value above 49 gets 14 added: doubling
// d + 14 gives 2d + 28 = (2d - 100) + 128, so bit 7 (the bit shifted out)
// carries one hundred into the next digit and the 7 bits left hold 2d - 100.
// The largest input, 99, becomes 113, which still fits in 7 bits.
//
// Purely combinational, no clock. The threshold and the constant are the
// ones of the design this follows; the original part had an unused clock
// pin, which is left out here.
module adder14
  import lab4_pkg::*;
(
  input  digit_t in7,
  output digit_t out7
);

  localparam digit_t THRESHOLD  = digit_t'(49);
  localparam digit_t CORRECTION = digit_t'(14);

  always_comb begin
    if (in7 > THRESHOLD) out7 = in7 + CORRECTION;
    else                 out7 = in7;
  end

endmodule
