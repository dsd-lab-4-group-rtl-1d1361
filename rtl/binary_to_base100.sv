// binary_to_base100: converts a 26-bit binary number into four base-100
// digits (00..99 each) with the shift-and-add-14 method.
//
// The number is loaded into shift_register26 and shifted out MSB first into
// a chain of four 7-bit digit registers (shift_register7). Before every
// shift each digit passes through adder14, which adds 14 to a digit above
// 49 so that doubling it carries one hundred into the next digit. After 26
// shifts the registers hold the number in base 100: digit[0] (DIGIT1) is
// the least significant pair of decimal digits, digit[3] (DIGIT4) the most
// significant. 2^26 - 1 = 67,108,863, so digit[3] never exceeds 67.
//
// Handshake: start low, then high, begins a conversion; done goes low and
// returns high 29 clocks after the edge that sees start high, and the
// digits then stay valid until the next start. stateB, q26is and cnt show
// the controller state, the input register and the step counter.
//
// reset is asynchronous. Besides the controller it also clears the
// registers and the counter (this design's choice, so that the digits are
// defined after reset); otherwise the structure follows the original.
module binary_to_base100
  import lab4_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [BIN_W-1:0] binary,
  output logic             done,
  output digit_t           digit [NUM_DIGITS],
  output logic [2:0]       stateB,
  output logic [BIN_W-1:0] q26is,
  output logic [7:0]       cnt
);

  logic reseting_reg, load_binary, counting26;
  logic clear_regs, reset_cnt;
  logic done_reseting, done_counting;
  logic s26_out;

  digit_t corrected [NUM_DIGITS];
  logic   carry     [NUM_DIGITS + 1];   // carry[i] enters digit i

  assign clear_regs = reseting_reg | reset;
  assign reset_cnt  = reseting_reg | reset;

  b2b100_fsm u_fsm (
    .clk           (clk),
    .reset         (reset),
    .start         (start),
    .done_reseting (done_reseting),
    .done_counting (done_counting),
    .reseting_reg  (reseting_reg),
    .load_binary   (load_binary),
    .counting26    (counting26),
    .done          (done),
    .stateB        (stateB)
  );

  shift_register26 #(.WIDTH(BIN_W)) u_sr26 (
    .clk       (clk),
    .clear     (clear_regs),
    .ld_enable (load_binary),
    .ldata     (binary),
    .shift_in  (1'b0),
    .q26       (q26is),
    .shift_out (s26_out)
  );

  counter u_counter (
    .clk    (clk),
    .reset  (reset_cnt),
    .enable (counting26),
    .countb (cnt)
  );

  assign carry[0] = s26_out;

  for (genvar i = 0; i < NUM_DIGITS; i++) begin : g_digit
    adder14 u_add (
      .in7  (digit[i]),
      .out7 (corrected[i])
    );
    shift_register7 u_sr7 (
      .clk       (clk),
      .clear     (clear_regs),
      .enable    (counting26),
      .ldata     (corrected[i]),
      .shift_in  (carry[i]),
      .q7        (digit[i]),
      .shift_out (carry[i+1])
    );
  end

  // The bit leaving the top digit is never used: the input is too small to
  // produce one.

  always_comb begin
    done_reseting = |q26is;
    for (int i = 0; i < NUM_DIGITS; i++) done_reseting |= |digit[i];
  end

  assign done_counting = |cnt;

endmodule
