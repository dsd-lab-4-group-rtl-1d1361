// nth_root_testbed: board wrapper of the N-th root circuit.
//
// X, N, start and reset are entered with ten switches and four push buttons
// (active low). On every rising clock edge while a button is held:
//   key[0]  sw[6:0] -> X
//   key[1]  sw[5:0] -> N
//   key[2]  nothing
//   key[3]  sw[9] -> start, sw[8] -> reset
// The four result digits (integer part, decimal point, first and second
// pairs of decimals) go to hex3, hex2, hex1 and hex0. Each display decodes
// the low four bits of its digit as a hexadecimal character. ledr_done and
// ledr_err show done and err.
//
// The button mapping follows the original board set-up. The button
// polarity, the display order, the LEDs and the power-up values (inputs
// zero, reset held until button 3 is first pressed) are this design's
// choices.
module nth_root_testbed
  import lab4_pkg::*;
(
  input  logic       clock,
  input  logic [3:0] key,      // push buttons, low while pressed
  input  logic [9:0] sw,
  output logic [6:0] hex0,
  output logic [6:0] hex1,
  output logic [6:0] hex2,
  output logic [6:0] hex3,
  output logic       ledr_done,
  output logic       ledr_err
);

  // Power-up values: inputs zero, reset held until button 3 is first pressed.
  logic [NR_X_W-1:0] x_input = '0;
  logic [NR_N_W-1:0] n_input = '0;
  logic              start_r = 1'b0;
  logic              reset_r = 1'b1;

  logic [NR_Y_W-1:0] y_unused;
  logic [3:0]        state_unused;
  digit_t            digit1, digit2, digit3, digit4;

  always_ff @(posedge clock) begin
    if (!key[0]) x_input <= sw[6:0];
    if (!key[1]) n_input <= sw[5:0];
    if (!key[3]) begin
      start_r <= sw[9];
      reset_r <= sw[8];
    end
  end

  nth_root u_root (
    .clk    (clock),
    .reset  (reset_r),
    .start  (start_r),
    .x      (x_input),
    .n      (n_input),
    .y      (y_unused),
    .done   (ledr_done),
    .err    (ledr_err),
    .digit1 (digit1),
    .digit2 (digit2),
    .digit3 (digit3),
    .digit4 (digit4),
    .stateB (state_unused)
  );

  seg7_decoder u_hex3 (.value(digit1[3:0]), .seg(hex3));
  seg7_decoder u_hex2 (.value(digit2[3:0]), .seg(hex2));
  seg7_decoder u_hex1 (.value(digit3[3:0]), .seg(hex1));
  seg7_decoder u_hex0 (.value(digit4[3:0]), .seg(hex0));

endmodule
