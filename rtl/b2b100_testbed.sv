// b2b100_testbed: board wrapper of the binary to base-100 converter.
//
// The 26-bit number, start and reset are entered with ten switches and four
// push buttons (active low, as on the usual FPGA boards). On every rising
// clock edge while a button is held:
//   key[0]  sw[9:0] -> number[9:0]
//   key[1]  sw[9:0] -> number[19:10]
//   key[2]  sw[5:0] -> number[25:20] (other switches ignored)
//   key[3]  sw[9]   -> start, sw[8] -> reset (other switches ignored)
// The four base-100 digits go to seven-segment displays hex3 (most
// significant) to hex0 (least significant). Each display decodes the low
// four bits of its digit as a hexadecimal character, so values 0..15 read
// correctly (for example 10, 11, 12, 13 show as A, b, C, d). ledr_done
// shows the converter's done.
//
// The button mapping follows the original board set-up. The button
// polarity, the power-up values (inputs zero, reset held until button 3 is
// first pressed) and the display of only the low four bits are this
// design's choices.
module b2b100_testbed
  import lab4_pkg::*;
(
  input  logic       clock,
  input  logic [3:0] key,      // push buttons, low while pressed
  input  logic [9:0] sw,
  output logic [6:0] hex0,
  output logic [6:0] hex1,
  output logic [6:0] hex2,
  output logic [6:0] hex3,
  output logic       ledr_done
);

  // Power-up values: inputs zero, reset held until button 3 is first pressed.
  logic [BIN_W-1:0] number  = '0;
  logic             start_r = 1'b0;
  logic             reset_r = 1'b1;
  digit_t           digit [NUM_DIGITS];
  logic [2:0]       state_unused;
  logic [BIN_W-1:0] q26_unused;
  logic [7:0]       cnt_unused;

  always_ff @(posedge clock) begin
    if (!key[0]) number[9:0]   <= sw;
    if (!key[1]) number[19:10] <= sw;
    if (!key[2]) number[25:20] <= sw[5:0];
    if (!key[3]) begin
      start_r <= sw[9];
      reset_r <= sw[8];
    end
  end

  binary_to_base100 u_conv (
    .clk    (clock),
    .reset  (reset_r),
    .start  (start_r),
    .binary (number),
    .done   (ledr_done),
    .digit  (digit),
    .stateB (state_unused),
    .q26is  (q26_unused),
    .cnt    (cnt_unused)
  );

  seg7_decoder u_hex0 (.value(digit[0][3:0]), .seg(hex0));
  seg7_decoder u_hex1 (.value(digit[1][3:0]), .seg(hex1));
  seg7_decoder u_hex2 (.value(digit[2][3:0]), .seg(hex2));
  seg7_decoder u_hex3 (.value(digit[3][3:0]), .seg(hex3));

endmodule
