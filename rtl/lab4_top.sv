// lab4_top: the two lab designs side by side on one device.
//
// p1_* are the board signals of the binary to base-100 converter
// (b2b100_testbed): four active-low buttons and ten switches enter a 26-bit
// number, start and reset; four seven-segment displays show the base-100
// digits and a LED shows done. p2_* are the board signals of the N-th root
// circuit (nth_root_testbed): buttons and switches enter X, N, start and
// reset; displays show the integer part, the decimal point and two pairs of
// decimals, LEDs show done and err. The two share only the clock.
module lab4_top (
  input  logic       clock,
  input  logic [3:0] p1_key,
  input  logic [9:0] p1_sw,
  output logic [6:0] p1_hex [4],   // p1_hex[0] = least significant digit
  output logic       p1_ledr_done,
  input  logic [3:0] p2_key,
  input  logic [9:0] p2_sw,
  output logic [6:0] p2_hex [4],   // p2_hex[3] = integer part
  output logic       p2_ledr_done,
  output logic       p2_ledr_err
);

  b2b100_testbed u_part1 (
    .clock     (clock),
    .key       (p1_key),
    .sw        (p1_sw),
    .hex0      (p1_hex[0]),
    .hex1      (p1_hex[1]),
    .hex2      (p1_hex[2]),
    .hex3      (p1_hex[3]),
    .ledr_done (p1_ledr_done)
  );

  nth_root_testbed u_part2 (
    .clock     (clock),
    .key       (p2_key),
    .sw        (p2_sw),
    .hex0      (p2_hex[0]),
    .hex1      (p2_hex[1]),
    .hex2      (p2_hex[2]),
    .hex3      (p2_hex[3]),
    .ledr_done (p2_ledr_done),
    .ledr_err  (p2_ledr_err)
  );

endmodule
