// lab4_pkg: types and constants shared by the two lab designs.
//
// Part 1 converts a 26-bit binary number into four base-100 digits with a
// shift-and-add-14 algorithm. Part 2 computes the N-th root of a small
// integer X in 7.14 fixed point and shows it as base-100 digits. Both use
// 7-bit digits (0..99) and both run a start handshake: start must go low,
// then high, before work begins.
package lab4_pkg;

  // One base-100 digit, 0..99, in plain binary.
  localparam int unsigned DIGIT_W    = 7;
  typedef logic [DIGIT_W-1:0] digit_t;

  // Part 1: width of the binary input and number of base-100 digits.
  localparam int unsigned BIN_W      = 26;
  localparam int unsigned NUM_DIGITS = 4;

  // Part 1 controller states; the encoding is the state number shown on stateB.
  typedef enum logic [2:0] {
    B2B_S0 = 3'd0,   // idle, wait for start low
    B2B_S1 = 3'd1,   // wait for start high
    B2B_S2 = 3'd2,   // clearing registers, wait until all are zero
    B2B_S3 = 3'd3,   // loading the binary number
    B2B_S4 = 3'd4,   // last load, enable counting
    B2B_S5 = 3'd5    // shifting, wait for the counter to reach zero
  } b2b_state_t;

  // Part 2: Y is unsigned fixed point with INT_W integer and FRAC_W fraction bits.
  localparam int unsigned NR_X_W     = 7;
  localparam int unsigned NR_N_W     = 6;
  localparam int unsigned NR_INT_W   = 7;
  localparam int unsigned NR_FRAC_W  = 14;
  localparam int unsigned NR_Y_W     = NR_INT_W + NR_FRAC_W;
  localparam int unsigned NR_X_MAX   = 99;

  // Part 2 controller states; the encoding is the state number shown on stateB.
  typedef enum logic [3:0] {
    NR_S0 = 4'd0,    // idle, wait for start low
    NR_S1 = 4'd1,    // wait for start high
    NR_S2 = 4'd2,    // check inputs, clear the result
    NR_S3 = 4'd3,    // set the next trial bit, power := 1.0
    NR_S4 = 4'd4,    // power := power * trial, N times
    NR_S5 = 4'd5,    // compare power with X, keep or drop the trial bit
    NR_S6 = 4'd6     // publish the result
  } nr_state_t;

endpackage
