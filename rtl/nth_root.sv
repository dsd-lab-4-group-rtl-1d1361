// nth_root: N-th root of a small integer, Y = X^(1/N), in fixed point.
//
// X is 0..99 and N is 1..63. Y has 7 integer and 14 fraction bits
// (Y[20:14] integer, Y[13:0] fraction), enough for 99^(1/1) = 99 and for
// four decimal places. err is high while X > 99 or N = 0.
//
// Method: bit-serial search, most significant bit first. For each of the 21
// bits of Y the controller sets the bit in a trial value T, raises T to the
// N-th power by N fixed-point multiplications P := (P * T) >> 14 starting
// from P = 1.0, and keeps the bit if P <= X. Products above the 22-bit
// power register saturate; since T >= 1.0 whenever that happens, further
// products stay saturated and the comparison is still right. Y is therefore
// the largest 7.14 value whose truncated N-th power does not exceed X.
// Truncation makes the power slightly low, so Y is floor(X^(1/N) * 2^14)
// or one unit of the last place above it (over all 99 x 63 inputs, never
// more; the square root of 69 comes out exact, 136095). X = 0 gives Y = 0
// directly.
//
// Display: digit1 is the integer part, digit2 stands for the decimal point
// and is always 0, digit3 and digit4 are the first and second pairs of
// decimals (frac_to_digits). All are plain 7-bit numbers 0..99.
//
// Handshake and timing: start low, then high, begins a computation
// (done low). 1 + 21 * (N + 2) + 1 clocks after the edge that sees start
// high, Y and the digits update and done returns high; they hold until the
// next computation. X = 0, and a start while err is high, give Y = 0
// after 2 clocks. stateB shows the state number. reset is asynchronous
// and returns to the idle state S0.
//
// The inputs, outputs, number format, err rule and the two multiplications
// by 100 for the display follow the original circuit; the search
// method, the state list, the X = 0 and error results are this design's.
module nth_root
  import lab4_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                start,
  input  logic [NR_X_W-1:0]   x,
  input  logic [NR_N_W-1:0]   n,
  output logic [NR_Y_W-1:0]   y,
  output logic                done,
  output logic                err,
  output digit_t              digit1,
  output digit_t              digit2,
  output digit_t              digit3,
  output digit_t              digit4,
  output logic [3:0]          stateB
);

  localparam int unsigned P_W    = NR_Y_W + 1;           // power register
  localparam int unsigned PROD_W = P_W + NR_Y_W;         // full product
  localparam logic [P_W-1:0] ONE = P_W'(1) << NR_FRAC_W; // 1.0

  nr_state_t             state;
  logic [NR_X_W-1:0]     x_r;
  logic [NR_N_W-1:0]     n_r;
  logic [NR_N_W-1:0]     k;        // multiplications left
  logic [4:0]            idx;      // bit of Y being decided
  logic [NR_Y_W-1:0]     y_t;      // bits decided so far
  logic [NR_Y_W-1:0]     trial;
  logic [P_W-1:0]        power;
  logic [PROD_W-1:0]     prod;
  logic [P_W-1:0]        power_next;
  logic [P_W-1:0]        x_fixed;

  assign err = (n == '0) || (x > NR_X_W'(NR_X_MAX));

  always_comb begin
    prod = PROD_W'(power) * PROD_W'(trial);
    if ((prod >> NR_FRAC_W) > PROD_W'({P_W{1'b1}})) power_next = '1;
    else                                            power_next = P_W'(prod >> NR_FRAC_W);
    x_fixed = P_W'(x_r) << NR_FRAC_W;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= NR_S0;
      x_r   <= '0;
      n_r   <= '0;
      k     <= '0;
      idx   <= '0;
      y_t   <= '0;
      trial <= '0;
      power <= '0;
      y     <= '0;
    end else begin
      unique case (state)
        NR_S0: if (!start) state <= NR_S1;
        NR_S1: if (start)  state <= NR_S2;
        NR_S2: begin
          x_r <= x;
          n_r <= n;
          y_t <= '0;
          idx <= 5'(NR_Y_W - 1);
          if (err || x == '0) state <= NR_S6;
          else                state <= NR_S3;
        end
        NR_S3: begin
          trial <= y_t | (NR_Y_W'(1) << idx);
          power <= ONE;
          k     <= n_r;
          state <= NR_S4;
        end
        NR_S4: begin
          power <= power_next;
          k     <= k - 1'b1;
          if (k == NR_N_W'(1)) state <= NR_S5;
        end
        NR_S5: begin
          if (power <= x_fixed) y_t <= trial;
          if (idx == '0) state <= NR_S6;
          else begin
            idx   <= idx - 1'b1;
            state <= NR_S3;
          end
        end
        NR_S6: begin
          y     <= y_t;
          state <= NR_S0;
        end
        default: state <= NR_S0;
      endcase
    end
  end

  assign done   = (state == NR_S0);
  assign stateB = state;

  assign digit1 = digit_t'(y[NR_Y_W-1:NR_FRAC_W]);
  assign digit2 = '0;

  frac_to_digits u_frac (
    .frac  (y[NR_FRAC_W-1:0]),
    .dec12 (digit3),
    .dec34 (digit4)
  );

  // The multiplication loop never runs with N = 0.
  a_n_nonzero: assert property (@(posedge clk) disable iff (reset)
    (state == NR_S3) |-> (n_r != '0));

endmodule
