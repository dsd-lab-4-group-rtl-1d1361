// b2b100_fsm: controller of the binary to base-100 converter.
//
// Six states, numbered on stateB:
//   S0  idle (done high); wait for start to go low.
//   S1  wait for start to go high; then clear every register and reset the
//       counter (reseting_reg high) and drop done.
//   S2  wait until every register bit is zero (done_reseting low); then stop
//       clearing and raise load_binary.
//   S3  load_binary stays high one more clock.
//   S4  stop loading; enable counting and shifting (counting26 high).
//   S5  shift one bit per clock until the counter reads zero
//       (done_counting low); then stop, raise done and return to S0.
// Every control output is a register, set on the clock edge that leaves the
// state listing the action. counting26 is high for the 26 edges on which the
// counter reads 25 down to 0, so exactly 26 bits are shifted; on the last
// edge the counter wraps to 31. A conversion takes 29 clocks from the edge
// that sees start high. reset is asynchronous: state S0, done high, all
// other controls low.
//
// The state list, the handshake and the feedback signals follow the design
// this is taken from; what S3 does and the exact clock of each control are
// this design's choice.
module b2b100_fsm
  import lab4_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic       done_reseting,  // OR of all register bits
  input  logic       done_counting,  // OR of all counter bits
  output logic       reseting_reg,
  output logic       load_binary,
  output logic       counting26,
  output logic       done,
  output logic [2:0] stateB
);

  b2b_state_t state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state        <= B2B_S0;
      reseting_reg <= 1'b0;
      load_binary  <= 1'b0;
      counting26   <= 1'b0;
      done         <= 1'b1;
    end else begin
      unique case (state)
        B2B_S0: if (!start) state <= B2B_S1;
        B2B_S1: if (start) begin
          reseting_reg <= 1'b1;
          done         <= 1'b0;
          state        <= B2B_S2;
        end
        B2B_S2: if (!done_reseting) begin
          reseting_reg <= 1'b0;
          load_binary  <= 1'b1;
          state        <= B2B_S3;
        end
        B2B_S3: state <= B2B_S4;
        B2B_S4: begin
          load_binary <= 1'b0;
          counting26  <= 1'b1;
          state       <= B2B_S5;
        end
        B2B_S5: if (!done_counting) begin
          counting26 <= 1'b0;
          done       <= 1'b1;
          state      <= B2B_S0;
        end
        default: state <= B2B_S0;
      endcase
    end
  end

  assign stateB = state;

  // Controls are mutually exclusive.
  a_one_control: assert property (@(posedge clk) disable iff (reset)
    $onehot0({reseting_reg, load_binary, counting26}));

endmodule
