// shift_register7: one base-100 digit of the shift-and-add-14 converter.
//
// The register's content feeds an adder14 outside this module, and the
// corrected value comes back on ldata. On a rising clock edge with enable
// high the register takes the corrected value shifted left by one, with
// shift_in (from the digit or register on its right) as the new LSB.
// Loading the adder's output and shifting happen in the same edge, so the
// adder never sees a half-updated value. shift_out is the MSB of the
// corrected value: the carry that moves into the next digit on that edge.
//
// clear is asynchronous and wins over everything. The combinational
// shift_out is this design's reading of how the carry leaves the digit.
module shift_register7
  import lab4_pkg::*;
(
  input  logic   clk,
  input  logic   clear,
  input  logic   enable,
  input  digit_t ldata,
  input  logic   shift_in,
  output digit_t q7,
  output logic   shift_out
);

  always_ff @(posedge clk or posedge clear) begin
    if (clear)       q7 <= '0;
    else if (enable) q7 <= {ldata[DIGIT_W-2:0], shift_in};
  end

  assign shift_out = ldata[DIGIT_W-1];

endmodule
