// counter: step counter of the base-100 converter.
//
// An 8-bit down counter. reset (asynchronous) sets it to START, 25, so that
// counting through 25, 24, ..., 0 covers the 26 bits of the input. With
// enable high it counts down one per rising edge; from 0 it wraps to WRAP,
// 31, as a 5-bit counter would. The controller resets it to START before
// every conversion, so the wrap value is only seen after a conversion ends.
module counter #(
  parameter logic [7:0] START = 8'd25,
  parameter logic [7:0] WRAP  = 8'd31
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  output logic [7:0] countb
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                countb <= START;
    else if (enable) begin
      if (countb == 8'd0)     countb <= WRAP;
      else                    countb <= countb - 8'd1;
    end
  end

endmodule
