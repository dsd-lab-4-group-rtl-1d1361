// shift_register26: input register of the base-100 converter.
//
// On a rising edge the register either loads ldata in parallel (ld_enable
// high) or shifts left by one, with shift_in entering at the LSB. The MSB
// is shift_out, the serial bit that feeds the least significant digit.
// There is no shift enable: once the number has been shifted through, the
// register holds zeros (shift_in is tied low in use), so idle shifting
// changes nothing. clear is asynchronous and wins over everything.
// q26 shows the content, for observation only.
module shift_register26 #(
  parameter int unsigned WIDTH = 26
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             ld_enable,
  input  logic [WIDTH-1:0] ldata,
  input  logic             shift_in,
  output logic [WIDTH-1:0] q26,
  output logic             shift_out
);

  always_ff @(posedge clk or posedge clear) begin
    if (clear)          q26 <= '0;
    else if (ld_enable) q26 <= ldata;
    else                q26 <= {q26[WIDTH-2:0], shift_in};
  end

  assign shift_out = q26[WIDTH-1];

endmodule
