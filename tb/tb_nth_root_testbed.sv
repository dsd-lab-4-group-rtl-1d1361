// tb_nth_root_testbed: enters X and N with buttons and switches and reads
// the displays. Square root of 69 is 8 . 30 65; the displays show the low
// four bits of each digit in hexadecimal: 8 0 E 1. X = 100 lights the
// error LED. Button 2 changes nothing.
module tb_nth_root_testbed;
  int checks = 0, failures = 0;
  logic       clock = 0;
  logic [3:0] key;
  logic [9:0] sw;
  logic [6:0] hex0, hex1, hex2, hex3;
  logic       ledr_done, ledr_err;

  nth_root_testbed dut (.clock, .key, .sw, .hex0, .hex1, .hex2, .hex3, .ledr_done, .ledr_err);

  always #10 clock = ~clock;

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(int k, logic [9:0] value);
    @(negedge clock); sw = value; key[k] = 1'b0;
    @(negedge clock); key[k] = 1'b1;
  endtask

  task automatic compute();
    press(3, 10'b0000000000);
    press(3, 10'b1000000000);
    repeat (400) @(posedge clock);
  endtask

  initial begin
    key = 4'b1111; sw = '0;
    repeat (3) @(posedge clock);
    press(3, 10'b0100000000);     // reset
    press(0, 10'd69);
    press(1, 10'd2);
    press(2, 10'd7);              // no effect
    compute();
    checks++;
    if ({hex3, hex2, hex1, hex0} !== {7'b0000000, 7'b0000001, 7'b0110000, 7'b1001111} || !ledr_done) begin
      failures++; $display("FAIL sqrt 69: %b %b %b %b", hex3, hex2, hex1, hex0);
    end
    checks++;
    if (ledr_err) failures++;
    // cube root of 27 = 3.0000
    press(0, 10'd27);
    press(1, 10'd3);
    compute();
    checks++;
    if ({hex3, hex2, hex1, hex0} !== {7'b0000110, 7'b0000001, 7'b0000001, 7'b0000001}) begin
      failures++; $display("FAIL cube root 27: %b %b %b %b", hex3, hex2, hex1, hex0);
    end
    press(0, 10'd100);
    @(posedge clock); #1;
    checks++;
    if (!ledr_err) begin failures++; $display("FAIL error LED"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
