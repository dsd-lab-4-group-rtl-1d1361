// tb_b2b100_testbed: enters numbers through the buttons and switches as a
// user would and reads the seven-segment displays. 10111214 must show
// A b C E (most significant first) and 09080706 must show 9 8 7 6; the
// LED must drop during a conversion and come back. Also checks that
// button 2 ignores sw[9:6] and that the reset switch works.
module tb_b2b100_testbed;
  int checks = 0, failures = 0;
  logic       clock = 0;
  logic [3:0] key;
  logic [9:0] sw;
  logic [6:0] hex0, hex1, hex2, hex3;
  logic       ledr_done;

  b2b100_testbed dut (.clock, .key, .sw, .hex0, .hex1, .hex2, .hex3, .ledr_done);

  always #10 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(int k, logic [9:0] value);
    @(negedge clock); sw = value; key[k] = 1'b0;
    @(negedge clock); key[k] = 1'b1;
  endtask

  task automatic enter(logic [25:0] number);
    press(0, number[9:0]);
    press(1, number[19:10]);
    press(2, {4'b1111, number[25:20]});   // upper switches must be ignored
  endtask

  task automatic run_and_check(logic [6:0] e3, e2, e1, e0, string what);
    bit saw_low = 0;
    press(3, 10'b0000000000);   // start low
    press(3, 10'b1000000000);   // start high
    for (int i = 0; i < 60; i++) begin
      @(posedge clock);
      if (!ledr_done) saw_low = 1;
    end
    checks++;
    if (!saw_low || !ledr_done) begin failures++; $display("FAIL %s: done LED", what); end
    checks++;
    if ({hex3, hex2, hex1, hex0} !== {e3, e2, e1, e0}) begin
      failures++;
      $display("FAIL %s: %b %b %b %b", what, hex3, hex2, hex1, hex0);
    end
  endtask

  initial begin
    key = 4'b1111; sw = '0;
    repeat (3) @(posedge clock);
    enter(26'd10111214);
    run_and_check(7'b0001000, 7'b1100000, 7'b0110001, 7'b0110000, "10111214");
    enter(26'd9080706);
    run_and_check(7'b0000100, 7'b0000000, 7'b0001111, 7'b0100000, "09080706");
    // reset switch clears the digits to 0 0 0 0
    press(3, 10'b0100000000);
    press(3, 10'b0000000000);
    repeat (2) @(posedge clock);
    checks++;
    if ({hex3, hex2, hex1, hex0} !== {4{7'b0000001}} || !ledr_done) begin
      failures++; $display("FAIL reset switch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
