// tb_binary_to_base100: conversions of the worked example 11347559
// (11 34 75 59), of the extremes and of random 26-bit numbers. Digits are
// checked against division by powers of 100, the latency against 29 clocks
// and the step counter against its final value 31. Also counts how often
// the add-14 correction fired.
module tb_binary_to_base100;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  logic             clk = 0, reset, start, done;
  logic [BIN_W-1:0] binary, q26is;
  digit_t           digit [NUM_DIGITS];
  logic [2:0]       stateB;
  logic [7:0]       cnt;
  int               corrections = 0;

  binary_to_base100 dut (.clk, .reset, .start, .binary, .done, .digit, .stateB, .q26is, .cnt);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (dut.counting26)
      for (int i = 0; i < NUM_DIGITS; i++) if (digit[i] > 49) corrections++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(logic [BIN_W-1:0] value);
    int lat;
    int unsigned v;
    @(negedge clk); binary = value; start = 0;
    @(negedge clk); start = 1;
    @(posedge clk); #1;
    lat = 0;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 29) begin failures++; $display("FAIL latency %0d, expected 29", lat); end
    checks++;
    if (cnt != 8'd31) begin failures++; $display("FAIL counter ends at %0d", cnt); end
    v = value;
    for (int i = 0; i < NUM_DIGITS; i++) begin
      checks++;
      if (int'(digit[i]) != (v / (100 ** i)) % 100) begin
        failures++;
        $display("FAIL %0d digit%0d=%0d expected %0d", value, i + 1, digit[i], (v / (100 ** i)) % 100);
      end
    end
    // the digits hold while idle
    repeat (3) @(posedge clk);
    #1 checks++;
    if (int'(digit[0]) != v % 100) failures++;
  endtask

  initial begin
    reset = 0; start = 1; binary = '0;
    #1 reset = 1;
    #2 checks++;
    if (!done || stateB != 0 || cnt != 25) failures++;
    @(negedge clk); reset = 0;
    convert(26'd11347559);
    checks++;
    if (digit[3] != 11 || digit[2] != 34 || digit[1] != 75 || digit[0] != 59) failures++;
    convert(26'd10111214);
    convert('0);
    convert('1);
    convert(26'd99999);
    for (int i = 0; i < 60; i++) convert(BIN_W'($urandom));
    checks++;
    if (corrections == 0) begin failures++; $display("FAIL no add-14 correction seen"); end
    $display("add-14 corrections: %0d", corrections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
