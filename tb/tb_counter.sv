// tb_counter: reset value 25, one count per enabled clock, hold while
// disabled, wrap from 0 to 31, asynchronous reset at any time.
module tb_counter;
  int checks = 0, failures = 0;
  logic       clk = 0, reset, enable;
  logic [7:0] countb;
  int         model;

  counter dut (.clk, .reset, .enable, .countb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (int'(countb) != model) begin
      failures++;
      $display("FAIL %s count=%0d expected=%0d", what, countb, model);
    end
  endtask

  initial begin
    int steps;
    reset = 0; enable = 0;
    #1 reset = 1;
    #2; model = 25; check("reset");
    reset = 0;
    // 26 enabled clocks reach 0, the next one wraps to 31
    @(negedge clk); enable = 1;
    steps = 0;
    while (countb != 0) begin
      @(posedge clk); #1; steps++;
      model--; check("count down");
    end
    checks++;
    if (steps != 25) begin
      failures++;
      $display("FAIL reached 0 after %0d clocks, expected 25", steps);
    end
    @(posedge clk); #1; model = 31; check("wrap to 31");
    // random enable, with asynchronous resets
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      enable = 1'($urandom);
      if ((i % 83) == 11) begin
        reset = 1; #1; model = 25; check("async reset"); reset = 0;
      end
      @(posedge clk);
      if (enable) model = (model == 0) ? 31 : model - 1;
      #1; check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
