// tb_b2b100_fsm: the controller with a behavioural stand-in for the
// datapath feedback. The stand-in clears its "registers nonzero" flag a
// programmable number of clocks after reseting_reg rises (so the wait in S2
// is exercised) and runs a counter from 25 while counting26 is high.
// Checks: start handshake, state order 0..5, 2 load clocks, 26 counting
// clocks, done low during the work and high after, total latency, and the
// asynchronous reset.
module tb_b2b100_fsm;
  int checks = 0, failures = 0;
  logic       clk = 0, reset, start;
  logic       done_reseting, done_counting;
  logic       reseting_reg, load_binary, counting26, done;
  logic [2:0] stateB;

  b2b100_fsm dut (.clk, .reset, .start, .done_reseting, .done_counting,
                  .reseting_reg, .load_binary, .counting26, .done, .stateB);

  always #5 clk = ~clk;

  // feedback stand-in
  int clear_delay;     // clocks of reseting_reg before the registers read zero
  int clear_seen;
  int cnt;
  always_ff @(posedge clk) begin
    if (reseting_reg) begin
      clear_seen <= clear_seen + 1;
      cnt        <= 25;
    end else if (counting26) cnt <= (cnt == 0) ? 31 : cnt - 1;
    if (load_binary) clear_seen <= 0;
  end
  assign done_reseting = !(reseting_reg && clear_seen >= clear_delay);
  assign done_counting = (cnt != 0);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(int delay);
    int n_load, n_count, n_cycles, last_state;
    bit order_ok;
    clear_delay = delay;
    @(negedge clk); start = 0;
    @(negedge clk); start = 1;
    @(posedge clk);   // S1 sees start high
    n_load = 0; n_count = 0; n_cycles = 0; order_ok = 1; last_state = 1;
    #1;
    while (!done) begin
      if (int'(stateB) != last_state && int'(stateB) != last_state + 1) order_ok = 0;
      last_state = int'(stateB);
      n_load  += int'(load_binary);
      n_count += int'(counting26);
      @(posedge clk); #1; n_cycles++;
      if (n_cycles > 200) break;
    end
    expect_eq("state order", int'(order_ok), 1);
    expect_eq("back in S0", int'(stateB), 0);
    expect_eq("load clocks", n_load, 2);
    expect_eq("counting clocks", n_count, 26);
    expect_eq("latency", n_cycles, 29 + delay);
    expect_eq("counter wrapped", cnt, 31);
    expect_eq("controls idle", int'({reseting_reg, load_binary, counting26}), 0);
  endtask

  initial begin
    reset = 0; start = 1; clear_delay = 0; clear_seen = 0; cnt = 31;
    #1 reset = 1;
    #2;
    expect_eq("reset state", int'(stateB), 0);
    expect_eq("reset done", int'(done), 1);
    @(negedge clk); reset = 0;
    // start held high does nothing
    repeat (5) @(posedge clk);
    #1 expect_eq("no start without low phase", int'(stateB), 0);
    run_one(0);
    run_one(3);
    // start low but not yet high: waits in S1
    @(negedge clk); start = 0;
    repeat (4) @(posedge clk);
    #1 expect_eq("waiting in S1", int'(stateB), 1);
    expect_eq("done while waiting for start high", int'(done), 1);
    @(negedge clk); start = 1;
    repeat (10) @(posedge clk);
    #1 expect_eq("in S5", int'(stateB), 5);
    expect_eq("done low while working", int'(done), 0);
    // asynchronous reset mid-run
    #2 reset = 1; #1;
    expect_eq("reset to S0", int'(stateB), 0);
    expect_eq("reset raises done", int'(done), 1);
    expect_eq("reset drops counting", int'(counting26), 0);
    @(negedge clk); reset = 0;
    run_one(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
