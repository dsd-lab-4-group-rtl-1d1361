// tb_nth_root: the worked example (square root of 69 gives
// 000100001001110011111, shown 8 . 30 65; square root of 3 shown
// 1 . 73 20), the error flag, X = 0, N = 1,
// and a sweep of X and N against X^(1/N) computed in floating point: Y
// must be floor(X^(1/N) * 2^14) or one unit above it (the truncated
// fixed-point powers may lose that unit). Every run's latency is checked
// against 1 + 21 * (N + 2) + 1 clocks (2 for X = 0).
module tb_nth_root;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  logic              clk = 0, reset, start, done, err;
  logic [NR_X_W-1:0] x;
  logic [NR_N_W-1:0] n;
  logic [NR_Y_W-1:0] y;
  digit_t            digit1, digit2, digit3, digit4;
  logic [3:0]        stateB;
  int                exact = 0, one_above = 0;

  nth_root dut (.clk, .reset, .start, .x, .n, .y, .done, .err,
                .digit1, .digit2, .digit3, .digit4, .stateB);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int xv, int nv, output int lat);
    @(negedge clk); x = NR_X_W'(xv); n = NR_N_W'(nv); start = 0;
    @(negedge clk); start = 1;
    @(posedge clk); #1;
    lat = 0;
    while (!done && lat < 5000) begin @(posedge clk); #1; lat++; end
  endtask

  task automatic check_root(int xv, int nv);
    int lat;
    longint expected;
    real r;
    run(xv, nv, lat);
    checks++;
    if (lat != ((xv == 0) ? 2 : 1 + 21 * (nv + 2) + 1)) begin
      failures++; $display("FAIL X=%0d N=%0d latency %0d", xv, nv, lat);
    end
    r = (xv == 0) ? 0.0 : $pow(real'(xv), 1.0 / real'(nv)) * 16384.0;
    expected = longint'($floor(r + 1.0e-9));
    checks++;
    if (longint'(y) == expected) exact++;
    else if (longint'(y) == expected + 1) one_above++;
    else begin
      failures++; $display("FAIL X=%0d N=%0d Y=%0d expected %0d", xv, nv, y, expected);
    end
    // display digits follow Y
    checks++;
    if (int'(digit1) != int'(y >> 14) || digit2 != 0 ||
        int'(digit3) * 100 + int'(digit4) != int'((longint'(y[13:0]) * 10000) >> 14)) begin
      failures++; $display("FAIL digits of Y=%0d: %0d %0d %0d %0d", y, digit1, digit2, digit3, digit4);
    end
  endtask

  initial begin
    int lat;
    reset = 0; start = 1; x = '0; n = 6'd1;
    #1 reset = 1;
    #2 checks++;
    if (!done || stateB != 0 || y != 0) failures++;
    @(negedge clk); reset = 0;

    // worked example: square root of 69
    run(69, 2, lat);
    checks++;
    if (y !== 21'b000100001001110011111 || digit1 != 8 || digit2 != 0 || digit3 != 30 || digit4 != 65) begin
      failures++; $display("FAIL sqrt(69): Y=%b digits %0d %0d %0d %0d", y, digit1, digit2, digit3, digit4);
    end

    // square root of 3 shows 1 . 73 20
    run(3, 2, lat);
    checks++;
    if (digit1 != 1 || digit3 != 73 || digit4 != 20) begin
      failures++; $display("FAIL sqrt(3): digits %0d %0d %0d", digit1, digit3, digit4);
    end

    // error flag
    x = 7'd100; n = 6'd2; #1;
    checks++; if (!err) failures++;
    x = 7'd99; n = 6'd0; #1;
    checks++; if (!err) failures++;
    x = 7'd99; n = 6'd63; #1;
    checks++; if (err) failures++;
    x = 7'd0; n = 6'd1; #1;
    checks++; if (err) failures++;
    run(120, 3, lat);
    checks++; if (y != 0 || lat != 2) begin failures++; $display("FAIL error run Y=%0d lat=%0d", y, lat); end

    check_root(0, 5);
    check_root(1, 63);
    check_root(99, 1);
    check_root(99, 63);
    check_root(2, 2);
    check_root(3, 2);
    for (int i = 0; i < 60; i++) check_root(1 + ($urandom % 99), 1 + ($urandom % 63));

    // asynchronous reset during a run
    @(negedge clk); x = 7'd50; n = 6'd20; start = 0;
    @(negedge clk); start = 1;
    repeat (30) @(posedge clk);
    #2 reset = 1; #1;
    checks++; if (!done || stateB != 0) failures++;
    @(negedge clk); reset = 0;
    check_root(50, 20);

    $display("exact %0d, one unit above %0d", exact, one_above);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
