// tb_lab4_top: end-to-end run of both designs through their board pins,
// at the design's default sizes.
//
// Part 1: 26-bit numbers (the worked examples 11347559 and 10111214, extremes and
// random values) are keyed in, converted and read back from the four
// displays; each display must show the low four bits of the right base-100
// digit. Part 2: X and N are keyed in and the displays must show the digits
// of X^(1/N) (checked within one unit of the last fraction bit) and the
// LEDs must show done and err.
//
// Every mechanism of the two designs is counted and must occur at least
// once: start handshake waiting, register clearing, add-14 correction,
// carry between digits, counter wrap, reset switch (part 1); error flag,
// X = 0 shortcut, kept and dropped trial bits, power saturation, reset
// switch (part 2).
module tb_lab4_top;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  logic       clock = 0;
  logic [3:0] p1_key, p2_key;
  logic [9:0] p1_sw, p2_sw;
  logic [6:0] p1_hex [4];
  logic [6:0] p2_hex [4];
  logic       p1_ledr_done, p2_ledr_done, p2_ledr_err;

  lab4_top dut (.clock, .p1_key, .p1_sw, .p1_hex, .p1_ledr_done,
                .p2_key, .p2_sw, .p2_hex, .p2_ledr_done, .p2_ledr_err);

  always #10 clock = ~clock;   // 50 MHz

  // ---- mechanism counters ------------------------------------------------
  int n_p1_conv = 0, n_p1_s1_wait = 0, n_p1_clear = 0, n_p1_corr = 0;
  int n_p1_carry = 0, n_p1_wrap = 0, n_p1_reset = 0;
  int n_p2_run = 0, n_p2_err = 0, n_p2_zero = 0, n_p2_keep = 0, n_p2_drop = 0;
  int n_p2_sat = 0, n_p2_reset = 0;

  always @(posedge clock) begin
    if (dut.u_part1.u_conv.stateB == 3'd1 && dut.u_part1.u_conv.start == 1'b0) n_p1_s1_wait++;
    if (dut.u_part1.u_conv.reseting_reg) n_p1_clear++;
    if (dut.u_part1.u_conv.counting26) begin
      for (int i = 0; i < NUM_DIGITS; i++) if (dut.u_part1.u_conv.digit[i] > 49) n_p1_corr++;
      for (int i = 1; i < NUM_DIGITS; i++) if (dut.u_part1.u_conv.carry[i]) n_p1_carry++;
      if (dut.u_part1.u_conv.cnt == 8'd0) n_p1_wrap++;
    end
    if (dut.u_part2.u_root.stateB == 4'd5) begin
      if (dut.u_part2.u_root.power <= dut.u_part2.u_root.x_fixed) n_p2_keep++;
      else n_p2_drop++;
    end
    if (dut.u_part2.u_root.stateB == 4'd4 && dut.u_part2.u_root.power_next == '1) n_p2_sat++;
  end

  initial begin
    repeat (3000000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- helpers --------------------------------------------------------------
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] seg_of(int v);
    logic [6:0] c = 7'b1111111;
    string s = lit[v % 16];
    for (int i = 0; i < s.len(); i++) c[6 - (s[i] - "a")] = 1'b0;
    return c;
  endfunction

  task automatic press1(int k, logic [9:0] value);
    @(negedge clock); p1_sw = value; p1_key[k] = 1'b0;
    @(negedge clock); p1_key[k] = 1'b1;
  endtask

  task automatic press2(int k, logic [9:0] value);
    @(negedge clock); p2_sw = value; p2_key[k] = 1'b0;
    @(negedge clock); p2_key[k] = 1'b1;
  endtask

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- part 1 ------------------------------------------------------------------
  task automatic p1_convert(int unsigned value, int idle_low);
    int lat;
    press1(0, value[9:0]);
    press1(1, value[19:10]);
    press1(2, {4'b1010, value[25:20]});
    press1(3, 10'b0000000000);          // start low
    repeat (idle_low) @(negedge clock);
    press1(3, 10'b1000000000);          // start high
    // count clock edges from the one on which the converter sees start
    // high (included) to the one that raises done: 1 + 29
    lat = 0;
    while (p1_ledr_done && lat < 10) begin @(posedge clock); #1; lat++; end
    while (!p1_ledr_done && lat < 100) begin @(posedge clock); #1; lat++; end
    n_p1_conv++;
    expect_true(lat == 1 + 29, $sformatf("part 1 latency %0d", lat));
    for (int i = 0; i < 4; i++)
      expect_true(p1_hex[i] === seg_of((value / (100 ** i)) % 100),
                  $sformatf("part 1 %0d display %0d", value, i));
  endtask

  // ---- part 2 ------------------------------------------------------------------
  task automatic p2_root(int xv, int nv);
    int lat;
    longint expected;
    longint y;
    press2(0, 10'(xv));
    press2(1, 10'(nv));
    press2(3, 10'b0000000000);
    press2(3, 10'b1000000000);
    // count clock edges from the one on which the root circuit sees start
    // high (included) to the one that raises done
    lat = 0;
    while (!p2_ledr_done && lat < 3000) begin @(posedge clock); #1; lat++; end
    n_p2_run++;
    y = longint'(dut.u_part2.u_root.y);
    expected = (xv == 0) ? 0 : longint'($floor($pow(real'(xv), 1.0 / real'(nv)) * 16384.0 + 1.0e-9));
    if (xv == 0) n_p2_zero++;
    expect_true(y == expected || y == expected + 1,
                $sformatf("part 2 root X=%0d N=%0d Y=%0d expected %0d", xv, nv, y, expected));
    expect_true(lat == 1 + ((xv == 0) ? 2 : 1 + 21 * (nv + 2) + 1),
                $sformatf("part 2 latency %0d for N=%0d", lat, nv));
    // displays: integer, point (0), two decimal pairs, low four bits each
    expect_true(p2_hex[3] === seg_of(int'(y >> 14)), "part 2 integer display");
    expect_true(p2_hex[2] === seg_of(0), "part 2 point display");
    expect_true(p2_hex[1] === seg_of(int'((y % 16384) * 100 / 16384)), "part 2 decimals 1-2");
    expect_true(p2_hex[0] === seg_of(int'(((y % 16384) * 10000 / 16384) % 100)), "part 2 decimals 3-4");
    expect_true(!p2_ledr_err, "part 2 no error");
  endtask

  initial begin
    p1_key = 4'b1111; p2_key = 4'b1111; p1_sw = '0; p2_sw = '0;
    repeat (3) @(posedge clock);
    // both designs come up held in reset; release them
    press1(3, 10'b0100000000); n_p1_reset++;
    press2(3, 10'b0100000000); n_p2_reset++;
    fork
      begin
        p1_convert(11347559, 0);
        p1_convert(10111214, 5);
        p1_convert(0, 0);
        p1_convert(26'h3ffffff, 0);
        for (int i = 0; i < 40; i++) p1_convert($urandom % (1 << 26), $urandom % 4);
        // reset switch in the middle of a conversion clears the digits
        press1(3, 10'b0000000000);
        press1(3, 10'b1000000000);
        repeat (8) @(posedge clock);
        press1(3, 10'b0100000000); n_p1_reset++;
        @(posedge clock); #1;
        for (int i = 0; i < 4; i++) expect_true(p1_hex[i] === seg_of(0), "part 1 reset clears display");
        expect_true(p1_ledr_done, "part 1 reset raises done");
        press1(3, 10'b0000000000);
        p1_convert(99999999 % (1 << 26), 0);
      end
      begin
        p2_root(69, 2);
        expect_true(p2_hex[3] === seg_of(8) && p2_hex[1] === seg_of(30) && p2_hex[0] === seg_of(65),
                    "part 2 square root of 69 shows 8 . 30 65");
        p2_root(0, 7);
        p2_root(99, 1);
        p2_root(99, 63);
        p2_root(2, 63);
        for (int i = 0; i < 15; i++) p2_root(1 + $urandom % 99, 1 + $urandom % 63);
        // error flag: X above 99, then N = 0
        press2(0, 10'd120);
        @(posedge clock); #1;
        expect_true(p2_ledr_err, "part 2 err for X = 120");
        if (p2_ledr_err) n_p2_err++;
        press2(0, 10'd5);
        press2(1, 10'd0);
        @(posedge clock); #1;
        expect_true(p2_ledr_err, "part 2 err for N = 0");
        if (p2_ledr_err) n_p2_err++;
        // reset switch during a run
        press2(1, 10'd40);
        press2(3, 10'b0000000000);
        press2(3, 10'b1000000000);
        repeat (100) @(posedge clock);
        press2(3, 10'b0100000000); n_p2_reset++;
        @(posedge clock); #1;
        expect_true(p2_ledr_done, "part 2 reset raises done");
        press2(3, 10'b0000000000);
        p2_root(5, 40);
      end
    join

    $display("part 1: conversions %0d, start waits %0d, clear clocks %0d, add-14 %0d, carries %0d, wraps %0d, resets %0d",
             n_p1_conv, n_p1_s1_wait, n_p1_clear, n_p1_corr, n_p1_carry, n_p1_wrap, n_p1_reset);
    $display("part 2: runs %0d, errors %0d, X=0 %0d, kept bits %0d, dropped bits %0d, saturations %0d, resets %0d",
             n_p2_run, n_p2_err, n_p2_zero, n_p2_keep, n_p2_drop, n_p2_sat, n_p2_reset);
    expect_true(n_p1_conv > 0 && n_p1_s1_wait > 0 && n_p1_clear > 0 && n_p1_corr > 0 &&
                n_p1_carry > 0 && n_p1_wrap > 0 && n_p1_reset > 1, "part 1 mechanisms all seen");
    expect_true(n_p2_run > 0 && n_p2_err > 1 && n_p2_zero > 0 && n_p2_keep > 0 &&
                n_p2_drop > 0 && n_p2_sat > 0 && n_p2_reset > 1, "part 2 mechanisms all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
