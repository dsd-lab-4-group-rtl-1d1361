// tb_frac_to_digits: every 14-bit fraction against decimal digits worked
// out with integer division, plus the worked example 0.30658
// (fraction 01001110011111) -> 30 65.
module tb_frac_to_digits;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  logic [13:0] frac;
  digit_t      dec12, dec34;

  frac_to_digits dut (.frac, .dec12, .dec34);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frac = 14'b01001110011111; #1;
    checks++;
    if (dec12 != 30 || dec34 != 65) begin
      failures++; $display("FAIL example: %0d %0d", dec12, dec34);
    end
    for (int f = 0; f < 16384; f++) begin
      longint four;
      frac = 14'(f); #1;
      four = (longint'(f) * 10000) / 16384;   // first four decimals
      checks++;
      if (int'(dec12) != four / 100 || int'(dec34) != four % 100) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: %0d %0d expected %0d", f, dec12, dec34, four);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
