// tb_adder14: exhaustive check of the base-100 correction adder.
// Every 7-bit input is applied; the expected output is worked out from the
// rule "above 49 add 14" and cross-checked with the property the correction
// exists for: doubling a corrected digit d (0..99) gives 2d mod 100 in the
// low seven bits and d >= 50 as the carry.
module tb_adder14;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  digit_t in7, out7;

  adder14 dut (.in7(in7), .out7(out7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int expected;
      in7 = digit_t'(v);
      #1;
      expected = (v >= 50) ? v + 14 : v;
      checks++;
      if (int'(out7) != (expected % 128)) begin
        failures++;
        $display("FAIL in=%0d out=%0d expected=%0d", v, out7, expected % 128);
      end
      if (v < 100) begin
        logic [7:0] doubled;
        doubled = {out7, 1'b0};
        checks++;
        if (int'(doubled[6:0]) != (2 * v) % 100 || doubled[7] != (v >= 50)) begin
          failures++;
          $display("FAIL base-100 doubling of %0d gives %0d carry %0b", v, doubled[6:0], doubled[7]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
