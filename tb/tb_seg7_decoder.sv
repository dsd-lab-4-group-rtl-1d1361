// tb_seg7_decoder: every input against a table of lit segments per
// character, turned into active-low abcdefg codes by the testbench.
module tb_seg7_decoder;
  int checks = 0, failures = 0;
  logic [3:0] value;
  logic [6:0] seg;

  seg7_decoder dut (.value, .seg);

  // segments lit for 0..9, A, b, C, d, E, F
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] code(string s);
    logic [6:0] c = 7'b1111111;
    for (int i = 0; i < s.len(); i++) c[6 - (s[i] - "a")] = 1'b0;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      value = 4'(v); #1;
      checks++;
      if (seg !== code(lit[v])) begin
        failures++;
        $display("FAIL %0d: seg=%b expected=%b", v, seg, code(lit[v]));
      end
    end
    // the four codes quoted for the board decoder
    value = 4'hA; #1; checks++; if (seg !== 7'b0001000) failures++;
    value = 4'hB; #1; checks++; if (seg !== 7'b1100000) failures++;
    value = 4'hC; #1; checks++; if (seg !== 7'b0110001) failures++;
    value = 4'hD; #1; checks++; if (seg !== 7'b1000010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
