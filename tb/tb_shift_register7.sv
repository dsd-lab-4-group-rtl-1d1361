// tb_shift_register7: random stimulus against a reference model of the
// digit register (asynchronous clear, enable, load-and-shift of ldata,
// combinational carry out).
module tb_shift_register7;
  import lab4_pkg::*;

  int checks = 0, failures = 0;
  logic   clk = 0, clear, enable, shift_in, shift_out;
  digit_t ldata, q7, model;

  shift_register7 dut (.clk, .clear, .enable, .ldata, .shift_in, .q7, .shift_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q7 !== model) begin
      failures++;
      $display("FAIL %s q7=%0d model=%0d", what, q7, model);
    end
  endtask

  initial begin
    clear = 0; enable = 0; ldata = '0; shift_in = 0;
    #1 clear = 1;
    #2;
    model = '0;
    check("async clear");
    clear = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      enable   = ($urandom % 4) != 0;
      ldata    = digit_t'($urandom);
      shift_in = 1'($urandom);
      #1;
      checks++;
      if (shift_out !== ldata[6]) begin
        failures++;
        $display("FAIL shift_out=%0b ldata=%0d", shift_out, ldata);
      end
      if ((i % 97) == 50) begin
        // asynchronous clear in the middle of a cycle
        clear = 1; #1; model = '0; check("async clear mid-cycle"); clear = 0;
      end
      @(posedge clk);
      if (enable) model = digit_t'((int'(ldata) * 2 + int'(shift_in)) % 128);
      #1;
      check("clocked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
