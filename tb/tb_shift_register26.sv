// tb_shift_register26: random load, shift and clear against a reference
// model; also checks that a loaded number leaves MSB first on shift_out.
module tb_shift_register26;
  int checks = 0, failures = 0;
  logic        clk = 0, clear, ld_enable, shift_in, shift_out;
  logic [25:0] ldata, q26;
  logic [25:0] model;

  shift_register26 dut (.clk, .clear, .ld_enable, .ldata, .shift_in, .q26, .shift_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q26 !== model || shift_out !== model[25]) begin
      failures++;
      $display("FAIL %s q26=%h model=%h", what, q26, model);
    end
  endtask

  initial begin
    logic [25:0] word;
    logic [25:0] serial;
    clear = 0; ld_enable = 0; ldata = '0; shift_in = 0;
    #1 clear = 1;
    #2; model = '0; check("clear");
    clear = 0;
    // load then 26 shifts: the bits come out MSB first
    word = 26'h2ad_beef;
    @(negedge clk); ld_enable = 1; ldata = word;
    @(posedge clk); #1; model = word; check("load");
    @(negedge clk); ld_enable = 0;
    serial = '0;
    for (int i = 0; i < 26; i++) begin
      serial = {serial[24:0], shift_out};
      @(posedge clk); #1;
    end
    checks++;
    if (serial !== word || q26 !== '0) begin
      failures++;
      $display("FAIL serial %h expected %h, left %h", serial, word, q26);
    end
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld_enable = ($urandom % 5) == 0;
      ldata     = 26'($urandom);
      shift_in  = 1'($urandom);
      if ((i % 101) == 7) begin
        clear = 1; #1; model = '0; check("async clear"); clear = 0;
      end
      @(posedge clk);
      model = ld_enable ? ldata : {model[24:0], shift_in};
      #1; check("clocked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
