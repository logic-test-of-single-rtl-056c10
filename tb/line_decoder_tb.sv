// line_decoder_tb: exhaustive test of the 1-out-of-N line decoder at the
// reference depth of 31 lines (5-bit address): address 0 selects nothing,
// address k selects exactly line k.
module line_decoder_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned AW = 5;
  logic [AW-1:0] add;
  logic [SD-1:0] ls, exp;
  int checks = 0, failures = 0;

  line_decoder #(.SD(SD), .AW(AW)) dut (.add(add), .ls(ls));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      add = AW'(a);
      exp = '0;
      if (a >= 1 && a <= SD) exp[a-1] = 1'b1;
      #1;
      checks++;
      if (ls !== exp) begin
        failures++;
        $display("FAIL add=%0d ls=%h expected %h", a, ls, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
