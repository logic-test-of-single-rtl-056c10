// line_decoder_and_sel_tb: checks the registered line decoder and AND
// selector: one clock after add/psel are applied, exactly line add is
// selected when psel is high and add is 1..SD, and no line otherwise.
module line_decoder_and_sel_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned AW = 5;
  logic clk = 1'b0, rst_n = 1'b0, psel;
  logic [AW-1:0] add;
  logic [SD-1:0] ls_q, exp;
  int checks = 0, failures = 0;

  line_decoder_and_sel #(.SD(SD), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .psel(psel), .add(add), .ls_q(ls_q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psel = 0; add = '0;
    #12 rst_n = 1'b1;
    checks++;
    if (ls_q !== '0) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      psel = 1'($urandom); add = AW'($urandom);
      exp = '0;
      if (psel && add >= 1 && add <= SD) exp[add-1] = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (ls_q !== exp) begin
        failures++;
        $display("FAIL psel=%0b add=%0d ls_q=%h", psel, add, ls_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
