// gcl_tb: checks the gated clock element. For random ls/gse/ce applied while
// the clock is low, the gated clock must pulse during the next high phase
// exactly when ls | (~gse & ce), stay low while clk is low, and ignore
// enable changes made while clk is high (no glitches).
module gcl_tb;
  logic clk = 1'b0, ls, gse, ce, gclk;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, rises = 0;
  logic exp;

  gcl dut (.clk(clk), .ls(ls), .gse(gse), .ce(ce), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) rises++;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ls = 0; gse = 1; ce = 0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      int r0;
      ls = 1'($urandom); gse = 1'($urandom); ce = 1'($urandom);
      exp = ls | (~gse & ce);
      #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
      r0 = rises;
      @(posedge clk); #1;
      checks++;
      if (gclk !== exp) begin failures++; $display("FAIL gclk=%0b expected %0b", gclk, exp); end
      // disturb the enable during the high phase
      ls = ~ls; gse = ~gse; ce = ~ce;
      #2;
      checks++;
      if (gclk !== exp) begin failures++; $display("FAIL glitch during high phase"); end
      @(negedge clk);
      checks++;
      if ((rises - r0) != int'(exp)) begin failures++; $display("FAIL pulse count"); end
      if (exp) n_on++; else n_off++;
    end
    if (n_on == 0 || n_off == 0) failures++;
    $display("enabled=%0d gated=%0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
