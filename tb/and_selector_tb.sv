// and_selector_tb: checks the registered scan-in AND-selector: one clock
// after si/psel are applied, si_q equals si when psel is high and zero
// otherwise.
module and_selector_tb;
  localparam int unsigned SW = 32;
  logic clk = 1'b0, rst_n = 1'b0, psel;
  logic [SW-1:0] si, si_q, exp;
  int checks = 0, failures = 0;

  and_selector #(.SW(SW)) dut (.clk(clk), .rst_n(rst_n), .psel(psel), .si(si), .si_q(si_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psel = 0; si = '0;
    #12 rst_n = 1'b1;
    checks++;
    if (si_q !== '0) failures++;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      psel = 1'($urandom); si = $urandom;
      exp = psel ? si : '0;
      #1;
      checks++;
      if (i > 0 && si_q === exp && exp != 0) begin
        // the output must not follow the input before the clock edge
        failures++;
        $display("FAIL output changed before the clock edge");
      end
      @(posedge clk); #1;
      checks++;
      if (si_q !== exp) begin
        failures++;
        $display("FAIL psel=%0b si=%h si_q=%h", psel, si, si_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
