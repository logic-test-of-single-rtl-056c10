// sca_ff_tb: self-checking test of the SCA-FF cell (no hold mode).
// Random di, si and se; the stored value must follow se ? si : di on every
// edge and so must be se ? Q : si.
module sca_ff_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic di, si, se, dout, so;
  int checks = 0, failures = 0;
  logic q_ref;

  sca_ff dut (.clk(clk), .rst_n(rst_n), .di(di), .si(si), .se(se), .dout(dout), .so(so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    di = 0; si = 0; se = 0;
    q_ref = 1'b0;
    #12 rst_n = 1'b1;
    check(dout, 1'b0, "reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      di = 1'($urandom); si = 1'($urandom); se = 1'($urandom);
      #1;
      check(so, se ? q_ref : si, "so");
      @(posedge clk);
      q_ref = se ? si : di;
      #1;
      check(dout, q_ref, "dout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
