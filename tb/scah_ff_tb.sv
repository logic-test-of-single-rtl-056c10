// scah_ff_tb: self-checking test of the SCAh-FF cell.
// Drives random di, si and se[1:0] for many cycles and compares the stored
// value and the scan output with a reference worked out from the cell's truth
// table (capture, hold, scan load; so = Q when selected, else si).
module scah_ff_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic di, si, dout, so;
  logic [1:0] se;
  int checks = 0, failures = 0;
  logic q_ref;
  int n_cap = 0, n_hold = 0, n_load = 0;

  scah_ff dut (.clk(clk), .rst_n(rst_n), .di(di), .si(si), .se(se), .dout(dout), .so(so));

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
    di = 0; si = 0; se = 2'b00;
    q_ref = 1'b0;
    #12 rst_n = 1'b1;
    check(dout, 1'b0, "reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      di = 1'($urandom); si = 1'($urandom); se = 2'($urandom);
      #1;
      check(so, se[1] ? q_ref : si, "so");
      @(posedge clk);
      case (se)
        2'b00, 2'b10: begin q_ref = di; n_cap++; end
        2'b01:        n_hold++;
        2'b11:        begin q_ref = si; n_load++; end
      endcase
      #1;
      check(dout, q_ref, "dout");
    end
    if (n_cap == 0 || n_hold == 0 || n_load == 0) failures++;
    $display("capture=%0d hold=%0d load=%0d", n_cap, n_hold, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
