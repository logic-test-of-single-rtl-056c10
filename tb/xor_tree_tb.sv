// xor_tree_tb: checks the registered XOR-tree for 4 inputs of 32 bits: one
// clock after d is applied, q is the bitwise XOR of all inputs. It also
// checks the intended use: when all inputs but one are zero, q is that input.
module xor_tree_tb;
  localparam int unsigned NIN = 4;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NIN-1:0][W-1:0] d;
  logic [W-1:0] q, exp;
  int checks = 0, failures = 0;

  xor_tree #(.NIN(NIN), .W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin
        exp = '0;
        for (int k = 0; k < NIN; k++) begin d[k] = $urandom; exp ^= d[k]; end
      end else begin
        int sel;
        sel = int'($urandom_range(0, NIN - 1));
        d = '0;
        d[sel] = $urandom;
        exp = d[sel];
      end
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h expected %h", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
