// scas_page_tb: self-checking test of an SCAS page (no hold mode) at the
// reference size (31 lines x 32 chains).
// The same stand-in circuit as the SCAhS test drives di. With add=k line k
// loads si while every other line captures di; with add=0 all lines capture.
// Every clock the full register array is compared with a reference, and
// before every clock so is compared with the addressed line or with si.
module scas_page_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned SW = 32;
  localparam int unsigned AW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] add;
  logic [SW-1:0] si, so;
  logic [SD-1:0][SW-1:0] di, dout, ref_q;
  int checks = 0, failures = 0;
  int n_write = 0, n_cap = 0;

  scas_page #(.SD(SD), .SW(SW), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .add(add), .si(si), .so(so), .di(di), .dout(dout)
  );

  function automatic logic [SD-1:0][SW-1:0] cut(input logic [SD-1:0][SW-1:0] q);
    logic [SD-1:0][SW-1:0] r;
    for (int l = 0; l < SD; l++) begin
      logic [SW-1:0] n;
      n = q[(l + 1) % SD];
      r[l] = {n[SW-2:0], n[SW-1]} ^ SW'(32'h9E37_79B9 * (l + 1));
    end
    return r;
  endfunction

  assign di = cut(dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add = '0; si = '0;
    ref_q = '0;
    #12 rst_n = 1'b1;
    // the first clock after reset captures from the all-zero registers
    @(posedge clk);
    ref_q = cut('0);
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      si  = $urandom;
      add = ($urandom_range(0, 3) == 0) ? '0 : AW'($urandom_range(1, SD));
      #1;
      checks++;
      if (so !== ((add != 0) ? ref_q[add-1] : si)) begin
        failures++;
        $display("FAIL read add=%0d so=%h", add, so);
      end
      @(posedge clk);
      begin
        logic [SD-1:0][SW-1:0] nxt;
        nxt = cut(ref_q);
        if (add != 0) begin nxt[add-1] = si; n_write++; end
        else n_cap++;
        ref_q = nxt;
      end
      #1;
      checks++;
      if (dout !== ref_q) begin
        failures++;
        $display("FAIL state after op %0d add=%0d", i, add);
      end
    end
    $display("writes=%0d captures=%0d", n_write, n_cap);
    if (n_write == 0 || n_cap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
