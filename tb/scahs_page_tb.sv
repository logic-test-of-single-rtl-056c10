// scahs_page_tb: self-checking test of an SCAhS page at the reference size
// (31 lines x 32 chains).
// A small combinational function stands in for the circuit under test:
// di[l] = dout[(l+1) mod SD] rotated left by one, XOR a constant per line.
// The test mixes random single cycle line writes (gse=1, add=k), idle test
// cycles (gse=1, add=0) and captures (gse=0), and after every clock compares
// all 992 registers with a reference array; before every clock it compares
// the asynchronous read data on so with the addressed line (or with si when
// no line is selected). It also checks that a write changes one line only.
module scahs_page_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned SW = 32;
  localparam int unsigned AW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gse;
  logic [AW-1:0] add;
  logic [SW-1:0] si, so;
  logic [SD-1:0][SW-1:0] di, dout, ref_q;
  int checks = 0, failures = 0;
  int n_write = 0, n_idle = 0, n_cap = 0, n_cap_read = 0;

  scahs_page #(.SD(SD), .SW(SW), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .gse(gse), .add(add), .si(si), .so(so), .di(di), .dout(dout)
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
    gse = 1'b1; add = '0; si = '0;
    ref_q = '0;
    #12 rst_n = 1'b1;
    checks++;
    if (dout !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1500; i++) begin
      int op;
      @(negedge clk);
      op  = int'($urandom_range(0, 9));
      si  = $urandom;
      if (op < 6) begin gse = 1'b1; add = AW'($urandom_range(1, SD)); end
      else if (op < 8) begin gse = 1'b1; add = '0; end
      else begin gse = 1'b0; add = AW'($urandom_range(0, SD)); end
      #1;
      // asynchronous read
      checks++;
      if (so !== ((add != 0) ? ref_q[add-1] : si)) begin
        failures++;
        $display("FAIL read add=%0d so=%h", add, so);
      end
      @(posedge clk);
      if (!gse) begin
        ref_q = cut(ref_q); n_cap++;
        if (add != 0) n_cap_read++;
      end else if (add != 0) begin
        ref_q[add-1] = si; n_write++;
      end else n_idle++;
      #1;
      checks++;
      if (dout !== ref_q) begin
        failures++;
        $display("FAIL state after op %0d gse=%0b add=%0d", i, gse, add);
      end
    end
    $display("writes=%0d idle=%0d captures=%0d capture_with_readout=%0d",
             n_write, n_idle, n_cap, n_cap_read);
    if (n_write == 0 || n_idle == 0 || n_cap == 0 || n_cap_read == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
