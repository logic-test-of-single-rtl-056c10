// scahs_tb: self-checking test of the multi-page SCAhS with two pages of
// 31 lines x 32 chains. Random cycles mix test accesses (gse=1) to one page,
// idle test cycles, full captures (gse=0, no page) and functional-mode line
// writes (gse=0 with one page selected: that page holds except for the
// addressed line, the other page keeps capturing). After every clock all
// registers are compared with a reference; before every clock each page's
// scan outputs are compared with the addressed line or with si.
module scahs_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned SW = 32;
  localparam int unsigned NP = 2;
  localparam int unsigned AW = 5;

  typedef logic [SD-1:0][SW-1:0] page_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gse;
  logic [NP-1:0] psel;
  logic [AW-1:0] add;
  logic [SW-1:0] si;
  logic [NP-1:0][SW-1:0] so;
  page_t [NP-1:0] di, dout, ref_q;
  int checks = 0, failures = 0;
  int n_test_write = 0, n_idle = 0, n_cap = 0, n_func_write = 0, n_running_page = 0;

  scahs #(.SD(SD), .SW(SW), .NP(NP), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .gse(gse), .psel(psel), .add(add), .si(si),
    .so(so), .di(di), .dout(dout)
  );

  function automatic page_t cut(input page_t q, input int p);
    page_t r;
    for (int l = 0; l < SD; l++) begin
      logic [SW-1:0] n;
      n = q[(l + 1) % SD];
      r[l] = {n[SW-2:0], n[SW-1]} ^ SW'(32'h9E37_79B9 * (l + 1 + 64 * p));
    end
    return r;
  endfunction

  for (genvar p = 0; p < NP; p++) begin : g_cut
    assign di[p] = cut(dout[p], p);
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gse = 1'b1; psel = '0; add = '0; si = '0;
    ref_q = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      int op;
      @(negedge clk);
      op = int'($urandom_range(0, 9));
      si = $urandom;
      add = AW'($urandom_range(1, SD));
      psel = '0;
      if (op < 5) begin gse = 1'b1; psel[$urandom_range(0, NP - 1)] = 1'b1; end
      else if (op < 6) begin gse = 1'b1; end
      else if (op < 8) begin gse = 1'b0; end
      else begin gse = 1'b0; psel[$urandom_range(0, NP - 1)] = 1'b1; end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (so[p] !== ((psel[p] || !gse) ? ref_q[p][add-1] : si)) begin
          failures++;
          $display("FAIL page %0d read, cycle %0d", p, i);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        if (psel[p]) ref_q[p][add-1] = si;
        else if (!gse) ref_q[p] = cut(ref_q[p], p);
      end
      if (gse && psel != 0) n_test_write++;
      if (gse && psel == 0) n_idle++;
      if (!gse && psel == 0) n_cap++;
      if (!gse && psel != 0) begin n_func_write++; n_running_page++; end
      #1;
      checks++;
      if (dout !== ref_q) begin
        failures++;
        $display("FAIL registers after cycle %0d gse=%0b psel=%b add=%0d", i, gse, psel, add);
      end
    end
    $display("test_writes=%0d idle=%0d captures=%0d functional_writes=%0d",
             n_test_write, n_idle, n_cap, n_func_write);
    if (n_test_write == 0 || n_idle == 0 || n_cap == 0 || n_func_write == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
