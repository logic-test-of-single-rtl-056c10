// gscas_page_tb: self-checking test of one gated SCA page (31 lines x 32
// chains) on its own, with the already-registered global scan enable driven
// directly. Random line writes, page-deselected cycles, idle test cycles and
// captures under a random per-line clock enable. After every clock all
// registers are compared with a reference; between clocks the chain outputs
// must show the line selected at the last edge (or the registered scan-in,
// which is zero when the page was not selected).
module gscas_page_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned SW = 32;
  localparam int unsigned AW = 5;

  typedef logic [SD-1:0][SW-1:0] page_t;

  logic clk = 1'b0, rst_n = 1'b1;
  logic gse_q, psel;
  logic [AW-1:0] add;
  logic [SW-1:0] si, so;
  logic [SD-1:0] ce;
  page_t di, dout, ref_q;
  logic [AW-1:0] m_line;
  logic [SW-1:0] m_si;
  int checks = 0, failures = 0;
  int n_write = 0, n_hold = 0, n_cap = 0, n_desel = 0;

  gscas_page #(.SD(SD), .SW(SW), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .gse_q(gse_q), .psel(psel), .add(add), .si(si),
    .ce(ce), .so(so), .di(di), .dout(dout)
  );

  function automatic page_t cut(input page_t q);
    page_t r;
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
    gse_q = 1'b1; psel = 1'b0; add = '0; si = '0; ce = '0;
    ref_q = '0; m_line = '0; m_si = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 1500; i++) begin
      int op;
      @(negedge clk);
      op = int'($urandom_range(0, 9));
      si = $urandom;
      ce = $urandom;
      add = AW'($urandom_range(0, SD));
      psel = (op < 7);
      gse_q = (op < 8);
      // chain outputs between edges
      #1;
      checks++;
      if (so !== ((m_line != 0) ? ref_q[m_line-1] : m_si)) begin
        failures++;
        $display("FAIL so=%h line=%0d cycle %0d", so, m_line, i);
      end
      if (m_line != 0) n_write++;
      else if (gse_q) n_hold++;
      if (!gse_q) n_cap++;
      if (!psel) n_desel++;
      @(posedge clk);
      begin
        page_t c, nxt;
        c = cut(ref_q);
        nxt = ref_q;
        for (int l = 0; l < SD; l++) begin
          if (m_line == AW'(l + 1)) nxt[l] = m_si;
          else if (!gse_q && ce[l]) nxt[l] = c[l];
        end
        ref_q = nxt;
      end
      m_line = psel ? add : '0;
      m_si   = psel ? si : '0;
      #1;
      checks++;
      if (dout !== ref_q) begin
        failures++;
        $display("FAIL registers after cycle %0d", i);
      end
    end
    $display("writes=%0d holds=%0d captures=%0d deselected=%0d", n_write, n_hold, n_cap, n_desel);
    if (n_write == 0 || n_hold == 0 || n_cap == 0 || n_desel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
