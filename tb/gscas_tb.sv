// gscas_tb: self-checking test of the gated single cycle access structure
// with two pages of 31 lines x 32 chains.
// Each page's registers drive a stand-in circuit (rotate the next line, XOR
// a per-line constant) that feeds di. Random cycles mix line writes to one
// page (gse=1, psel one-hot, add=k), idle test cycles, accesses with no page
// selected, and captures (gse=0) under a random per-line clock enable ce.
// A cycle-accurate reference (input registers, gated line clocks, XOR-tree
// register) predicts all registers and the merged scan output after every
// clock; the two-edge access latency is therefore checked on every access.
module gscas_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned SW = 32;
  localparam int unsigned NP = 2;
  localparam int unsigned AW = 5;

  typedef logic [SD-1:0][SW-1:0] page_t;

  logic clk = 1'b0, rst_n = 1'b1;
  logic gse;
  logic [NP-1:0] psel;
  logic [AW-1:0] add;
  logic [SW-1:0] si, so;
  logic [NP-1:0][SD-1:0] ce;
  page_t [NP-1:0] di, dout, ref_q;

  // reference copies of the input registers and the XOR-tree register
  logic                 m_gse;
  logic [NP-1:0][AW-1:0] m_line;
  logic [NP-1:0][SW-1:0] m_si;
  logic [SW-1:0]         m_so;

  int checks = 0, failures = 0;
  int n_write = 0, n_hold = 0, n_cap = 0, n_gated = 0, n_nopage = 0, n_page[NP];

  gscas #(.SD(SD), .SW(SW), .NP(NP), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .gse(gse), .psel(psel), .add(add), .si(si),
    .ce(ce), .so(so), .di(di), .dout(dout)
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

  // reference step for one rising edge, using the inputs applied before it
  task automatic model_edge();
    logic [SW-1:0] x;
    page_t nxt;
    x = '0;
    for (int p = 0; p < NP; p++)
      x ^= (m_line[p] != 0) ? ref_q[p][m_line[p]-1] : m_si[p];
    for (int p = 0; p < NP; p++) begin
      page_t c;
      c = cut(ref_q[p], p);
      nxt = ref_q[p];
      for (int l = 0; l < SD; l++) begin
        if (m_line[p] == AW'(l + 1)) nxt[l] = m_si[p];
        else if (!m_gse && ce[p][l]) nxt[l] = c[l];
      end
      ref_q[p] = nxt;
    end
    m_so = x;
    m_gse = gse;
    for (int p = 0; p < NP; p++) begin
      m_line[p] = psel[p] ? add : '0;
      m_si[p]   = psel[p] ? si : '0;
    end
  endtask

  initial begin
    gse = 1'b1; psel = '0; add = '0; si = '0; ce = '0;
    ref_q = '0; m_gse = 1'b0; m_line = '0; m_si = '0; m_so = '0;
    foreach (n_page[p]) n_page[p] = 0;
    #1 rst_n = 1'b0;  // a falling edge, so cells whose clock is stopped are reset too
    #11 rst_n = 1'b1;
    // first edge after reset: gse register still 0, ce = 0, nothing clocked
    @(posedge clk); model_edge();
    for (int i = 0; i < 1500; i++) begin
      int op;
      @(negedge clk);
      op = int'($urandom_range(0, 9));
      si = $urandom;
      ce = {$urandom, $urandom};
      add = AW'($urandom_range(1, SD));
      psel = '0;
      if (op < 6) begin
        gse = 1'b1;
        psel[$urandom_range(0, NP - 1)] = 1'b1;
      end else if (op < 7) begin
        gse = 1'b1;
        add = '0;
        psel[$urandom_range(0, NP - 1)] = 1'b1;
      end else if (op < 8) begin
        gse = 1'b1;
      end else begin
        gse = 1'b0;
        add = '0;
      end
      // statistics on what reaches the cells at the next edge
      if (m_gse && m_line != '0) n_write++;
      if (m_gse) n_hold++;
      if (!m_gse) begin n_cap++; if (ce != '1) n_gated++; end
      if (m_gse && m_line == '0) n_nopage++;
      for (int p = 0; p < NP; p++) if (m_line[p] != 0) n_page[p]++;
      @(posedge clk);
      model_edge();
      #1;
      checks++;
      if (dout !== ref_q) begin
        failures++;
        $display("FAIL registers after cycle %0d", i);
        for (int p = 0; p < NP; p++) for (int l = 0; l < SD; l++)
          if (dout[p][l] !== ref_q[p][l] && i < 3)
            $display("  page %0d line %0d got %h exp %h gse_q=%0b line=%0d ce=%0b", p, l+1, dout[p][l], ref_q[p][l], m_gse, m_line[p], ce[p][l]);
      end
      checks++;
      if (so !== m_so) begin
        failures++;
        $display("FAIL so=%h expected %h after cycle %0d", so, m_so, i);
      end
    end
    $display("writes=%0d holds=%0d captures=%0d gated_captures=%0d no_line=%0d page0=%0d page1=%0d",
             n_write, n_hold, n_cap, n_gated, n_nopage, n_page[0], n_page[1]);
    if (n_write == 0 || n_cap == 0 || n_gated == 0 || n_nopage == 0 ||
        n_page[0] == 0 || n_page[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
