// sca_top_tb: end-to-end test of the three single cycle access structures at
// their default size (one page of 31 lines x 32 chains each, 992 registers).
//
// Each structure runs one complete test operation on a stand-in circuit
// (di = next line rotated left by one, XOR a per-line constant):
//   load   : write a pattern line by line, one line per clock;
//   capture: one functional clock (gse=0) with the pattern applied;
//   unload : read the response line by line, each read overlapped with the
//            write of the next pattern into the same line.
// Around it the test exercises the other mechanisms: the SCAhS continuous
// read-out of one line during capture clocks, SCAhS line writes in
// functional mode through the page select, idle test cycles with no line
// selected, SCAS captures of unselected lines during a write, gated captures
// with a per-line clock enable and a deselected page in the gated structure.
// Reference models of all three run on every clock; after every clock all
// 3 x 992 registers and the scan outputs are compared, and the counters of
// each mechanism must end above zero. The two-clock access latency of the
// gated structure and the zero-clock read of the other two are part of the
// reference, so every read checks them.
module sca_top_tb;
  import sca_pkg::*;
  localparam int unsigned SD = SCA_SD;
  localparam int unsigned SW = SCA_SW;
  localparam int unsigned AW = addr_width(SD);

  typedef logic [SD-1:0][SW-1:0] page_t;

  logic clk = 1'b0, rst_n = 1'b1;
  logic          h_gse, g_gse;
  logic [AW-1:0] h_add, s_add, g_add;
  logic [SW-1:0] h_si, h_so, s_si, s_so, g_si, g_so;
  logic [0:0]    g_psel, h_psel;
  logic [0:0][SW-1:0] h_so1;
  logic [0:0][SD-1:0] g_ce;
  page_t s_di, s_dout;
  page_t [0:0] g_di, g_dout, h_di, h_dout;

  // reference state
  page_t h_ref, s_ref, g_ref;
  logic g_m_gse;
  logic [AW-1:0] g_m_line;
  logic [SW-1:0] g_m_si, g_m_so;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_h_write = 0, n_h_read = 0, n_h_hold = 0, n_h_cap = 0, n_h_stream = 0, n_h_func_write = 0;
  int n_s_write = 0, n_s_cap_during_write = 0, n_s_cap = 0;
  int n_g_write = 0, n_g_read = 0, n_g_cap = 0, n_g_gated = 0, n_g_desel = 0;
  int n_h_op = 0, n_s_op = 0, n_g_op = 0;

  sca_top dut (
    .clk(clk), .rst_n(rst_n),
    .h_gse(h_gse), .h_psel(h_psel), .h_add(h_add), .h_si(h_si), .h_so(h_so1), .h_di(h_di), .h_dout(h_dout),
    .s_add(s_add), .s_si(s_si), .s_so(s_so), .s_di(s_di), .s_dout(s_dout),
    .g_gse(g_gse), .g_psel(g_psel), .g_add(g_add), .g_si(g_si), .g_ce(g_ce),
    .g_so(g_so), .g_di(g_di), .g_dout(g_dout)
  );

  function automatic page_t cut(input page_t q, input int salt);
    page_t r;
    for (int l = 0; l < SD; l++) begin
      logic [SW-1:0] n;
      n = q[(l + 1) % SD];
      r[l] = {n[SW-2:0], n[SW-1]} ^ SW'(32'h9E37_79B9 * (l + 1 + 64 * salt));
    end
    return r;
  endfunction

  assign h_di[0] = cut(h_dout[0], 0);
  assign h_so    = h_so1[0];
  assign s_di    = cut(s_dout, 1);
  assign g_di[0] = cut(g_dout[0], 2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Between edges: check the combinational read paths, count mechanisms.
  task automatic pre_edge();
    #1;
    check(h_so === ((h_add != 0 && (h_psel[0] || !h_gse)) ? h_ref[h_add-1] : h_si), "SCAhS read");
    check(s_so === ((s_add != 0) ? s_ref[s_add-1] : s_si), "SCAS read");
    if (h_gse && h_psel[0] && h_add != 0) begin n_h_write++; n_h_read++; end
    if (h_gse && (h_add == 0 || !h_psel[0])) n_h_hold++;
    if (!h_gse && !h_psel[0]) n_h_cap++;
    if (!h_gse && !h_psel[0] && h_add != 0) n_h_stream++;
    if (!h_gse && h_psel[0] && h_add != 0) n_h_func_write++;
    if (s_add != 0) begin n_s_write++; n_s_cap_during_write++; end
    else n_s_cap++;
    if (g_m_line != 0) n_g_write++;
    if (!g_m_gse) begin n_g_cap++; if (g_ce[0] != '1) n_g_gated++; end
    if (g_gse && !g_psel[0]) n_g_desel++;
  endtask

  // One rising edge: advance the three reference models, then compare.
  task automatic edge_and_check();
    page_t c, nxt;
    @(posedge clk);
    // SCAhS
    if (h_psel[0]) begin
      if (h_add != 0) h_ref[h_add-1] = h_si;
    end else if (!h_gse) h_ref = cut(h_ref, 0);
    // SCAS
    nxt = cut(s_ref, 1);
    if (s_add != 0) nxt[s_add-1] = s_si;
    s_ref = nxt;
    // gated SCAS, one page
    g_m_so = (g_m_line != 0) ? g_ref[g_m_line-1] : g_m_si;
    c = cut(g_ref, 2);
    nxt = g_ref;
    for (int l = 0; l < SD; l++) begin
      if (g_m_line == AW'(l + 1)) nxt[l] = g_m_si;
      else if (!g_m_gse && g_ce[0][l]) nxt[l] = c[l];
    end
    g_ref = nxt;
    g_m_gse  = g_gse;
    g_m_line = g_psel[0] ? g_add : '0;
    g_m_si   = g_psel[0] ? g_si : '0;
    #1;
    check(h_dout[0] === h_ref, "SCAhS registers");
    check(s_dout === s_ref, "SCAS registers");
    check(g_dout[0] === g_ref, "gSCAS registers");
    check(g_so === g_m_so, "gSCAS scan out");
  endtask

  // idle inputs for all three
  task automatic idle_inputs();
    h_gse = 1'b1; h_psel = 1'b0; h_add = '0; h_si = $urandom;
    s_add = AW'($urandom_range(1, SD)); s_si = $urandom;
    g_gse = 1'b1; g_psel = 1'b0; g_add = '0; g_si = $urandom; g_ce = $urandom;
  endtask

  page_t pat_h, pat_s, pat_g, resp_h, resp_g;

  initial begin
    idle_inputs();
    s_add = '0;
    h_ref = '0; s_ref = '0; g_ref = '0;
    g_m_gse = 1'b0; g_m_line = '0; g_m_si = '0; g_m_so = '0;
    #1 rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    // first edge after reset: SCAS captures, the others hold
    pre_edge(); edge_and_check();

    for (int run = 0; run < 3; run++) begin
      for (int l = 0; l < SD; l++) begin pat_h[l] = $urandom; pat_g[l] = $urandom; pat_s[l] = $urandom; end

      // ---- SCAhS: load, capture, unload overlapped with the next load ----
      for (int l = 0; l < SD; l++) begin
        @(negedge clk); idle_inputs();
        h_psel = 1'b1; h_add = AW'(l + 1); h_si = pat_h[l];
        pre_edge(); edge_and_check();
      end
      check(h_dout[0] === pat_h, "SCAhS pattern loaded in SD clocks");
      @(negedge clk); idle_inputs(); h_gse = 1'b0; pre_edge(); edge_and_check();
      resp_h = cut(pat_h, 0);
      check(h_dout[0] === resp_h, "SCAhS response captured");
      for (int l = 0; l < SD; l++) begin
        @(negedge clk); idle_inputs();
        h_psel = 1'b1; h_add = AW'(l + 1); h_si = ~pat_h[l];
        #1;
        check(h_so === resp_h[l], "SCAhS unload");
        pre_edge(); edge_and_check();
      end
      // continuous read-out of one line while the logic runs
      for (int k = 0; k < 8; k++) begin
        @(negedge clk); idle_inputs(); h_gse = 1'b0; h_add = AW'(5 + run);
        pre_edge(); edge_and_check();
      end
      // functional-mode line writes: the selected page holds for one cycle
      // while one of its lines is written
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); idle_inputs(); h_gse = 1'b0; h_psel = 1'b1;
        h_add = AW'(10 + k); h_si = $urandom;
        pre_edge(); edge_and_check();
        @(negedge clk); idle_inputs(); h_gse = 1'b0; pre_edge(); edge_and_check();
      end
      n_h_op++;

      // ---- SCAS: a line write lets every other line capture ----
      for (int l = 0; l < SD; l++) begin
        @(negedge clk); idle_inputs();
        s_add = AW'(l + 1); s_si = pat_s[l];
        pre_edge(); edge_and_check();
      end
      check(s_dout[SD-1] === pat_s[SD-1], "SCAS last line written");
      @(negedge clk); idle_inputs(); s_add = '0; pre_edge(); edge_and_check();
      for (int l = 0; l < SD; l++) begin
        @(negedge clk); idle_inputs(); s_add = AW'(l + 1); s_si = $urandom;
        pre_edge(); edge_and_check();
      end
      n_s_op++;

      // ---- gSCAS: load, capture, unload through the XOR-tree ----
      for (int l = 0; l < SD; l++) begin
        @(negedge clk); idle_inputs();
        g_psel = 1'b1; g_add = AW'(l + 1); g_si = pat_g[l];
        pre_edge(); edge_and_check();
      end
      // two more clocks: the last write lands on the second edge
      @(negedge clk); idle_inputs(); pre_edge(); edge_and_check();
      @(negedge clk); idle_inputs(); pre_edge(); edge_and_check();
      check(g_dout[0] === pat_g, "gSCAS pattern loaded");
      // capture with every line enabled; gse is registered, so the capture
      // happens on the second edge after gse falls
      @(negedge clk); idle_inputs(); g_gse = 1'b0; g_ce = '1; pre_edge(); edge_and_check();
      @(negedge clk); idle_inputs(); g_ce = '1; pre_edge(); edge_and_check();
      resp_g = cut(pat_g, 2);
      check(g_dout[0] === resp_g, "gSCAS response captured");
      for (int l = 0; l < SD + 1; l++) begin
        @(negedge clk); idle_inputs();
        if (l < SD) begin g_psel = 1'b1; g_add = AW'(l + 1); g_si = ~pat_g[l]; end
        pre_edge(); edge_and_check();
        // line l - 1, addressed one clock earlier, is on the XOR-tree output
        // after this edge: the second edge after its address was applied
        if (l >= 1) begin
          check(g_so === resp_g[l-1], "gSCAS unload latency");
          n_g_read++;
        end
      end
      // a few gated captures with random line enables
      for (int k = 0; k < 6; k++) begin
        @(negedge clk); idle_inputs(); g_gse = 1'b0; pre_edge(); edge_and_check();
      end
      // an access with the page deselected must leave everything alone
      @(negedge clk); idle_inputs(); g_psel = 1'b0; g_add = 1; pre_edge(); edge_and_check();
      @(negedge clk); idle_inputs(); pre_edge(); edge_and_check();
      @(negedge clk); idle_inputs(); pre_edge(); edge_and_check();
      n_g_op++;
    end

    $display("SCAhS: writes=%0d reads=%0d idle=%0d captures=%0d readout_during_capture=%0d functional_writes=%0d operations=%0d",
             n_h_write, n_h_read, n_h_hold, n_h_cap, n_h_stream, n_h_func_write, n_h_op);
    $display("SCAS : writes=%0d captures=%0d other_lines_captured_during_write=%0d operations=%0d",
             n_s_write, n_s_cap, n_s_cap_during_write, n_s_op);
    $display("gSCAS: writes=%0d reads=%0d captures=%0d gated_captures=%0d deselected=%0d operations=%0d",
             n_g_write, n_g_read, n_g_cap, n_g_gated, n_g_desel, n_g_op);
    if (n_h_write == 0 || n_h_read == 0 || n_h_hold == 0 || n_h_cap == 0 || n_h_stream == 0 ||
        n_h_func_write == 0) failures++;
    if (n_s_write == 0 || n_s_cap == 0 || n_s_cap_during_write == 0) failures++;
    if (n_g_write == 0 || n_g_read == 0 || n_g_cap == 0 || n_g_gated == 0 || n_g_desel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
