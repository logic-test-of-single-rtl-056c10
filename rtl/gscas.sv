// gscas: gated single cycle access structure, NP pages sharing one line
// address, one global scan enable register and one XOR-tree.
//
// Each page has its own page select psel[p]. At most one page should be
// selected during a test access; the AND-selectors of the other pages feed
// zeros into their chains, so the XOR-tree output q equals the scan output
// of the selected page. gse is registered once here and distributed to the
// gated clock elements of every page, as in the published structure.
//
// Access timing, counted in rising clock edges after psel/add/si/gse are
// applied:
//   edge 1: page/line select, scan data and gse registered; the old contents
//           of the addressed line appear on the chain outputs;
//   edge 2: the addressed line loads the scan data; the XOR-tree registers
//           the old contents, which are on so from then on.
// Back-to-back accesses overlap, one line per clock.
// Indexing: di/dout [page][line][chain], ce [page][line].
module gscas
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned SW = SCA_SW,
  parameter int unsigned NP = 1,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          gse,
  input  logic [NP-1:0]                 psel,
  input  logic [AW-1:0]                 add,
  input  logic [SW-1:0]                 si,
  input  logic [NP-1:0][SD-1:0]         ce,
  output logic [SW-1:0]                 so,
  input  logic [NP-1:0][SD-1:0][SW-1:0] di,
  output logic [NP-1:0][SD-1:0][SW-1:0] dout
);

  logic                  gse_q;
  logic [NP-1:0][SW-1:0] page_so;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gse_q <= 1'b0;
    else        gse_q <= gse;
  end

  for (genvar p = 0; p < NP; p++) begin : g_page
    gscas_page #(.SD(SD), .SW(SW), .AW(AW)) u_page (
      .clk  (clk),
      .rst_n(rst_n),
      .gse_q(gse_q),
      .psel (psel[p]),
      .add  (add),
      .si   (si),
      .ce   (ce[p]),
      .so   (page_so[p]),
      .di   (di[p]),
      .dout (dout[p])
    );
  end

  xor_tree #(.NIN(NP), .W(SW)) u_xor (
    .clk(clk), .rst_n(rst_n), .d(page_so), .q(so)
  );

  // test access rule: at most one page selected at a time
  a_one_page: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(psel))
    else $error("gscas: more than one page selected");

endmodule
