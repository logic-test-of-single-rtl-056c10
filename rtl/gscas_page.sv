// gscas_page: one page of the gated single cycle access structure (gSCAS).
//
// SD x SW SCA-FF cells in the same line/chain organisation as the SCAhS page.
// The page's scan inputs come through the registered scan-in AND-selector,
// its line selects through the registered line decoder and AND selector; both
// are gated by the page select psel. Line l (address l+1) is clocked by its
// own gated clock element, enabled by its line select, the (registered)
// global scan enable gse and the line's functional clock enable ce[l]. The
// chain outputs so[SW-1:0] go to the XOR-tree outside the page.
//
// Because the hold of the SCAh-FF is done by stopping the line clocks, the
// gSCAS behaves like the SCAhS with only the area of the SCAS cells:
//   gse=0           : lines with ce high capture di.
//   gse=1, line k   : line k loads the scan data, other lines hold; so shows
//                     the old contents of line k.
// Timing: psel, add and si are registered on the way in, so a write lands on
// the second rising edge after they are applied, and the old line contents
// are visible on so after the first. gse must arrive registered (gscas does
// that once for all pages). Asynchronous active-low reset.
module gscas_page
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned SW = SCA_SW,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  gse_q,
  input  logic                  psel,
  input  logic [AW-1:0]         add,
  input  logic [SW-1:0]         si,
  input  logic [SD-1:0]         ce,
  output logic [SW-1:0]         so,
  input  logic [SD-1:0][SW-1:0] di,
  output logic [SD-1:0][SW-1:0] dout
);

  logic [SD-1:0]       ls;
  logic [SD-1:0]       gclk;
  logic [SD:0][SW-1:0] node;

  and_selector #(.SW(SW)) u_sisel (
    .clk(clk), .rst_n(rst_n), .psel(psel), .si(si), .si_q(node[0])
  );

  line_decoder_and_sel #(.SD(SD), .AW(AW)) u_lsel (
    .clk(clk), .rst_n(rst_n), .psel(psel), .add(add), .ls_q(ls)
  );

  for (genvar l = 0; l < SD; l++) begin : g_line
    gcl u_gcl (.clk(clk), .ls(ls[l]), .gse(gse_q), .ce(ce[l]), .gclk(gclk[l]));

    for (genvar c = 0; c < SW; c++) begin : g_chain
      sca_ff u_ff (
        .clk  (gclk[l]),
        .rst_n(rst_n),
        .di   (di[l][c]),
        .si   (node[l][c]),
        .se   (ls[l]),
        .dout (dout[l][c]),
        .so   (node[l+1][c])
      );
    end
  end

  assign so = node[SD];

endmodule
