// scahs: single cycle access structure with hold mode, NP pages.
//
// Each page is an scahs_page (SD lines x SW chains of SCAh-FF cells) with its
// own page select psel[p]. The line address add and the scan inputs si are
// shared; each page brings out its own scan outputs so[p].
//   page selected   : the page's global scan enable is forced high, so its
//                     unaddressed registers take a hold cycle, and the line
//                     address reaches its decoder: line add is written from si
//                     and read on so[p] in the same cycle.
//   page unselected, gse=1 : its decoder sees address 0, the page holds.
//   page unselected, gse=0 : the page captures di, and line add stays
//                     visible on so[p] (continuous read-out while running).
// With gse=0 this gives write (and read) cycles to one line of one page while
// all other pages keep running functionally; with gse=1 it is the usual test
// access. Selecting a page to enable its hold cycle follows the description
// of the structure; forcing the page's scan enable with psel, the gating of
// the address during test access and the separate per-page scan outputs are this design's
// choices. Purely combinational control; the timing is that of scahs_page.
module scahs
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
  output logic [NP-1:0][SW-1:0]         so,
  input  logic [NP-1:0][SD-1:0][SW-1:0] di,
  output logic [NP-1:0][SD-1:0][SW-1:0] dout
);

  for (genvar p = 0; p < NP; p++) begin : g_page
    logic          page_gse;
    logic [AW-1:0] page_add;

    assign page_gse = gse | psel[p];
    assign page_add = (psel[p] | ~gse) ? add : '0;

    scahs_page #(.SD(SD), .SW(SW), .AW(AW)) u_page (
      .clk  (clk),
      .rst_n(rst_n),
      .gse  (page_gse),
      .add  (page_add),
      .si   (si),
      .so   (so[p]),
      .di   (di[p]),
      .dout (dout[p])
    );
  end

endmodule
