// scahs_page: one page of the single cycle access structure with hold mode
// (SCAhS).
//
// SD x SW SCAh-FF cells. Chain c (0..SW-1) runs from si[c] through the cells
// at scan depth 1..SD (line index 0..SD-1) to so[c]: each cell's si is the so
// of the cell before it. All cells share the global scan enable gse on se[0].
// The se[1] pins of the SW cells at the same scan depth form one line and are
// driven by one output of the 1-out-of-N line decoder, addressed by add.
//
// Operation:
//   gse=0          : every cell captures its functional input di (capture).
//   gse=1, add=0   : every cell holds; so[c] = si[c].
//   gse=1, add=k   : line k loads si[SW-1:0] in one clock (single cycle
//                    write), all other lines hold. During the same cycle
//                    so[SW-1:0] shows the old contents of line k, because
//                    all other cells of the chain pass their scan input
//                    through (asynchronous read).
//   gse=0, add=k   : capture, with line k still visible on so (continuous
//                    read-out of one line while the circuit runs).
// A read therefore needs no clock edge at all and a write needs one; the
// registers of other lines never toggle during an access.
//
// di/dout are indexed [line][chain]; line index l is scan depth l+1 and
// address l+1. Defaults are the reference page of 31 x 32 = 992 registers.
module scahs_page
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned SW = SCA_SW,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  gse,
  input  logic [AW-1:0]         add,
  input  logic [SW-1:0]         si,
  output logic [SW-1:0]         so,
  input  logic [SD-1:0][SW-1:0] di,
  output logic [SD-1:0][SW-1:0] dout
);

  logic [SD-1:0] ls;
  // chain nodes: node[l] is the scan input of line l, node[SD] is the output
  logic [SD:0][SW-1:0] node;

  line_decoder #(.SD(SD), .AW(AW)) u_dec (.add(add), .ls(ls));

  assign node[0] = si;

  for (genvar l = 0; l < SD; l++) begin : g_line
    for (genvar c = 0; c < SW; c++) begin : g_chain
      scah_ff u_ff (
        .clk  (clk),
        .rst_n(rst_n),
        .di   (di[l][c]),
        .si   (node[l][c]),
        .se   ({ls[l], gse}),
        .dout (dout[l][c]),
        .so   (node[l+1][c])
      );
    end
  end

  assign so = node[SD];

endmodule
