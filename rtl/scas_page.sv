// scas_page: one page of the single cycle access structure without hold mode
// (SCAS).
//
// The same line and chain organisation as the SCAhS page, built from SCA-FF
// cells, and without a global scan enable: the only scan control of a cell is
// the line select of its line.
//   add=0 : no line selected, every cell captures di (functional mode and
//           capture); so[c] = si[c].
//   add=k : line k loads si[SW-1:0] in one clock and shows its old contents on
//           so[SW-1:0] during that cycle; all other lines capture di, since
//           the SCA-FF has no hold path.
// di/dout are indexed [line][chain]; line index l is address l+1.
module scas_page
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned SW = SCA_SW,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AW-1:0]         add,
  input  logic [SW-1:0]         si,
  output logic [SW-1:0]         so,
  input  logic [SD-1:0][SW-1:0] di,
  output logic [SD-1:0][SW-1:0] dout
);

  logic [SD-1:0] ls;
  logic [SD:0][SW-1:0] node;

  line_decoder #(.SD(SD), .AW(AW)) u_dec (.add(add), .ls(ls));

  assign node[0] = si;

  for (genvar l = 0; l < SD; l++) begin : g_line
    for (genvar c = 0; c < SW; c++) begin : g_chain
      sca_ff u_ff (
        .clk  (clk),
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
