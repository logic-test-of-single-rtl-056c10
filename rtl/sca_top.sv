// sca_top: the three single cycle access test structures side by side.
//
// A single cycle access structure turns the scan registers of a chip into a
// memory of lines: instead of shifting a pattern through whole chains, one
// line of SW registers (one register per chain, all at the same scan depth)
// is written in a single clock and read without a clock, while every other
// register keeps its value. Three implementations are brought out here, each
// with its own ports, so they can be compared on the same circuit:
//   h_* : SCAhS, SCAh-FF cells with hold mode, global scan enable h_gse,
//         NP pages with page selects h_psel and per-page scan outputs;
//   s_* : SCAS page, SCA-FF cells without hold mode, no global scan enable;
//   g_* : gated SCAS, SCA-FF cells held by per-line gated clocks, NP pages
//         with page selects, registered scan inputs and an XOR-tree output.
// The combinational logic of the chip under test is outside: its inputs are
// the registers' outputs (*_dout) and it drives their functional inputs
// (*_di). All three share clk and the active-low asynchronous reset rst_n.
// Defaults: one reference page of 31 lines x 32 chains (992 registers) in
// each structure (NP = 1 page for the SCAhS and the gated SCAS).
module sca_top
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned SW = SCA_SW,
  parameter int unsigned NP = 1,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // SCAhS
  input  logic                          h_gse,
  input  logic [NP-1:0]                 h_psel,
  input  logic [AW-1:0]                 h_add,
  input  logic [SW-1:0]                 h_si,
  output logic [NP-1:0][SW-1:0]         h_so,
  input  logic [NP-1:0][SD-1:0][SW-1:0] h_di,
  output logic [NP-1:0][SD-1:0][SW-1:0] h_dout,
  // SCAS page
  input  logic [AW-1:0]                 s_add,
  input  logic [SW-1:0]                 s_si,
  output logic [SW-1:0]                 s_so,
  input  logic [SD-1:0][SW-1:0]         s_di,
  output logic [SD-1:0][SW-1:0]         s_dout,
  // gated SCAS
  input  logic                          g_gse,
  input  logic [NP-1:0]                 g_psel,
  input  logic [AW-1:0]                 g_add,
  input  logic [SW-1:0]                 g_si,
  input  logic [NP-1:0][SD-1:0]         g_ce,
  output logic [SW-1:0]                 g_so,
  input  logic [NP-1:0][SD-1:0][SW-1:0] g_di,
  output logic [NP-1:0][SD-1:0][SW-1:0] g_dout
);

  scahs #(.SD(SD), .SW(SW), .NP(NP), .AW(AW)) u_scahs (
    .clk(clk), .rst_n(rst_n), .gse(h_gse), .psel(h_psel), .add(h_add),
    .si(h_si), .so(h_so), .di(h_di), .dout(h_dout)
  );

  scas_page #(.SD(SD), .SW(SW), .AW(AW)) u_scas (
    .clk(clk), .rst_n(rst_n), .add(s_add),
    .si(s_si), .so(s_so), .di(s_di), .dout(s_dout)
  );

  gscas #(.SD(SD), .SW(SW), .NP(NP), .AW(AW)) u_gscas (
    .clk(clk), .rst_n(rst_n), .gse(g_gse), .psel(g_psel), .add(g_add),
    .si(g_si), .ce(g_ce), .so(g_so), .di(g_di), .dout(g_dout)
  );

endmodule
