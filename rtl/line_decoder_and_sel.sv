// line_decoder_and_sel: registered line decoder and AND selector of a gated
// SCA page.
//
// Decodes the line address with the 1-out-of-N decoder (address 0 = no line)
// and gates the result with the page select: ls_q <= psel ? onehot(add) : 0,
// one register per line select. One clock of latency, matching the
// scan-in AND-selector, so the line select and the scan data of an access
// reach the cells in the same cycle. Asynchronous active-low reset clears all
// line selects.
module line_decoder_and_sel
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          psel,
  input  logic [AW-1:0] add,
  output logic [SD-1:0] ls_q
);

  logic [SD-1:0] ls;

  line_decoder #(.SD(SD), .AW(AW)) u_dec (.add(add), .ls(ls));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ls_q <= '0;
    else        ls_q <= ls & {SD{psel}};
  end

endmodule
