// and_selector: registered scan-in AND-selector of a gated SCA page.
//
// Feeds the scan inputs of the page's chains: si_q[c] <= si[c] & psel on every
// rising clock edge. A page whose page select psel is low gets all-zero scan
// inputs, so its chains (with no line selected) put zeros on their scan
// outputs and drop out of the XOR-tree that merges the pages' outputs.
// One clock of latency; asynchronous active-low reset clears the outputs.
module and_selector
  import sca_pkg::*;
#(
  parameter int unsigned SW = SCA_SW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          psel,
  input  logic [SW-1:0] si,
  output logic [SW-1:0] si_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) si_q <= '0;
    else        si_q <= si & {SW{psel}};
  end

endmodule
