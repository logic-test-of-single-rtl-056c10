// xor_tree: registered XOR-tree merging the scan outputs of the pages.
//
// q[c] <= XOR over all NIN inputs of d[i][c]. With the scan-in AND-selectors
// of unselected pages feeding zeros, only the selected page contributes, so
// q carries that page's scan output, one clock later. Asynchronous
// active-low reset clears q.
module xor_tree
  import sca_pkg::*;
#(
  parameter int unsigned NIN = 1,
  parameter int unsigned W   = SCA_SW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIN-1:0][W-1:0]   d,
  output logic [W-1:0]            q
);

  logic [W-1:0] x;

  always_comb begin
    x = '0;
    for (int unsigned i = 0; i < NIN; i++) x ^= d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= x;
  end

endmodule
