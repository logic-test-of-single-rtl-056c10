// line_decoder: 1-out-of-N line decoder of a single cycle access page.
//
// Turns a line address into one-hot line-select signals. Address 0 selects no
// line; address k (1..SD) raises ls[k-1], i.e. the line at scan depth k.
// Addresses above SD select nothing. Purely combinational.
module line_decoder
  import sca_pkg::*;
#(
  parameter int unsigned SD = SCA_SD,
  parameter int unsigned AW = addr_width(SD)
) (
  input  logic [AW-1:0] add,
  output logic [SD-1:0] ls
);

  always_comb begin
    for (int unsigned k = 0; k < SD; k++)
      ls[k] = (add == AW'(k + 1));
  end

endmodule
