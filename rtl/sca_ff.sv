// sca_ff: single cycle access register without hold mode (SCA-FF).
//
// A mux-scan flip-flop with one extra 2-to-1 multiplexer on the scan output.
// It has a single scan enable se, driven by the line select of its line:
//   se=0: the flip-flop captures di, and so passes si through;
//   se=1: the flip-flop loads si, and so shows the stored value Q.
// There is no hold path: a cell that must keep its value has to have its
// clock stopped, which the gated SCA structure does per line (see gcl).
// The scan-out multiplexer (so = se ? Q : si) is taken to be the one extra
// multiplexer, as it is the part of the SCAh-FF that the line-wise access
// cannot do without; the hold multiplexer is the one left out.
//
// Timing: Q changes on the rising edge of clk (in the gated structure this is
// the gated line clock); so is combinational. Asynchronous active-low reset.
module sca_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic di,
  input  logic si,
  input  logic se,
  output logic dout,
  output logic so
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (se) q <= si;
    else         q <= di;
  end

  assign dout = q;
  assign so   = se ? q : si;

endmodule
