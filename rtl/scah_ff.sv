// scah_ff: single cycle access register with hold mode (SCAh-FF).
//
// A standard mux-scan flip-flop extended by two 2-to-1 multiplexers:
//   * a hold multiplexer in front of the scan input of the flip-flop, which
//     selects the scan input si when se[1] is high and the flip-flop's own
//     output when se[1] is low;
//   * a scan-out multiplexer, so = se[1] ? Q : si. An unselected cell passes
//     its scan input straight through; a selected cell shows its stored value.
// The scan input multiplexer of the underlying scan flip-flop is controlled by
// se[0] (the global scan enable): se[0]=0 captures the functional input di.
//
//   se[0] se[1] | next Q   so
//   ------------+-------------
//     0     0   | di       si
//     0     1   | di       Q
//     1     0   | Q (hold) si
//     1     1   | si       Q
//
// Timing: Q and dout change on the rising clock edge; so is combinational from
// si, se[1] and Q (the asynchronous read path). The asynchronous active-low
// reset clears Q; the published cell has a reset pin of unstated kind,
// so the asynchronous active-low form is this design's choice.
module scah_ff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       di,
  input  logic       si,
  input  logic [1:0] se,
  output logic       dout,
  output logic       so
);

  logic q;
  logic scan_d;

  // hold multiplexer: si when the line is selected, else the stored value
  assign scan_d = se[1] ? si : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (se[0]) q <= scan_d;
    else            q <= di;
  end

  assign dout = q;
  assign so   = se[1] ? q : si;

endmodule
