// burst_trap_test: the TEST circuit of the burst-trapping decoders.
//
// A decoder that corrects bursts of up to B symbols with an R-stage syndrome
// register has trapped the error pattern when the leading R-B stages (stages
// 1..R-B, state[R-B-1:0]) are all zero: the burst then sits in the last B
// stages, aligned with the symbol about to leave the buffer. The circuit is a
// pure zero detector on those stages, plus a detector of a non-zero register,
// which separates a trapped burst from the error-free all-zeros case.
// Combinational, no clock.
module burst_trap_test #(
  parameter int unsigned R = 14,
  parameter int unsigned B = 5
) (
  input  logic [R-1:0] state,
  output logic         lead_zero,
  output logic         nonzero
);

  initial assert (B >= 1 && B < R) else $fatal(1, "burst_trap_test needs 1 <= B < R");

  assign lead_zero = ~|state[R-B-1:0];
  assign nonzero   = |state;

endmodule
