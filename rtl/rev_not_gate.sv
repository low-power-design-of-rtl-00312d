// rev_not_gate: the 1x1 reversible NOT gate (P = A').
//
// A single line with an inverter on it. It is its own inverse, so it is
// reversible. Used on the opcode, function and ALUOp lines wherever a decode
// needs a complemented input, and inside the reversible OR gate.
// Purely combinational.
module rev_not_gate (
  input  logic a,
  output logic p   // = ~A
);
  assign p = ~a;
endmodule
