// rev_and_gate: a two-input AND made reversible.
//
// A Toffoli gate whose target line is fed with constant 0: the target output
// becomes A&B ^ 0 = A&B, while A and B come out unchanged on the control lines
// (the "garbage" outputs that keep the mapping one-to-one). The garbage
// outputs are brought out so the reversible structure stays visible; callers
// that only want the AND leave them open. Purely combinational.
module rev_and_gate (
  input  logic a,
  input  logic b,
  output logic a_out,  // A, garbage
  output logic b_out,  // B, garbage
  output logic y       // A & B
);
  toffoli_gate u_tof (.a(a), .b(b), .c(1'b0), .p(a_out), .q(b_out), .r(y));
endmodule
