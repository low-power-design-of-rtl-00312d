// rev_or_gate: a two-input OR made reversible.
//
// Both inputs are first complemented by reversible NOT gates; a Toffoli gate
// then takes the complements as its controls and constant 1 as its target, so
// the target output is A'B' ^ 1 = ~(A'B') = A | B (De Morgan). The control
// lines come out as A' and B' (garbage outputs). Purely combinational.
module rev_or_gate (
  input  logic a,
  input  logic b,
  output logic a_n,  // ~A, garbage
  output logic b_n,  // ~B, garbage
  output logic y     // A | B
);
  logic na, nb;
  rev_not_gate u_na (.a(a), .p(na));
  rev_not_gate u_nb (.a(b), .p(nb));
  toffoli_gate u_tof (.a(na), .b(nb), .c(1'b1), .p(a_n), .q(b_n), .r(y));
endmodule
