// toffoli_gate: the 3x3 reversible Toffoli gate.
//
// The two control lines pass straight through (P = A, Q = B) and the target
// line is inverted when both controls are 1 (R = A&B ^ C). The mapping from
// (A,B,C) to (P,Q,R) is one-to-one, so no information is lost; applying the
// gate twice gives back the inputs. Purely combinational, no timing.
// It is the basic cell from which the reversible AND and OR gates, and through
// them the whole control unit, are built. Its definition is the standard one
// and follows the document's truth table exactly.
module toffoli_gate (
  input  logic a,  // control A
  input  logic b,  // control B
  input  logic c,  // target C
  output logic p,  // = A
  output logic q,  // = B
  output logic r   // = A&B ^ C
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
