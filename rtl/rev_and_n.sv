// rev_and_n: an N-input AND built as a cascade of reversible AND gates.
//
// Input 0 and input 1 meet in the first Toffoli gate (target tied to 0); each
// further input meets the running product in the next Toffoli gate, whose
// target is again a fresh 0 ancilla line. N inputs thus take N-1 Toffoli gates
// and N-1 ancilla lines; the controls that pass through are garbage outputs
// and are left open. Bits of POLARITY that are 0 mark inputs that must be 0 for
// a match: those inputs first pass through a reversible NOT gate. With
// POLARITY set to an opcode the module is a reversible opcode recogniser.
// Purely combinational; the cascade is this design's way of widening the
// document's 3x3 gate.
module rev_and_n #(
  parameter int unsigned  N        = 6,
  parameter logic [N-1:0] POLARITY = '1   // 1: input must be 1, 0: must be 0
) (
  input  logic [N-1:0] in,
  output logic         y
);
  logic [N-1:0] lit;      // inputs after optional inversion
  logic [N-1:0] prod;     // running product, prod[i] = AND of lit[i:0]

  for (genvar i = 0; i < N; i++) begin : g_lit
    if (POLARITY[i]) begin : g_pos
      assign lit[i] = in[i];
    end else begin : g_neg
      rev_not_gate u_not (.a(in[i]), .p(lit[i]));
    end
  end

  assign prod[0] = lit[0];
  for (genvar i = 1; i < N; i++) begin : g_chain
    rev_and_gate u_and (.a(prod[i-1]), .b(lit[i]), .a_out(), .b_out(), .y(prod[i]));
  end

  assign y = prod[N-1];
endmodule
