// alu_control: the ALU decoder of the control unit, in reversible logic.
//
// Inputs are the 2-bit ALUOp from the main decoder and the 6-bit function
// field; the output is the 3-bit ALU operation. ALUOp 00 asks for an add
// (lw/sw address), ALUOp x1 for a subtract (beq compare), and ALUOp 1x hands
// the choice to function bits F3..F0: add 0000 -> 010, sub 0010 -> 110,
// and 0100 -> 000, or 0101 -> 001, slt 1010 -> 111. F5 and F4 are ignored.
// Minimised over the table's don't-cares this is
//   Operation2 = ALUOp0 | (ALUOp1 & F1)
//   Operation1 = ~ALUOp1 | ~F2
//   Operation0 = ALUOp1 & (F3 | F0)
// and each AND, OR and complement is a reversible gate (Toffoli with a 0
// target, Toffoli on complemented inputs with a 1 target, NOT). The truth
// table is the document's; the minimised equations were worked out from it.
// Purely combinational.
module alu_control (
  input  logic [1:0] alu_op,     // {ALUOp1, ALUOp0}
  input  logic [5:0] funct,      // F5..F0
  output logic [2:0] operation   // Operation2..0
);
  // Operation2 = ALUOp0 | (ALUOp1 & F1)
  logic op1_and_f1;
  rev_and_gate u_and2 (.a(alu_op[1]), .b(funct[1]), .a_out(), .b_out(), .y(op1_and_f1));
  rev_or_gate  u_or2  (.a(alu_op[0]), .b(op1_and_f1), .a_n(), .b_n(), .y(operation[2]));

  // Operation1 = ~ALUOp1 | ~F2
  logic n_aluop1, n_f2;
  rev_not_gate u_not_aluop1 (.a(alu_op[1]), .p(n_aluop1));
  rev_not_gate u_not_f2     (.a(funct[2]),  .p(n_f2));
  rev_or_gate  u_or1 (.a(n_aluop1), .b(n_f2), .a_n(), .b_n(), .y(operation[1]));

  // Operation0 = ALUOp1 & (F3 | F0)
  logic f3_or_f0;
  rev_or_gate  u_or0  (.a(funct[3]), .b(funct[0]), .a_n(), .b_n(), .y(f3_or_f0));
  rev_and_gate u_and0 (.a(alu_op[1]), .b(f3_or_f0), .a_out(), .b_out(), .y(operation[0]));
endmodule
