// control_unit: the reversible control unit of the processor.
//
// The main decoder turns Instruction[31:26] into the datapath control word
// (RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, ALUOp); the
// ALU decoder combines ALUOp with Instruction[5:0] into the 3-bit ALU
// operation. Both are built only from reversible NOT and Toffoli gates. This
// two-level split is the document's; the outputs are combinational in the
// instruction word, so the whole control settles within the single cycle.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,    // Instruction[31:26]
  input  logic [5:0] funct,     // Instruction[5:0]
  output ctrl_t      ctrl,
  output logic [2:0] alu_ctrl
);
  main_control u_main (.opcode(opcode), .ctrl(ctrl));
  alu_control  u_alu  (.alu_op(ctrl.alu_op), .funct(funct), .operation(alu_ctrl));
endmodule
