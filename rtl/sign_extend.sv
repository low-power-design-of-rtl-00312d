// sign_extend: widens the 16-bit immediate Instruction[15:0] to 32 bits by
// copying bit 15 into the upper half. Combinational. Feeds the ALU operand
// mux (lw/sw offset) and, shifted left by 2, the branch target adder.
module sign_extend (
  input  logic [15:0] imm,
  output logic [31:0] ext
);
  assign ext = {{16{imm[15]}}, imm};
endmodule
