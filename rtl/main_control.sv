// main_control: the main decoder of the control unit, in reversible logic.
//
// The 6-bit opcode is matched against the four instruction groups the
// processor executes: R-format (000000), lw (100011), sw (101011) and
// beq (000100). Each match is a 6-input AND of opcode bits and complemented
// opcode bits, built from reversible NOT gates and a cascade of Toffoli
// gates. The nine control lines are then single decodes or ORs of two of them:
//   RegDst = R      ALUSrc = lw | sw   MemtoReg = lw   RegWrite = R | lw
//   MemRead = lw    MemWrite = sw      Branch = beq    ALUOp1 = R   ALUOp0 = beq
// The ORs are Toffoli gates fed with complemented inputs and a constant 1.
// Which decode drives which line follows the document's control table and its
// gate-level diagram; the cascade used for the 6-input ANDs, and driving the
// table's don't-care entries to 0, are this design's choices. An opcode that
// matches none of the four gives an all-zero control word (nothing is written,
// no branch). An immediate assertion checks that at most one of the four
// recognisers fires. Purely combinational.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,  // Instruction[31:26]
  output ctrl_t      ctrl
);
  logic is_r, is_lw, is_sw, is_beq;

  rev_and_n #(.N(6), .POLARITY(OP_RTYPE)) u_dec_r   (.in(opcode), .y(is_r));
  rev_and_n #(.N(6), .POLARITY(OP_LW))    u_dec_lw  (.in(opcode), .y(is_lw));
  rev_and_n #(.N(6), .POLARITY(OP_SW))    u_dec_sw  (.in(opcode), .y(is_sw));
  rev_and_n #(.N(6), .POLARITY(OP_BEQ))   u_dec_beq (.in(opcode), .y(is_beq));

  // The four opcode recognisers are mutually exclusive.
  always_comb begin
    assert (32'(is_r) + 32'(is_lw) + 32'(is_sw) + 32'(is_beq) <= 1)
      else $error("main_control: more than one instruction group decoded");
  end

  logic alu_src, reg_write;
  rev_or_gate u_or_alusrc   (.a(is_lw), .b(is_sw), .a_n(), .b_n(), .y(alu_src));
  rev_or_gate u_or_regwrite (.a(is_r),  .b(is_lw), .a_n(), .b_n(), .y(reg_write));

  always_comb begin
    ctrl.reg_dst    = is_r;
    ctrl.alu_src    = alu_src;
    ctrl.mem_to_reg = is_lw;
    ctrl.reg_write  = reg_write;
    ctrl.mem_read   = is_lw;
    ctrl.mem_write  = is_sw;
    ctrl.branch     = is_beq;
    ctrl.alu_op     = {is_r, is_beq};
  end
endmodule
