// mips_top: single-cycle 32-bit MIPS processor with a reversible control unit.
//
// Each clock cycle fetches the instruction at PC from the instruction memory,
// decodes it in the control unit (reversible NOT/Toffoli logic), reads two
// registers, runs the ALU, optionally reads or writes the data memory and
// writes the result back, and loads the next PC. Supported instructions are
// R-format add, sub, and, or, slt, plus lw, sw and beq.
//   - RegDst picks rd (Instruction[15:11]) or rt (Instruction[20:16]) as the
//     destination; ALUSrc picks register rt or the sign-extended immediate as
//     ALU operand B; MemtoReg picks the ALU result or the loaded word.
//   - The next PC is PC+4, or PC+4 + (immediate << 2) when Branch and the ALU's
//     Zero are both 1; that AND is itself a reversible Toffoli AND.
// The block structure and all controls are the document's. Separate
// instruction and data memories, memory sizes, the program load port
// (prog_we/prog_addr/prog_data, usable while rst_n is low) and the reset are
// this design's choices. Any opcode outside the four groups executes as a
// no-operation.
// Outputs pc, instr, ctrl and alu_result show the instruction currently
// executing, for observation.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned XLEN       = 32,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                   prog_data,
  output logic [XLEN-1:0]               pc,
  output logic [31:0]                   instr,
  output ctrl_t                         ctrl,
  output logic [XLEN-1:0]               alu_result
);
  // ---------------- fetch ----------------
  logic [XLEN-1:0] pc_plus4, pc_next, branch_target;
  logic [XLEN-1:0] imm_ext, imm_shifted;
  logic            zero, pc_src;

  program_counter #(.XLEN(XLEN)) u_pc (
    .clk(clk), .rst_n(rst_n), .pc_next(pc_next), .pc(pc));

  instruction_memory #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk(clk), .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .read_address(pc), .instruction(instr));

  adder #(.WIDTH(XLEN)) u_add_pc4 (
    .a(pc), .b(XLEN'(4)), .sum(pc_plus4));

  // ---------------- decode ----------------
  logic [2:0] alu_ctrl;
  control_unit u_ctrl (
    .opcode(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl), .alu_ctrl(alu_ctrl));

  logic [4:0]      write_reg;
  logic [XLEN-1:0] read_data1, read_data2, write_data;

  mux2 #(.WIDTH(5)) u_mux_regdst (
    .sel(ctrl.reg_dst), .in0(instr[20:16]), .in1(instr[15:11]), .y(write_reg));

  register_file #(.NREGS(32), .XLEN(XLEN)) u_rf (
    .clk(clk), .reg_write(ctrl.reg_write),
    .read_reg1(instr[25:21]), .read_reg2(instr[20:16]),
    .write_reg(write_reg), .write_data(write_data),
    .read_data1(read_data1), .read_data2(read_data2));

  sign_extend u_sext (.imm(instr[15:0]), .ext(imm_ext));

  // ---------------- execute ----------------
  logic [XLEN-1:0] alu_b;
  mux2 #(.WIDTH(XLEN)) u_mux_alusrc (
    .sel(ctrl.alu_src), .in0(read_data2), .in1(imm_ext), .y(alu_b));

  alu #(.XLEN(XLEN)) u_alu (
    .a(read_data1), .b(alu_b), .op(alu_ctrl), .result(alu_result), .zero(zero));

  shift_left2 #(.WIDTH(XLEN)) u_sl2 (.a(imm_ext), .y(imm_shifted));

  adder #(.WIDTH(XLEN)) u_add_br (
    .a(pc_plus4), .b(imm_shifted), .sum(branch_target));

  rev_and_gate u_branch_and (
    .a(ctrl.branch), .b(zero), .a_out(), .b_out(), .y(pc_src));

  mux2 #(.WIDTH(XLEN)) u_mux_pcsrc (
    .sel(pc_src), .in0(pc_plus4), .in1(branch_target), .y(pc_next));

  // ---------------- memory / write-back ----------------
  logic [XLEN-1:0] mem_rdata;
  data_memory #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk(clk), .mem_read(ctrl.mem_read), .mem_write(ctrl.mem_write),
    .address(alu_result), .write_data(read_data2), .read_data(mem_rdata));

  mux2 #(.WIDTH(XLEN)) u_mux_memtoreg (
    .sel(ctrl.mem_to_reg), .in0(alu_result), .in1(mem_rdata), .y(write_data));
endmodule
