// mips_pkg: types and constants shared by the single-cycle MIPS processor.
//
// Holds the four opcodes the main control unit recognises (R-format, lw, sw,
// beq), the 3-bit ALU operation codes produced by the ALU control unit, the
// function-field values of the five R-format instructions, and the control
// word that the main decoder hands to the datapath. The opcode and function
// values are the ones of the MIPS instruction set that the control tables of
// this design are written for; the names of the ALU operations are this
// design's reading of those tables.
package mips_pkg;

  // Opcodes (Instruction[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;

  // Function field values of the R-format instructions (Instruction[5:0])
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALU operation (output of the ALU control unit)
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // ALUOp from the main decoder: {ALUOp1, ALUOp0}
  localparam logic [1:0] ALUOP_ADD   = 2'b00;  // lw / sw address
  localparam logic [1:0] ALUOP_SUB   = 2'b01;  // beq compare
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;  // R-format: decode funct

  // Control word of the main decoder
  typedef struct packed {
    logic       reg_dst;
    logic       alu_src;
    logic       mem_to_reg;
    logic       reg_write;
    logic       mem_read;
    logic       mem_write;
    logic       branch;
    logic [1:0] alu_op;     // {ALUOp1, ALUOp0}
  } ctrl_t;

endpackage
