// alu: the 32-bit arithmetic-logic unit of the datapath.
//
// The 3-bit operation from the ALU control unit selects
//   000 and, 001 or, 010 add, 110 subtract, 111 set-on-less-than (signed)
// and any other code gives 0. Zero is 1 when the result is 0; beq subtracts
// its operands and branches on Zero. The code assignment is the one the ALU
// control table produces; the operations it stands for, the signed compare and
// the absence of overflow detection are this design's reading.
// Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [2:0]      op,
  output logic [XLEN-1:0] result,
  output logic            zero
);
  logic [XLEN-1:0] diff;
  assign diff = a - b;

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_SLT: result = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);
endmodule
