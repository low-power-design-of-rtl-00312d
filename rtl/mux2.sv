// mux2: WIDTH-bit two-to-one multiplexer, y = sel ? in1 : in0.
//
// The datapath uses four: write-register select (RegDst), ALU operand B select
// (ALUSrc), write-back select (MemtoReg) and next-PC select (Branch & Zero).
// Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? in1 : in0;
endmodule
