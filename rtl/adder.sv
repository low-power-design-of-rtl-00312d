// adder: WIDTH-bit binary adder, carry-out dropped.
//
// Used twice in the datapath: PC + 4 for the sequential next address, and
// PC + 4 + (offset << 2) for the branch target. Combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  assign sum = a + b;
endmodule
