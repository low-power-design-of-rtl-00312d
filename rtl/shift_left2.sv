// shift_left2: shifts its input left by two places (multiply by 4), turning
// a word offset into a byte offset for the branch target. The two bits shifted
// out at the top are dropped. Combinational.
module shift_left2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  assign y = {a[WIDTH-3:0], 2'b00};
endmodule
