// program_counter: the PC register of the single-cycle datapath.
//
// Loads pc_next on every rising clock edge, so one instruction completes per
// cycle. A synchronous active-low reset sets the PC to 0; the reset and its
// value are this design's choice.
module program_counter #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc_next,
  output logic [XLEN-1:0] pc
);
  always_ff @(posedge clk) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc_next;
  end
endmodule
