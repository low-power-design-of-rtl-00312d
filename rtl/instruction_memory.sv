// instruction_memory: word-organised program store, DEPTH words of 32 bits.
//
// The PC (a byte address) selects word read_address[AW+1:2]; the read is
// combinational so fetch, decode and execute all fit in one clock. Upper
// address bits are ignored, so addresses wrap. A write port (we, waddr, wdata),
// clocked, loads the program before or while the processor is held in reset.
// The depth and the load port are this design's choices.
module instruction_memory #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [31:0]   read_address,
  output logic [31:0]   instruction
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instruction = mem[read_address[AW+1:2]];
endmodule
