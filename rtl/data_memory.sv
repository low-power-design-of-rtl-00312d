// data_memory: word-organised data store, DEPTH words of 32 bits.
//
// The ALU result is the byte address; word address[AW+1:2] is used, so only
// aligned word loads and stores exist and upper address bits wrap. With
// mem_read high the addressed word appears combinationally on read_data (0
// otherwise); with mem_write high write_data is stored on the rising clock
// edge. Contents are not reset. Depth, alignment and timing are this design's
// choices; the MemRead and MemWrite controls are the document's.
module data_memory #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] address,
  input  logic [31:0] write_data,
  output logic [31:0] read_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mem_write) mem[address[AW+1:2]] <= write_data;
  end

  assign read_data = mem_read ? mem[address[AW+1:2]] : '0;
endmodule
