// register_file: 32 general registers of XLEN bits, two read ports and one
// write port.
//
// Reads are combinational from the two 5-bit source fields; the write happens
// on the rising clock edge when reg_write is 1. Register 0 always reads as 0
// and ignores writes, as in MIPS. A read of the register being written in the
// same cycle returns the old value, which is what a single-cycle datapath
// needs. Contents are not reset. The register count follows from the 5-bit
// register fields; the zero register and the timing are this design's choices.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            reg_write,
  input  logic [AW-1:0]   read_reg1,
  input  logic [AW-1:0]   read_reg2,
  input  logic [AW-1:0]   write_reg,
  input  logic [XLEN-1:0] write_data,
  output logic [XLEN-1:0] read_data1,
  output logic [XLEN-1:0] read_data2
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reg_write && write_reg != '0) regs[write_reg] <= write_data;
  end

  assign read_data1 = (read_reg1 == '0) ? '0 : regs[read_reg1];
  assign read_data2 = (read_reg2 == '0) ? '0 : regs[read_reg2];
endmodule
