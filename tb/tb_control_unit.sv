// tb_control_unit: end-to-end check of the control unit on real instruction
// fields: each R-format function code and lw, sw, beq must give the expected
// control word and ALU operation.
module tb_control_unit;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode, funct;
  ctrl_t ctrl;
  logic [2:0] alu_ctrl;
  control_unit dut (.opcode(opcode), .funct(funct), .ctrl(ctrl), .alu_ctrl(alu_ctrl));

  task automatic check(input logic [5:0] op, input logic [5:0] fn,
                       input logic [8:0] exp_ctrl, input logic [2:0] exp_alu);
    opcode = op; funct = fn; #1; checks++;
    if (ctrl !== exp_ctrl || alu_ctrl !== exp_alu) begin
      failures++;
      $display("FAIL op=%b fn=%b ctrl=%b alu=%b exp %b %b", op, fn, ctrl, alu_ctrl, exp_ctrl, exp_alu);
    end
  endtask

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    check(6'b000000, 6'b100000, 9'b100100010, 3'b010);   // add
    check(6'b000000, 6'b100010, 9'b100100010, 3'b110);   // sub
    check(6'b000000, 6'b100100, 9'b100100010, 3'b000);   // and
    check(6'b000000, 6'b100101, 9'b100100010, 3'b001);   // or
    check(6'b000000, 6'b101010, 9'b100100010, 3'b111);   // slt
    for (int f = 0; f < 64; f += 7) begin
      check(6'b100011, 6'(f), 9'b011110000, 3'b010);      // lw: add
      check(6'b101011, 6'(f), 9'b010001000, 3'b010);      // sw: add
      check(6'b000100, 6'(f), 9'b000000101, 3'b110);      // beq: subtract
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
