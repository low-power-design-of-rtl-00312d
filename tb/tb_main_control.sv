// tb_main_control: drives all 64 opcodes into the main decoder. The four
// recognised opcodes must give the rows of the control table (don't-care
// entries are expected as 0); every other opcode must give all zeros.
module tb_main_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode;
  ctrl_t ctrl, exp;
  main_control dut (.opcode(opcode), .ctrl(ctrl));

  // Expected row: RegDst ALUSrc MemtoReg RegWrite MemRead MemWrite Branch ALUOp1 ALUOp0
  function automatic ctrl_t row(input logic [5:0] op);
    case (op)
      6'b000000: return 9'b1_0_0_1_0_0_0_10;
      6'b100011: return 9'b0_1_1_1_1_0_0_00;
      6'b101011: return 9'b0_1_0_0_0_1_0_00;
      6'b000100: return 9'b0_0_0_0_0_0_1_01;
      default:   return 9'b0;
    endcase
  endfunction

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      opcode = 6'(i); #1;
      exp = row(opcode);
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL opcode=%b ctrl=%b exp=%b", opcode, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
