// tb_alu_control: checks the ALU decoder against the ALU control truth table.
// ALUOp 00 and 01 are tried with all 64 function codes (function is a
// don't-care there); ALUOp 10 is tried with the five function codes of the
// table under all four values of the don't-care bits F5 and F4.
module tb_alu_control;
  int checks = 0, failures = 0;
  logic [1:0] alu_op;
  logic [5:0] funct;
  logic [2:0] operation;
  alu_control dut (.alu_op(alu_op), .funct(funct), .operation(operation));

  task automatic check(input logic [2:0] exp);
    #1; checks++;
    if (operation !== exp) begin
      failures++;
      $display("FAIL aluop=%b funct=%b op=%b exp=%b", alu_op, funct, operation, exp);
    end
  endtask

  localparam logic [3:0] FLO [5] = '{4'b0000, 4'b0010, 4'b0100, 4'b0101, 4'b1010};
  localparam logic [2:0] OPS [5] = '{3'b010, 3'b110, 3'b000, 3'b001, 3'b111};

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int f = 0; f < 64; f++) begin
      alu_op = 2'b00; funct = 6'(f); check(3'b010);
      alu_op = 2'b01; funct = 6'(f); check(3'b110);
    end
    for (int k = 0; k < 5; k++)
      for (int hi = 0; hi < 4; hi++) begin
        alu_op = 2'b10; funct = {2'(hi), FLO[k]}; check(OPS[k]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
