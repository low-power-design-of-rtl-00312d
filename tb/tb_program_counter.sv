// tb_program_counter: reset forces 0; afterwards the register follows
// pc_next with exactly one clock of delay.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [31:0] pc_next, pc;
  program_counter dut (.clk(clk), .rst_n(rst_n), .pc_next(pc_next), .pc(pc));
  always #5 clk = ~clk;
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst_n = 0; pc_next = 32'hDEAD_BEEF;
    @(posedge clk); #1; checks++; if (pc !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v;
      v = $urandom;
      pc_next = v;
      @(posedge clk); #1;
      checks++; if (pc !== v) begin failures++; $display("FAIL pc=%h exp=%h", pc, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
