// tb_instruction_memory: loads every word through the load port, then reads
// them back by byte address (PC-style, multiples of 4) in random order, and
// checks that the low two address bits are ignored.
module tb_instruction_memory;
  int checks = 0, failures = 0;
  localparam int D = 256;
  logic clk = 0, we;
  logic [7:0] waddr;
  logic [31:0] wdata, ra, ins;
  logic [31:0] model [D];
  instruction_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                          .read_address(ra), .instruction(ins));
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 1;
    for (int i = 0; i < D; i++) begin
      waddr = 8'(i); wdata = $urandom; model[i] = wdata; @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int w;
      w = $urandom_range(0, D - 1);
      ra = 32'(w) * 4 + ((n % 3 == 0) ? 32'($urandom_range(0, 3)) : 32'd0); #1;
      checks++; if (ins !== model[w]) begin failures++; $display("FAIL addr %h got %h exp %h", ra, ins, model[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
