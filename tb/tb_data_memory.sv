// tb_data_memory: random word stores and loads against a reference array;
// checks that a load with MemRead low returns 0 and that MemWrite low leaves
// memory unchanged.
module tb_data_memory;
  int checks = 0, failures = 0;
  localparam int D = 256;
  logic clk = 0, mr, mw;
  logic [31:0] addr, wd, rd;
  logic [31:0] model [D];
  data_memory dut (.clk(clk), .mem_read(mr), .mem_write(mw), .address(addr),
                   .write_data(wd), .read_data(rd));
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mr = 0; mw = 1;
    for (int i = 0; i < D; i++) begin
      addr = 32'(i) * 4; wd = $urandom; model[i] = wd; @(posedge clk); #1;
    end
    for (int n = 0; n < 600; n++) begin
      int w;
      w = $urandom_range(0, D - 1);
      addr = 32'(w) * 4; mw = 1'($urandom_range(0, 1)); mr = 1'($urandom_range(0, 1)); wd = $urandom; #1;
      checks++;
      if (rd !== (mr ? model[w] : 32'd0)) begin failures++; $display("FAIL read w%0d got %h", w, rd); end
      @(posedge clk); #1;
      if (mw) model[w] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
