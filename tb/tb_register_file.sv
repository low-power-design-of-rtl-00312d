// tb_register_file: writes random values into random registers while keeping
// a reference copy, and checks both read ports every cycle; checks that
// register 0 stays 0, that reg_write low writes nothing, and that a read in
// the cycle of a write returns the old value.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [4:0] r1, r2, wr;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];
  register_file dut (.clk(clk), .reg_write(we), .read_reg1(r1), .read_reg2(r2),
                     .write_reg(wr), .write_data(wd), .read_data1(rd1), .read_data2(rd2));
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // fill every register once
    we = 1;
    for (int i = 0; i < 32; i++) begin
      wr = 5'(i); wd = $urandom; model[i] = (i == 0) ? 32'd0 : wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 500; n++) begin
      we = 1'($urandom_range(0, 1)); wr = 5'($urandom); wd = $urandom;
      r1 = 5'($urandom); r2 = (n % 5 == 0) ? wr : 5'($urandom);
      #1;
      checks++; if (rd1 !== model[r1]) begin failures++; $display("FAIL rd1 r%0d=%h exp %h", r1, rd1, model[r1]); end
      checks++; if (rd2 !== model[r2]) begin failures++; $display("FAIL rd2 r%0d=%h exp %h", r2, rd2, model[r2]); end
      @(posedge clk); #1;
      if (we && wr != 0) model[wr] = wd;
    end
    we = 0; r1 = 0; r2 = 0; #1;
    checks++; if (rd1 !== 0 || rd2 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
