// tb_shift_left2: random inputs; output must be the input times 4 modulo 2^32.
module tb_shift_left2;
  int checks = 0, failures = 0;
  logic [31:0] a, y;
  shift_left2 dut (.a(a), .y(y));
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [63:0] ref64;
      a = (i == 0) ? 32'hFFFF_FFFF : $urandom; #1;
      ref64 = 64'(a) * 4;
      checks++;
      if (y !== ref64[31:0]) begin failures++; $display("FAIL %h -> %h", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
