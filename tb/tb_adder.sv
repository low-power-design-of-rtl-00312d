// tb_adder: random and corner-case sums, compared with a 64-bit reference
// truncated to 32 bits.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  adder dut (.a(a), .b(b), .sum(s));
  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] ref64;
    a = x; b = y; #1;
    ref64 = 64'(x) + 64'(y);
    checks++;
    if (s !== ref64[31:0]) begin failures++; $display("FAIL %h+%h=%h", x, y, s); end
  endtask
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    check(0, 4); check(32'hFFFF_FFFC, 4); check(32'h7FFF_FFFF, 1);
    for (int i = 0; i < 200; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
