// tb_rev_and_gate: exhaustive check of the reversible AND (Toffoli with a 0
// target): output is A&B and the two control lines pass through unchanged.
module tb_rev_and_gate;
  int checks = 0, failures = 0;
  logic a, b, ao, bo, y;
  rev_and_gate dut (.a(a), .b(b), .a_out(ao), .b_out(bo), .y(y));
  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); #1;
      checks++; if (y !== (i == 3)) begin failures++; $display("FAIL y a=%b b=%b y=%b", a, b, y); end
      checks++; if (ao !== a || bo !== b) begin failures++; $display("FAIL garbage lines"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
