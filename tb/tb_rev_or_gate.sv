// tb_rev_or_gate: exhaustive check of the reversible OR (NOT on both inputs,
// then a Toffoli with a 1 target): output is A|B, control lines carry ~A, ~B.
module tb_rev_or_gate;
  int checks = 0, failures = 0;
  logic a, b, an, bn, y;
  rev_or_gate dut (.a(a), .b(b), .a_n(an), .b_n(bn), .y(y));
  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); #1;
      checks++; if (y !== (i != 0)) begin failures++; $display("FAIL y a=%b b=%b y=%b", a, b, y); end
      checks++; if (an !== !a || bn !== !b) begin failures++; $display("FAIL garbage lines"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
