// tb_rev_not_gate: checks both rows of the NOT gate truth table.
module tb_rev_not_gate;
  int checks = 0, failures = 0;
  logic a, p;
  rev_not_gate dut (.a(a), .p(p));
  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 1'b0; #1; checks++; if (p !== 1'b1) failures++;
    a = 1'b1; #1; checks++; if (p !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
