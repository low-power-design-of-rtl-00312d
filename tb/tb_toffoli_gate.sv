// tb_toffoli_gate: exhaustive check of the 3x3 Toffoli gate against its
// truth table (P = A, Q = B, R flips when A and B are both 1), plus a check
// that applying the gate twice returns the inputs (reversibility).
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;
  // expected {P,Q,R} for input index {A,B,C}, written out row by row
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b101, 3'b111, 3'b110};
  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i); #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin failures++; $display("FAIL in=%b out=%b exp=%b", 3'(i), {p,q,r}, EXP[i]); end
      checks++;
      if ({p2, q2, r2} !== 3'(i)) begin failures++; $display("FAIL not self-inverse for %b", 3'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
