// tb_mux2: random data on both inputs with both select values, at the default
// 32-bit width and at the 5-bit width used for the write-register select.
module tb_mux2;
  int checks = 0, failures = 0;
  logic sel;
  logic [31:0] i0, i1, y;
  logic [4:0]  j0, j1, z;
  mux2 dut (.sel(sel), .in0(i0), .in1(i1), .y(y));
  mux2 #(.WIDTH(5)) dut5 (.sel(sel), .in0(j0), .in1(j1), .y(z));
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 100; i++) begin
      i0 = $urandom; i1 = $urandom; j0 = 5'($urandom); j1 = 5'($urandom); sel = i[0]; #1;
      checks++; if (y !== (sel ? i1 : i0)) failures++;
      checks++; if (z !== (sel ? j1 : j0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
