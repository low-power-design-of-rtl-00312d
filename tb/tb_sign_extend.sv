// tb_sign_extend: all 65536 immediates; the 32-bit result must equal the
// immediate read as a signed 16-bit number.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic [31:0] ext;
  sign_extend dut (.imm(imm), .ext(ext));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 65536; i++) begin
      int signed v;
      imm = 16'(i); #1;
      v = (i >= 32768) ? i - 65536 : i;
      checks++;
      if ($signed(ext) != v) begin failures++; if (failures < 10) $display("FAIL %h -> %h", imm, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
