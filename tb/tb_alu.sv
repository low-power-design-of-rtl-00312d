// tb_alu: random and edge operands for and, or, add, subtract and
// set-on-less-than, compared with results computed here from integer
// arithmetic; checks the Zero flag on every result, and that unused codes
// give 0.
module tb_alu;
  int checks = 0, failures = 0;
  logic [31:0] a, b, r;
  logic [2:0]  op;
  logic        zero;
  alu dut (.a(a), .b(b), .op(op), .result(r), .zero(zero));

  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] y, input logic [2:0] o);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    case (o)
      3'b000: return x & y;
      3'b001: return x | y;
      3'b010: return 32'(longint'(x) + longint'(y));
      3'b110: return 32'(longint'(x) - longint'(y));
      3'b111: return (sx < sy) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [2:0] o);
    logic [31:0] e;
    a = x; b = y; op = o; #1;
    e = model(x, y, o);
    checks++;
    if (r !== e || zero !== (e == 0)) begin
      failures++; $display("FAIL op=%b a=%h b=%h r=%h z=%b exp=%h", o, x, y, r, zero, e);
    end
  endtask

  localparam logic [31:0] EDGE [5] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int o = 0; o < 8; o++) begin
      foreach (EDGE[i]) foreach (EDGE[j]) check(EDGE[i], EDGE[j], 3'(o));
      for (int k = 0; k < 100; k++) check($urandom, $urandom, 3'(o));
      check(32'h1234, 32'h1234, 3'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
