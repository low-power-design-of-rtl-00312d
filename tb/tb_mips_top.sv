// tb_mips_top: runs programs on the whole single-cycle processor, at its
// default parameters, and compares it cycle by cycle with an instruction-level
// reference model kept in this testbench.
//
// The program is a hand-written countdown loop (a backward beq that is taken
// and a forward beq that is taken once, lw/sw of the loop counter) followed by
// a stream of random R-format, lw, sw and short forward beq instructions and a
// few unrecognised opcodes, which must act as no-operations. Registers and data
// memory are given known contents before reset is released (they have no
// reset of their own). Every cycle the PC and fetched instruction must match the
// model, so the processor must retire exactly one instruction per clock; after
// every cycle all 32 registers are compared, and the data memory at the end.
// Each mechanism (five ALU functions, load, store, branch taken, branch not
// taken, no-operation) is counted, and one that never happened is a failure.
module tb_mips_top;
  import mips_pkg::*;
  int checks = 0, failures = 0;

  localparam int IW = 256, DW = 256;
  logic clk = 0, rst_n;
  logic prog_we;
  logic [7:0]  prog_addr;
  logic [31:0] prog_data;
  logic [31:0] pc, instr, alu_result;
  ctrl_t       ctrl;

  mips_top dut (.clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
                .prog_data(prog_data), .pc(pc), .instr(instr), .ctrl(ctrl),
                .alu_result(alu_result));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [31:0] m_imem [IW];
  logic [31:0] m_dmem [DW];
  logic [31:0] m_regs [32];
  logic [31:0] m_pc;

  int n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_nop;

  function automatic logic [31:0] r_type(input logic [4:0] rs, rt, rd, input logic [5:0] fn);
    return {6'b000000, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input logic [4:0] rs, rt, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  task automatic model_step();
    logic [31:0] ins, a, b, imm, res, npc;
    logic [4:0] rs, rt, rd;
    ins = m_imem[m_pc[9:2]];
    rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    a = m_regs[rs]; b = m_regs[rt];
    imm = {{16{ins[15]}}, ins[15:0]};
    npc = m_pc + 4;
    case (ins[31:26])
      6'b000000: begin
        case (ins[3:0])
          4'b0000: begin res = a + b; n_add++; end
          4'b0010: begin res = a - b; n_sub++; end
          4'b0100: begin res = a & b; n_and++; end
          4'b0101: begin res = a | b; n_or++;  end
          4'b1010: begin res = ($signed(a) < $signed(b)) ? 1 : 0; n_slt++; end
          default: res = 0;
        endcase
        if (rd != 0) m_regs[rd] = res;
      end
      6'b100011: begin
        res = a + imm; n_lw++;
        if (rt != 0) m_regs[rt] = m_dmem[res[9:2]];
      end
      6'b101011: begin
        res = a + imm; n_sw++;
        m_dmem[res[9:2]] = b;
      end
      6'b000100: begin
        if (a == b) begin npc = m_pc + 4 + (imm << 2); n_beq_t++; end
        else n_beq_nt++;
      end
      default: n_nop++;
    endcase
    m_pc = npc;
  endtask

  // ---------------- program ----------------
  int plen;
  task automatic build_program();
    logic [5:0] fns [5];
    fns = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
    foreach (m_imem[i]) m_imem[i] = 32'hFC00_0000;   // unrecognised opcode 111111
    plen = 0;
    // countdown: r1 = 1 (preset), r3 = loop count (loaded from dmem[0])
    m_imem[plen++] = i_type(OP_LW, 5'd0, 5'd3, 16'd0);              // lw   r3, 0(r0)
    m_imem[plen++] = r_type(5'd3, 5'd1, 5'd3, FN_SUB);              // loop: sub r3, r3, r1
    m_imem[plen++] = r_type(5'd4, 5'd3, 5'd4, FN_ADD);              //  add r4, r4, r3
    m_imem[plen++] = i_type(OP_BEQ, 5'd3, 5'd0, 16'd1);             //  beq r3, r0, +1 (exit)
    m_imem[plen++] = i_type(OP_BEQ, 5'd0, 5'd0, 16'hFFFC);          //  beq r0, r0, loop
    m_imem[plen++] = i_type(OP_SW, 5'd0, 5'd4, 16'd4);              // sw   r4, 4(r0)
    m_imem[plen++] = r_type(5'd4, 5'd1, 5'd5, FN_SLT);              // slt  r5, r4, r1
    // random stream
    while (plen < IW - 8) begin
      int kind;
      kind = $urandom_range(0, 99);
      if (kind < 50)
        m_imem[plen++] = r_type(5'($urandom), 5'($urandom), 5'($urandom), fns[$urandom_range(0, 4)]);
      else if (kind < 65)
        m_imem[plen++] = i_type(OP_LW, 5'd0, 5'($urandom), 16'($urandom_range(0, DW - 1) * 4));
      else if (kind < 80)
        m_imem[plen++] = i_type(OP_SW, 5'd0, 5'($urandom), 16'($urandom_range(0, DW - 1) * 4));
      else if (kind < 95)
        m_imem[plen++] = i_type(OP_BEQ, 5'($urandom_range(0, 3)), 5'($urandom_range(0, 3)), 16'($urandom_range(0, 3)));
      else
        m_imem[plen++] = {6'($urandom_range(1, 3)), 26'($urandom)};   // not one of the four groups
    end
    // r2 == r2 always: a final branch that is taken
    m_imem[plen++] = i_type(OP_BEQ, 5'd2, 5'd2, 16'd2);
  endtask

  // ---------------- run ----------------
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles;
    bit countdown_seen;
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    build_program();
    for (int i = 0; i < 32; i++) m_regs[i] = (i == 0) ? 0 : $urandom_range(0, 3);
    m_regs[1] = 1; m_regs[4] = 0;
    for (int i = 0; i < DW; i++) m_dmem[i] = (i == 0) ? 32'd5 : $urandom;
    for (int i = 0; i < 32; i++) dut.u_rf.regs[i] = m_regs[i];
    for (int i = 0; i < DW; i++) dut.u_dmem.mem[i] = m_dmem[i];
    // load the program while reset holds the PC at 0
    prog_we = 1;
    for (int i = 0; i < IW; i++) begin
      prog_addr = 8'(i); prog_data = m_imem[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc %h", pc); end
    m_pc = 0;
    countdown_seen = 0;
    rst_n = 1;
    cycles = 0;
    // one instruction per clock until the model leaves the program
    while (m_pc < 32'(plen * 4) && cycles < 2000) begin
      #1;
      checks++;
      if (pc !== m_pc || instr !== m_imem[m_pc[9:2]]) begin
        failures++; $display("FAIL cycle %0d pc=%h exp %h instr=%h", cycles, pc, m_pc, instr);
      end
      // the countdown stored 4+3+2+1+0 at word 1 before the slt at 0x18 runs
      if (m_pc == 32'h18 && !countdown_seen) begin
        countdown_seen = 1; checks++;
        if (dut.u_dmem.mem[1] !== 32'd10) begin failures++; $display("FAIL countdown %0d", dut.u_dmem.mem[1]); end
      end
      model_step();
      @(posedge clk); #1;
      cycles++;
      begin
        int bad;
        bad = 0;
        for (int r = 0; r < 32; r++) if (dut.u_rf.regs[r] !== m_regs[r] && r != 0) bad++;
        checks++;
        if (bad != 0) begin failures++; $display("FAIL cycle %0d: %0d registers differ", cycles, bad); end
      end
      #3;
    end
    checks++; if (pc !== m_pc) begin failures++; $display("FAIL final pc %h exp %h", pc, m_pc); end
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_dmem[i]) begin failures++; $display("FAIL dmem[%0d]=%h exp %h", i, dut.u_dmem.mem[i], m_dmem[i]); end
    end
    checks++; if (!countdown_seen) begin failures++; $display("FAIL countdown result never checked"); end
    $display("cycles=%0d add=%0d sub=%0d and=%0d or=%0d slt=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d nop=%0d",
             cycles, n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_nop);
    begin
      int counts [10];
      counts = '{n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_nop};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
