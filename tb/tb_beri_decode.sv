// tb_beri_decode: checks the decode stage on its own.
//
// Each instruction of the implemented subset is decoded and the control
// fields that later stages rely on (memory read/write, access size and
// signedness, multiply/divide operation and width, CP0 operation, branch
// type and link, 32-bit flag, immediate extension, exceptions for SYSCALL,
// BREAK and reserved opcodes) are compared with the expected values. The
// register values must be passed through as operands a and b, an exception
// must cancel the register write and memory access (for
// other instructions the register-write flag belongs to the scheduler), and a token must be held
// while the next stage is not ready. One instruction per cycle is checked.
module tb_beri_decode;
  import beri_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic    in_val, in_rdy, out_val, out_rdy;
  ctoken_t in_tok, out_tok;
  word_t   rf_a, rf_b;
  beri_decode dut (.clk, .rst, .in_val, .in_rdy, .in_tok, .rf_a, .rf_b, .out_val, .out_rdy, .out_tok);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic dec(input logic [31:0] ins, output ctoken_t t);
    ctoken_t x;
    int lat;
    x = '0; x.instr = ins; x.wr_reg = 1'b1; x.pc = 64'h1000;
    @(negedge clk); in_val = 1; in_tok = x; rf_a = {$urandom, $urandom}; rf_b = {$urandom, $urandom};
    @(negedge clk); in_val = 0; lat = 1;
    while (!out_val) begin @(negedge clk); lat++; end
    t = out_tok;
    check("decode latency", lat, 1);
  endtask

  // packs the fields checked for every instruction
  function automatic logic [31:0] fields(input ctoken_t t);
    return {t.mem_rd, t.mem_wr, t.mem_uns, 2'(t.mem_sz), 3'(t.md), t.md_w64, 3'(t.c0),
            4'(t.br), t.link, t.w32, t.exc, 5'(t.exc_code), t.wr_reg, 5'(t.alu)};
  endfunction
  function automatic logic [31:0] f(input logic rd, wr, uns, input mem_size_e sz, input md_op_e md,
      input logic w64, input cp0_op_e c0, input br_type_e br, input logic link, w32, exc,
      input exc_code_e ec, input logic wreg, input alu_op_e alu);
    return {rd, wr, uns, 2'(sz), 3'(md), w64, 3'(c0), 4'(br), link, w32, exc, 5'(ec), wreg, 5'(alu)};
  endfunction

  initial begin
    ctoken_t t;
    word_t a0, b0;
    int held;
    in_val = 0; in_tok = '0; rf_a = 0; rf_b = 0; out_rdy = 1;
    repeat (3) @(negedge clk); rst = 0;
    // ALU, memory, multiply/divide, CP0 and branch classes
    dec(DADDU(3, 1, 2), t);  check("daddu", fields(t), f(0,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(ADDU(3, 1, 2), t);   check("addu", fields(t), f(0,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,1,0,EXC_INT,1,ALU_ADD));
    dec(SUBU(3, 1, 2), t);   check("subu", fields(t), f(0,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,1,0,EXC_INT,1,ALU_SUB));
    dec(SLTU(3, 1, 2), t);   check("sltu", fields(t), f(0,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_SLTU));
    dec(DSRA32(3, 2, 4), t); check("dsra32", fields(t), f(0,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_SRA));
    check("dsra32 shift amount", t.imm, 64'd36);
    dec(SRLV(3, 2, 1), t);   check("srlv variable", {t.shv, t.w32}, 2'b11);
    dec(LB(3, -4, 1), t);    check("lb", fields(t), f(1,0,0,SZ_B,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    check("lb offset sign-extended", t.imm, -64'sd4);
    dec(LBU(3, 4, 1), t);    check("lbu", fields(t), f(1,0,1,SZ_B,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(LH(3, 4, 1), t);     check("lh", fields(t), f(1,0,0,SZ_H,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(LW(3, 4, 1), t);     check("lw", fields(t), f(1,0,0,SZ_W,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(LWU(3, 4, 1), t);    check("lwu", fields(t), f(1,0,1,SZ_W,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(LD(3, 8, 1), t);     check("ld", fields(t), f(1,0,0,SZ_D,MD_NONE,0,C0_NONE,BR_NONE,0,0,0,EXC_INT,1,ALU_ADD));
    dec(SB(3, 8, 1), t);     check("sb", {t.mem_wr, t.mem_rd, 2'(t.mem_sz)}, {1'b1, 1'b0, 2'(SZ_B)});
    dec(SH(3, 8, 1), t);     check("sh", {t.mem_wr, 2'(t.mem_sz)}, {1'b1, 2'(SZ_H)});
    dec(SW(3, 8, 1), t);     check("sw", {t.mem_wr, 2'(t.mem_sz)}, {1'b1, 2'(SZ_W)});
    dec(SD(3, 8, 1), t);     check("sd", {t.mem_wr, 2'(t.mem_sz)}, {1'b1, 2'(SZ_D)});
    dec(MULT(1, 2), t);      check("mult", {4'(t.md), t.md_w64}, {4'(MD_MULT), 1'b0});
    dec(DMULTU(1, 2), t);    check("dmultu", {4'(t.md), t.md_w64}, {4'(MD_MULTU), 1'b1});
    dec(DIV(1, 2), t);       check("div", {4'(t.md), t.md_w64}, {4'(MD_DIV), 1'b0});
    dec(DDIVU(1, 2), t);     check("ddivu", {4'(t.md), t.md_w64}, {4'(MD_DIVU), 1'b1});
    dec(MTHI(1), t);         check("mthi", t.md, MD_MTHI);
    dec(MFHI(3), t);         check("mfhi", {5'(t.alu), t.wr_reg}, {5'(ALU_MFHI), 1'b1});
    dec(MFC0(3, 12), t);     check("mfc0", {5'(t.alu), t.c0_reg, t.wr_reg}, {5'(ALU_MFC0), 5'd12, 1'b1});
    dec(DMTC0(3, 10), t);    check("dmtc0", {3'(t.c0), t.c0_reg}, {3'(C0_MTC0), 5'd10});
    dec(TLBWR(), t);         check("tlbwr", t.c0, C0_TLBWR);
    dec(TLBWI(), t);         check("tlbwi", t.c0, C0_TLBWI);
    dec(TLBR(), t);          check("tlbr", t.c0, C0_TLBR);
    dec(TLBP(), t);          check("tlbp", t.c0, C0_TLBP);
    dec(ERET(), t);          check("eret", t.c0, C0_ERET);
    dec(BEQ(1, 2, -3), t);   check("beq", {4'(t.br), t.is_branch}, {4'(BR_EQ), 1'b1});
    check("beq offset", t.imm, -64'sd3);
    dec(BNE(1, 2, 5), t);    check("bne", t.br, BR_NE);
    dec(BGEZ(1, 5), t);      check("bgez", {4'(t.br), t.link}, {4'(BR_GEZ), 1'b0});
    dec(J(64'h40), t);       check("j", {4'(t.br), t.link}, {4'(BR_J), 1'b0});
    dec(JAL(64'h40), t);     check("jal", {4'(t.br), t.link, 5'(t.alu)}, {4'(BR_J), 1'b1, 5'(ALU_LINK)});
    dec(JR(31), t);          check("jr", {4'(t.br), t.link}, {4'(BR_JR), 1'b0});
    dec(JALR(31, 4), t);     check("jalr", {4'(t.br), t.link, t.wr_reg}, {4'(BR_JR), 1'b1, 1'b1});
    dec(ORI(3, 1, 16'hFFFF), t); check("ori zero-extended", {t.b_imm, t.imm}, {1'b1, 64'hFFFF});
    dec(ADDIU(3, 1, -1), t); check("addiu", {t.b_imm, t.w32, t.imm}, {1'b1, 1'b1, 64'hFFFF_FFFF_FFFF_FFFF});
    // exceptions cancel side effects
    dec(SYSCALL(), t);       check("syscall", {t.exc, 5'(t.exc_code), t.wr_reg}, {1'b1, 5'(EXC_SYS), 1'b0});
    dec(32'h0000_000D, t);   check("break", {t.exc, 5'(t.exc_code)}, {1'b1, 5'(EXC_BP)});
    dec({6'd29, 26'd0}, t);  check("reserved opcode", {t.exc, 5'(t.exc_code), t.wr_reg, t.mem_rd}, {1'b1, 5'(EXC_RI), 1'b0, 1'b0});
    dec({6'd0, 20'd0, 6'h3D}, t); check("reserved function", {t.exc, 5'(t.exc_code)}, {1'b1, 5'(EXC_RI)});
    // operands come from the register file
    @(negedge clk); in_val = 1; in_tok = '0; in_tok.instr = DADDU(3, 1, 2); in_tok.wr_reg = 1;
    a0 = 64'h0123_4567_89AB_CDEF; b0 = 64'hFEDC_BA98_7654_3210; rf_a = a0; rf_b = b0;
    @(negedge clk); in_val = 0;
    check("operand a", out_tok.a, a0); check("operand b", out_tok.b, b0);
    // back-pressure: the token is held and no new one accepted
    out_rdy = 0;
    @(negedge clk); in_val = 1; in_tok.instr = LD(3, 8, 1);
    @(negedge clk);
    held = 0;
    repeat (5) begin @(negedge clk); if (out_val && out_tok.instr == DADDU(3, 1, 2)) held++; end
    check("held while stalled", held, 5); check("not accepted while full", in_rdy, 0);
    out_rdy = 1; @(posedge clk); @(negedge clk); in_val = 0;
    // throughput: 20 back-to-back tokens take 20 cycles
    begin
      int n_out, cyc;
      n_out = 0; cyc = 0;
      @(negedge clk); in_val = 1;
      while (n_out < 20) begin
        @(posedge clk); if (out_val) n_out++; cyc++;
      end
      @(negedge clk); in_val = 0;
      check("one instruction per cycle", cyc <= 22, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
