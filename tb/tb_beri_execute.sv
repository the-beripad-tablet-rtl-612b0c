// tb_beri_execute: checks the execute stage, fed through the decode stage.
//
// Random operands and instructions (64- and 32-bit arithmetic and logic,
// shifts by constant and by register, LUI, set-less-than, conditional
// branches, jumps and links, loads and stores) go through decode into
// execute; each result, branch decision and target, memory address and
// alignment exception is compared with a model written here. Forwarding is
// checked by marking a source as coming from the result-table slot of an
// earlier instruction. The stage must accept one instruction per cycle, and
// must start multiply/divide only for the current epoch.
module tb_beri_execute;
  import beri_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic    d_in_val, d_in_rdy, d_out_val, d_out_rdy, out_val, out_rdy;
  ctoken_t d_in_tok, d_out_tok, out_tok;
  word_t   rf_a, rf_b, c0_rd_data, md_a, md_b;
  logic [3:0] epoch;
  logic    tab_we, md_start, md_w64;
  logic [1:0] tab_slot;
  word_t   tab_data;
  logic [4:0] c0_rd_reg;
  logic [2:0] c0_rd_sel;
  md_op_e  md_op;

  beri_decode u_dec (.clk, .rst, .in_val(d_in_val), .in_rdy(d_in_rdy), .in_tok(d_in_tok),
    .rf_a, .rf_b, .out_val(d_out_val), .out_rdy(d_out_rdy), .out_tok(d_out_tok));
  beri_execute dut (.clk, .rst, .in_val(d_out_val), .in_rdy(d_out_rdy), .in_tok(d_out_tok),
    .out_val, .out_rdy, .out_tok, .epoch, .older_empty(1'b1), .tab_we, .tab_slot, .tab_data,
    .c0_rd_reg, .c0_rd_sel, .c0_rd_data(64'h1234), .md_start, .md_op, .md_w64, .md_a, .md_b,
    .md_busy(1'b0), .hi(64'hAAAA), .lo(64'hBBBB));

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  function automatic word_t sx(input logic [31:0] v); return {{32{v[31]}}, v}; endfunction

  // one instruction through decode and execute; returns the executed token
  int n_id = 0;
  task automatic run(input logic [31:0] ins, input word_t a, b, input word_t pc,
                     input logic afwd, input logic [3:0] ep, output ctoken_t t, output int lat);
    ctoken_t x;
    x = '0; x.id = 4'(n_id++); x.epoch = ep; x.pc = pc; x.instr = ins;
    x.rs = ins[25:21]; x.rt = ins[20:16];
    x.rd = (ins[31:26] == 0) ? ins[15:11] : (ins[31:26] == 6'd3) ? 5'd31 : ins[20:16];
    x.wr_reg = 1'b1;
    x.a_fwd = afwd; x.a_slot = 2'd3;
    @(negedge clk); d_in_val = 1; d_in_tok = x; rf_a = afwd ? 64'hDEAD : a; rf_b = b;
    @(negedge clk); d_in_val = 0; lat = 1;
    while (!out_val) begin @(negedge clk); lat++; end
    t = out_tok;
  endtask

  // put a value into result-table slot 3 (as writeback does for a load)
  task automatic fill_slot3(input word_t v);
    @(negedge clk); tab_we = 1; tab_slot = 2'd3; tab_data = v; @(negedge clk); tab_we = 0;
  endtask

  initial begin
    ctoken_t t; int lat, starts;
    word_t a, b, pc;
    logic [15:0] im;
    logic [4:0] s;
    d_in_val = 0; d_in_tok = '0; rf_a = 0; rf_b = 0; out_rdy = 1; epoch = 0;
    tab_we = 0; tab_slot = 0; tab_data = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 60; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; im = 16'($urandom); s = 5'($urandom);
      pc = {32'hFFFF_FFFF, 4'h8, 24'($urandom), 4'h0};
      run(DADDU(3, 1, 2), a, b, pc, 0, 0, t, lat); check("daddu", t.result, a + b);
      check("one cycle per stage", lat, 2);
      run(ADDU(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("addu", t.result, sx(a[31:0] + b[31:0]));
      run(DSUBU(3, 1, 2), a, b, pc, 0, 0, t, lat); check("dsubu", t.result, a - b);
      run(SUBU(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("subu", t.result, sx(a[31:0] - b[31:0]));
      run(AND_(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("and", t.result, a & b);
      run(OR_(3, 1, 2), a, b, pc, 0, 0, t, lat);   check("or", t.result, a | b);
      run(XOR_(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("xor", t.result, a ^ b);
      run(NOR_(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("nor", t.result, ~(a | b));
      run(SLT(3, 1, 2), a, b, pc, 0, 0, t, lat);   check("slt", t.result, 64'($signed(a) < $signed(b)));
      run(SLTU(3, 1, 2), a, b, pc, 0, 0, t, lat);  check("sltu", t.result, 64'(a < b));
      run(DADDIU(3, 1, int'($signed(im))), a, b, pc, 0, 0, t, lat);
      check("daddiu", t.result, a + {{48{im[15]}}, im});
      run(ADDIU(3, 1, int'($signed(im))), a, b, pc, 0, 0, t, lat);
      check("addiu", t.result, sx(a[31:0] + {{16{im[15]}}, im}));
      run(ORI(3, 1, int'(im)), a, b, pc, 0, 0, t, lat);  check("ori zero-extends", t.result, a | {48'd0, im});
      run(ANDI(3, 1, int'(im)), a, b, pc, 0, 0, t, lat); check("andi", t.result, a & {48'd0, im});
      run(SLTI(3, 1, int'($signed(im))), a, b, pc, 0, 0, t, lat);
      check("slti", t.result, 64'($signed(a) < $signed({{48{im[15]}}, im})));
      run(LUI(3, int'(im)), a, b, pc, 0, 0, t, lat); check("lui", t.result, sx({im, 16'd0}));
      run(SLL(3, 2, int'(s)), a, b, pc, 0, 0, t, lat); check("sll", t.result, sx(b[31:0] << s));
      run(SRA(3, 2, int'(s)), a, b, pc, 0, 0, t, lat); check("sra", t.result, sx(32'($signed(b[31:0]) >>> s)));
      run(SRLV(3, 2, 1), a, b, pc, 0, 0, t, lat);     check("srlv", t.result, sx(b[31:0] >> a[4:0]));
      run(DSLL(3, 2, int'(s)), a, b, pc, 0, 0, t, lat); check("dsll", t.result, b << s);
      run(DSRL(3, 2, int'(s)), a, b, pc, 0, 0, t, lat); check("dsrl", t.result, b >> s);
      run(DSLL32(3, 2, int'(s)), a, b, pc, 0, 0, t, lat); check("dsll32", t.result, b << (32 + s));
      run(DSRA32(3, 2, int'(s)), a, b, pc, 0, 0, t, lat);
      check("dsra32", t.result, word_t'($signed(b) >>> (32 + s)));
      // branches
      if (n % 2) b = a;
      run(BEQ(1, 2, int'($signed(im))), a, b, pc, 0, 0, t, lat);
      check("beq taken", t.taken, a == b);
      check("beq target", t.target, (a == b) ? pc + 4 + {{46{im[15]}}, im, 2'b00} : pc + 8);
      run(BNE(1, 2, int'($signed(im))), a, b, pc, 0, 0, t, lat); check("bne taken", t.taken, a != b);
      run(BGEZ(1, int'($signed(im))), a, b, pc, 0, 0, t, lat);   check("bgez taken", t.taken, !a[63]);
      run(JAL(pc + 64'h100), a, b, pc, 0, 0, t, lat);
      check("jal target", t.target, {pc[63:28], pc[27:0] + 28'h100});
      check("jal link", t.result, pc + 8); check("jal writes r31", {t.wr_reg, t.rd}, {1'b1, 5'd31});
      run(JR(1), a, b, pc, 0, 0, t, lat); check("jr target", t.target, a);
      // loads / stores: address and alignment
      run(LD(3, int'($signed(im)), 1), a, b, pc, 0, 0, t, lat);
      check("ld address", t.vaddr, a + {{48{im[15]}}, im});
      check("ld alignment", t.exc, 3'(a[2:0] + im[2:0]) != 3'd0);
      if (t.exc) check("ld address error code", t.exc_code, EXC_ADEL);
      run(SW(3, int'($signed(im)), 1), a, b, pc, 0, 0, t, lat);
      check("sw alignment", t.exc, 2'(a[1:0] + im[1:0]) != 2'd0);
      if (t.exc) check("sw address error code", t.exc_code, EXC_ADES);
      // forwarding from the result table
      fill_slot3(a ^ 64'h5555);
      run(DADDU(3, 1, 2), a, b, pc, 1, 0, t, lat); check("forwarded operand", t.result, (a ^ 64'h5555) + b);
    end
    run(MFHI(3), 0, 0, 0, 0, 0, t, lat); check("mfhi", t.result, 64'hAAAA);
    run(MFLO(3), 0, 0, 0, 0, 0, t, lat); check("mflo", t.result, 64'hBBBB);
    run(MFC0(3, 12), 0, 0, 0, 0, 0, t, lat); check("mfc0", t.result, 64'h1234); check("cp0 read reg", c0_rd_reg, 12);
    // multiply starts only in the current epoch
    starts = 0;
    fork
      repeat (40) begin @(posedge clk); if (md_start) starts++; end
    join_none
    run(MULT(1, 2), 64'd6, 64'd7, 0, 0, 0, t, lat);
    check("mult operands", {md_a[31:0], md_b[31:0]}, {32'd6, 32'd7});
    run(MULT(1, 2), 64'd6, 64'd7, 0, 0, 4'd9, t, lat);
    repeat (30) @(negedge clk);
    check("multiply started once", starts, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
