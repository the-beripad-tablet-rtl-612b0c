// tb_beri_writeback: checks the commit stage.
//
// Tokens are presented one at a time and the stage's outputs are compared
// with the expected action: a normal commit (register write, next PC to the
// predictor, slot return), a drop for an old epoch, load data extraction for
// every size, offset and signedness against random doublewords (big-endian:
// byte offset 0 is the most significant byte), a load waiting for the data
// cache, the next PC of a branch delay slot, exceptions from the token and
// from the data cache (code, PC, bad address, delay-slot flag, restart at
// the vector), interrupts (not taken in a delay slot), a CP0 operation held
// while CP0 is busy, ERET restarting at EPC and a debug breakpoint token.
module tb_beri_writeback;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_val, in_rdy, dc_val, dc_rdy, dc_exc, dc_refill, rf_we, tab_we, retire_val;
  logic pcwb_val, redirect_val, c0_val, c0_busy, exc_val, exc_bd, exc_refill, int_pending, bp_hit;
  ctoken_t in_tok;
  logic [3:0] epoch;
  word_t dc_data, rf_wd, pcwb_next, redirect_pc, c0_wdata, epc, exc_pc, exc_badva, exc_vector;
  exc_code_e dc_code, exc_code;
  logic [4:0] rf_wa, c0_reg;
  logic [2:0] c0_sel;
  logic [1:0] tab_slot, retire_slot;
  cp0_op_e c0_op;
  logic [31:0] n_commit, n_dropped, n_exc, n_int;

  beri_writeback dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic ctoken_t alu_tok(input word_t pc, input logic [3:0] id);
    ctoken_t t;
    t = '0; t.pc = pc; t.id = id; t.epoch = epoch; t.wr_reg = 1; t.rd = 5'(id + 1);
    t.result = {$urandom, $urandom}; t.target = pc + 8;
    return t;
  endfunction
  task automatic show(input ctoken_t t);
    @(negedge clk); in_val = 1; in_tok = t; #1;
  endtask
  task automatic done();
    @(posedge clk); #1 in_val = 0;
  endtask

  initial begin
    ctoken_t t;
    word_t d, exp_v;
    int nb, off, waited;
    in_val = 0; in_tok = '0; epoch = 3; dc_val = 0; dc_data = 0; dc_exc = 0; dc_refill = 0;
    dc_code = EXC_INT; c0_busy = 0; epc = 64'h5000; exc_vector = 64'hFFFF_FFFF_8000_0180; int_pending = 0;
    repeat (3) @(negedge clk); rst = 0;
    // normal commit
    t = alu_tok(64'h1000, 4'd6); show(t);
    check("commit: register write", {rf_we, rf_wa, rf_wd}, {1'b1, t.rd, t.result});
    check("commit: next pc", {pcwb_val, pcwb_next}, {1'b1, 64'h1004});
    check("commit: slot returned", {retire_val, retire_slot}, {1'b1, 2'd2});
    check("commit: no redirect", {redirect_val, exc_val, tab_we}, 3'b000);
    done();
    // old epoch: dropped
    t = alu_tok(64'h1004, 4'd7); t.epoch = 2; show(t);
    check("drop: nothing written", {rf_we, pcwb_val, exc_val, redirect_val}, 4'b0000);
    check("drop: slot returned", {retire_val, in_rdy}, 2'b11);
    done();
    check("drop counted", n_dropped, 1);
    // branch then its delay slot
    t = alu_tok(64'h1100, 4'd0); t.is_branch = 1; t.target = 64'h2000; t.wr_reg = 0; show(t); done();
    t = alu_tok(64'h1104, 4'd1); show(t);
    check("delay slot next pc is the branch target", pcwb_next, 64'h2000);
    // an interrupt is not taken in a delay slot
    int_pending = 1; #1;
    check("no interrupt in delay slot", {exc_val, rf_we}, 2'b01);
    done();
    // interrupt taken on the next ordinary instruction
    t = alu_tok(64'h2000, 4'd2); show(t);
    check("interrupt", {exc_val, 5'(exc_code), rf_we, pcwb_val}, {1'b1, 5'(EXC_INT), 1'b0, 1'b0});
    check("interrupt restarts at vector", {redirect_val, redirect_pc, exc_pc}, {1'b1, exc_vector, 64'h2000});
    done(); int_pending = 0;
    check("interrupt counted", {n_int, n_exc}, {32'd1, 32'd1});
    // token exception inside a delay slot
    t = alu_tok(64'h3000, 4'd3); t.is_branch = 1; t.target = 64'h4000; show(t); done();
    t = alu_tok(64'h3004, 4'd4); t.exc = 1; t.exc_code = EXC_SYS; show(t);
    check("exception", {exc_val, 5'(exc_code), exc_bd, rf_we}, {1'b1, 5'(EXC_SYS), 1'b1, 1'b0});
    check("exception pc", exc_pc, 64'h3004);
    done();
    // loads: every size, offset and signedness
    for (int n = 0; n < 400; n++) begin
      t = alu_tok(64'h6000, 4'(n)); t.mem_rd = 1; t.mem_go = 1;
      t.mem_sz = mem_size_e'($urandom % 4); t.mem_uns = 1'($urandom);
      nb = 1 << int'(t.mem_sz);
      off = ($urandom % (8 / nb)) * nb;
      t.vaddr = {$urandom, 25'($urandom), 4'($urandom), 3'(off)};
      d = {$urandom, $urandom};
      show(t);
      waited = 0;
      repeat ($urandom % 3) begin
        if (in_rdy || rf_we) waited = -100;
        @(negedge clk); waited++;
      end
      dc_val = 1; dc_data = d; #1;
      check("load waits for data", waited >= 0, 1);
      exp_v = (d << (8 * off)) >> (64 - 8 * nb);
      if (!t.mem_uns && nb < 8 && exp_v[8 * nb - 1]) exp_v = exp_v | (~64'd0 << (8 * nb));
      check("load data", {rf_we, rf_wd}, {1'b1, exp_v});
      check("load refills result table", {tab_we, tab_slot}, {1'b1, 2'(n)});
      check("load takes cache answer", dc_rdy, 1);
      @(posedge clk); #1 in_val = 0; dc_val = 0;
    end
    // data-cache exception
    t = alu_tok(64'h7000, 4'd5); t.mem_rd = 1; t.mem_go = 1; t.vaddr = 64'h1234_0008; show(t);
    dc_val = 1; dc_exc = 1; dc_refill = 1; dc_code = EXC_TLBL; #1;
    check("tlb miss exception", {exc_val, 5'(exc_code), exc_refill, rf_we}, {1'b1, 5'(EXC_TLBL), 1'b1, 1'b0});
    check("bad address", exc_badva, 64'h1234_0008);
    @(posedge clk); #1 in_val = 0; dc_val = 0; dc_exc = 0; dc_refill = 0;
    // CP0 operation waits while CP0 is busy
    t = alu_tok(64'h7100, 4'd6); t.c0 = C0_TLBWR; t.wr_reg = 0; c0_busy = 1; show(t);
    check("cp0 op waits", {in_rdy, pcwb_val}, 2'b00);
    @(negedge clk); c0_busy = 0; #1;
    check("cp0 op issued", {c0_val, 3'(c0_op), pcwb_val}, {1'b1, 3'(C0_TLBWR), 1'b1});
    done();
    // ERET
    t = alu_tok(64'h7200, 4'd7); t.c0 = C0_ERET; t.wr_reg = 0; show(t);
    check("eret restarts at epc", {redirect_val, redirect_pc, pcwb_val}, {1'b1, 64'h5000, 1'b0});
    done();
    // breakpoint token
    t = alu_tok(64'h7300, 4'd8); t.dead = 1; show(t);
    check("breakpoint", {bp_hit, redirect_val, redirect_pc, rf_we}, {1'b1, 1'b1, 64'h7300, 1'b0});
    done();
    check("commits counted", n_commit, 4 + 400 + 2);
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
