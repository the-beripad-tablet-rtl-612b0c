// tb_beri_scheduler: checks the scheduler / register-rename stage.
//
// Random instruction streams over six registers (so that dependencies are
// dense) are fed in: register-register ALU, immediate ALU, loads, stores,
// branches, CP0 reads and CP0 writes. The testbench plays writeback, which
// returns the result-table slot of the oldest instruction after a random
// delay. A model that keeps the list of in-flight instructions in order
// predicts for each instruction:
//  * whether the stage must hold it (its own slot still in flight, a source
//    produced by an in-flight load, or a CP0 read while a CP0 write is in
//    flight), checked every cycle against in_rdy;
//  * for each source, whether it is forwarded and from which slot (the
//    youngest in-flight writer of that register, used only if it belongs
//    to the reader's epoch; the epoch advances now and then, as after a
//    restart), and the destination;
//  * the branch type reported to the predictor.
// At most four instructions are ever in flight, and the forward and stall
// counters must match the model's counts.
module tb_beri_scheduler;
  import beri_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_val, in_rdy, in_exc, in_refill, rf_en, put_val, put_rdy, out_val, out_rdy, retire_val;
  ctoken_t in_tok, out_tok;
  logic [31:0] in_instr, put_instr, n_fwd, n_stall;
  exc_code_e in_exc_code;
  logic [4:0] rf_ra0, rf_ra1;
  word_t put_pc;
  br_type_e put_br;
  logic [3:0] put_epoch;
  logic [1:0] retire_slot;

  beri_scheduler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // one generated instruction and what it does with registers
  typedef struct { logic [31:0] ins; int rs, rt, dst; logic use_rs, use_rt, load, c0rd, c0wr; br_type_e br; } gen_t;
  function automatic gen_t gen();
    gen_t g;
    int k;
    g.rs = $urandom % 6; g.rt = $urandom % 6; k = $urandom % 100;
    g.use_rs = 0; g.use_rt = 0; g.dst = 0; g.load = 0; g.c0rd = 0; g.c0wr = 0; g.br = BR_NONE;
    if (k < 40)      begin g.dst = $urandom % 6; g.ins = DADDU(g.dst, g.rs, g.rt); g.use_rs = 1; g.use_rt = 1; end
    else if (k < 55) begin g.ins = ORI(g.rt, g.rs, 1); g.use_rs = 1; g.dst = g.rt; end
    else if (k < 70) begin g.ins = LD(g.rt, 0, g.rs); g.use_rs = 1; g.dst = g.rt; g.load = 1; end
    else if (k < 80) begin g.ins = SD(g.rt, 0, g.rs); g.use_rs = 1; g.use_rt = 1; end
    else if (k < 88) begin g.ins = BEQ(g.rs, g.rt, 4); g.use_rs = 1; g.use_rt = 1; g.br = BR_EQ; end
    else if (k < 94) begin g.ins = MFC0(g.rt, 12); g.dst = g.rt; g.c0rd = 1; end
    else             begin g.ins = DMTC0(g.rt, 12); g.use_rt = 1; g.c0rd = 1; g.c0wr = 1; end
    return g;
  endfunction

  typedef struct { int slot, dst; logic load, c0wr; logic [3:0] ep; } fl_t;
  fl_t  inflight[$];
  typedef struct { logic afwd, bfwd; int aslot, bslot, dst; logic wr; } exp_t;
  exp_t exp_q[$];

  gen_t cur;
  logic [3:0] next_id = 0;
  int n_other_ep = 0;
  logic [3:0] cur_ep = 0;
  int n_pass = 0, n_hold = 0, n_fwd_m = 0, max_inflight = 0, delay = 0;
  logic retire_now;

  // youngest in-flight writer of register r, or -1
  function automatic int writer(input int r);
    int w = -1;
    if (r == 0) return -1;
    foreach (inflight[i]) if (inflight[i].dst == r) w = i;
    return w;
  endfunction

  always @(posedge clk) if (!rst) begin
    exp_t e;
    int wa, wb;
    logic hold;
    // token leaving for decode
    if (out_val && out_rdy) begin
      check("token expected", exp_q.size() > 0, 1);
      e = exp_q.pop_front();
      check("a forwarded", out_tok.a_fwd, e.afwd);
      if (e.afwd) check("a slot", out_tok.a_slot, 64'(e.aslot));
      check("b forwarded", out_tok.b_fwd, e.bfwd);
      if (e.bfwd) check("b slot", out_tok.b_slot, 64'(e.bslot));
      check("destination", {out_tok.wr_reg, out_tok.wr_reg ? out_tok.rd : 5'd0}, {e.wr, 5'(e.dst)});
    end
    // hold decision for the instruction offered now
    if (in_val) begin
      wa = cur.use_rs ? writer(cur.rs) : -1;
      wb = cur.use_rt ? writer(cur.rt) : -1;
      // a writer from another epoch is on a cancelled path: read the register file
      if (wa >= 0 && inflight[wa].ep != in_tok.epoch) begin wa = -1; n_other_ep++; end
      if (wb >= 0 && inflight[wb].ep != in_tok.epoch) begin wb = -1; n_other_ep++; end
      hold = (wa >= 0 && inflight[wa].load) || (wb >= 0 && inflight[wb].load);
      foreach (inflight[i]) if (inflight[i].slot == int'(in_tok.id[1:0])) hold = 1;
      if (cur.c0rd) foreach (inflight[i]) if (inflight[i].c0wr) hold = 1;
      check("hold decision", in_rdy, !hold);
      if (!hold) begin
        check("branch type to predictor", {put_val, 4'(put_br)}, {1'b1, 4'(cur.br)});
        e.afwd = wa >= 0; e.bfwd = wb >= 0;
        e.aslot = wa >= 0 ? inflight[wa].slot : 0; e.bslot = wb >= 0 ? inflight[wb].slot : 0;
        e.dst = cur.dst; e.wr = cur.dst != 0;
        if (e.afwd || e.bfwd) n_fwd_m++;
        exp_q.push_back(e);
        n_pass++;
      end else n_hold++;
    end
    // writeback returns the oldest slot
    if (retire_val) void'(inflight.pop_front());
    if (in_val && in_rdy)
      inflight.push_back('{int'(in_tok.id[1:0]), cur.dst, cur.load, cur.c0wr, in_tok.epoch});
    if (inflight.size() > max_inflight) max_inflight = inflight.size();
  end

  always @(negedge clk) begin
    retire_val = 0;
    if (!rst && inflight.size() > 0) begin
      if (delay == 0) begin retire_val = 1; retire_slot = 2'(inflight[0].slot); delay = $urandom % 4; end
      else delay--;
    end
  end

  initial begin
    in_val = 0; in_tok = '0; in_instr = 0; in_exc = 0; in_refill = 0; in_exc_code = EXC_INT;
    put_rdy = 1; out_rdy = 1; retire_val = 0; retire_slot = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cur = gen();
      if ($urandom % 40 == 0) cur_ep++;   // a restart: later instructions belong to a new epoch
      in_val = 1; in_tok = '0; in_tok.id = next_id; in_tok.epoch = cur_ep; in_tok.pc = 64'h1000 + 64'(4 * n); in_instr = cur.ins;
      @(posedge clk); while (!in_rdy) @(posedge clk);
      next_id++;
      #1 in_val = 0;
    end
    repeat (10) @(negedge clk);
    check("all tokens delivered", exp_q.size(), 0);
    check("forward counter", n_fwd, n_fwd_m);
    check("stall counter", n_stall, n_hold);
    check("never more than four in flight", max_inflight <= 4, 1);
    check("forwarding happened", n_fwd_m > 100, 1);
    check("holds happened", n_hold > 100, 1);
    check("writers of an older epoch were met", n_other_ep > 5, 1);
    $display("passed=%0d held=%0d forwarded=%0d", n_pass, n_hold, n_fwd_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
