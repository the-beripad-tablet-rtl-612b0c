// tb_beri_memaccess: checks the memory-access stage.
//
// A model data cache accepts requests with random ready gaps. Checked:
// stores of every size and offset place their data on the big-endian byte
// lanes of the doubleword (byte offset 0 in bits 63:56) with the matching
// byte enables; loads send their enables and address; a memory operation
// waits until every older token has left for writeback; a token of an old
// epoch or with an exception never reaches the data cache; tokens leave in
// order with mem_go set exactly for issued operations; while writeback is
// stalled the stage still takes MEMQ tokens (ALU work continues behind an
// outstanding load); ALU tokens pass at one per cycle.
module tb_beri_memaccess;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_val, in_rdy, dc_val, dc_rdy, dc_wr, out_val, out_rdy, q_empty;
  ctoken_t in_tok, out_tok;
  logic [3:0] epoch;
  word_t dc_va, dc_wdata;
  logic [7:0] dc_be;

  beri_memaccess dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // expected tokens at the output, in order
  ctoken_t exp_q[$];
  logic    exp_go[$];
  int n_out = 0, n_dc = 0;
  always @(posedge clk) if (!rst && out_val && out_rdy) begin
    check("output order", out_tok.id, exp_q[0].id);
    check("mem_go", out_tok.mem_go, exp_go[0]);
    void'(exp_q.pop_front()); void'(exp_go.pop_front());
    n_out++;
  end
  logic dc_busy_gap;
  always @(negedge clk) dc_busy_gap <= ($urandom % 3) == 0;
  assign dc_rdy = !dc_busy_gap;
  always @(posedge clk) if (!rst && dc_val && dc_rdy) begin
    n_dc++;
    check("request only with empty queue", q_empty, 1);
  end

  int id = 0;
  // offer one token; returns after it is accepted
  task automatic send(input ctoken_t t, input logic go);
    t.id = 4'(id++);
    exp_q.push_back(t); exp_go.push_back(go);
    @(negedge clk); in_val = 1; in_tok = t;
    @(posedge clk); while (!in_rdy) @(posedge clk);
    #1 in_val = 0;
  endtask

  function automatic ctoken_t mem_tok(input logic wr, input mem_size_e sz, input logic [2:0] off, input word_t b);
    ctoken_t t;
    t = '0; t.epoch = epoch; t.mem_wr = wr; t.mem_rd = !wr; t.mem_sz = sz; t.b = b;
    t.vaddr = {$urandom, 29'($urandom), off};
    return t;
  endfunction

  initial begin
    ctoken_t t;
    word_t b, lanes;
    int nb, off, cyc, acc;
    in_val = 0; in_tok = '0; epoch = 5; out_rdy = 1;
    repeat (3) @(negedge clk); rst = 0;
    // store lanes for every size and offset
    for (int n = 0; n < 300; n++) begin
      mem_size_e sz;
      sz = mem_size_e'($urandom % 4);
      nb = 1 << int'(sz);
      off = ($urandom % (8 / nb)) * nb;
      b = {$urandom, $urandom};
      t = mem_tok(1'($urandom), sz, 3'(off), b);
      t.id = 4'(id++); exp_q.push_back(t); exp_go.push_back(1);
      @(negedge clk); in_val = 1; in_tok = t;
      #1;
      while (!(dc_val && dc_rdy)) begin @(negedge clk); #1; end
      lanes = '0;
      for (int k = 0; k < nb; k++) lanes[63 - 8 * (off + k) -: 8] = b[8 * (nb - 1 - k) +: 8];
      check("byte enables", dc_be, 8'((16'hFF00 >> nb) & 8'hFF) >> off);
      if (t.mem_wr) check("store lanes", dc_wdata & {{8{dc_be[7]}}, {8{dc_be[6]}}, {8{dc_be[5]}}, {8{dc_be[4]}},
                                                     {8{dc_be[3]}}, {8{dc_be[2]}}, {8{dc_be[1]}}, {8{dc_be[0]}}}, lanes);
      check("address", dc_va, t.vaddr);
      check("write flag", dc_wr, t.mem_wr);
      @(posedge clk); #1 in_val = 0;
    end
    // old epoch and exception tokens never reach the cache
    acc = n_dc;
    t = mem_tok(0, SZ_D, 0, 0); t.epoch = 4; send(t, 0);
    t = mem_tok(1, SZ_D, 0, 0); t.exc = 1; send(t, 0);
    repeat (3) @(negedge clk);
    check("no request for cancelled tokens", n_dc, acc);
    // writeback stalled: a load and MEMQ-1 ALU tokens are still taken
    out_rdy = 0;
    t = mem_tok(0, SZ_W, 4, 0); send(t, 1);
    t = '0; t.epoch = epoch; send(t, 0);
    @(negedge clk); in_val = 1; in_tok = '0; in_tok.epoch = epoch;
    repeat (3) @(negedge clk);
    check("full queue holds off", in_rdy, 0);
    in_val = 0;
    // a load behind queued tokens waits for them to leave
    out_rdy = 1; @(negedge clk); out_rdy = 0;
    acc = n_dc;
    t = mem_tok(0, SZ_D, 0, 0); t.id = 4'(id++); exp_q.push_back(t); exp_go.push_back(1);
    @(negedge clk); in_val = 1; in_tok = t;
    repeat (4) @(negedge clk);
    check("load waits for older tokens", {n_dc == acc, in_rdy}, 2'b10);
    out_rdy = 1;
    @(posedge clk); while (!in_rdy) @(posedge clk);
    #1 in_val = 0;
    // ALU tokens at one per cycle
    repeat (4) @(negedge clk);
    acc = n_out; cyc = 0;
    for (int n = 0; n < 30; n++) begin
      t = '0; t.epoch = epoch; t.id = 4'(id++); exp_q.push_back(t); exp_go.push_back(0);
      @(negedge clk); in_val = 1; in_tok = t; cyc++; #1;
      check("alu token accepted each cycle", in_rdy, 1);
    end
    @(negedge clk); in_val = 0;
    repeat (4) @(negedge clk);
    check("every token delivered", exp_q.size(), 0);
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
