// tb_beri_branch: checks the next-PC predictor with its three interfaces.
//
// The testbench plays fetch, scheduler and writeback around the predictor
// for a small looping program: a backward conditional branch taken three
// times out of four, a jump, a forward conditional branch that is always
// taken, and a register jump back to the start. Fetched PCs go to putTarget
// after a random delay; writeback drops instructions of an old epoch and
// sends the real next PC of every other one. The model checks that the
// committed PCs follow the program exactly (branch delay slots included),
// that a mispredict is flagged at exactly the commits where the fixed
// prediction policy is wrong, that the epoch advances on each, that the
// corrected PC is offered to fetch in the very next cycle, and that an
// external redirect (as for an exception) restarts fetch the same way.
module tb_beri_branch;
  import beri_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       getpc_val, getpc_rdy, put_val, put_rdy, wb_val, wb_mispredict, redirect_val;
  word_t      getpc_pc, put_pc, wb_next_pc, redirect_pc;
  logic [3:0] epoch, put_epoch;
  logic [31:0] put_instr, n_mispredict;
  br_type_e   put_br;

  beri_branch #(.RESET_VECTOR(64'h1000)) dut (.clk, .rst, .getpc_val, .getpc_rdy, .getpc_pc, .epoch,
    .put_val, .put_rdy, .put_pc, .put_instr, .put_br, .put_epoch,
    .wb_val, .wb_next_pc, .wb_mispredict, .redirect_val, .redirect_pc, .n_mispredict);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] instr_at(input word_t pc);
    case (pc)
      64'h1010: return BNE(1, 2, -5);       // back to 0x1000
      64'h1018: return J(64'h1100);
      64'h1100: return BEQ(1, 1, 63);       // forward to 0x1200
      64'h1208: return JR(31);              // to 0x1000
      default:  return NOP();
    endcase
  endfunction
  function automatic br_type_e br_of(input logic [31:0] i);
    case (i[31:26])
      6'd4: return BR_EQ;
      6'd5: return BR_NE;
      6'd2: return BR_J;
      6'd0: return (i[5:0] == 6'h08) ? BR_JR : BR_NONE;
      default: return BR_NONE;
    endcase
  endfunction

  typedef struct packed { word_t pc; logic [3:0] ep; } ftok_t;
  ftok_t q1[$], q2[$];

  // fetch: take every offered PC
  assign getpc_rdy = 1'b1;
  always @(posedge clk) if (!rst && getpc_val) q1.push_back('{getpc_pc, epoch});

  // scheduler: present the oldest fetched token to putTarget after a random gap
  logic sched_go;
  always @(negedge clk) sched_go <= ($urandom % 4) != 0;
  always_comb begin
    put_val = sched_go && q1.size() > 0;
    put_pc = 0; put_epoch = 0; put_instr = 0;
    if (q1.size() > 0) begin put_pc = q1[0].pc; put_epoch = q1[0].ep; put_instr = instr_at(q1[0].pc); end
    put_br = br_of(put_instr);
  end
  always @(posedge clk) if (put_val && put_rdy) q2.push_back(q1.pop_front());

  // writeback with an architectural model of the program
  word_t arch_pc = 64'h1000, pend_tgt;
  logic  pend = 0, mp_next = 0, expect_restart = 0, cur_ep_valid;
  word_t restart_pc;
  int    visits = 0, commits = 0, n_exp_mp = 0, dropped = 0;
  logic [3:0] wb_ep = 0;
  logic  wb_go;
  always @(negedge clk) wb_go <= ($urandom % 3) != 0;

  task automatic commit_one(input word_t pc, output word_t nxt, output logic mp);
    logic [31:0] i;
    logic tk; word_t tg;
    check("committed pc", pc, arch_pc);
    i = instr_at(pc);
    nxt = pend ? pend_tgt : pc + 4;
    mp = mp_next;
    tk = 0; tg = 0;
    case (pc)
      64'h1010: begin tk = (visits % 4) != 3; visits++; tg = 64'h1000; end
      64'h1018: begin tk = 1; tg = 64'h1100; end
      64'h1100: begin tk = 1; tg = 64'h1200; end
      64'h1208: begin tk = 1; tg = 64'h1000; end
      default: ;
    endcase
    // predicted taken: jumps and backward conditional branches
    mp_next = (br_of(i) != BR_NONE) &&
              (tk != (br_of(i) == BR_J || (br_of(i) inside {BR_EQ, BR_NE} && i[15])));
    pend = tk; pend_tgt = tg;
    arch_pc = nxt;
  endtask

  initial begin
    word_t nxt; logic mp;
    wb_val = 0; wb_next_pc = 0; redirect_val = 0; redirect_pc = 0;
    repeat (3) @(negedge clk); rst = 0;
    while (commits < 400) begin
      @(negedge clk);
      wb_val = 0;
      if (expect_restart) begin
        check("restart pc offered next cycle", {getpc_val, getpc_pc}, {1'b1, restart_pc});
        expect_restart = 0;
      end
      if (wb_go && q2.size() > 0) begin
        if (q2[0].ep != epoch) begin void'(q2.pop_front()); dropped++; end
        else if (commits == 300) begin
          // exception-style redirect instead of a commit
          redirect_val = 1; redirect_pc = 64'h1100;
          arch_pc = 64'h1100; pend = 0; mp_next = 0;
          @(posedge clk); #1 redirect_val = 0;
          restart_pc = 64'h1100; expect_restart = 1; commits++;
          void'(q2.pop_front());
          continue;
        end else begin
          commit_one(q2[0].pc, nxt, mp);
          void'(q2.pop_front());
          wb_val = 1; wb_next_pc = nxt; #1;
          check("mispredict flag", wb_mispredict, mp);
          if (mp) begin n_exp_mp++; restart_pc = nxt; expect_restart = 1; wb_ep = epoch + 1; end
          commits++;
        end
      end
    end
    @(negedge clk); wb_val = 0;
    check("mispredict counter", n_mispredict, n_exp_mp);
    check("epoch advanced per restart", epoch, 4'(n_exp_mp + 1));
    check("wrong-path instructions were dropped", dropped > 0, 1);
    $display("mispredicts=%0d dropped=%0d", n_exp_mp, dropped);
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
