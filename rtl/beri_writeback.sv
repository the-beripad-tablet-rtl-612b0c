// beri_writeback: writeback stage, where instructions commit or are dropped.
//
// Works on the oldest token (the head of the memory stage's FIFO):
//  * a token of an old epoch (fetched down a mispredicted path or behind an
//    exception) is dropped; a token of the current epoch marked dead by a
//    debug breakpoint is dropped and fetch restarts at its own PC (bp_hit);
//  * a token with an exception (from fetch translation, decode, execute or
//    the data-cache answer), or an interrupt pending in CP0, is reported to
//    CP0, which returns the vector; fetch restarts there in a new epoch.
//    Interrupts are taken only on instructions that are neither in a branch
//    delay slot nor memory accesses (own simplification: such an
//    instruction then never needs to be undone);
//  * otherwise it commits: the register write (load data extracted and
//    extended from the data-cache doubleword, which also refills the result
//    table), the CP0 operation (waiting while CP0 is busy with the TLB), and
//    the canonical next PC (pc+4, or the branch's resolved target for a
//    delay slot) to the branch predictor's pcWriteback. ERET restarts fetch
//    at EPC instead.
// Every token leaving returns its result-table slot to the scheduler.
// A load or store waits here for the data-cache answer.
module beri_writeback
  import beri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_val,
  output logic       in_rdy,
  input  ctoken_t    in_tok,
  input  logic [3:0] epoch,
  // data cache answer
  input  logic       dc_val,
  output logic       dc_rdy,
  input  word_t      dc_data,
  input  logic       dc_exc,
  input  logic       dc_refill,
  input  exc_code_e  dc_code,
  // register file / result table
  output logic       rf_we,
  output logic [4:0] rf_wa,
  output word_t      rf_wd,
  output logic       tab_we,
  output logic [1:0] tab_slot,
  output logic       retire_val,
  output logic [1:0] retire_slot,
  // pcWriteback
  output logic       pcwb_val,
  output word_t      pcwb_next,
  output logic       redirect_val,
  output word_t      redirect_pc,
  // CP0
  output logic       c0_val,
  output cp0_op_e    c0_op,
  output logic [4:0] c0_reg,
  output logic [2:0] c0_sel,
  output word_t      c0_wdata,
  input  logic       c0_busy,
  input  word_t      epc,
  output logic       exc_val,
  output exc_code_e  exc_code,
  output word_t      exc_pc,
  output logic       exc_bd,
  output word_t      exc_badva,
  output logic       exc_refill,
  input  word_t      exc_vector,
  input  logic       int_pending,
  output logic       bp_hit,
  // statistics
  output logic [31:0] n_commit,
  output logic [31:0] n_dropped,
  output logic [31:0] n_exc,
  output logic [31:0] n_int
);
  logic  in_ds;        // previous committed instruction was a branch
  word_t ds_target;

  wire cur     = in_val && in_tok.epoch == epoch && !in_tok.dead;
  wire bpt     = in_val && in_tok.epoch == epoch && in_tok.dead;      // breakpoint
  wire mem_w   = cur && in_tok.mem_go && !dc_val;                 // waiting for data
  wire take_int = cur && int_pending && !in_ds && !in_tok.mem_go && !in_tok.exc;
  wire excp    = cur && !mem_w && (in_tok.exc || (in_tok.mem_go && dc_exc) || take_int);
  wire c0_wait = cur && !excp && in_tok.c0 != C0_NONE && c0_busy;
  wire commit  = cur && !mem_w && !excp && !c0_wait;

  assign in_rdy  = in_val && !mem_w && !c0_wait;
  assign dc_rdy  = in_val && in_tok.mem_go && cur;

  // load data extraction
  word_t ld;
  always_comb begin
    int nb;
    word_t sh;
    nb = (in_tok.mem_sz == SZ_B) ? 1 : (in_tok.mem_sz == SZ_H) ? 2 : (in_tok.mem_sz == SZ_W) ? 4 : 8;
    sh = dc_data >> (8 * (8 - nb - int'(in_tok.vaddr[2:0])));
    unique case (in_tok.mem_sz)
      SZ_B: ld = in_tok.mem_uns ? {56'd0, sh[7:0]}  : {{56{sh[7]}},  sh[7:0]};
      SZ_H: ld = in_tok.mem_uns ? {48'd0, sh[15:0]} : {{48{sh[15]}}, sh[15:0]};
      SZ_W: ld = in_tok.mem_uns ? {32'd0, sh[31:0]} : {{32{sh[31]}}, sh[31:0]};
      default: ld = sh;
    endcase
  end

  assign rf_we    = commit && in_tok.wr_reg;
  assign rf_wa    = in_tok.rd;
  assign rf_wd    = in_tok.mem_rd ? ld : in_tok.result;
  assign tab_we   = commit && in_tok.wr_reg && in_tok.mem_rd;
  assign tab_slot = in_tok.id[1:0];

  assign retire_val  = in_val && in_rdy;
  assign retire_slot = in_tok.id[1:0];

  wire eret = in_tok.c0 == C0_ERET;
  assign pcwb_val  = commit && !eret;
  assign pcwb_next = in_ds ? ds_target : in_tok.pc + 64'd4;

  assign c0_val   = cur && !mem_w && !excp && in_tok.c0 != C0_NONE;
  assign c0_op    = in_tok.c0;
  assign c0_reg   = in_tok.c0_reg;
  assign c0_sel   = in_tok.c0_sel;
  assign c0_wdata = in_tok.result;

  assign exc_val    = excp;
  assign exc_code   = take_int ? EXC_INT : in_tok.exc ? in_tok.exc_code : dc_code;
  assign exc_pc     = in_tok.pc;
  assign exc_bd     = in_ds;
  assign exc_badva  = in_tok.mem_go ? in_tok.vaddr : in_tok.pc;
  assign exc_refill = in_tok.mem_go ? dc_refill : (in_tok.exc && in_tok.refill);

  assign redirect_val = excp || (commit && eret) || bpt;
  assign redirect_pc  = excp ? exc_vector : bpt ? in_tok.pc : epc;
  assign bp_hit       = bpt;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_ds <= 1'b0; ds_target <= '0;
      n_commit <= '0; n_dropped <= '0; n_exc <= '0; n_int <= '0;
    end else begin
      if (in_val && in_rdy && !cur && !bpt) n_dropped <= n_dropped + 1;
      if (excp) begin
        in_ds <= 1'b0;
        n_exc <= n_exc + 1;
        if (take_int) n_int <= n_int + 1;
      end
      if (commit) begin
        n_commit  <= n_commit + 1;
        in_ds     <= in_tok.is_branch;
        ds_target <= in_tok.target;
        if (eret) in_ds <= 1'b0;
      end
    end
  end
endmodule
