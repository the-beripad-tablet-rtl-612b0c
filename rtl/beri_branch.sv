// beri_branch: next-PC prediction with instruction-sequence epochs.
//
// Three interfaces, as in the BERI pipeline:
//  * getPc      hands the fetch stage the next PC and the current epoch.
//  * putTarget  receives every scheduled instruction of the current epoch
//               (its PC, word and branch type from the scheduler's pre-decode)
//               and predicts the PC two instructions later, which the MIPS
//               branch delay slot makes possible: pc(i+2) is the target if
//               instruction i is a predicted-taken branch, else pc(i+1)+4.
//               The prediction becomes two tokens: one queued for getPc, one
//               queued for pcWriteback (it is the predicted next PC of i+1).
//  * pcWriteback receives the canonical next PC of each committed instruction
//               and compares it with the oldest queued prediction. On a
//               mismatch it increments the epoch and restarts getPc at the
//               correct PC; the writeback stage discards every instruction
//               that still carries the old epoch.
// Exceptions and ERET use the same restart path (redirect inputs).
// Prediction policy (own choice, the predictor is meant to be replaced):
// J/JAL taken, conditional branches taken when backward, JR/JALR not taken.
// After a restart at X the first two PCs, X and X+4, are issued without
// waiting for putTarget. Latency: a restart is visible on getPc the next cycle.
module beri_branch
  import beri_pkg::*;
#(
  parameter word_t RESET_VECTOR = RESET_PC,
  parameter int    PRED_DEPTH   = 8
) (
  input  logic       clk,
  input  logic       rst,
  // getPc
  output logic       getpc_val,
  input  logic       getpc_rdy,
  output word_t      getpc_pc,
  output logic [3:0] epoch,
  // putTarget
  input  logic       put_val,
  output logic       put_rdy,
  input  word_t      put_pc,
  input  logic [31:0] put_instr,
  input  br_type_e   put_br,
  input  logic [3:0] put_epoch,
  // pcWriteback
  input  logic       wb_val,
  input  word_t      wb_next_pc,
  output logic       wb_mispredict,
  // exception / ERET restart
  input  logic       redirect_val,
  input  word_t      redirect_pc,
  // statistics
  output logic [31:0] n_mispredict
);
  logic [1:0] seed_cnt;
  word_t      seed_pc, last_gen;
  logic       restart;
  word_t      restart_pc;

  logic  pcq_enq_rdy, pcq_val, predq_enq_rdy, predq_val;
  word_t pcq_first, predq_first, gen;
  logic  put_fire, taken;
  word_t target;

  // prediction for putTarget
  always_comb begin
    target = put_pc + 64'd4 + {{46{put_instr[15]}}, put_instr[15:0], 2'b00};
    taken  = 1'b0;
    unique case (put_br)
      BR_J: begin
        taken  = 1'b1;
        target = {put_pc[63:28] , put_instr[25:0], 2'b00};
      end
      BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ: taken = put_instr[15];
      default: taken = 1'b0;
    endcase
    gen = taken ? target : last_gen + 64'd4;
  end

  // The seed prediction (X+4 is the predicted next PC of X) is queued for
  // pcWriteback in the cycle after a restart.
  logic seed_pred;
  logic put_cur;
  assign put_cur  = (put_epoch == epoch) && !restart;
  assign put_rdy  = !put_cur || (pcq_enq_rdy && predq_enq_rdy);
  assign put_fire = put_val && put_cur && pcq_enq_rdy && predq_enq_rdy;

  // writeback check
  assign wb_mispredict = wb_val && !redirect_val && (!predq_val || predq_first != wb_next_pc);
  assign restart       = redirect_val || wb_mispredict;
  assign restart_pc    = redirect_val ? redirect_pc : wb_next_pc;

  assign getpc_val = (seed_cnt != 2'd0) || pcq_val;
  assign getpc_pc  = (seed_cnt != 2'd0) ? seed_pc : pcq_first;

  beri_fifo #(.T(word_t), .DEPTH(4)) u_pcq (
    .clk, .rst, .flush(restart),
    .enq_val(put_fire), .enq_rdy(pcq_enq_rdy), .enq_data(gen),
    .deq_val(pcq_val), .deq_rdy(getpc_rdy && seed_cnt == 2'd0), .first(pcq_first));

  beri_fifo #(.T(word_t), .DEPTH(PRED_DEPTH)) u_predq (
    .clk, .rst, .flush(restart),
    .enq_val(put_fire || seed_pred), .enq_rdy(predq_enq_rdy),
    .enq_data(seed_pred ? last_gen : gen),
    .deq_val(predq_val), .deq_rdy(wb_val), .first(predq_first));


  always_ff @(posedge clk) begin
    if (rst) begin
      epoch     <= '0;
      seed_cnt  <= 2'd2;
      seed_pc   <= RESET_VECTOR;
      last_gen  <= RESET_VECTOR + 64'd4;
      seed_pred <= 1'b1;
      n_mispredict <= '0;
    end else if (restart) begin
      epoch     <= epoch + 4'd1;
      seed_cnt  <= 2'd2;
      seed_pc   <= restart_pc;
      last_gen  <= restart_pc + 64'd4;
      seed_pred <= 1'b1;
      if (wb_mispredict) n_mispredict <= n_mispredict + 1;
    end else begin
      if (getpc_val && getpc_rdy && seed_cnt != 2'd0) begin
        seed_cnt <= seed_cnt - 2'd1;
        seed_pc  <= seed_pc + 64'd4;
      end
      if (put_fire) last_gen <= gen;
      seed_pred <= 1'b0;
    end
  end
endmodule
