// beri_scheduler: scheduler / register-rename stage.
//
// Takes a fetch token together with its instruction word from the
// instruction cache and pre-decodes just enough to know which fields are
// source registers and which is the destination. It then
//  * submits the sources to the two register-file read ports,
//  * renames: every instruction owns result-table slot id[1:0] in execute;
//    a table map[32] remembers which in-flight slot last targets each
//    register, and a source found there is marked to be taken from the
//    result table in execute instead of the register file. Only a slot
//    filled in the reader's own epoch is used: an instruction of an older
//    epoch is on a cancelled path, and every instruction older than the
//    restart that began the reader's epoch has already written the
//    register file,
//  * reports the branch type to the branch predictor (putTarget),
//  * passes the token to decode (one register, read data arrive with it).
// At most 4 instructions are in flight between this stage and the end of
// writeback, so a slot is never reused while a reader may still need it;
// writeback returns a slot (retire) for every instruction it removes. The
// stage holds an instruction back while
//  * all 4 slots are in flight,
//  * a source comes from an in-flight load (loads fill the table only at
//    writeback),
//  * it reads or updates CP0 while a CP0-updating instruction is in flight
//    (CP0 values are never forwarded).
// Timing: one instruction per cycle when nothing holds it back.
module beri_scheduler
  import beri_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // fetch token + instruction
  input  logic        in_val,
  output logic        in_rdy,
  input  ctoken_t     in_tok,
  input  logic [31:0] in_instr,
  input  logic        in_exc,
  input  exc_code_e   in_exc_code,
  input  logic        in_refill,
  // register file read ports
  output logic        rf_en,
  output logic [4:0]  rf_ra0,
  output logic [4:0]  rf_ra1,
  // putTarget
  output logic        put_val,
  input  logic        put_rdy,
  output word_t       put_pc,
  output logic [31:0] put_instr,
  output br_type_e    put_br,
  output logic [3:0]  put_epoch,
  // to decode
  output logic        out_val,
  input  logic        out_rdy,
  output ctoken_t     out_tok,
  // slot return from writeback
  input  logic        retire_val,
  input  logic [1:0]  retire_slot,
  // statistics
  output logic [31:0] n_fwd,
  output logic [31:0] n_stall
);
  typedef struct packed { logic valid; logic [1:0] slot; } map_t;
  map_t       map [32];
  logic [3:0] inflight;     // one bit per slot
  logic [3:0] is_load;
  logic [3:0] is_c0;
  logic [3:0] slot_ep [4];  // epoch of the instruction holding each slot

  // pre-decode
  logic [5:0] opc, fn;
  logic [4:0] rs, rt, rd, dst;
  logic       use_rs, use_rt, wr, load, c0rd, c0wr;
  br_type_e   br;
  always_comb begin
    opc = in_instr[31:26]; fn = in_instr[5:0];
    rs = in_instr[25:21]; rt = in_instr[20:16]; rd = in_instr[15:11];
    use_rs = 1'b0; use_rt = 1'b0; wr = 1'b0; dst = 5'd0; load = 1'b0;
    c0rd = 1'b0; c0wr = 1'b0; br = BR_NONE;
    unique case (opc)
      6'd0: begin
        unique case (fn)
          6'h08: begin use_rs = 1'b1; br = BR_JR; end                         // JR
          6'h09: begin use_rs = 1'b1; br = BR_JR; wr = 1'b1; dst = rd; end   // JALR
          6'h0C, 6'h0D: ;                                                      // SYSCALL, BREAK
          6'h10, 6'h12: begin wr = 1'b1; dst = rd; end                         // MFHI, MFLO
          6'h11, 6'h13: use_rs = 1'b1;                                         // MTHI, MTLO
          6'h18, 6'h19, 6'h1A, 6'h1B, 6'h1C, 6'h1D, 6'h1E, 6'h1F:
            begin use_rs = 1'b1; use_rt = 1'b1; end                            // mult/div
          6'h00, 6'h02, 6'h03, 6'h38, 6'h3A, 6'h3B, 6'h3C, 6'h3E, 6'h3F:
            begin use_rt = 1'b1; wr = 1'b1; dst = rd; end                      // shifts by sa
          default: begin use_rs = 1'b1; use_rt = 1'b1; wr = 1'b1; dst = rd; end
        endcase
      end
      6'd1: begin
        use_rs = 1'b1;
        br = in_instr[16] ? BR_GEZ : BR_LTZ;
        if (in_instr[20]) begin wr = 1'b1; dst = 5'd31; end                   // BxxZAL
      end
      6'd2: br = BR_J;
      6'd3: begin br = BR_J; wr = 1'b1; dst = 5'd31; end
      6'd4: begin use_rs = 1'b1; use_rt = 1'b1; br = BR_EQ; end
      6'd5: begin use_rs = 1'b1; use_rt = 1'b1; br = BR_NE; end
      6'd6: begin use_rs = 1'b1; br = BR_LEZ; end
      6'd7: begin use_rs = 1'b1; br = BR_GTZ; end
      6'd15: begin wr = 1'b1; dst = rt; end                                   // LUI
      6'd8, 6'd9, 6'd10, 6'd11, 6'd12, 6'd13, 6'd14, 6'd24, 6'd25:
        begin use_rs = 1'b1; wr = 1'b1; dst = rt; end
      6'd16: begin
        c0rd = 1'b1;
        if (rs == 5'd0 || rs == 5'd1) begin wr = 1'b1; dst = rt; end          // (D)MFC0
        else if (rs == 5'd4 || rs == 5'd5) begin use_rt = 1'b1; c0wr = 1'b1; end
        else c0wr = 1'b1;                                                      // TLB ops, ERET
      end
      6'd32, 6'd33, 6'd35, 6'd36, 6'd37, 6'd39, 6'd55:
        begin use_rs = 1'b1; wr = 1'b1; dst = rt; load = 1'b1; end
      6'd40, 6'd41, 6'd43, 6'd63: begin use_rs = 1'b1; use_rt = 1'b1; end
      default: ;
    endcase
    if (in_exc) begin br = BR_NONE; wr = 1'b0; use_rs = 1'b0; use_rt = 1'b0; c0rd = 1'b0; c0wr = 1'b0; end
    if (dst == 5'd0) wr = 1'b0;
  end

  wire [1:0] slot = in_tok.id[1:0];
  wire a_fwd = use_rs && rs != 5'd0 && map[rs].valid && slot_ep[map[rs].slot] == in_tok.epoch;
  wire b_fwd = use_rt && rt != 5'd0 && map[rt].valid && slot_ep[map[rt].slot] == in_tok.epoch;
  wire hazard = (a_fwd && is_load[map[rs].slot]) || (b_fwd && is_load[map[rt].slot]) ||
                inflight[slot] || (c0rd && (is_c0 != 4'd0));

  logic fire;
  assign fire   = in_val && !hazard && (!out_val || out_rdy) && put_rdy;
  assign in_rdy = fire;

  assign rf_en  = fire;
  assign rf_ra0 = rs;
  assign rf_ra1 = rt;

  assign put_val   = in_val && !hazard && (!out_val || out_rdy);
  assign put_pc    = in_tok.pc;
  assign put_instr = in_instr;
  assign put_br    = br;
  assign put_epoch = in_tok.epoch;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_val <= 1'b0; inflight <= '0; is_load <= '0; is_c0 <= '0;
      n_fwd <= '0; n_stall <= '0; out_tok <= '0;
      for (int i = 0; i < 32; i++) map[i] <= '0;
      for (int i = 0; i < 4; i++) slot_ep[i] <= '0;
    end else begin
      if (out_val && out_rdy) out_val <= 1'b0;
      if (retire_val) begin
        inflight[retire_slot] <= 1'b0;
        is_load[retire_slot]  <= 1'b0;
        is_c0[retire_slot]    <= 1'b0;
        for (int i = 0; i < 32; i++)
          if (map[i].valid && map[i].slot == retire_slot) map[i].valid <= 1'b0;
      end
      if (in_val && hazard) n_stall <= n_stall + 1;
      if (fire) begin
        out_val <= 1'b1;
        out_tok <= in_tok;
        out_tok.instr  <= in_instr;
        out_tok.rs     <= rs;
        out_tok.rt     <= rt;
        out_tok.rd     <= dst;
        out_tok.wr_reg <= wr;
        out_tok.a_fwd  <= a_fwd;
        out_tok.b_fwd  <= b_fwd;
        out_tok.a_slot <= map[rs].slot;
        out_tok.b_slot <= map[rt].slot;
        out_tok.exc    <= in_exc;
        out_tok.exc_code <= in_exc_code;
        out_tok.refill <= in_exc && in_refill;
        inflight[slot] <= 1'b1;
        is_load[slot]  <= load;
        is_c0[slot]    <= c0wr;
        slot_ep[slot]  <= in_tok.epoch;
        if (wr) map[dst] <= '{valid: 1'b1, slot: slot};
        if (a_fwd || b_fwd) n_fwd <= n_fwd + 1;
      end
    end
  end
endmodule
