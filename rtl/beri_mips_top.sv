// beri_mips_top: the BERI processor: instruction fetch and the pipeline
// stages, caches, TLB, CP0, multiply/divide and debug unit wired together.
//
//   fetch -> scheduler -> decode -> execute -> memory access -> writeback
//
// Instruction fetch (this module) takes the next PC and epoch from the
// branch predictor's getPc, asks the debug unit whether it is a breakpoint,
// queues a control token (id, epoch, PC) for the scheduler and sends the PC
// to the instruction cache; the scheduler pairs each token with its
// instruction word. The two level-1 caches translate through their own
// port caches in front of the single TLB inside CP0 (data side first when
// both miss at once), and miss through the request merge into the shared
// level-2 cache, which talks to memory with 32-byte requests (mem_*).
// Instructions of an old epoch are not flushed early: they flow to
// writeback and are dropped there, returning their rename slots.
// Interface: memory request/answer, five hardware interrupt lines (Cause
// IP2-IP6), the debug byte streams, and event counters.
module beri_mips_top
  import beri_pkg::*;
#(
  parameter word_t RESET_VECTOR = RESET_PC,
  parameter int    L1_KB        = 16,
  parameter int    L2_KB        = 64
) (
  input  logic       clk,
  input  logic       rst,
  output logic       mreq_val,
  input  logic       mreq_rdy,
  output mem_req_t   mreq,
  input  logic       mresp_val,
  input  line_t      mresp_data,
  input  logic [4:0] hw_irq,
  input  logic       dbg_cmd_val,
  output logic       dbg_cmd_rdy,
  input  logic [7:0] dbg_cmd_byte,
  output logic       dbg_rsp_val,
  input  logic       dbg_rsp_rdy,
  output logic [7:0] dbg_rsp_byte,
  output stats_t     stats
);
  // ---------------- branch predictor
  logic       getpc_val, getpc_rdy;
  word_t      getpc_pc;
  logic [3:0] epoch;
  logic       put_val, put_rdy;
  word_t      put_pc;
  logic [31:0] put_instr;
  br_type_e   put_br;
  logic [3:0] put_epoch;
  logic       pcwb_val, mispredict, redirect_val;
  word_t      pcwb_next, redirect_pc;

  beri_branch #(.RESET_VECTOR(RESET_VECTOR)) u_branch (
    .clk, .rst, .getpc_val, .getpc_rdy, .getpc_pc, .epoch,
    .put_val, .put_rdy, .put_pc, .put_instr, .put_br, .put_epoch,
    .wb_val(pcwb_val), .wb_next_pc(pcwb_next), .wb_mispredict(mispredict),
    .redirect_val, .redirect_pc, .n_mispredict(stats.mispredict));

  // ---------------- debug unit
  logic pause, breakpoint, bp_hit, rf_we;
  logic [4:0] rf_wa;
  word_t      rf_wd;
  logic       wb_commit_val;
  word_t      wb_commit_pc;

  beri_debug u_debug (
    .clk, .rst, .cmd_val(dbg_cmd_val), .cmd_rdy(dbg_cmd_rdy), .cmd_byte(dbg_cmd_byte),
    .rsp_val(dbg_rsp_val), .rsp_rdy(dbg_rsp_rdy), .rsp_byte(dbg_rsp_byte),
    .pause, .check_pc(getpc_pc), .check_val(getpc_val && getpc_rdy), .breakpoint,
    .bp_hit, .commit_val(wb_commit_val), .commit_pc(wb_commit_pc));

  // ---------------- instruction fetch
  logic    [3:0] next_id;
  logic    tokq_rdy, tokq_val, tokq_deq;
  ctoken_t fetch_tok, tokq_first;
  logic    ic_req_rdy, ic_resp_val, ic_resp_rdy, ic_exc, ic_refill;
  word_t   ic_data;
  exc_code_e ic_code;

  always_comb begin
    fetch_tok       = '0;
    fetch_tok.id    = next_id;
    fetch_tok.epoch = epoch;
    fetch_tok.pc    = getpc_pc;
    fetch_tok.dead  = breakpoint;
  end

  assign getpc_rdy = getpc_val && !pause && tokq_rdy && ic_req_rdy;

  always_ff @(posedge clk) begin
    if (rst) next_id <= '0;
    else if (getpc_rdy) next_id <= next_id + 4'd1;
  end

  beri_fifo #(.T(ctoken_t), .DEPTH(4)) u_toScheduler (
    .clk, .rst, .flush(1'b0),
    .enq_val(getpc_rdy), .enq_rdy(tokq_rdy), .enq_data(fetch_tok),
    .deq_val(tokq_val), .deq_rdy(tokq_deq), .first(tokq_first));

  // ---------------- TLB lookup arbitration (two ports, one TLB)
  logic        i_lk_val, i_lk_rdy, d_lk_val, d_lk_rdy, lk_rdy;
  logic [26:0] i_lk_vpn2, d_lk_vpn2;
  logic [1:0]  i_lk_r, d_lk_r;
  logic [7:0]  i_lk_asid, d_lk_asid, asid;
  logic        res_val, res_hit, res_tag, tlb_write;
  tlb_entry_t  res_entry;

  assign d_lk_rdy = lk_rdy;
  assign i_lk_rdy = lk_rdy && !d_lk_val;

  // ---------------- caches
  logic      ic_mreq_val, ic_mreq_rdy, dc_mreq_val, dc_mreq_rdy, l1_resp_val;
  mem_req_t  ic_mreq, dc_mreq;
  mem_resp_t l1_resp;

  beri_l1cache #(.SIZE_KB(L1_KB), .SRC(1'b0), .WORD_B(8)) u_icache (
    .clk, .rst, .asid,
    .req_val(getpc_rdy), .req_rdy(ic_req_rdy), .req_va(getpc_pc), .req_wr(1'b0),
    .req_wdata('0), .req_be(8'hFF),
    .resp_val(ic_resp_val), .resp_rdy(ic_resp_rdy), .resp_data(ic_data),
    .resp_exc(ic_exc), .resp_refill(ic_refill), .resp_code(ic_code),
    .lk_val(i_lk_val), .lk_rdy(i_lk_rdy), .lk_vpn2(i_lk_vpn2), .lk_r(i_lk_r), .lk_asid(i_lk_asid),
    .res_val, .res_hit, .res_entry, .res_tag, .tlb_write,
    .mreq_val(ic_mreq_val), .mreq_rdy(ic_mreq_rdy), .mreq(ic_mreq),
    .mresp_val(l1_resp_val), .mresp(l1_resp),
    .n_hit(stats.ic_hit), .n_miss(stats.ic_miss), .n_tlb_miss(stats.itlb_miss));

  logic       dc_val, dc_rdy, dc_wr, dc_resp_val, dc_resp_rdy, dc_exc, dc_refill;
  word_t      dc_va, dc_wdata, dc_rdata;
  logic [7:0] dc_be;
  exc_code_e  dc_code;

  beri_l1cache #(.SIZE_KB(L1_KB), .SRC(1'b1)) u_dcache (
    .clk, .rst, .asid,
    .req_val(dc_val), .req_rdy(dc_rdy), .req_va(dc_va), .req_wr(dc_wr),
    .req_wdata(dc_wdata), .req_be(dc_be),
    .resp_val(dc_resp_val), .resp_rdy(dc_resp_rdy), .resp_data(dc_rdata),
    .resp_exc(dc_exc), .resp_refill(dc_refill), .resp_code(dc_code),
    .lk_val(d_lk_val), .lk_rdy(d_lk_rdy), .lk_vpn2(d_lk_vpn2), .lk_r(d_lk_r), .lk_asid(d_lk_asid),
    .res_val, .res_hit, .res_entry, .res_tag, .tlb_write,
    .mreq_val(dc_mreq_val), .mreq_rdy(dc_mreq_rdy), .mreq(dc_mreq),
    .mresp_val(l1_resp_val), .mresp(l1_resp),
    .n_hit(stats.dc_hit), .n_miss(stats.dc_miss), .n_tlb_miss(stats.dtlb_miss));

  logic      l2_req_val, l2_req_rdy, l2_resp_val;
  mem_req_t  l2_req;
  mem_resp_t l2_resp;

  beri_merge u_merge (
    .clk, .rst,
    .i_val(ic_mreq_val), .i_rdy(ic_mreq_rdy), .i_req(ic_mreq),
    .d_val(dc_mreq_val), .d_rdy(dc_mreq_rdy), .d_req(dc_mreq),
    .o_val(l2_req_val), .o_rdy(l2_req_rdy), .o_req(l2_req),
    .l2_resp_val, .l2_resp, .resp_val(l1_resp_val), .resp(l1_resp));

  beri_l2cache #(.SIZE_KB(L2_KB)) u_l2 (
    .clk, .rst,
    .req_val(l2_req_val), .req_rdy(l2_req_rdy), .req(l2_req),
    .resp_val(l2_resp_val), .resp(l2_resp),
    .mreq_val, .mreq_rdy, .mreq, .mresp_val, .mresp_data,
    .n_hit(stats.l2_hit), .n_miss(stats.l2_miss));

  // ---------------- scheduler and register file
  logic       rf_en;
  logic [4:0] rf_ra0, rf_ra1;
  word_t      rf_rd0, rf_rd1;
  logic       sch_val, sch_rdy, sch_in_rdy;
  ctoken_t    sch_tok;
  logic       retire_val;
  logic [1:0] retire_slot;

  assign tokq_deq    = sch_in_rdy;
  assign ic_resp_rdy = sch_in_rdy;

  beri_scheduler u_sched (
    .clk, .rst,
    .in_val(tokq_val && ic_resp_val), .in_rdy(sch_in_rdy), .in_tok(tokq_first),
    .in_instr(tokq_first.pc[2] ? ic_data[31:0] : ic_data[63:32]),
    .in_exc(ic_exc), .in_exc_code(ic_code), .in_refill(ic_refill),
    .rf_en, .rf_ra0, .rf_ra1,
    .put_val, .put_rdy, .put_pc, .put_instr, .put_br, .put_epoch,
    .out_val(sch_val), .out_rdy(sch_rdy), .out_tok(sch_tok),
    .retire_val, .retire_slot,
    .n_fwd(stats.fwd), .n_stall(stats.sched_stall));

  beri_regfile u_rf (
    .clk, .rd_en(rf_en), .ra0(rf_ra0), .ra1(rf_ra1), .rd0(rf_rd0), .rd1(rf_rd1),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd));

  // ---------------- decode
  logic    dec_val, dec_rdy;
  ctoken_t dec_tok;

  beri_decode u_decode (
    .clk, .rst, .in_val(sch_val), .in_rdy(sch_rdy), .in_tok(sch_tok),
    .rf_a(rf_rd0), .rf_b(rf_rd1),
    .out_val(dec_val), .out_rdy(dec_rdy), .out_tok(dec_tok));

  // ---------------- execute and multiply/divide
  logic    ex_val, ex_rdy, tab_we, md_start, md_w64, md_busy, ma_q_empty;
  ctoken_t ex_tok;
  logic [1:0] tab_slot;
  logic [4:0] c0_rd_reg;
  logic [2:0] c0_rd_sel;
  word_t   c0_rd_data, md_a, md_b, hi, lo;
  md_op_e  md_op;

  beri_execute u_execute (
    .clk, .rst, .in_val(dec_val), .in_rdy(dec_rdy), .in_tok(dec_tok),
    .out_val(ex_val), .out_rdy(ex_rdy), .out_tok(ex_tok),
    .epoch, .older_empty(!ex_val && ma_q_empty),
    .tab_we, .tab_slot, .tab_data(rf_wd),
    .c0_rd_reg, .c0_rd_sel, .c0_rd_data,
    .md_start, .md_op, .md_w64, .md_a, .md_b, .md_busy, .hi, .lo);

  beri_muldiv u_muldiv (
    .clk, .rst, .start(md_start), .op(md_op), .w64(md_w64), .a(md_a), .b(md_b),
    .busy(md_busy), .hi, .lo, .n_skips(stats.div_skips));

  // ---------------- memory access
  logic    ma_val, ma_rdy;
  ctoken_t ma_tok;

  beri_memaccess u_memaccess (
    .clk, .rst, .in_val(ex_val), .in_rdy(ex_rdy), .in_tok(ex_tok), .epoch,
    .dc_val, .dc_rdy, .dc_va, .dc_wr, .dc_wdata, .dc_be,
    .out_val(ma_val), .out_rdy(ma_rdy), .out_tok(ma_tok), .q_empty(ma_q_empty));

  // ---------------- writeback and CP0
  logic       c0_val, c0_busy, exc_val, exc_bd, exc_refill, int_pending;
  cp0_op_e    c0_op;
  logic [4:0] c0_reg;
  logic [2:0] c0_sel;
  word_t      c0_wdata, epc, exc_pc, exc_badva, exc_vector;
  exc_code_e  exc_code;

  beri_writeback u_writeback (
    .clk, .rst, .in_val(ma_val), .in_rdy(ma_rdy), .in_tok(ma_tok), .epoch,
    .dc_val(dc_resp_val), .dc_rdy(dc_resp_rdy), .dc_data(dc_rdata),
    .dc_exc, .dc_refill, .dc_code,
    .rf_we, .rf_wa, .rf_wd, .tab_we, .tab_slot, .retire_val, .retire_slot,
    .pcwb_val, .pcwb_next, .redirect_val, .redirect_pc,
    .c0_val, .c0_op, .c0_reg, .c0_sel, .c0_wdata, .c0_busy, .epc,
    .exc_val, .exc_code, .exc_pc, .exc_bd, .exc_badva, .exc_refill, .exc_vector,
    .int_pending, .bp_hit,
    .n_commit(stats.commit), .n_dropped(stats.dropped), .n_exc(stats.exc), .n_int(stats.intr));

  assign wb_commit_val = pcwb_val;
  assign wb_commit_pc  = ma_tok.pc;

  beri_cp0 u_cp0 (
    .clk, .rst, .rd_reg(c0_rd_reg), .rd_sel(c0_rd_sel), .rd_data(c0_rd_data),
    .c0_val, .c0_op, .c0_reg, .c0_sel, .c0_wdata, .busy(c0_busy), .epc_out(epc),
    .exc_val, .exc_code, .exc_pc, .exc_bd, .exc_badva, .exc_refill, .exc_vector,
    .hw_irq, .int_pending, .asid,
    .lk_val(i_lk_val || d_lk_val), .lk_rdy,
    .lk_vpn2(d_lk_val ? d_lk_vpn2 : i_lk_vpn2), .lk_r(d_lk_val ? d_lk_r : i_lk_r),
    .lk_asid(d_lk_val ? d_lk_asid : i_lk_asid), .lk_tag(d_lk_val),
    .res_val, .res_hit, .res_entry, .res_tag, .tlb_write,
    .n_victim_moves(stats.victim_moves));
endmodule
