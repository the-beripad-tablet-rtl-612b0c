// tb_beri_cp0: checks the system control coprocessor.
//
// Plays writeback: commits MTC0 writes, TLB operations and ERET, and reports
// exceptions. Checked: reset values (Status.BEV, PRId, Config1), register
// write/read-back, exception entry (EPC, Cause.ExcCode and BD, BadVAddr,
// EntryHi.VPN2, Status.EXL) and the vector for each case (refill 0x080 with
// EXL clear, general 0x180, BEV base), ERET clearing EXL, interrupt pending
// from a hardware line and from the Count/Compare timer, and a TLB write
// followed by a probe through the TLB inside, with busy high meanwhile.
module tb_beri_cp0;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0]  rd_reg, c0_reg, hw_irq;
  logic [2:0]  rd_sel, c0_sel;
  word_t       rd_data, c0_wdata, epc_out, exc_pc, exc_badva, exc_vector;
  logic        c0_val, busy, exc_val, exc_bd, exc_refill, int_pending, tlb_write;
  cp0_op_e     c0_op;
  exc_code_e   exc_code;
  logic [7:0]  asid, lk_asid;
  logic        lk_val, lk_rdy, lk_tag, res_val, res_hit, res_tag;
  logic [26:0] lk_vpn2;
  logic [1:0]  lk_r;
  tlb_entry_t  res_entry;
  logic [31:0] n_victim_moves;
  beri_cp0 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic rdt(input int r, input int s, output word_t q);
    rd_reg = 5'(r); rd_sel = 3'(s); #1 q = rd_data;
  endtask
  task automatic commit(input cp0_op_e op, input int r = 0, input word_t d = 0, output int cyc);
    @(negedge clk); c0_val = 1; c0_op = op; c0_reg = 5'(r); c0_sel = 0; c0_wdata = d; cyc = 1;
    #1 while (busy) begin @(negedge clk); cyc++; #1; end
    @(negedge clk); c0_val = 0;
  endtask
  task automatic mtc0(input int r, input word_t d); int c; commit(C0_MTC0, r, d, c); endtask
  task automatic raise(input exc_code_e code, input word_t pc, input logic bd, input word_t bad,
                       input logic refill, output word_t vec);
    @(negedge clk); exc_val = 1; exc_code = code; exc_pc = pc; exc_bd = bd; exc_badva = bad;
    exc_refill = refill; #1 vec = exc_vector;
    @(negedge clk); exc_val = 0;
  endtask

  initial begin
    word_t v, t1, t2; int cyc;
    rd_reg = 0; rd_sel = 0; c0_val = 0; c0_op = C0_NONE; c0_reg = 0; c0_sel = 0; c0_wdata = 0;
    exc_val = 0; exc_code = EXC_INT; exc_pc = 0; exc_bd = 0; exc_badva = 0; exc_refill = 0;
    hw_irq = 0; lk_val = 0; lk_vpn2 = 0; lk_r = 0; lk_asid = 0; lk_tag = 0;
    repeat (3) @(negedge clk); rst = 0;
    rdt(12, 0, t1); check("reset Status BEV", t1, 64'h0040_0000);
    rdt(15, 0, t1); check("PRId", t1, 64'h400);
    rdt(16, 1, t1); check("Config1", t1, 64'hCEE0_7040);
    rdt(9, 0, t1); repeat (5) @(negedge clk); rdt(9, 0, t2); check("Count runs", t2 - t1, 5);
    // BEV vector
    raise(EXC_SYS, 64'h1000, 0, 0, 0, v);
    check("BEV general vector", v, 64'hFFFF_FFFF_BFC0_0380);
    mtc0(12, 0);
    rdt(12, 0, t1); check("Status written", t1, 0);
    raise(EXC_SYS, 64'hFFFF_FFFF_8000_1234, 0, 0, 0, v);
    check("general vector", v, 64'hFFFF_FFFF_8000_0180);
    rdt(14, 0, t1); check("EPC", t1, 64'hFFFF_FFFF_8000_1234); check("epc_out", epc_out, 64'hFFFF_FFFF_8000_1234);
    rdt(13, 0, t1); check("Cause.ExcCode", t1 & 64'h7C, 64'h20);
    rdt(12, 0, t1); check("EXL set", t1 & 2, 2);
    commit(C0_ERET, 0, 0, cyc); rdt(12, 0, t1); check("ERET clears EXL", t1 & 2, 0);
    // refill in a delay slot
    raise(EXC_TLBL, 64'h4004, 1, 64'h0000_0000_0060_0123, 1, v);
    check("refill vector", v, 64'hFFFF_FFFF_8000_0080);
    rdt(14, 0, t1); check("delay slot EPC = branch", t1, 64'h4000);
    rdt(13, 0, t1); check("Cause.BD", t1 >> 31, 1);
    rdt(8, 0, t1); check("BadVAddr", t1, 64'h60_0123);
    rdt(10, 0, t1); check("EntryHi.VPN2", t1 & 64'hFFFF_E000, 64'h60_0000);
    raise(EXC_TLBL, 64'h5000, 0, 64'h7000, 1, v);
    check("refill with EXL set uses general vector", v, 64'hFFFF_FFFF_8000_0180);
    rdt(14, 0, t1); check("EPC kept while EXL", t1, 64'h4000);
    commit(C0_ERET, 0, 0, cyc);
    // interrupts
    mtc0(12, 64'h0000_0401);
    hw_irq = 5'b00001; repeat (2) @(negedge clk);
    rdt(13, 0, t1); check("IP2 in Cause", (t1 >> 10) & 1, 1); check("interrupt pending", int_pending, 1);
    mtc0(12, 64'h0000_0400); check("IE clear masks", int_pending, 0);
    hw_irq = 0;
    mtc0(12, 64'h0000_8001);
    rdt(9, 0, t1); v = t1; mtc0(11, v + 20);
    check("no timer interrupt before the match", int_pending, 0);
    repeat (25) @(negedge clk);
    check("timer interrupt IP7", int_pending, 1);
    mtc0(11, 0); repeat (2) @(negedge clk); check("Compare write clears IP7", int_pending, 0);
    mtc0(12, 0);
    // TLB write indexed and probe
    mtc0(10, 64'h0000_0000_0040_0005);
    check("ASID to ports", asid, 5);
    mtc0(2, 64'h801F); mtc0(3, 64'h805F); mtc0(0, 3);
    commit(C0_TLBWI, 0, 0, cyc); check("TLB op busy 2 cycles", cyc, 3);
    mtc0(0, 0);
    commit(C0_TLBP, 0, 0, cyc); rdt(0, 0, t1); check("probe index", t1, 3);
    mtc0(10, 64'h0000_0000_0080_0005);
    commit(C0_TLBP, 0, 0, cyc); rdt(0, 0, t1); check("probe miss flag", t1 >> 31, 1);
    mtc0(0, 3); commit(C0_TLBR, 0, 0, cyc);
    rdt(10, 0, t1); check("TLBR EntryHi", t1 & 64'hFFFF_E0FF, 64'h40_0005);
    rdt(2, 0, t1); check("TLBR EntryLo0", t1 & 64'h3FFF_FFFF, 64'h801F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
