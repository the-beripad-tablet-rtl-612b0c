// tb_beri_soc_top: end-to-end test of the BERI system-on-chip top.
//
// The processor boots from the reset ROM address through an Avalon memory
// model, jumps to cached code and runs a self-contained MIPS64 program that
// exercises register renaming/forwarding, a load-use hold, a predicted loop
// with a mispredicted exit, cached and uncached loads and stores (L1 hits
// and misses, an L2 hit), multiply/divide including the zero-skipping
// divider, a system call exception, explicit TLB writes with a direct-mapped
// conflict that moves an entry into the victim buffer, a TLB probe, a TLB
// refill exception handled in software, an interrupt routed through the
// PIC, and a debug breakpoint with status and PC queries. The final
// architectural registers and memory are compared with values worked out
// here by hand, and each mechanism must have happened at least once.
module tb_beri_soc_top;
  import beri_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0]  avm_address, avm_byteenable, irq;
  logic         avm_read, avm_write, avm_waitrequest, avm_readdatavalid;
  logic [255:0] avm_writedata, avm_readdata;
  logic         dbg_sink_valid, dbg_sink_ready, dbg_source_valid, dbg_source_ready;
  logic [7:0]   dbg_sink_data, dbg_source_data;
  stats_t       stats;

  beri_soc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- Avalon memory model (byte array, big-endian program)
  logic [7:0] mem [logic [31:0]];
  function automatic logic [7:0] rdb(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 8'h00;
  endfunction
  task automatic put32(input logic [31:0] a, input logic [31:0] w);
    for (int i = 0; i < 4; i++) mem[a + i] = w[31 - 8*i -: 8];
  endtask
  function automatic logic [63:0] get64(input logic [31:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[63 - 8*i -: 8] = rdb(a + i);
    return v;
  endfunction

  logic [31:0] rq_addr [$];
  int          rd_delay;
  int          irq_raise_at = -1;
  logic        done_seen = 0;
  int          cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  always_comb avm_waitrequest = (cyc % 3 == 1);

  always_ff @(posedge clk) begin
    avm_readdatavalid <= 1'b0;
    if (rst) begin
      rd_delay <= 0; irq <= '0;
    end else begin
      if ((avm_read || avm_write) && !avm_waitrequest) begin
        if (avm_read) rq_addr.push_back(avm_address);
        else begin
          for (int j = 0; j < 32; j++)
            if (avm_byteenable[j]) mem[avm_address + j] = avm_writedata[8*j +: 8];
          // device registers of the test bench
          if (avm_byteenable != 0 && avm_address == 32'h7f00_0200) irq[3] <= 1'b1;
          if (avm_byteenable != 0 && avm_address == 32'h7f00_0100) irq[3] <= 1'b0;
          if (avm_byteenable != 0 && avm_address == 32'h7f00_0000) done_seen <= 1'b1;
        end
      end
      if (rq_addr.size() != 0) begin
        if (rd_delay == 3) begin
          logic [31:0] a;
          a = rq_addr.pop_front();
          for (int j = 0; j < 32; j++) avm_readdata[8*j +: 8] <= rdb(a + j);
          avm_readdatavalid <= 1'b1;
          rd_delay <= 0;
        end else rd_delay <= rd_delay + 1;
      end
    end
  end

  // ---------------- program
  logic [31:0] pcw;
  task automatic emit(input logic [31:0] w); put32(pcw, w); pcw += 4; endtask

  localparam logic [63:0] K0 = 64'hFFFF_FFFF_8000_0000;
  logic [31:0] bp_addr, w_addr, main0, main1;

  initial begin
    // boot ROM (uncached): jump to cached main at kseg0 + 0x1000
    pcw = 32'h7f01_0000;
    emit(LUI(8, 16'h8000)); emit(ORI(8, 8, 16'h1000)); emit(JR(8)); emit(NOP());
    // XTLB refill handler at 0x080: map the faulting page pair to 0x100000
    pcw = 32'h80;
    emit(ORI(27, 0, 16'h401F)); emit(DMTC0(27, 2));
    emit(ORI(27, 0, 16'h405F)); emit(DMTC0(27, 3));
    emit(TLBWR()); emit(ADDIU(25, 25, 1)); emit(ERET());
    // general exception handler at 0x180
    pcw = 32'h180;
    emit(MFC0(26, 13)); emit(ANDI(26, 26, 16'h7c)); emit(ADDIU(27, 0, 16'h20));
    emit(BNE(26, 27, 6)); emit(NOP());
    emit(DMFC0(27, 14)); emit(DADDIU(27, 27, 4)); emit(DMTC0(27, 14));
    emit(ADDIU(24, 24, 1)); emit(ERET());
    // interrupt: count, acknowledge at the device, read back to order it
    emit(ADDIU(23, 23, 1)); emit(SD(0, 16'h100, 31)); emit(LD(26, 16'h100, 31)); emit(ERET());
    // main
    pcw = 32'h1000;
    main0 = MTC0(0, 12); main1 = ADDIU(1, 0, 5);
    emit(main0); emit(main1);
    bp_addr = pcw;
    emit(ADDIU(2, 1, 7)); emit(DADDU(3, 1, 2)); emit(DSLL32(4, 3, 4));
    emit(OR_(5, 4, 2)); emit(DSUBU(6, 5, 1)); emit(SLTU(7, 1, 2));
    emit(LUI(9, 16'h1234)); emit(ORI(9, 9, 16'h5678));
    emit(ADDIU(10, 0, 10)); emit(ADDU(11, 0, 0));
    emit(ADDU(11, 11, 10)); emit(ADDIU(10, 10, -1)); emit(BNE(10, 0, -3)); emit(NOP());
    emit(LUI(12, 16'h8000)); emit(ORI(12, 12, 16'h2000));
    emit(SD(6, 0, 12)); emit(SW(9, 8, 12)); emit(SB(1, 13, 12));
    emit(LD(13, 0, 12)); emit(LW(14, 8, 12)); emit(LBU(15, 13, 12)); emit(ADDU(16, 14, 15));
    emit(LH(22, 8, 12));
    emit(LD(21, -4096, 12));                      // code line: L2 hit
    emit(ADDIU(17, 0, 1000)); emit(ADDIU(18, 0, -7));
    emit(MULT(17, 18)); emit(MFLO(19)); emit(DIV(17, 18)); emit(MFLO(20)); emit(MFHI(8));
    emit(DDIVU(17, 1)); emit(MFLO(30));
    emit(SYSCALL());
    // explicit TLB entry for VA 0x400000 -> PA 0x200000
    emit(LUI(27, 16'h40)); emit(DMTC0(27, 10));
    emit(ORI(26, 0, 16'h801F)); emit(DMTC0(26, 2)); emit(ORI(26, 0, 16'h805F)); emit(DMTC0(26, 3));
    emit(TLBWR());
    emit(SD(9, 16'h10, 27)); emit(LD(28, 16'h10, 27));
    // VA 0x8000 hashes to the same slot: old entry moves to the victim buffer
    emit(ORI(29, 0, 16'h8000)); emit(DMTC0(29, 10));
    emit(ORI(26, 0, 16'hC01F)); emit(DMTC0(26, 2)); emit(ORI(26, 0, 16'hC05F)); emit(DMTC0(26, 3));
    emit(TLBWR());
    emit(SD(1, 0, 29)); emit(LD(3, 0, 29)); emit(LD(4, 16'h10, 27));
    emit(DMTC0(27, 10)); emit(TLBP()); emit(MFC0(5, 0));
    // refill exception
    emit(LUI(17, 16'h60)); emit(LD(10, 0, 17));
    // I/O base 0x9000_0000_7f00_0000 and the PIC
    emit(ORI(31, 0, 16'h9000)); emit(DSLL32(31, 31, 16)); emit(LUI(26, 16'h7f00)); emit(DADDU(31, 31, 26));
    emit(LUI(18, 16'h0080)); emit(ORI(18, 18, 16'h4000)); emit(DADDU(18, 18, 31));
    emit(LUI(26, 16'h8000)); emit(SD(26, 16'h18, 18));
    emit(ORI(26, 0, 16'h0401)); emit(MTC0(26, 12));
    emit(SD(0, 16'h200, 31));
    w_addr = pcw;
    emit(BEQ(23, 0, -1)); emit(NOP());
    emit(ORI(26, 0, 16'h0D0E)); emit(SD(26, 0, 31));
    emit(J(K0 + 64'(pcw))); emit(NOP());
    // data for the refill mapping
    put32(32'h0010_0000, 32'hCAFE_F00D); put32(32'h0010_0004, 32'h1234_5678);
  end

  // ---------------- debug stream driver
  task automatic dbg_send(input logic [7:0] b);
    @(negedge clk);
    dbg_sink_valid = 1'b1; dbg_sink_data = b;
    do @(posedge clk); while (!dbg_sink_ready);
    @(negedge clk) dbg_sink_valid = 1'b0;
  endtask
  task automatic dbg_recv(output logic [7:0] b);
    dbg_source_ready = 1'b1;
    do @(posedge clk); while (!dbg_source_valid);
    b = dbg_source_data;
    @(negedge clk) dbg_source_ready = 1'b0;
  endtask

  int n_bp = 0;
  initial begin
    logic [7:0]  b;
    logic [63:0] q;
    logic [63:0] bpva;
    dbg_sink_valid = 0; dbg_sink_data = 0; dbg_source_ready = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    bpva = K0 + 64'(bp_addr);
    dbg_send(8'h42);
    for (int i = 7; i >= 0; i--) dbg_send(bpva[8*i +: 8]);
    // wait for the stop
    do begin
      repeat (20) @(posedge clk);
      dbg_send(8'h53); dbg_recv(b);
    end while (!b[2]);
    n_bp++;
    check("debug status", 64'(b), 64'h07);
    dbg_send(8'h51);
    q = '0;
    for (int i = 0; i < 8; i++) begin dbg_recv(b); q = {q[55:0], b}; end
    check("debug last PC", q, K0 + 64'(bp_addr) - 64'd4);
    dbg_send(8'h43);
    dbg_send(8'h52);
  end

  // ---------------- end, checks
  function automatic logic [63:0] r(input int i); return dut.u_cpu.u_rf.regs[i]; endfunction

  initial begin
    logic [63:0] r6;
    wait (done_seen);
    repeat (20) @(posedge clk);
    r6 = ((64'd17 << 36) | 64'd12) - 64'd5;
    check("r2 addiu chain", r(2), 64'd12);
    check("r6 64-bit chain", r(6), r6);
    check("r7 sltu", r(7), 64'd1);
    check("r9 lui/ori", r(9), 64'h1234_5678);
    check("r11 loop sum", r(11), 64'd55);
    check("r13 ld", r(13), r6);
    check("r14 lw", r(14), 64'h1234_5678);
    check("r15 lbu", r(15), 64'd5);
    check("r16 load-use", r(16), 64'h1234_567D);
    check("r22 lh", r(22), 64'h1234);
    check("r21 code line via L2", r(21), {main0, main1});
    check("r19 mult lo", r(19), -64'sd7000);
    check("r20 div lo", r(20), -64'sd142);
    check("r8 div hi", r(8), 64'd6);
    check("r30 ddivu", r(30), 64'd200);
    check("r24 syscalls", r(24), 64'd1);
    check("r28 mapped ld", r(28), 64'h1234_5678);
    check("r3 second page", r(3), 64'd5);
    check("r4 from victim buffer", r(4), 64'h1234_5678);
    check("r5 tlbp index", r(5), 64'd0);
    check("r10 after refill", r(10), 64'hCAFE_F00D_1234_5678);
    check("r25 refills", r(25), 64'd1);
    check("r23 interrupts", r(23), 64'd1);
    check("mem PA 0x200010", get64(32'h0020_0010), 64'h1234_5678);
    check("mem PA 0x300000", get64(32'h0030_0000), 64'd5);
    check("mem PA 0x2000", get64(32'h2000), r6);
    // every mechanism must have happened
    check("forwarding used",       64'(stats.fwd != 0), 1);
    check("scheduler hold",        64'(stats.sched_stall != 0), 1);
    check("mispredict",            64'(stats.mispredict != 0), 1);
    check("wrong-path dropped",    64'(stats.dropped != 0), 1);
    check("exceptions = 3",        64'(stats.exc), 3);
    check("interrupt",             64'(stats.intr), 1);
    check("icache hit/miss",       64'(stats.ic_hit != 0 && stats.ic_miss != 0), 1);
    check("dcache hit/miss",       64'(stats.dc_hit != 0 && stats.dc_miss != 0), 1);
    check("l2 hit/miss",           64'(stats.l2_hit != 0 && stats.l2_miss != 0), 1);
    check("port-cache TLB misses", 64'(stats.dtlb_miss != 0), 1);
    check("victim move",           64'(stats.victim_moves != 0), 1);
    check("divider skip",          64'(stats.div_skips != 0), 1);
    check("breakpoint",            64'(n_bp), 1);
    $display("commits=%0d cycles=%0d fwd=%0d stall=%0d mispredict=%0d dropped=%0d ic %0d/%0d dc %0d/%0d l2 %0d/%0d dtlb=%0d victim=%0d skips=%0d",
      stats.commit, cyc, stats.fwd, stats.sched_stall, stats.mispredict, stats.dropped,
      stats.ic_hit, stats.ic_miss, stats.dc_hit, stats.dc_miss, stats.l2_hit, stats.l2_miss,
      stats.dtlb_miss, stats.victim_moves, stats.div_skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog; commits=%0d pc=%h", stats.commit, dut.u_cpu.ma_tok.pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
