// beri_cp0: the MIPS system control coprocessor (CP0) with the TLB inside.
//
// Register file of system registers: Index(0), Random(1), EntryLo0(2),
// EntryLo1(3), PageMask(5, reads 0), Wired(6), BadVAddr(8), Count(9),
// EntryHi(10), Compare(11), Status(12), Cause(13), EPC(14), PRId(15),
// Config(16 sel 0) and Config1(16 sel 1).
// Reads are combinational (rd_reg/rd_sel -> rd_data); the pipeline reads in
// execute and never forwards CP0 values, it holds back an instruction that
// may read CP0 while a CP0 update is in flight. Writes, TLB operations and
// ERET are performed when writeback commits the instruction (c0_val); TLB
// operations take 2 cycles, during which busy is high.
// Exceptions: writeback reports a failing instruction (exc_val with code,
// PC, delay-slot flag, bad address); CP0 records EPC (the branch PC for a
// delay slot, with Cause.BD), Cause.ExcCode, BadVAddr and EntryHi.VPN2 for
// TLB faults, sets Status.EXL and returns the vector: XTLB refill (offset
// 0x080) for a refill with EXL clear, the general vector (0x180) otherwise,
// from the BEV base chosen by Status.BEV.
// Interrupts: Cause.IP[6:2] follow the hardware lines, IP7 is set when
// Count equals Compare and cleared by a write to Compare; int_pending is
// IE && !EXL && !ERL && (IP & IM) != 0. Count increments every cycle.
// The TLB entries are in beri_tlb; EntryHi.ASID goes to the translation
// ports. Config1 reports direct-mapped 16 KB caches with 32-byte lines.
module beri_cp0
  import beri_pkg::*;
#(
  parameter logic [31:0] PRID    = 32'h0000_0400,
  parameter logic [31:0] CONFIG0 = 32'h8000_C083,
  parameter logic [31:0] CONFIG1 = 32'hCEE0_7040
) (
  input  logic        clk,
  input  logic        rst,
  // read
  input  logic [4:0]  rd_reg,
  input  logic [2:0]  rd_sel,
  output word_t       rd_data,
  // commit of CP0 instructions
  input  logic        c0_val,
  input  cp0_op_e     c0_op,
  input  logic [4:0]  c0_reg,
  input  logic [2:0]  c0_sel,
  input  word_t       c0_wdata,
  output logic        busy,
  output word_t       epc_out,
  // exceptions
  input  logic        exc_val,
  input  exc_code_e   exc_code,
  input  word_t       exc_pc,
  input  logic        exc_bd,
  input  word_t       exc_badva,
  input  logic        exc_refill,
  output word_t       exc_vector,
  // interrupts
  input  logic [4:0]  hw_irq,
  output logic        int_pending,
  // to the translation ports
  output logic [7:0]  asid,
  // TLB lookup path (shared by the two ports)
  input  logic        lk_val,
  output logic        lk_rdy,
  input  logic [26:0] lk_vpn2,
  input  logic [1:0]  lk_r,
  input  logic [7:0]  lk_asid,
  input  logic        lk_tag,
  output logic        res_val,
  output logic        res_hit,
  output tlb_entry_t  res_entry,
  output logic        res_tag,
  output logic        tlb_write,
  output logic [31:0] n_victim_moves
);
  logic [7:0]  index_r;
  logic        probe_p;
  logic [3:0]  random_r, wired_r;
  word_t       entrylo0, entrylo1, badva, count, entryhi, compare, epc;
  logic [31:0] status, cause;
  logic        tlb_busy;

  assign asid    = entryhi[7:0];
  assign epc_out = epc;

  // EntryHi/EntryLo -> TLB entry
  tlb_entry_t wr_entry;
  always_comb begin
    wr_entry.vpn2 = entryhi[39:13];
    wr_entry.r    = entryhi[63:62];
    wr_entry.asid = entryhi[7:0];
    wr_entry.g    = entrylo0[0] & entrylo1[0];
    wr_entry.pfn0 = entrylo0[33:6]; wr_entry.c0 = entrylo0[5:3];
    wr_entry.d0   = entrylo0[2];    wr_entry.v0 = entrylo0[1];
    wr_entry.pfn1 = entrylo1[33:6]; wr_entry.c1 = entrylo1[5:3];
    wr_entry.d1   = entrylo1[2];    wr_entry.v1 = entrylo1[1];
  end

  logic       op_rdy, op_done, probe_miss;
  logic [7:0] probe_index;
  tlb_entry_t read_entry;
  wire  tlb_op = c0_val && (c0_op == C0_TLBP || c0_op == C0_TLBR ||
                            c0_op == C0_TLBWI || c0_op == C0_TLBWR);

  beri_tlb u_tlb (
    .clk, .rst,
    .lk_val, .lk_rdy, .lk_vpn2, .lk_r, .lk_asid, .lk_tag,
    .res_val, .res_hit, .res_entry, .res_tag,
    .op_val(tlb_op && !tlb_busy), .op_rdy, .op(c0_op),
    .op_index(c0_op == C0_TLBWR ? 8'd16 : index_r),
    .op_entry(wr_entry), .wired(wired_r),
    .op_done, .probe_miss, .probe_index, .read_entry, .tlb_write, .n_victim_moves);

  assign busy = tlb_op && !op_done;

  // reads
  always_comb begin
    rd_data = '0;
    unique case (rd_reg)
      5'd0:  rd_data = {32'd0, probe_p, 23'd0, index_r};
      5'd1:  rd_data = {60'd0, random_r};
      5'd2:  rd_data = entrylo0;
      5'd3:  rd_data = entrylo1;
      5'd6:  rd_data = {60'd0, wired_r};
      5'd8:  rd_data = badva;
      5'd9:  rd_data = {32'd0, count[31:0]};
      5'd10: rd_data = entryhi;
      5'd11: rd_data = {32'd0, compare[31:0]};
      5'd12: rd_data = {32'd0, status};
      5'd13: rd_data = {32'd0, cause};
      5'd14: rd_data = epc;
      5'd15: rd_data = {32'd0, PRID};
      5'd16: rd_data = {32'd0, (rd_sel == 3'd1) ? CONFIG1 : CONFIG0};
      default: rd_data = '0;
    endcase
  end

  // exception vector
  always_comb begin
    word_t base;
    base = status[22] ? 64'hFFFF_FFFF_BFC0_0200 : 64'hFFFF_FFFF_8000_0000;
    exc_vector = base + ((exc_refill && !status[1]) ? 64'h080 : 64'h180);
  end

  assign int_pending = status[0] && !status[1] && !status[2] &&
                       ((cause[15:8] & status[15:8]) != 8'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      index_r <= '0; probe_p <= 1'b0; random_r <= 4'd15; wired_r <= '0;
      entrylo0 <= '0; entrylo1 <= '0; badva <= '0; count <= '0; entryhi <= '0;
      compare <= '0; epc <= '0; cause <= '0; tlb_busy <= 1'b0;
      status <= 32'h0040_0000;          // BEV = 1, kernel mode after reset
    end else begin
      count <= count + 64'd1;
      random_r <= (random_r <= wired_r) ? 4'd15 : random_r - 4'd1;
      cause[14:10] <= hw_irq;
      if (count[31:0] + 32'd1 == compare[31:0]) cause[15] <= 1'b1;
      if (tlb_op && !tlb_busy && op_rdy) tlb_busy <= 1'b1;
      if (op_done) tlb_busy <= 1'b0;
      if (c0_val) begin
        unique case (c0_op)
          C0_MTC0: unique case (c0_reg)
            5'd0:  index_r  <= c0_wdata[7:0];
            5'd2:  entrylo0 <= c0_wdata;
            5'd3:  entrylo1 <= c0_wdata;
            5'd6:  begin wired_r <= c0_wdata[3:0]; random_r <= 4'd15; end
            5'd9:  count    <= c0_wdata;
            5'd10: entryhi  <= c0_wdata;
            5'd11: begin compare <= c0_wdata; cause[15] <= 1'b0; end
            5'd12: status   <= c0_wdata[31:0];
            5'd13: cause[9:8] <= c0_wdata[9:8];
            5'd14: epc      <= c0_wdata;
            default: ;
          endcase
          C0_ERET: begin
            if (status[2]) status[2] <= 1'b0;
            else           status[1] <= 1'b0;
          end
          default: ;
        endcase
      end
      if (op_done) begin
        if (c0_op == C0_TLBP) begin
          probe_p <= probe_miss;
          if (!probe_miss) index_r <= probe_index;
        end
        if (c0_op == C0_TLBR) begin
          entryhi  <= {read_entry.r, 22'd0, read_entry.vpn2, 5'd0, read_entry.asid};
          entrylo0 <= {30'd0, read_entry.pfn0, read_entry.c0, read_entry.d0, read_entry.v0, read_entry.g};
          entrylo1 <= {30'd0, read_entry.pfn1, read_entry.c1, read_entry.d1, read_entry.v1, read_entry.g};
        end
      end
      if (exc_val) begin
        if (!status[1]) begin
          epc       <= exc_bd ? exc_pc - 64'd4 : exc_pc;
          cause[31] <= exc_bd;
        end
        cause[6:2] <= exc_code;
        status[1]  <= 1'b1;
        if (exc_code inside {EXC_TLBL, EXC_TLBS, EXC_MOD, EXC_ADEL, EXC_ADES})
          badva <= exc_badva;
        if (exc_code inside {EXC_TLBL, EXC_TLBS, EXC_MOD})
          entryhi <= {exc_badva[63:62], 22'd0, exc_badva[39:13], 5'd0, entryhi[7:0]};
      end
    end
  end
endmodule
