// beri_execute: execute stage with the 4-entry result table.
//
// Operands come from decode, except those the scheduler marked forwarded,
// which are read from the result table (slot a_slot/b_slot). The stage then
// performs, by case: arithmetic and logic (64-bit, or 32-bit with sign
// extension), shifts, branch resolution (condition, target, link value),
// memory address generation on its own adder, CP0 reads, HI/LO reads, and
// starting multiply/divide in beri_muldiv. Its result is written into the
// table slot of the instruction (id[1:0]) so the next instructions can use it
// before it is written back; loads fill their slot from writeback (tab_*).
// Unaligned memory addresses raise address-error exceptions here.
// Multiply/divide and HI/LO reads wait until the unit is idle; a
// multiply/divide is also started only when no older instruction is left
// downstream (older_empty) and it belongs to the current epoch, so a
// discarded instruction never changes HI/LO.
// Timing: one register stage; one instruction per cycle unless waiting.
module beri_execute
  import beri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_val,
  output logic       in_rdy,
  input  ctoken_t    in_tok,
  output logic       out_val,
  input  logic       out_rdy,
  output ctoken_t    out_tok,
  input  logic [3:0] epoch,
  input  logic       older_empty,
  // result-table write from writeback (load data)
  input  logic       tab_we,
  input  logic [1:0] tab_slot,
  input  word_t      tab_data,
  // CP0 read
  output logic [4:0] c0_rd_reg,
  output logic [2:0] c0_rd_sel,
  input  word_t      c0_rd_data,
  // multiply / divide
  output logic       md_start,
  output md_op_e     md_op,
  output logic       md_w64,
  output word_t      md_a,
  output word_t      md_b,
  input  logic       md_busy,
  input  word_t      hi,
  input  word_t      lo
);
  word_t table_r [4];

  word_t   a, b, bo, r, va_c;
  logic    mis;
  ctoken_t t;
  logic    wait_md;

  function automatic word_t sx32(input logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  always_comb begin
    logic [5:0] sh;
    a  = in_tok.a_fwd ? table_r[in_tok.a_slot] : in_tok.a;
    b  = in_tok.b_fwd ? table_r[in_tok.b_slot] : in_tok.b;
    bo = in_tok.b_imm ? in_tok.imm : b;
    sh = in_tok.shv ? a[5:0] : in_tok.imm[5:0];
    if (in_tok.w32) sh[5] = 1'b0;
    t  = in_tok;
    unique case (in_tok.alu)
      ALU_ADD:   r = a + bo;
      ALU_SUB:   r = a - bo;
      ALU_AND:   r = a & bo;
      ALU_OR:    r = a | bo;
      ALU_XOR:   r = a ^ bo;
      ALU_NOR:   r = ~(a | bo);
      ALU_SLT:   r = {63'd0, $signed(a) < $signed(bo)};
      ALU_SLTU:  r = {63'd0, a < bo};
      ALU_SLL:   r = b << sh;
      ALU_SRL:   r = in_tok.w32 ? {32'd0, b[31:0]} >> sh : b >> sh;
      ALU_SRA:   r = in_tok.w32 ? word_t'($signed(sx32(b[31:0])) >>> sh)
                                : word_t'($signed(b) >>> sh);
      ALU_LUI:   r = {in_tok.imm[47:0], 16'd0};
      ALU_PASSB: r = b;
      ALU_LINK:  r = in_tok.pc + 64'd8;
      ALU_MFHI:  r = hi;
      ALU_MFLO:  r = lo;
      ALU_MFC0:  r = c0_rd_data;
      default:   r = '0;
    endcase
    if (in_tok.w32) r = sx32(r[31:0]);
    t.result = r;
    t.a = a;
    t.b = b;
    // branches
    unique case (in_tok.br)
      BR_EQ:  t.taken = (a == b);
      BR_NE:  t.taken = (a != b);
      BR_LEZ: t.taken = $signed(a) <= 0;
      BR_GTZ: t.taken = $signed(a) > 0;
      BR_LTZ: t.taken = $signed(a) < 0;
      BR_GEZ: t.taken = $signed(a) >= 0;
      BR_J, BR_JR: t.taken = 1'b1;
      default: t.taken = 1'b0;
    endcase
    if (!t.taken)             t.target = in_tok.pc + 64'd8;
    else if (in_tok.br == BR_J)  t.target = {in_tok.pc[63:28], in_tok.instr[25:0], 2'b00};
    else if (in_tok.br == BR_JR) t.target = a;
    else                      t.target = in_tok.pc + 64'd4 + {in_tok.imm[61:0], 2'b00};
    // memory address, alignment
    t.vaddr = va_c;
    if (mis) begin
      t.exc = 1'b1; t.exc_code = in_tok.mem_wr ? EXC_ADES : EXC_ADEL;
      t.mem_rd = 1'b0; t.mem_wr = 1'b0;
    end
  end

  // dedicated address adder and alignment check
  always_comb begin
    va_c = (in_tok.a_fwd ? table_r[in_tok.a_slot] : in_tok.a) + in_tok.imm;
    mis  = 1'b0;
    if ((in_tok.mem_rd || in_tok.mem_wr) && !in_tok.exc)
      unique case (in_tok.mem_sz)
        SZ_H: mis = va_c[0];
        SZ_W: mis = va_c[1:0] != 2'b00;
        SZ_D: mis = va_c[2:0] != 3'b000;
        default: mis = 1'b0;
      endcase
  end

  wire cur    = (in_tok.epoch == epoch) && !in_tok.exc;
  wire is_md  = in_tok.md != MD_NONE;
  wire rd_hl  = in_tok.alu == ALU_MFHI || in_tok.alu == ALU_MFLO;
  assign wait_md = in_val && ((is_md && cur && (md_busy || !older_empty)) || (rd_hl && md_busy));

  assign c0_rd_reg = in_tok.c0_reg;
  assign c0_rd_sel = in_tok.c0_sel;

  assign in_rdy   = (!out_val || out_rdy) && !wait_md;
  assign md_start = in_val && in_rdy && is_md && cur;
  assign md_op    = in_tok.md;
  assign md_w64   = in_tok.md_w64;
  assign md_a     = a;
  assign md_b     = b;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_val <= 1'b0; out_tok <= '0;
      for (int i = 0; i < 4; i++) table_r[i] <= '0;
    end else begin
      if (out_rdy || !out_val) out_val <= in_val && in_rdy;
      if (in_rdy) begin
        if (in_val) begin
          out_tok <= t;
          if (in_tok.wr_reg && !in_tok.mem_rd) table_r[in_tok.id[1:0]] <= r;
        end
      end
      if (tab_we) table_r[tab_slot] <= tab_data;
    end
  end
endmodule
