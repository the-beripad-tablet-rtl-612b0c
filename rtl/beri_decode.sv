// beri_decode: decode stage.
//
// Consumes the token from the scheduler together with the two register
// values read for it, and sets every control flag the rest of the pipeline
// needs (ALU operation, 32/64-bit width, immediate selection and extension,
// branch type and link, memory read/write/width/signedness, multiply/divide
// operation, CP0 operation) so that no later stage looks at the instruction
// word. Operands a (rs) and b (rt) are the register values; execute replaces
// them from its result table when the scheduler marked them forwarded.
// SYSCALL and BREAK are marked as exceptions here, as is any opcode outside
// the implemented MIPS64 subset (reserved instruction).
// Timing: one register stage; one instruction per cycle.
module beri_decode
  import beri_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_val,
  output logic    in_rdy,
  input  ctoken_t in_tok,
  input  word_t   rf_a,
  input  word_t   rf_b,
  output logic    out_val,
  input  logic    out_rdy,
  output ctoken_t out_tok
);
  ctoken_t t;
  always_comb begin
    logic [5:0]  opc, fn;
    logic [15:0] im;
    logic        ri;
    t = in_tok;
    opc = t.instr[31:26]; fn = t.instr[5:0]; im = t.instr[15:0];
    t.a = rf_a; t.b = rf_b;
    t.imm = {{48{im[15]}}, im};
    t.alu = ALU_ADD; t.w32 = 1'b0; t.b_imm = 1'b0; t.shv = 1'b0;
    t.br = BR_NONE; t.link = 1'b0; t.is_branch = 1'b0;
    t.mem_rd = 1'b0; t.mem_wr = 1'b0; t.mem_uns = 1'b0; t.mem_sz = SZ_D;
    t.md = MD_NONE; t.md_w64 = 1'b0; t.c0 = C0_NONE;
    t.c0_reg = t.instr[15:11]; t.c0_sel = t.instr[2:0];
    t.result = '0; t.taken = 1'b0; t.target = '0; t.vaddr = '0; t.mem_go = 1'b0;
    ri = 1'b0;
    unique case (opc)
      6'd0: begin
        unique case (fn)
          6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07: begin
            t.alu = (fn[1:0] == 2'b00) ? ALU_SLL : (fn[1:0] == 2'b10) ? ALU_SRL : ALU_SRA;
            t.w32 = 1'b1; t.shv = fn[2];
            t.imm = {59'd0, t.instr[10:6]};
          end
          6'h14, 6'h16, 6'h17, 6'h38, 6'h3A, 6'h3B, 6'h3C, 6'h3E, 6'h3F: begin
            t.alu = (fn[1:0] == 2'b00) ? ALU_SLL : (fn[1:0] == 2'b10) ? ALU_SRL : ALU_SRA;
            t.shv = (fn[5:3] == 3'b010);
            t.imm = {58'd0, fn[2], t.instr[10:6]};
          end
          6'h08: begin t.br = BR_JR; t.is_branch = 1'b1; end
          6'h09: begin t.br = BR_JR; t.is_branch = 1'b1; t.link = 1'b1; t.alu = ALU_LINK; end
          6'h0C: begin t.exc = 1'b1; t.exc_code = EXC_SYS; end
          6'h0D: begin t.exc = 1'b1; t.exc_code = EXC_BP; end
          6'h10: t.alu = ALU_MFHI;
          6'h12: t.alu = ALU_MFLO;
          6'h11: t.md = MD_MTHI;
          6'h13: t.md = MD_MTLO;
          6'h18: t.md = MD_MULT;
          6'h19: t.md = MD_MULTU;
          6'h1A: t.md = MD_DIV;
          6'h1B: t.md = MD_DIVU;
          6'h1C: begin t.md = MD_MULT;  t.md_w64 = 1'b1; end
          6'h1D: begin t.md = MD_MULTU; t.md_w64 = 1'b1; end
          6'h1E: begin t.md = MD_DIV;   t.md_w64 = 1'b1; end
          6'h1F: begin t.md = MD_DIVU;  t.md_w64 = 1'b1; end
          6'h20, 6'h21: begin t.alu = ALU_ADD; t.w32 = 1'b1; end
          6'h22, 6'h23: begin t.alu = ALU_SUB; t.w32 = 1'b1; end
          6'h2C, 6'h2D: t.alu = ALU_ADD;
          6'h2E, 6'h2F: t.alu = ALU_SUB;
          6'h24: t.alu = ALU_AND;
          6'h25: t.alu = ALU_OR;
          6'h26: t.alu = ALU_XOR;
          6'h27: t.alu = ALU_NOR;
          6'h2A: t.alu = ALU_SLT;
          6'h2B: t.alu = ALU_SLTU;
          default: ri = 1'b1;
        endcase
      end
      6'd1: begin
        t.br = t.instr[16] ? BR_GEZ : BR_LTZ; t.is_branch = 1'b1;
        if (t.instr[20]) begin t.link = 1'b1; t.alu = ALU_LINK; end
        if (t.instr[19:17] != 3'd0) ri = 1'b1;
      end
      6'd2: begin t.br = BR_J; t.is_branch = 1'b1; end
      6'd3: begin t.br = BR_J; t.is_branch = 1'b1; t.link = 1'b1; t.alu = ALU_LINK; end
      6'd4: begin t.br = BR_EQ;  t.is_branch = 1'b1; end
      6'd5: begin t.br = BR_NE;  t.is_branch = 1'b1; end
      6'd6: begin t.br = BR_LEZ; t.is_branch = 1'b1; end
      6'd7: begin t.br = BR_GTZ; t.is_branch = 1'b1; end
      6'd8, 6'd9:   begin t.alu = ALU_ADD;  t.b_imm = 1'b1; t.w32 = 1'b1; end
      6'd24, 6'd25: begin t.alu = ALU_ADD;  t.b_imm = 1'b1; end
      6'd10:        begin t.alu = ALU_SLT;  t.b_imm = 1'b1; end
      6'd11:        begin t.alu = ALU_SLTU; t.b_imm = 1'b1; end
      6'd12: begin t.alu = ALU_AND; t.b_imm = 1'b1; t.imm = {48'd0, im}; end
      6'd13: begin t.alu = ALU_OR;  t.b_imm = 1'b1; t.imm = {48'd0, im}; end
      6'd14: begin t.alu = ALU_XOR; t.b_imm = 1'b1; t.imm = {48'd0, im}; end
      6'd15: begin t.alu = ALU_LUI; t.b_imm = 1'b1; end
      6'd16: begin
        unique case (t.instr[25:21])
          5'd0: begin t.alu = ALU_MFC0; t.w32 = 1'b1; end
          5'd1: t.alu = ALU_MFC0;
          5'd4, 5'd5: begin t.c0 = C0_MTC0; t.alu = ALU_PASSB; end
          5'd16: unique case (fn)
            6'h01: t.c0 = C0_TLBR;
            6'h02: t.c0 = C0_TLBWI;
            6'h06: t.c0 = C0_TLBWR;
            6'h08: t.c0 = C0_TLBP;
            6'h18: t.c0 = C0_ERET;
            default: ri = 1'b1;
          endcase
          default: ri = 1'b1;
        endcase
      end
      6'd32: begin t.mem_rd = 1'b1; t.mem_sz = SZ_B; end
      6'd33: begin t.mem_rd = 1'b1; t.mem_sz = SZ_H; end
      6'd35: begin t.mem_rd = 1'b1; t.mem_sz = SZ_W; end
      6'd36: begin t.mem_rd = 1'b1; t.mem_sz = SZ_B; t.mem_uns = 1'b1; end
      6'd37: begin t.mem_rd = 1'b1; t.mem_sz = SZ_H; t.mem_uns = 1'b1; end
      6'd39: begin t.mem_rd = 1'b1; t.mem_sz = SZ_W; t.mem_uns = 1'b1; end
      6'd55: begin t.mem_rd = 1'b1; t.mem_sz = SZ_D; end
      6'd40: begin t.mem_wr = 1'b1; t.mem_sz = SZ_B; end
      6'd41: begin t.mem_wr = 1'b1; t.mem_sz = SZ_H; end
      6'd43: begin t.mem_wr = 1'b1; t.mem_sz = SZ_W; end
      6'd63: begin t.mem_wr = 1'b1; t.mem_sz = SZ_D; end
      default: ri = 1'b1;
    endcase
    if (ri && !t.exc) begin t.exc = 1'b1; t.exc_code = EXC_RI; end
    if (t.exc) begin t.wr_reg = 1'b0; t.mem_rd = 1'b0; t.mem_wr = 1'b0; t.md = MD_NONE; t.c0 = C0_NONE; end
  end

  assign in_rdy = !out_val || out_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_val <= 1'b0; out_tok <= '0;
    end else if (in_rdy) begin
      out_val <= in_val;
      if (in_val) out_tok <= t;
    end
  end
endmodule
