// beri_pkg: types and constants shared by the BERI 64-bit MIPS pipeline.
//
// The pipeline passes one control token per instruction from stage to stage
// (the pipeline register type). Each stage fills in the fields it owns:
// fetch sets pc/epoch/id, the scheduler sets the rename information, decode
// sets every control flag so later stages never look at the instruction word,
// execute writes the result, and memory/writeback complete it.
//
// Widths: 64-bit virtual addresses and data (MIPS64), 40-bit physical
// addresses (own choice), 32-byte cache lines moved as 256-bit words, which
// matches the 256-bit DDR2 transfer per processor cycle.
package beri_pkg;

  localparam int XLEN     = 64;
  localparam int PALEN    = 40;
  localparam int LINE_B   = 32;              // cache line bytes
  localparam int LINE_W   = LINE_B * 8;      // 256 bits

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [PALEN-1:0]  paddr_t;
  typedef logic [LINE_W-1:0] line_t;

  // Peripheral space: physical addresses at or above this are uncached.
  localparam paddr_t UNCACHED_BASE = 40'h00_4000_0000;

  // Reset PC: the reset ROM of the peripheral bridge (bridge base
  // 0x4000_0000 + ROM offset 0x3f01_0000), reached through the uncached
  // xkphys window.
  localparam word_t RESET_PC = 64'h9000_0000_7f01_0000;

  // Exception vectors (MIPS64, Status.BEV = 0).
  localparam word_t VEC_XTLB_REFILL = 64'hFFFF_FFFF_8000_0080;
  localparam word_t VEC_GENERAL     = 64'hFFFF_FFFF_8000_0180;

  // Exception codes (Cause.ExcCode).
  typedef enum logic [4:0] {
    EXC_INT  = 5'd0,
    EXC_MOD  = 5'd1,
    EXC_TLBL = 5'd2,
    EXC_TLBS = 5'd3,
    EXC_ADEL = 5'd4,
    EXC_ADES = 5'd5,
    EXC_SYS  = 5'd8,
    EXC_BP   = 5'd9,
    EXC_RI   = 5'd10
  } exc_code_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_PASSB, ALU_LINK,
    ALU_MFHI, ALU_MFLO, ALU_MFC0
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_type_e;

  typedef enum logic [3:0] {
    MD_NONE, MD_MULT, MD_MULTU, MD_DIV, MD_DIVU, MD_MTHI, MD_MTLO
  } md_op_e;

  typedef enum logic [2:0] {
    C0_NONE, C0_MTC0, C0_TLBP, C0_TLBR, C0_TLBWI, C0_TLBWR, C0_ERET
  } cp0_op_e;

  typedef enum logic [1:0] { SZ_B, SZ_H, SZ_W, SZ_D } mem_size_e;

  // Pipeline register type.
  typedef struct packed {
    logic [3:0]  id;        // fetch sequence number; id[1:0] names the result-table slot
    logic [3:0]  epoch;
    word_t       pc;
    logic [31:0] instr;
    logic        dead;      // breakpoint or debug squash
    // scheduler
    logic [4:0]  rs, rt, rd;
    logic        wr_reg;
    logic        a_fwd, b_fwd;
    logic [1:0]  a_slot, b_slot;
    // decode
    alu_op_e     alu;
    logic        w32;       // 32-bit operation, sign-extend result
    logic        b_imm;     // second operand is the immediate
    logic        shv;       // shift amount comes from rs (variable shift)
    word_t       a, b, imm;
    br_type_e    br;
    logic        link;
    logic        mem_rd, mem_wr, mem_uns;
    mem_size_e   mem_sz;
    md_op_e      md;
    logic        md_w64;
    cp0_op_e     c0;
    logic [4:0]  c0_reg;
    logic [2:0]  c0_sel;
    logic        exc;
    exc_code_e   exc_code;
    logic        refill;    // fetch exception is a TLB refill
    // execute
    word_t       result;
    logic        taken;
    word_t       target;    // resolved branch target or pc+8
    word_t       vaddr;
    logic        is_branch;
    // memory access
    logic        mem_go;    // a data-cache request was issued for it
  } ctoken_t;

  // Memory request between the caches, the merge unit, L2 and the bus.
  typedef struct packed {
    logic          write;
    logic          uncached;
    paddr_t        addr;     // 32-byte aligned for cached requests
    line_t         data;
    logic [31:0]   be;       // byte enables within the 32-byte line
    logic          src;      // 0 = instruction side, 1 = data side
  } mem_req_t;

  typedef struct packed {
    line_t data;
    logic  src;
  } mem_resp_t;

  // TLB entry (4 KB pages, EntryHi/EntryLo layout of MIPS64).
  typedef struct packed {
    logic [26:0] vpn2;       // VA[39:13]
    logic [1:0]  r;          // VA[63:62] region
    logic [7:0]  asid;
    logic        g;
    logic [27:0] pfn0;       // PA[39:12]
    logic [2:0]  c0;
    logic        d0, v0;
    logic [27:0] pfn1;
    logic [2:0]  c1;
    logic        d1, v1;
  } tlb_entry_t;

  // Event counters brought out of the CPU for observation.
  typedef struct packed {
    logic [31:0] commit, dropped, exc, intr, mispredict, fwd, sched_stall;
    logic [31:0] ic_hit, ic_miss, dc_hit, dc_miss, l2_hit, l2_miss;
    logic [31:0] itlb_miss, dtlb_miss, victim_moves, div_skips;
  } stats_t;

  // Big-endian byte lane of an access inside a 64-bit word.
  function automatic logic [7:0] be64(input logic [2:0] off, input mem_size_e sz);
    logic [7:0] m;
    unique case (sz)
      SZ_B: m = 8'b1000_0000 >> off;
      SZ_H: m = 8'b1100_0000 >> off;
      SZ_W: m = 8'b1111_0000 >> off;
      default: m = 8'hFF;
    endcase
    return m;
  endfunction

endpackage
