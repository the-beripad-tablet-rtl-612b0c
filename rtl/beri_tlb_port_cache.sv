// beri_tlb_port_cache: address translation for one TLB user (the instruction
// cache or the data cache).
//
// A request (virtual address, load/store) is registered; in the next cycle the
// answer is ready if the address is unmapped or its page is in the port's
// small cache of TLB entries: 4 entries, direct-mapped on VPN[1:0] so the
// check stays off the critical path. On a miss the port asks the shared
// beri_tlb; the entry comes back 2 cycles later, is filled, and the answer is
// ready one cycle after that: a port-cache miss costs 3 extra cycles. The whole
// cache is cleared on every TLB write so it cannot hold stale translations.
//
// Address map (MIPS64, own subset): xkphys (VA[63:62] = 2) is unmapped with
// PA = VA[39:0], uncached when VA[61:59] = 2; kseg0/kseg1
// (0xFFFF_FFFF_8000_0000 - 0xFFFF_FFFF_BFFF_FFFF) are unmapped with
// PA = VA[28:0], kseg1 uncached; everything else is mapped through the TLB.
// A physical address at or above UNCACHED_BASE is always uncached.
// Answers: pa, uncached, and an exception: refill (no entry: XTLB refill
// vector), invalid (V = 0) or modified (store to a page with D = 0).
// The answer is held until resp_rdy.
module beri_tlb_port_cache
  import beri_pkg::*;
#(
  parameter int  ENTRIES = 4,
  parameter logic TAG    = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  asid,
  input  logic        req_val,
  output logic        req_rdy,
  input  word_t       req_va,
  input  logic        req_store,
  output logic        resp_val,
  input  logic        resp_rdy,
  output paddr_t      resp_pa,
  output logic        resp_uncached,
  output logic        resp_exc,
  output logic        resp_refill,
  output exc_code_e   resp_code,
  // shared TLB
  output logic        lk_val,
  input  logic        lk_rdy,
  output logic [26:0] lk_vpn2,
  output logic [1:0]  lk_r,
  output logic [7:0]  lk_asid,
  input  logic        res_val,
  input  logic        res_hit,
  input  tlb_entry_t  res_entry,
  input  logic        res_tag,
  input  logic        tlb_write,
  output logic [31:0] n_miss
);
  localparam int IW = $clog2(ENTRIES);

  typedef struct packed {
    logic        valid;
    logic [27:0] vpn;     // VA[39:12]
    logic [1:0]  r;
    logic [7:0]  asid;
    logic        g;
    logic [27:0] pfn;
    logic [2:0]  c;
    logic        d, v;
  } pent_t;

  pent_t ent [ENTRIES];

  logic  busy, waiting, nores;
  word_t va;
  logic  store;

  wire unmapped_x = (va[63:62] == 2'b10);
  wire unmapped_k = (va[63:30] == 34'h3_FFFF_FFFE);  // 0xFFFF_FFFF_8..B
  wire [IW-1:0] idx = va[12+IW-1:12];
  pent_t e;
  assign e = ent[idx];
  wire hit = e.valid && e.vpn == va[39:12] && e.r == va[63:62] && (e.g || e.asid == asid);

  paddr_t pa;
  logic   unc;
  always_comb begin
    if (unmapped_x) begin
      pa  = va[39:0];
      unc = (va[61:59] == 3'd2);
    end else if (unmapped_k) begin
      pa  = {11'd0, va[28:0]};
      unc = va[29];
    end else begin
      pa  = {e.pfn, va[11:0]};
      unc = (e.c == 3'd2);
    end
    if (pa >= UNCACHED_BASE) unc = 1'b1;
  end

  wire ready_now = busy && !waiting && (unmapped_x || unmapped_k || hit || nores);

  assign resp_val      = ready_now;
  assign resp_pa       = pa;
  assign resp_uncached = unc;
  assign resp_refill   = nores;
  assign resp_exc      = nores || (!(unmapped_x || unmapped_k) && (!e.v || (store && !e.d)));
  assign resp_code     = (nores || !e.v) ? (store ? EXC_TLBS : EXC_TLBL) : EXC_MOD;
  assign req_rdy       = !busy || (ready_now && resp_rdy);

  assign lk_val  = busy && !waiting && !(unmapped_x || unmapped_k || hit || nores);
  assign lk_vpn2 = va[39:13];
  assign lk_r    = va[63:62];
  assign lk_asid = asid;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; waiting <= 1'b0; nores <= 1'b0; n_miss <= '0;
      va <= '0; store <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      if (req_val && req_rdy) begin
        busy <= 1'b1; va <= req_va; store <= req_store; nores <= 1'b0;
      end else if (ready_now && resp_rdy) begin
        busy <= 1'b0; nores <= 1'b0;
      end
      if (lk_val && lk_rdy) begin
        waiting <= 1'b1;
        n_miss  <= n_miss + 1;
      end
      if (res_val && res_tag == TAG && waiting) begin
        waiting <= 1'b0;
        if (res_hit) begin
          ent[idx] <= '{valid: 1'b1, vpn: va[39:12], r: va[63:62], asid: res_entry.asid,
                        g: res_entry.g,
                        pfn: va[12] ? res_entry.pfn1 : res_entry.pfn0,
                        c:   va[12] ? res_entry.c1   : res_entry.c0,
                        d:   va[12] ? res_entry.d1   : res_entry.d0,
                        v:   va[12] ? res_entry.v1   : res_entry.v0};
        end else begin
          nores <= 1'b1;
        end
      end
      if (tlb_write)
        for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
    end
  end
endmodule
