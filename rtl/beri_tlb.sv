// beri_tlb: the BERI translation look-aside buffer.
//
// 16 fully associative entries held in registers (indices 0-15) and 128
// direct-mapped entries held in block RAM (indices 16-143). The direct-mapped
// slot of a virtual page is 16 + hash(VPN2), hash = VPN2[6:0] ^ VPN2[13:7].
// There is one lookup path; each translation user keeps its own small cache
// of entries (beri_tlb_port_cache) in front of it.
//
// Operations requested by CP0:
//  * probe        searches both parts; returns the index or the miss flag.
//  * read         returns the entry at an index.
//  * write indexed writes index 0-15 directly; an index of 16 or more
//                 writes the entry's own direct-mapped slot instead, so a
//                 lookup always finds it.
//  * write random writes the entry's direct-mapped slot. A different valid
//                 entry already there is moved into the associative entries
//                 at or above WIRED, which act as a victim buffer filled
//                 round-robin, so two pages that hash alike can coexist.
//                 Associative entries at or above WIRED holding the same page
//                 are dropped first, so a page is never present twice.
// Timing: lookups and operations are accepted when the other is not in
// progress; a lookup result appears 2 cycles after acceptance (block RAM
// read, then compare), an operation completes 2 cycles after acceptance.
// tlb_write pulses when an entry changes, for the per-port caches.
// Only 4 KB pages are supported (PageMask reads as zero and is ignored).
module beri_tlb
  import beri_pkg::*;
#(
  parameter int N_ASSOC = 16,
  parameter int N_DM    = 128
) (
  input  logic        clk,
  input  logic        rst,
  // lookup
  input  logic        lk_val,
  output logic        lk_rdy,
  input  logic [26:0] lk_vpn2,
  input  logic [1:0]  lk_r,
  input  logic [7:0]  lk_asid,
  input  logic        lk_tag,        // requester id, returned with the result
  output logic        res_val,
  output logic        res_hit,
  output tlb_entry_t  res_entry,
  output logic        res_tag,
  // CP0 operations
  input  logic        op_val,
  output logic        op_rdy,
  input  cp0_op_e     op,            // C0_TLBP, C0_TLBR, C0_TLBWI, C0_TLBWR
  input  logic [7:0]  op_index,
  input  tlb_entry_t  op_entry,      // from EntryHi / EntryLo0 / EntryLo1
  input  logic [3:0]  wired,
  output logic        op_done,
  output logic        probe_miss,
  output logic [7:0]  probe_index,
  output tlb_entry_t  read_entry,
  output logic        tlb_write,
  output logic [31:0] n_victim_moves
);
  localparam int DMW = $clog2(N_DM);

  tlb_entry_t assoc [N_ASSOC];
  logic [N_ASSOC-1:0] assoc_used;
  tlb_entry_t dm [N_DM];
  logic [N_DM-1:0]    dm_used;

  function automatic logic [DMW-1:0] hash(input logic [26:0] v);
    return v[DMW-1:0] ^ v[2*DMW-1:DMW];
  endfunction

  function automatic logic match(input tlb_entry_t e, input logic [26:0] v,
                                 input logic [1:0] r, input logic [7:0] want_asid);
    return e.vpn2 == v && e.r == r && (e.g || e.asid == want_asid);
  endfunction

  // Stage 1 registers (one request in flight, lookup or operation).
  typedef enum logic [1:0] { S_IDLE, S_LK, S_OP } st_e;
  st_e         st;
  logic [26:0] s_vpn2;
  logic [1:0]  s_r;
  logic [7:0]  s_asid;
  logic        s_tag;
  cp0_op_e     s_op;
  logic [7:0]  s_index;
  tlb_entry_t  s_entry;
  tlb_entry_t  dm_q;        // block RAM read data
  logic        dm_used_q;
  logic [DMW-1:0] dm_idx_q;
  logic [3:0]  vptr;        // next victim-buffer slot

  assign op_rdy = (st == S_IDLE);
  assign lk_rdy = (st == S_IDLE) && !op_val;

  logic [DMW-1:0] rd_idx;
  always_comb begin
    if (op_val) begin
      if (op == C0_TLBR) rd_idx = DMW'(op_index - 8'(N_ASSOC));
      else               rd_idx = hash(op_entry.vpn2);
    end else             rd_idx = hash(lk_vpn2);
  end

  // Associative search on the stage-1 request.
  logic [N_ASSOC-1:0] amatch;
  logic               a_hit, d_hit;
  logic [3:0]         a_idx;
  always_comb begin
    a_hit = 1'b0; a_idx = '0;
    for (int i = 0; i < N_ASSOC; i++) begin
      amatch[i] = assoc_used[i] && match(assoc[i], s_vpn2, s_r, s_asid);
      if (amatch[i] && !a_hit) begin a_hit = 1'b1; a_idx = 4'(i); end
    end
    d_hit = dm_used_q && match(dm_q, s_vpn2, s_r, s_asid);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; res_val <= 1'b0; op_done <= 1'b0; tlb_write <= 1'b0;
      assoc_used <= '0; dm_used <= '0; vptr <= 4'd0; n_victim_moves <= '0;
      probe_miss <= 1'b0; probe_index <= '0; read_entry <= '0;
      res_hit <= 1'b0; res_entry <= '0; res_tag <= 1'b0;
    end else begin
      res_val <= 1'b0; op_done <= 1'b0; tlb_write <= 1'b0;
      unique case (st)
        S_IDLE: begin
          dm_q      <= dm[rd_idx];
          dm_used_q <= dm_used[rd_idx];
          dm_idx_q  <= rd_idx;
          if (op_val) begin
            st <= S_OP; s_op <= op; s_index <= op_index; s_entry <= op_entry;
            s_vpn2 <= op_entry.vpn2; s_r <= op_entry.r; s_asid <= op_entry.asid;
          end else if (lk_val) begin
            st <= S_LK; s_vpn2 <= lk_vpn2; s_r <= lk_r; s_asid <= lk_asid; s_tag <= lk_tag;
          end
        end
        S_LK: begin
          st        <= S_IDLE;
          res_val   <= 1'b1;
          res_tag   <= s_tag;
          res_hit   <= a_hit || d_hit;
          res_entry <= a_hit ? assoc[a_idx] : dm_q;
        end
        S_OP: begin
          st      <= S_IDLE;
          op_done <= 1'b1;
          unique case (s_op)
            C0_TLBP: begin
              probe_miss  <= !(a_hit || d_hit);
              probe_index <= a_hit ? 8'(a_idx) : 8'(N_ASSOC) + 8'(dm_idx_q);
            end
            C0_TLBR: begin
              read_entry <= (s_index < 8'(N_ASSOC)) ? assoc[s_index[3:0]] : dm_q;
            end
            C0_TLBWI: begin
              tlb_write <= 1'b1;
              if (s_index < 8'(N_ASSOC)) begin
                assoc[s_index[3:0]]      <= s_entry;
                assoc_used[s_index[3:0]] <= 1'b1;
              end else begin
                dm[dm_idx_q]      <= s_entry;
                dm_used[dm_idx_q] <= 1'b1;
              end
            end
            C0_TLBWR: begin
              tlb_write <= 1'b1;
              // drop copies of this page from the victim buffer
              for (int i = 0; i < N_ASSOC; i++)
                if (4'(i) >= wired && amatch[i]) assoc_used[i] <= 1'b0;
              // move a different occupant of the slot into the victim buffer
              if (dm_used_q && !(dm_q.vpn2 == s_entry.vpn2 && dm_q.r == s_entry.r)) begin
                assoc[vptr]      <= dm_q;
                assoc_used[vptr] <= 1'b1;
                vptr <= (vptr == 4'(N_ASSOC-1)) ? wired : vptr + 4'd1;
                n_victim_moves <= n_victim_moves + 1;
              end
              dm[dm_idx_q]      <= s_entry;
              dm_used[dm_idx_q] <= 1'b1;
            end
            default: ;
          endcase
        end
        default: st <= S_IDLE;
      endcase
      if (vptr < wired) vptr <= wired;
    end
  end
endmodule
