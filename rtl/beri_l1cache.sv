// beri_l1cache: level-1 cache, used for both the instruction cache and the
// data cache (the two differ only in parameters).
//
// Direct-mapped, 32-byte lines, 16 KB by default, write-through with no
// allocation on a store miss, virtually indexed and physically tagged. In
// the cycle a request is accepted, the tag and data arrays are read with the
// virtual index and the translation port (beri_tlb_port_cache, instantiated
// here) starts on the same virtual address. In the next cycle the physical
// address is compared with the tag: a load hit answers in that cycle, so a
// hit takes one cycle and back-to-back hits are accepted every cycle.
// A load miss reads the line from the next level and answers in the cycle
// after it arrives; a store updates the line if present and is written through as a
// byte-enabled line write (no answer is expected from below for writes; the
// store answers in the cycle after the write is accepted). Uncached accesses go
// straight to the next level with only their bytes enabled.
// Data are big-endian: byte address offset i of a line sits at bits
// [255-8i -: 8], and be[j] enables bits [8j +: 8].
// CPU side: one 64-bit doubleword per access (req_va selects it; req_be are
// the byte lanes of that doubleword, bit 7 = lowest address; for uncached
// loads they select the bytes read from the bus). The answer
// carries the whole doubleword, or an exception from translation.
// WORD_B sets the width of the data array. The data cache keeps whole 32-byte
// lines (WORD_B = 32), so a fill is one array write. The instruction cache
// uses an 8-byte array (WORD_B = 8) as the document describes: a hit reads one
// 8-byte word, and a fill writes the line one word per cycle, four cycles,
// before the load is answered; requests are not accepted during the fill.
module beri_l1cache
  import beri_pkg::*;
#(
  parameter int   SIZE_KB = 16,
  parameter logic SRC     = 1'b0,    // 0 instruction side, 1 data side
  parameter int   WORD_B  = 32       // data-array width in bytes (8 or 32)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  asid,
  // CPU side
  input  logic        req_val,
  output logic        req_rdy,
  input  word_t       req_va,
  input  logic        req_wr,
  input  word_t       req_wdata,
  input  logic [7:0]  req_be,
  output logic        resp_val,
  input  logic        resp_rdy,
  output word_t       resp_data,
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
  // next level
  output logic        mreq_val,
  input  logic        mreq_rdy,
  output mem_req_t    mreq,
  input  logic        mresp_val,
  input  mem_resp_t   mresp,
  // statistics
  output logic [31:0] n_hit,
  output logic [31:0] n_miss,
  output logic [31:0] n_tlb_miss
);
  localparam int LINES = SIZE_KB * 1024 / LINE_B;
  localparam int IW    = $clog2(LINES);
  localparam int TW    = PALEN - 5 - IW;

  localparam int NW    = LINE_B / WORD_B;     // array words per line
  localparam int WW    = WORD_B * 8;

  logic [TW-1:0] tags [LINES];
  logic [WW-1:0] data [LINES*NW];
  logic [LINES-1:0] valid;

  // request held for the lookup cycle
  typedef enum logic [2:0] { C_IDLE, C_LOOK, C_MISS, C_WAIT, C_FILL, C_RESP } st_e;
  st_e           st;
  word_t         va;
  logic          wr;
  word_t         wdata;
  logic [7:0]    be;
  logic [TW-1:0] tag_q;
  logic [WW-1:0] word_q;      // array word read in the accept cycle
  line_t         line_q;      // line from the next level
  logic [5:0]    fcnt;        // fill word counter
  logic          valid_q;
  paddr_t        pa_q;
  logic          t_unc_q;

  logic   t_val, t_rdy_in, t_unc, t_exc, t_refill, t_req_rdy;
  paddr_t t_pa;
  exc_code_e t_code;

  wire [IW-1:0] vidx = va[5+IW-1:5];
  wire [1:0]    dw   = va[4:3];
  // word of the line that holds the doubleword, and its array address
  int           wsel;
  assign wsel = int'(va[4:0]) / WORD_B;
  function automatic int aidx(input word_t a);
    return int'(a[5+IW-1:5]) * NW + int'(a[4:0]) / WORD_B;
  endfunction
  wire          tag_hit = valid_q && tag_q == t_pa[PALEN-1:5+IW];

  // byte-enabled line image of the store
  line_t       st_line;
  logic [31:0] st_be;
  always_comb begin
    st_line = '0; st_be = '0;
    st_line[255 - 64*dw -: 64] = wdata;
    st_be[31 - 8*dw -: 8]      = be;
  end

  // store merged into the array word it falls in
  logic [WW-1:0] st_word;
  always_comb begin
    logic [WW-1:0]     nw;
    logic [WORD_B-1:0] m;
    nw = st_line[255 - WW*wsel -: WW];
    m  = st_be[31 - WORD_B*wsel -: WORD_B];
    for (int j = 0; j < WORD_B; j++) st_word[8*j +: 8] = m[j] ? nw[8*j +: 8] : word_q[8*j +: 8];
  end

  logic   look_done;   // lookup cycle finishes this cycle
  logic   need_mem;
  always_comb begin
    look_done = 1'b0; need_mem = 1'b0;
    if (st == C_LOOK && t_val) begin
      if (t_exc)                     look_done = 1'b1;
      else if (wr)                   need_mem  = 1'b1;
      else if (!t_unc && tag_hit)    look_done = 1'b1;
      else                           need_mem  = 1'b1;
    end
  end

  // answer
  always_comb begin
    resp_val    = 1'b0;
    resp_data   = (st == C_RESP) ? line_q[255 - 64*dw -: 64]
                                 : word_q[WW - 1 - 64*(int'(dw) % (WORD_B/8)) -: 64];
    resp_exc    = t_exc && st == C_LOOK;
    resp_refill = t_refill;
    resp_code   = t_code;
    if (look_done) resp_val = 1'b1;
    if (st == C_WAIT && wr) resp_val = 1'b1;
    if (st == C_RESP) resp_val = 1'b1;
  end

  assign t_rdy_in = (st == C_LOOK) && (look_done ? resp_rdy : need_mem);
  assign req_rdy  = (st == C_IDLE || (look_done && resp_rdy)) && t_req_rdy;

  assign mreq_val      = (st == C_MISS);
  assign mreq.write    = wr;
  assign mreq.uncached = t_unc_q;
  assign mreq.addr     = {pa_q[PALEN-1:5], 5'd0};
  assign mreq.data     = st_line;
  assign mreq.be       = (wr || t_unc_q) ? st_be : '1;
  assign mreq.src      = SRC;


  beri_tlb_port_cache #(.TAG(SRC)) u_xlate (
    .clk, .rst, .asid,
    .req_val(req_val && req_rdy), .req_rdy(t_req_rdy), .req_va, .req_store(req_wr),
    .resp_val(t_val), .resp_rdy(t_rdy_in), .resp_pa(t_pa), .resp_uncached(t_unc),
    .resp_exc(t_exc), .resp_refill(t_refill), .resp_code(t_code),
    .lk_val, .lk_rdy, .lk_vpn2, .lk_r, .lk_asid,
    .res_val, .res_hit, .res_entry, .res_tag, .tlb_write, .n_miss(n_tlb_miss));

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; valid <= '0; n_hit <= '0; n_miss <= '0;
      va <= '0; wr <= 1'b0; wdata <= '0; be <= '0; pa_q <= '0; t_unc_q <= 1'b0;
      fcnt <= '0;
    end else begin
      unique case (st)
        C_IDLE, C_LOOK: begin
          if (st == C_LOOK && need_mem) begin
            st <= C_MISS; pa_q <= t_pa; t_unc_q <= t_unc;
            if (!wr && !t_unc) n_miss <= n_miss + 1;
            // write-through: update a present line now
            if (wr && !t_unc && tag_hit)
              data[aidx(va)] <= st_word;
          end else if (req_val && req_rdy) begin
            st <= C_LOOK; va <= req_va; wr <= req_wr; wdata <= req_wdata; be <= req_be;
            if (look_done && !t_exc) n_hit <= n_hit + 1;
          end else if (look_done && resp_rdy) begin
            st <= C_IDLE;
            if (!t_exc) n_hit <= n_hit + 1;
          end
        end
        C_MISS: if (mreq_rdy) st <= C_WAIT;
        C_WAIT: if (wr && resp_rdy) st <= C_IDLE;
        else if (!wr && mresp_val && mresp.src == SRC) begin
          st     <= (!t_unc_q && NW > 1) ? C_FILL : C_RESP;
          line_q <= mresp.data;
          fcnt   <= 6'd1;
          if (!t_unc_q) begin
            data[int'(vidx)*NW] <= mresp.data[255 -: WW];
            tags[vidx]  <= pa_q[PALEN-1:5+IW];
            valid[vidx] <= 1'b1;
          end
        end
        // narrow array: one word of the line per cycle
        C_FILL: begin
          data[int'(vidx)*NW + int'(fcnt)] <= line_q[255 - WW*int'(fcnt) -: WW];
          fcnt <= fcnt + 6'd1;
          if (int'(fcnt) == NW - 1) st <= C_RESP;
        end
        C_RESP: if (resp_rdy) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
    // array read in the accept cycle
    if (req_val && req_rdy) begin
      tag_q   <= tags[req_va[5+IW-1:5]];
      word_q  <= data[aidx(req_va)];
      valid_q <= valid[req_va[5+IW-1:5]];
    end
  end

endmodule
