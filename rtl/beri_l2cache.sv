// beri_l2cache: the shared level-2 cache.
//
// Direct-mapped, 32-byte lines, 64 KB by default, serving the two level-1
// caches through beri_merge with full 32-byte requests. A request is
// accepted, the arrays are read, and in the next cycle a read hit answers
// (one-cycle hit). A read miss fetches the line from memory, fills it and
// answers with it. Writes are written through to memory (no allocation on a
// write miss) after updating a present line; writes get no answer. Uncached
// requests pass straight to memory, and uncached reads return memory's answer
// unchanged. One request is handled at a time; the next is accepted in the
// cycle the previous one finishes.
module beri_l2cache
  import beri_pkg::*;
#(
  parameter int SIZE_KB = 64
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      req_val,
  output logic      req_rdy,
  input  mem_req_t  req,
  output logic      resp_val,
  output mem_resp_t resp,
  output logic      mreq_val,
  input  logic      mreq_rdy,
  output mem_req_t  mreq,
  input  logic      mresp_val,
  input  line_t     mresp_data,
  output logic [31:0] n_hit,
  output logic [31:0] n_miss
);
  localparam int LINES = SIZE_KB * 1024 / LINE_B;
  localparam int IW    = $clog2(LINES);
  localparam int TW    = PALEN - 5 - IW;

  logic [TW-1:0]    tags [LINES];
  line_t            data [LINES];
  logic [LINES-1:0] valid;

  typedef enum logic [2:0] { L_IDLE, L_LOOK, L_MEM, L_WAIT, L_RESP } st_e;
  st_e      st;
  mem_req_t r;
  logic [TW-1:0] tag_q;
  line_t    line_q;
  logic     valid_q;

  wire [IW-1:0] idx = r.addr[5+IW-1:5];
  wire hit = valid_q && tag_q == r.addr[PALEN-1:5+IW] && !r.uncached;

  function automatic line_t merge(input line_t old, input line_t nw, input logic [31:0] m);
    line_t o;
    for (int j = 0; j < 32; j++) o[8*j +: 8] = m[j] ? nw[8*j +: 8] : old[8*j +: 8];
    return o;
  endfunction

  wire look_hit = (st == L_LOOK) && !r.write && hit;

  assign req_rdy  = (st == L_IDLE) || look_hit;
  assign resp_val = look_hit || (st == L_RESP);
  assign resp.data = line_q;
  assign resp.src  = r.src;
  assign mreq_val  = (st == L_MEM);
  assign mreq      = r;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= L_IDLE; valid <= '0; n_hit <= '0; n_miss <= '0; r <= '0;
    end else begin
      unique case (st)
        L_IDLE: if (req_val) st <= L_LOOK;
        L_LOOK: begin
          if (look_hit) begin
            n_hit <= n_hit + 1;
            st <= req_val ? L_LOOK : L_IDLE;
          end else begin
            st <= L_MEM;
            if (!r.write && !r.uncached) n_miss <= n_miss + 1;
            if (r.write && hit) data[idx] <= merge(line_q, r.data, r.be);
          end
        end
        L_MEM: if (mreq_rdy) st <= r.write ? L_IDLE : L_WAIT;
        L_WAIT: if (mresp_val) begin
          st     <= L_RESP;
          line_q <= mresp_data;
          if (!r.uncached) begin
            data[idx]  <= mresp_data;
            tags[idx]  <= r.addr[PALEN-1:5+IW];
            valid[idx] <= 1'b1;
          end
        end
        L_RESP: st <= L_IDLE;
        default: st <= L_IDLE;
      endcase
    end
    if (req_val && req_rdy) begin
      r       <= req;
      tag_q   <= tags[req.addr[5+IW-1:5]];
      line_q  <= data[req.addr[5+IW-1:5]];
      valid_q <= valid[req.addr[5+IW-1:5]];
    end
  end
endmodule
