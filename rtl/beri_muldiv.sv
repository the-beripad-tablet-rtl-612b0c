// beri_muldiv: the asynchronous MIPS multiply/divide unit and its HI/LO pair.
//
// Execute starts an operation and carries on; a later MFHI/MFLO waits until
// busy is low. Multiply is a 2-stage pipeline after the start cycle (64x64 ->
// 128-bit product registered, then sign/width adjustment into HI/LO), so
// HI/LO are valid 2 cycles after start. Divide is restoring radix-4: two
// quotient bits per cycle, 32 cycles for a 64-bit dividend (16 for 32-bit
// operations). While the partial remainder is zero and the next 8 dividend
// bits are zero, 8 bits are retired in a single cycle, so small dividends
// finish early. Signed operations divide magnitudes and fix the signs at the
// end (quotient negative when the signs differ, remainder takes the sign of
// the dividend). 32-bit operations (MULT, DIV, ...) sign-extend their 32-bit
// results into HI and LO. Division by zero gives an undefined-but-harmless
// value, as MIPS allows. MTHI/MTLO write HI/LO directly.
// Interface: start with op/w64/a/b when busy is low; busy, hi, lo.
module beri_muldiv
  import beri_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  md_op_e op,
  input  logic   w64,
  input  word_t  a,
  input  word_t  b,
  output logic   busy,
  output word_t  hi,
  output word_t  lo,
  output logic [31:0] n_skips
);
  typedef enum logic [1:0] { M_IDLE, M_MUL, M_DIV, M_FIX } st_e;
  st_e st;

  logic [127:0] prod;
  logic         m_w64;
  logic         sgn;
  logic         neg_q, neg_r;
  logic [64:0]  rem;
  logic [63:0]  quo, dvd, dvs;
  logic [6:0]   cnt;

  function automatic word_t sx32(input logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  // operand preparation
  word_t ua, ub;
  logic  sa, sb;
  always_comb begin
    sa = (op == MD_DIV || op == MD_MULT) && (w64 ? a[63] : a[31]);
    sb = (op == MD_DIV || op == MD_MULT) && (w64 ? b[63] : b[31]);
    ua = w64 ? a : {32'd0, a[31:0]};
    ub = w64 ? b : {32'd0, b[31:0]};
    if (sa) ua = w64 ? -a : {32'd0, -a[31:0]};
    if (sb) ub = w64 ? -b : {32'd0, -b[31:0]};
  end

  // two restoring steps
  logic [64:0] r1, r2;
  logic [63:0] d1, d2, q2;
  always_comb begin
    r1 = {rem[63:0], dvd[63]};
    d1 = {dvd[62:0], 1'b0};
    q2 = {quo[61:0], 2'b00};
    if (r1 >= {1'b0, dvs}) begin r1 = r1 - {1'b0, dvs}; q2[1] = 1'b1; end
    r2 = {r1[63:0], d1[63]};
    d2 = {d1[62:0], 1'b0};
    if (r2 >= {1'b0, dvs}) begin r2 = r2 - {1'b0, dvs}; q2[0] = 1'b1; end
  end

  assign busy = (st != M_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE; hi <= '0; lo <= '0; n_skips <= '0;
      prod <= '0; rem <= '0; quo <= '0; dvd <= '0; dvs <= '0; cnt <= '0;
      m_w64 <= 1'b0; sgn <= 1'b0; neg_q <= 1'b0; neg_r <= 1'b0;
    end else begin
      unique case (st)
        M_IDLE: if (start) begin
          m_w64 <= w64;
          unique case (op)
            MD_MULT, MD_MULTU: begin
              st    <= M_MUL;
              sgn   <= sa ^ sb;
              prod  <= {64'd0, ua} * {64'd0, ub};
            end
            MD_DIV, MD_DIVU: begin
              st    <= M_DIV;
              neg_q <= sa ^ sb;
              neg_r <= sa;
              rem   <= '0;
              quo   <= '0;
              dvs   <= ub;
              dvd   <= w64 ? ua : {ua[31:0], 32'd0};
              cnt   <= w64 ? 7'd64 : 7'd32;
            end
            MD_MTHI: hi <= a;
            MD_MTLO: lo <= a;
            default: ;
          endcase
        end
        M_MUL: begin
          logic [127:0] p;
          p = sgn ? -prod : prod;
          if (m_w64) begin hi <= p[127:64]; lo <= p[63:0]; end
          else       begin hi <= sx32(p[63:32]); lo <= sx32(p[31:0]); end
          st <= M_IDLE;
        end
        M_DIV: begin
          if (rem == '0 && cnt >= 7'd8 && dvd[63:56] == 8'd0) begin
            dvd <= {dvd[55:0], 8'd0};
            quo <= {quo[55:0], 8'd0};
            cnt <= cnt - 7'd8;
            n_skips <= n_skips + 1;
            if (cnt == 7'd8) st <= M_FIX;
          end else begin
            rem <= r2;
            dvd <= d2;
            quo <= q2;
            cnt <= cnt - 7'd2;
            if (cnt == 7'd2) st <= M_FIX;
          end
        end
        M_FIX: begin
          word_t q, r;
          q = neg_q ? -quo : quo;
          r = neg_r ? -rem[63:0] : rem[63:0];
          if (m_w64) begin hi <= r; lo <= q; end
          else       begin hi <= sx32(r[31:0]); lo <= sx32(q[31:0]); end
          st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
