// beri_memaccess: memory-access stage.
//
// Starts the data-cache operation of a load or store and passes every token
// on to writeback through a small FIFO (MEMQ entries), which lets ALU
// instructions keep flowing while a data access is outstanding. A token
// without a memory operation is passed on unchanged.
// A memory operation is started only when it is the oldest instruction left
// (the FIFO to writeback is empty) and belongs to the current epoch, so a
// store or an uncached load is never performed for an instruction that an
// older one would cancel; the data cache answers in order to writeback.
// Store data are placed on their big-endian byte lanes of the doubleword
// (byte offset 0 in bits 63:56) with matching byte enables; loads send the
// enables of the bytes they read.
module beri_memaccess
  import beri_pkg::*;
#(
  parameter int MEMQ = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_val,
  output logic       in_rdy,
  input  ctoken_t    in_tok,
  input  logic [3:0] epoch,
  // data cache request
  output logic       dc_val,
  input  logic       dc_rdy,
  output word_t      dc_va,
  output logic       dc_wr,
  output word_t      dc_wdata,
  output logic [7:0] dc_be,
  // to writeback
  output logic       out_val,
  input  logic       out_rdy,
  output ctoken_t    out_tok,
  output logic       q_empty
);
  logic    q_rdy;
  ctoken_t t;

  wire is_mem = (in_tok.mem_rd || in_tok.mem_wr) && !in_tok.exc && in_tok.epoch == epoch;
  wire go     = in_val && is_mem && q_empty && q_rdy && dc_rdy;

  always_comb begin
    int nb;
    t = in_tok;
    t.mem_go = is_mem;
    nb = (in_tok.mem_sz == SZ_B) ? 1 : (in_tok.mem_sz == SZ_H) ? 2 : (in_tok.mem_sz == SZ_W) ? 4 : 8;
    dc_wdata = in_tok.b << (8 * (8 - nb - int'(in_tok.vaddr[2:0])));
    dc_be    = be64(in_tok.vaddr[2:0], in_tok.mem_sz);
  end

  assign dc_val = in_val && is_mem && q_empty && q_rdy;
  assign dc_va  = in_tok.vaddr;
  assign dc_wr  = in_tok.mem_wr;
  assign in_rdy = is_mem ? go : q_rdy;

  logic q_val;
  beri_fifo #(.T(ctoken_t), .DEPTH(MEMQ)) u_q (
    .clk, .rst, .flush(1'b0),
    .enq_val(in_val && in_rdy), .enq_rdy(q_rdy), .enq_data(t),
    .deq_val(q_val), .deq_rdy(out_rdy), .first(out_tok));

  assign out_val = q_val;
  assign q_empty = !q_val;
endmodule
