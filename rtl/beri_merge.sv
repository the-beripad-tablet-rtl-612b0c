// beri_merge: the request merge between the two level-1 caches and the
// shared level-2 cache.
//
// Requests from the instruction side and the data side are arbitrated
// round-robin and registered (one cycle); the response coming back from L2
// is registered (one cycle) and presented to both caches, each picking the
// ones whose src tag is its own. Together with a one-cycle L2 hit this gives
// 3 cycles for a level-1 miss that hits in level 2.
module beri_merge
  import beri_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      i_val,
  output logic      i_rdy,
  input  mem_req_t  i_req,
  input  logic      d_val,
  output logic      d_rdy,
  input  mem_req_t  d_req,
  output logic      o_val,
  input  logic      o_rdy,
  output mem_req_t  o_req,
  input  logic      l2_resp_val,
  input  mem_resp_t l2_resp,
  output logic      resp_val,
  output mem_resp_t resp
);
  logic last_d;     // data side won the last arbitration
  logic free, pick_d;

  assign free   = !o_val || o_rdy;
  assign pick_d = d_val && (!i_val || !last_d);
  assign d_rdy  = free && pick_d;
  assign i_rdy  = free && !pick_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      o_val <= 1'b0; last_d <= 1'b0; resp_val <= 1'b0;
      o_req <= '0; resp <= '0;
    end else begin
      if (free) begin
        o_val <= i_val || d_val;
        if (pick_d)     begin o_req <= d_req; last_d <= 1'b1; end
        else if (i_val) begin o_req <= i_req; last_d <= 1'b0; end
      end
      resp_val <= l2_resp_val;
      if (l2_resp_val) resp <= l2_resp;
    end
  end
endmodule
