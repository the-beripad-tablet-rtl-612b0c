// beri_fifo: N-entry FIFO used where the pipeline needs more than one slot
// of buffering (fetch tokens waiting for the instruction cache, the memory
// stage buffer). Circular buffer with read/write pointers; enq and deq may
// happen in the same cycle, so it sustains one transfer per cycle.
// flush empties it in one cycle.
module beri_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic flush,
  input  logic enq_val,
  output logic enq_rdy,
  input  T     enq_data,
  output logic deq_val,
  input  logic deq_rdy,
  output T     first
);
  localparam int AW = $clog2(DEPTH);
  T             mem [DEPTH];
  logic [AW:0]  count;
  logic [AW-1:0] rp, wp;
  logic do_enq, do_deq;

  assign enq_rdy = (count != DEPTH[AW:0]);
  assign deq_val = (count != '0);
  assign first   = mem[rp];
  assign do_enq  = enq_val && enq_rdy;
  assign do_deq  = deq_rdy && deq_val;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      count <= '0; rp <= '0; wp <= '0;
    end else begin
      if (do_enq) begin
        mem[wp] <= enq_data;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (do_deq) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_enq) - (AW+1)'(do_deq);
    end
  end
endmodule
