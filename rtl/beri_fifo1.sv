// beri_fifo1: single-element guarded FIFO, the pipeline register of BERI.
//
// One storage register and a full flag. enq is accepted only while empty
// (enq_rdy = !full), deq and first are valid only while full. A flush input
// empties it (used when the pipeline is redirected). The element type is a
// type parameter, so a FIFO of one token type cannot be fed another.
// Timing: data written with enq is visible on first in the next cycle.
// Same-cycle enq and deq are not allowed on a full FIFO (the single-element
// behaviour of the guarded FIFO example this follows); the result is one
// transfer every second cycle when used alone.
module beri_fifo1 #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic enq_val,
  output logic enq_rdy,
  input  T     enq_data,
  output logic deq_val,
  input  logic deq_rdy,
  output T     first
);
  T     mem;
  logic full;

  assign enq_rdy = !full;
  assign deq_val = full;
  assign first   = mem;

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= 1'b0;
      mem  <= '0;
    end else if (enq_val && !full) begin
      mem  <= enq_data;
      full <= 1'b1;
    end else if (deq_rdy && full) begin
      full <= 1'b0;
    end
  end

endmodule
