// beri_avalon_master: turns the processor's memory requests into an
// Avalon memory-mapped master (the translation done by the Avalon top level).
//
// A request (32-byte aligned address, 256-bit data, 32 byte enables, read or
// write) is held in a single-element FIFO and presented on the bus until
// waitrequest is low. Reads then wait for readdatavalid; one read is
// outstanding at a time. The bus is 256 bits wide with byte address
// avm_address. Avalon numbers bytes little-endian (byteenable[j] and
// data[8j +: 8] belong to address offset j) while the processor is
// big-endian (offset i in bits [255-8i -: 8]), so data and byte enables are
// byte-reversed in both directions.
module beri_avalon_master
  import beri_pkg::*;
#(
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          req_val,
  output logic          req_rdy,
  input  mem_req_t      req,
  output logic          resp_val,
  output line_t         resp_data,
  output logic [AW-1:0] avm_address,
  output logic          avm_read,
  output logic          avm_write,
  output logic [255:0]  avm_writedata,
  output logic [31:0]   avm_byteenable,
  input  logic          avm_waitrequest,
  input  logic [255:0]  avm_readdata,
  input  logic          avm_readdatavalid
);
  logic     h_val, rd_pending;
  mem_req_t h;

  function automatic logic [255:0] swap256(input logic [255:0] d);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[8*i +: 8] = d[255-8*i -: 8];
    return r;
  endfunction

  function automatic logic [31:0] swap32(input logic [31:0] m);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = m[31-i];
    return r;
  endfunction

  wire issue = h_val && !rd_pending;
  wire done  = issue && !avm_waitrequest;

  beri_fifo1 #(.T(mem_req_t)) u_hold (
    .clk, .rst, .enq_val(req_val), .enq_rdy(req_rdy), .enq_data(req),
    .deq_val(h_val), .deq_rdy(done), .first(h));

  assign avm_address    = AW'(h.addr);
  assign avm_read       = issue && !h.write;
  assign avm_write      = issue && h.write;
  assign avm_writedata  = swap256(h.data);
  assign avm_byteenable = swap32(h.be);

  assign resp_val  = rd_pending && avm_readdatavalid;
  assign resp_data = swap256(avm_readdata);

  always_ff @(posedge clk) begin
    if (rst) rd_pending <= 1'b0;
    else begin
      if (done && !h.write) rd_pending <= 1'b1;
      if (resp_val)         rd_pending <= 1'b0;
    end
  end
endmodule
