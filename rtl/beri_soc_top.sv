// beri_soc_top: the BERI processor as a system-on-chip component with an
// Avalon memory-mapped master, the way it sits in the tablet's system.
//
// It holds the processor (beri_mips_top), the translation of its memory
// requests to an Avalon master (beri_avalon_master) and the BERI
// programmable interrupt controller (beri_pic), which is reached at
// physical address PIC_BASE (16 KB window) and never appears on the bus.
// Everything else (DDR2 memory at 0x0000_0000-0x3FFF_FFFF, the peripheral
// bridge at 0x4000_0000-0x7FFF_FFFF with UARTs, SD card, Ethernet, flash and
// framebuffer, boot ROM) is outside and reached through avm_*.
// Interrupt inputs irq[31:0] go through the PIC to Cause.IP2-IP6.
// The debug unit's command and reply byte streams are brought out as
// Avalon-ST style sink and source (valid/ready/data).
// PIC accesses: a read answers one cycle after the request; the PIC register
// is the doubleword selected by the request's byte enables.
module beri_soc_top
  import beri_pkg::*;
#(
  parameter word_t  RESET_VECTOR = RESET_PC,
  parameter int     L1_KB        = 16,
  parameter int     L2_KB        = 64,
  parameter paddr_t PIC_BASE     = 40'h00_7f80_4000
) (
  input  logic         clk,
  input  logic         rst,
  output logic [31:0]  avm_address,
  output logic         avm_read,
  output logic         avm_write,
  output logic [255:0] avm_writedata,
  output logic [31:0]  avm_byteenable,
  input  logic         avm_waitrequest,
  input  logic [255:0] avm_readdata,
  input  logic         avm_readdatavalid,
  input  logic [31:0]  irq,
  input  logic         dbg_sink_valid,
  output logic         dbg_sink_ready,
  input  logic [7:0]   dbg_sink_data,
  output logic         dbg_source_valid,
  input  logic         dbg_source_ready,
  output logic [7:0]   dbg_source_data,
  output stats_t       stats
);
  logic     mreq_val, mreq_rdy, mresp_val;
  mem_req_t mreq;
  line_t    mresp_data;
  logic [4:0] hw_irq;

  beri_mips_top #(.RESET_VECTOR(RESET_VECTOR), .L1_KB(L1_KB), .L2_KB(L2_KB)) u_cpu (
    .clk, .rst, .mreq_val, .mreq_rdy, .mreq, .mresp_val, .mresp_data, .hw_irq,
    .dbg_cmd_val(dbg_sink_valid), .dbg_cmd_rdy(dbg_sink_ready), .dbg_cmd_byte(dbg_sink_data),
    .dbg_rsp_val(dbg_source_valid), .dbg_rsp_rdy(dbg_source_ready), .dbg_rsp_byte(dbg_source_data),
    .stats);

  // address decode
  wire to_pic = mreq.uncached && mreq.addr[PALEN-1:14] == PIC_BASE[PALEN-1:14];

  // doubleword selected by the byte enables
  logic [1:0] dw;
  always_comb begin
    dw = 2'd0;
    for (int k = 3; k >= 0; k--) if (mreq.be[31-8*k -: 8] != 8'd0) dw = 2'(k);
  end

  logic  pic_rd_q;
  logic [1:0] pic_dw_q;
  logic [63:0] pic_rdata;

  beri_pic u_pic (
    .clk, .rst, .irq_in(irq), .irq_out(hw_irq),
    .rd(mreq_val && to_pic && !mreq.write), .wr(mreq_val && to_pic && mreq.write),
    .addr({mreq.addr[13:5], dw, 3'd0}), .wdata(mreq.data[255-64*dw -: 64]),
    .rdata(pic_rdata));

  logic  bus_rdy, bus_resp_val;
  line_t bus_resp;

  beri_avalon_master u_avm (
    .clk, .rst, .req_val(mreq_val && !to_pic), .req_rdy(bus_rdy), .req(mreq),
    .resp_val(bus_resp_val), .resp_data(bus_resp),
    .avm_address, .avm_read, .avm_write, .avm_writedata, .avm_byteenable,
    .avm_waitrequest, .avm_readdata, .avm_readdatavalid);

  assign mreq_rdy = to_pic ? 1'b1 : bus_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin pic_rd_q <= 1'b0; pic_dw_q <= '0; end
    else begin
      pic_rd_q <= mreq_val && to_pic && !mreq.write;
      pic_dw_q <= dw;
    end
  end

  always_comb begin
    mresp_val  = bus_resp_val || pic_rd_q;
    mresp_data = bus_resp;
    if (pic_rd_q) begin
      mresp_data = '0;
      mresp_data[255-64*pic_dw_q -: 64] = pic_rdata;
    end
  end
endmodule
