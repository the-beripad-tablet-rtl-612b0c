// beri_pic: programmable interrupt controller.
//
// Routes NSRC hardware interrupt sources and NSRC software-set sources to
// NOUT processor interrupt lines (the MIPS hardware interrupt inputs). Each
// source has a configuration register: bit 31 enable, bits 2:0 the output
// line. An output line is high while any enabled, pending source routed to
// it is high; sources that are not enabled are suppressed.
// Register map (byte offsets in a 16 KB window, 64-bit registers; layout of
// this design):
//   0x0000 + 8*i  config of source i: 0..NSRC-1 hardware, NSRC..2*NSRC-1 soft
//   0x2000        pending: {soft bits, hardware lines} (read only)
//   0x2080        write 1s to set soft bits
//   0x2100        write 1s to clear soft bits
// Accesses take one cycle: rdata is valid in the cycle after rd.
module beri_pic #(
  parameter int NSRC = 32,
  parameter int NOUT = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NSRC-1:0]  irq_in,
  output logic [NOUT-1:0]  irq_out,
  input  logic             rd,
  input  logic             wr,
  input  logic [13:0]      addr,
  input  logic [63:0]      wdata,
  output logic [63:0]      rdata
);
  localparam int NS = 2 * NSRC;
  logic [31:0]     cfg [NS];
  logic [NSRC-1:0] sw_pend;

  wire [NS-1:0] pending = {sw_pend, irq_in};

  always_comb begin
    irq_out = '0;
    for (int i = 0; i < NS; i++)
      if (cfg[i][31] && pending[i] && int'(cfg[i][2:0]) < NOUT)
        irq_out[cfg[i][2:0]] = 1'b1;
  end

  wire [$clog2(NS)-1:0] cidx = addr[3 +: $clog2(NS)];

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_pend <= '0; rdata <= '0;
      for (int i = 0; i < NS; i++) cfg[i] <= '0;
    end else begin
      if (wr) begin
        if (addr < 14'(8 * NS)) cfg[cidx] <= wdata[31:0];
        else if (addr == 14'h2080) sw_pend <= sw_pend | wdata[NSRC-1:0];
        else if (addr == 14'h2100) sw_pend <= sw_pend & ~wdata[NSRC-1:0];
      end
      if (rd) begin
        if (addr < 14'(8 * NS))     rdata <= {32'd0, cfg[cidx]};
        else if (addr == 14'h2000)  rdata <= 64'(pending);
        else                        rdata <= '0;
      end
    end
  end
endmodule
