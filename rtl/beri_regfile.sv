// beri_regfile: the 32 x 64-bit MIPS general register file.
//
// Two synchronous read ports, addressed by the scheduler and read out one
// cycle later for decode, and one write port driven by writeback when an
// instruction commits. A read in the same cycle as a write to the same
// register returns the new value (write-first), so a value that commits while
// a dependent instruction is being scheduled is not lost. Register 0 always
// reads as zero. Read addresses are held (rd_en low) while decode stalls.
module beri_regfile (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [4:0]  ra0,
  input  logic [4:0]  ra1,
  output logic [63:0] rd0,
  output logic [63:0] rd1,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [63:0] wd
);
  logic [63:0] regs [32];

  initial for (int i = 0; i < 32; i++) regs[i] = '0;

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
    if (rd_en) begin
      rd0 <= (ra0 == 5'd0) ? '0 : (we && wa == ra0) ? wd : regs[ra0];
      rd1 <= (ra1 == 5'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    end
  end
endmodule
