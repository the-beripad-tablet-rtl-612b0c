// tb_beri_pic: checks the programmable interrupt controller.
//
// Random configurations (enable bit, output line) are written to the
// hardware and software source registers, random hardware lines are driven
// and software bits set and cleared; every output line is compared with a
// reference computed here: a line is high while any enabled, pending source
// routed to it is high. Register read-back (one cycle after the read) and the
// pending register are checked too.
module tb_beri_pic;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] irq_in;
  logic [4:0]  irq_out;
  logic        rd, wr;
  logic [13:0] addr;
  logic [63:0] wdata, rdata;
  beri_pic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  logic [31:0] cfg [64];
  logic [31:0] sw;

  task automatic wreg(input logic [13:0] a, input logic [63:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d; @(negedge clk); wr = 0;
  endtask
  task automatic rreg(input logic [13:0] a, output logic [63:0] d);
    @(negedge clk); rd = 1; addr = a; @(negedge clk); rd = 0; d = rdata;
  endtask

  function automatic logic [4:0] expect_out();
    logic [4:0] o; logic [63:0] p;
    o = '0; p = {sw, irq_in};
    for (int i = 0; i < 64; i++) if (cfg[i][31] && p[i] && cfg[i][2:0] < 5) o[cfg[i][2:0]] = 1'b1;
    return o;
  endfunction

  initial begin
    logic [63:0] d;
    irq_in = 0; rd = 0; wr = 0; addr = 0; wdata = 0; sw = 0;
    for (int i = 0; i < 64; i++) cfg[i] = 0;
    repeat (3) @(negedge clk); rst = 0;
    check("reset: no output", irq_out, 0);
    // directed: source 3 to line 0
    wreg(14'h18, 64'h8000_0000); irq_in[3] = 1; cfg[3] = 32'h8000_0000;
    #1 check("source 3 -> line 0", irq_out, 5'b00001);
    irq_in[3] = 0; #1 check("source 3 low", irq_out, 0);
    irq_in[5] = 1; #1 check("disabled source ignored", irq_out, 0);
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom % 4;
      if (k == 0) begin
        int i; logic [31:0] c;
        i = $urandom % 64; c = {$urandom % 2 == 1, 28'd0, 3'($urandom % 6)};
        wreg(14'(8 * i), 64'(c)); cfg[i] = c;
        rreg(14'(8 * i), d); check("config read-back", d, 64'(c));
      end else if (k == 1) begin
        logic [31:0] m; m = $urandom;
        if ($urandom % 2) begin wreg(14'h2080, 64'(m)); sw |= m; end
        else begin wreg(14'h2100, 64'(m)); sw &= ~m; end
      end else begin
        irq_in = $urandom & $urandom;
      end
      #1 check("irq_out", irq_out, expect_out());
      if (n % 10 == 0) begin rreg(14'h2000, d); check("pending", d, {sw, irq_in}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
