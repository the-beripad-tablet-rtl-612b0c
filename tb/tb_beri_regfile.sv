// tb_beri_regfile: checks the 32 x 64-bit register file.
//
// Random writes and reads on both ports are compared with a reference
// array: the read data appear one cycle after the address, a read of the
// register being written in the same cycle returns the new value, register 0
// reads zero whatever is written to it, and the outputs hold while rd_en is
// low.
module tb_beri_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, we;
  logic [4:0] ra0, ra1, wa;
  logic [63:0] rd0, rd1, wd;
  beri_regfile dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  logic [63:0] r [32];

  initial begin
    logic [63:0] e0, e1;
    rd_en = 0; we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    for (int i = 0; i < 32; i++) r[i] = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rd_en = ($urandom % 5 != 0); we = $urandom % 2; wa = 5'($urandom);
      wd = {$urandom, $urandom}; ra0 = 5'($urandom); ra1 = ($urandom % 3 == 0) ? wa : 5'($urandom);
      e0 = rd0; e1 = rd1;
      if (rd_en) begin
        e0 = (ra0 == 0) ? 0 : (we && wa == ra0) ? wd : r[ra0];
        e1 = (ra1 == 0) ? 0 : (we && wa == ra1) ? wd : r[ra1];
      end
      if (we && wa != 0) r[wa] = wd;
      @(negedge clk);
      check("port 0", rd0, e0); check("port 1", rd1, e1);
      we = 0; rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
