// tb_beri_muldiv: checks the multiply/divide unit.
//
// Random signed and unsigned 32- and 64-bit multiplies and divides are
// compared with SystemVerilog arithmetic. The cycle counts are checked too:
// a multiply leaves busy after its two pipeline stages, a 64-bit divide of a
// full-width dividend takes 32 two-bit steps plus the sign-fix cycle, and a
// small dividend must finish early through the 8-bit zero skip.
module tb_beri_muldiv;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy, w64;
  md_op_e op;
  word_t a, b, hi, lo;
  logic [31:0] n_skips;
  beri_muldiv dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // run one operation, return the number of cycles busy stays high
  task automatic run(input md_op_e o, input logic w, input word_t x, y, output int cyc);
    @(negedge clk); start = 1; op = o; w64 = w; a = x; b = y;
    @(negedge clk); start = 0; cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  function automatic word_t sx(input logic [31:0] v); return {{32{v[31]}}, v}; endfunction

  initial begin
    int cyc;
    word_t x, y;
    logic [127:0] p;
    start = 0; op = MD_NONE; w64 = 0; a = 0; b = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 40; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (i % 4 == 1) y = y >> ($urandom % 60);
      if (y == 0) y = 1;
      run(MD_MULT, 1'b0, x, y, cyc);
      p = 128'($signed(64'($signed(x[31:0])) * 64'($signed(y[31:0]))));
      check("mult lo", lo, sx(p[31:0])); check("mult hi", hi, sx(p[63:32]));
      check("mult cycles", cyc, 2);
      run(MD_MULTU, 1'b1, x, y, cyc);
      p = {64'd0, x} * {64'd0, y};
      check("dmultu lo", lo, p[63:0]); check("dmultu hi", hi, p[127:64]);
      run(MD_DIV, 1'b1, x, y, cyc);
      check("ddiv lo", lo, word_t'($signed(x) / $signed(y)));
      check("ddiv hi", hi, word_t'($signed(x) % $signed(y)));
      run(MD_DIVU, 1'b0, x, y, cyc);
      if (y[31:0] != 0) begin
        check("divu lo", lo, sx(x[31:0] / y[31:0]));
        check("divu hi", hi, sx(x[31:0] % y[31:0]));
      end
      run(MD_DIVU, 1'b1, x | 64'h8000_0000_0000_0000, y, cyc);
      check("64-bit divide: start + 32 steps + sign fix", cyc, 34);
    end
    run(MD_DIVU, 1'b1, 64'd200, 64'd7, cyc);
    check("small ddivu lo", lo, 64'd28); check("small ddivu hi", hi, 64'd4);
    // start, 7 skips of 8 zero bits, 4 two-bit steps, the fix cycle
    check("zero-skip divide cycles", cyc, 13);
    check("skips counted", 64'(n_skips != 0), 1);
    run(MD_MTHI, 1'b1, 64'h1234, 0, cyc); check("mthi", hi, 64'h1234);
    run(MD_MTLO, 1'b1, 64'h5678, 0, cyc); check("mtlo", lo, 64'h5678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
