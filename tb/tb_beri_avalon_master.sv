// tb_beri_avalon_master: checks the memory-request to Avalon-MM translation.
//
// Random 32-byte reads and byte-enabled writes go through the master into an
// Avalon slave model with random waitrequest and read latency. Checked: the
// slave sees each address once, stored bytes land at the little-endian lane
// of their address (the processor's big-endian byte i goes to lane i), only
// enabled bytes change, reads return the big-endian line image, and no
// second read is issued while one is outstanding.
module tb_beri_avalon_master;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic         req_val, req_rdy, resp_val;
  mem_req_t     req;
  line_t        resp_data;
  logic [31:0]  avm_address, avm_byteenable;
  logic         avm_read, avm_write, avm_waitrequest, avm_readdatavalid;
  logic [255:0] avm_writedata, avm_readdata;
  beri_avalon_master dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  logic [7:0] mem [logic [31:0]];
  function automatic logic [7:0] mb(input logic [31:0] a); return mem.exists(a) ? mem[a] : a[7:0] + 8'h3C; endfunction
  logic [7:0] refm [logic [31:0]];
  function automatic logic [7:0] rb(input logic [31:0] a); return refm.exists(a) ? refm[a] : a[7:0] + 8'h3C; endfunction

  int outstanding = 0, bus_ops = 0, lat = 0;
  logic [31:0] ra;
  always @(negedge clk) avm_waitrequest <= ($urandom % 3 == 0);
  always_ff @(posedge clk) begin
    avm_readdatavalid <= 1'b0;
    if ((avm_read || avm_write) && !avm_waitrequest) begin
      bus_ops++;
      if (avm_read) begin
        if (outstanding != 0) begin failures++; $display("FAIL second read outstanding"); end
        outstanding = 1; ra = avm_address; lat = 1 + $urandom % 4;
      end else
        for (int j = 0; j < 32; j++) if (avm_byteenable[j]) mem[avm_address + j] = avm_writedata[8*j +: 8];
    end else if (outstanding != 0) begin
      if (--lat == 0) begin
        for (int j = 0; j < 32; j++) avm_readdata[8*j +: 8] <= mb(ra + j);
        avm_readdatavalid <= 1'b1; outstanding = 0;
      end
    end
  end

  initial begin
    line_t exp;
    req_val = 0; req = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a;
      a = ($urandom % 64) * 32;
      req = '0; req.addr = 40'(a);
      req.write = ($urandom % 2 == 1);
      req.data = {8{$urandom}}; req.be = $urandom;
      if (!req.write) req.be = '1;
      @(negedge clk); req_val = 1;
      do @(posedge clk); while (!req_rdy);
      @(negedge clk) req_val = 0;
      if (req.write) begin
        for (int i = 0; i < 32; i++) if (req.be[31 - i]) refm[a + i] = req.data[255 - 8*i -: 8];
      end else begin
        for (int i = 0; i < 32; i++) exp[255 - 8*i -: 8] = rb(a + i);
        while (!resp_val) @(negedge clk);
        check("read line", resp_data, exp);
      end
    end
    repeat (20) @(negedge clk);
    foreach (refm[a]) check("written byte", 256'(mb(a)), 256'(refm[a]));
    check("one bus operation per request", 256'(bus_ops), 256'(200));
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
