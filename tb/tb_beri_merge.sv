// tb_beri_merge: checks the request merge in front of the level-2 cache.
//
// Both sides send random streams of tagged requests while the level-2 side
// accepts at random. Checked: every request arrives exactly once and in
// order per side, with its fields intact; when both sides wait they are
// served alternately; a request needs one cycle to pass (registered), and a
// response is presented one cycle after level 2 gives it, with its tag.
module tb_beri_merge;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic i_val, i_rdy, d_val, d_rdy, o_val, o_rdy, l2_resp_val, resp_val;
  mem_req_t i_req, d_req, o_req;
  mem_resp_t l2_resp, resp;
  beri_merge dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  int ni = 0, nd = 0, gi = 0, gd = 0, alt_ok = 0, both = 0;
  logic last_src; logic have_last = 0;
  always @(negedge clk) o_rdy <= ($urandom % 3 != 0);

  initial begin
    i_val = 0; d_val = 0; i_req = '0; d_req = '0; l2_resp_val = 0; l2_resp = '0; o_rdy = 0;
    repeat (3) @(negedge clk); rst = 0;
    // latency: one request, L2 ready
    @(negedge clk); o_rdy = 1;
    i_req = '0; i_req.addr = 40'h1234_5600; i_val = 1;
    @(posedge clk); #1 i_val = 0;
    check("request registered: visible next cycle", o_val, 1); check("address", o_req.addr, 40'h1234_5600);
    @(negedge clk); l2_resp_val = 1; l2_resp.data = {8{32'hCAFE0001}}; l2_resp.src = 1;
    @(posedge clk); #1 l2_resp_val = 0;
    check("response one cycle later", resp_val, 1); check("response tag", resp.src, 1);
    check("response data", resp.data[31:0], 32'hCAFE0001);
    @(posedge clk); #1 check("response is a pulse", resp_val, 0);
    while (o_val) @(negedge clk);
    fork
      forever begin
        @(posedge clk);
        if (i_val && d_val && (i_rdy || d_rdy)) begin
          both++;
          if (!have_last || (d_rdy == !last_src)) alt_ok++;
        end
        if (i_val && i_rdy) begin last_src = 0; have_last = 1; end
        if (d_val && d_rdy) begin last_src = 1; have_last = 1; end
        if (o_val && o_rdy) begin
          if (o_req.src) begin check("data order", o_req.addr, gd); check("data write flag", o_req.write, 1); gd++; end
          else begin check("instr order", o_req.addr, gi); gi++; end
        end
      end
    join_none
    fork
      begin
      while (ni < 200) begin
        @(negedge clk); i_val = ($urandom % 2); i_req = '0; i_req.addr = 40'(ni); i_req.src = 0;
        @(posedge clk); if (i_val && i_rdy) ni++;
      end
      @(negedge clk) i_val = 0;
      end
      begin
      while (nd < 200) begin
        @(negedge clk); d_val = ($urandom % 2); d_req = '0; d_req.addr = 40'(nd); d_req.src = 1;
        d_req.write = 1; @(posedge clk); if (d_val && d_rdy) nd++;
      end
      @(negedge clk) d_val = 0;
      end
    join
    @(negedge clk); i_val = 0; d_val = 0;
    repeat (3) @(negedge clk);
    while (o_val) @(negedge clk);
    repeat (3) @(negedge clk);
    $display("ni=%0d nd=%0d gi=%0d gd=%0d both=%0d", ni, nd, gi, gd, both);
    check("all instruction requests", gi, 200); check("all data requests", gd, 200);
    check("round robin when both wait", alt_ok, both);
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
