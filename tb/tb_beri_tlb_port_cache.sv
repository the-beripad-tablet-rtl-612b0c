// tb_beri_tlb_port_cache: checks one translation port in front of the TLB.
//
// The port is connected to a real beri_tlb, which the test bench fills with
// indexed writes. Checked: translations of mapped pages (even and odd page
// of a pair), the unmapped xkphys/kseg0/kseg1 windows and their cacheability,
// refill, invalid and modified exceptions, the ASID match, and the timing:
// an answer one cycle after the request when the port cache hits, four
// cycles (three extra) when it must ask the TLB, and a miss again after any
// TLB write has cleared the port cache.
module tb_beri_tlb_port_cache;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0]  asid;
  logic        req_val, req_rdy, req_store, resp_val, resp_rdy, resp_uncached, resp_exc, resp_refill;
  word_t       req_va;
  paddr_t      resp_pa;
  exc_code_e   resp_code;
  logic        lk_val, lk_rdy, res_val, res_hit, res_tag, tlb_write;
  logic [26:0] lk_vpn2;
  logic [1:0]  lk_r;
  logic [7:0]  lk_asid;
  tlb_entry_t  res_entry;
  logic [31:0] n_miss, n_victim_moves;
  logic        op_val, op_rdy, op_done, probe_miss;
  cp0_op_e     op;
  logic [7:0]  op_index, probe_index;
  tlb_entry_t  op_entry, read_entry;

  beri_tlb_port_cache dut (.*);
  beri_tlb u_tlb (.clk, .rst, .lk_val, .lk_rdy, .lk_vpn2, .lk_r, .lk_asid, .lk_tag(1'b0),
    .res_val, .res_hit, .res_entry, .res_tag, .op_val, .op_rdy, .op, .op_index, .op_entry,
    .wired(4'd0), .op_done, .probe_miss, .probe_index, .read_entry, .tlb_write, .n_victim_moves);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic tlbwi(input int idx, input tlb_entry_t e);
    @(negedge clk); op_val = 1; op = C0_TLBWI; op_index = 8'(idx); op_entry = e;
    do @(posedge clk); while (!op_rdy);
    @(negedge clk) op_val = 0;
    repeat (4) @(negedge clk);
  endtask

  // translate; returns the number of cycles from acceptance to the answer
  task automatic xlate(input word_t va, input logic st, output int cyc);
    @(negedge clk); req_val = 1; req_va = va; req_store = st;
    do @(posedge clk); while (!req_rdy);
    @(negedge clk) req_val = 0; cyc = 1;
    while (!resp_val) begin @(negedge clk); cyc++; end
  endtask

  function automatic tlb_entry_t mk(input logic [26:0] vpn2, input logic [7:0] as, input logic g,
                                    input logic [27:0] p0, p1, input logic d, v);
    tlb_entry_t e;
    e = '0; e.vpn2 = vpn2; e.asid = as; e.g = g;
    e.pfn0 = p0; e.c0 = 3'd3; e.d0 = d; e.v0 = v;
    e.pfn1 = p1; e.c1 = 3'd2; e.d1 = d; e.v1 = v;
    return e;
  endfunction

  initial begin
    int cyc;
    asid = 8'd5; req_val = 0; req_va = 0; req_store = 0; resp_rdy = 1;
    op_val = 0; op = C0_NONE; op_index = 0; op_entry = '0;
    repeat (3) @(negedge clk); rst = 0;
    tlbwi(1, mk(27'h2, 8'd5, 1'b0, 28'h123, 28'h456, 1'b1, 1'b1));   // VA 0x4000/0x5000
    tlbwi(2, mk(27'h8, 8'd9, 1'b0, 28'h777, 28'h778, 1'b1, 1'b1));   // other ASID
    tlbwi(3, mk(27'hA, 8'd0, 1'b1, 28'h200, 28'h201, 1'b0, 1'b1));   // global, clean
    tlbwi(4, mk(27'hC, 8'd5, 1'b0, 28'h300, 28'h301, 1'b1, 1'b0));   // invalid

    xlate(64'h4010, 0, cyc);
    check("miss pa", resp_pa, 40'h123010); check("miss no exc", resp_exc, 0);
    check("cached page", resp_uncached, 0);
    check("port-cache miss: 3 extra cycles", cyc, 4);
    xlate(64'h4FF8, 0, cyc);
    check("hit pa", resp_pa, 40'h123FF8); check("port-cache hit: 1 cycle", cyc, 1);
    xlate(64'h5008, 0, cyc);
    check("odd page pa", resp_pa, 40'h456008); check("odd page uncached (C=2)", resp_uncached, 1);
    check("odd page miss cycles", cyc, 4);
    xlate(64'h4020, 0, cyc); check("still cached", cyc, 1);
    tlbwi(5, mk(27'h40, 8'd5, 1'b0, 28'h9, 28'h9, 1'b1, 1'b1));
    xlate(64'h4020, 0, cyc); check("after TLB write: miss again", cyc, 4);
    check("after TLB write pa", resp_pa, 40'h123020);
    xlate(64'h10000, 0, cyc);
    check("other ASID: refill", {resp_exc, resp_refill}, 2'b11); check("refill code", resp_code, EXC_TLBL);
    xlate(64'h10000, 1, cyc); check("store refill code", resp_code, EXC_TLBS);
    xlate(64'h14000, 1, cyc);
    check("global page, store to clean page", resp_exc, 1); check("mod code", resp_code, EXC_MOD);
    check("mod not refill", resp_refill, 0);
    xlate(64'h14000, 0, cyc); check("global load ok", resp_exc, 0); check("global pa", resp_pa, 40'h200000);
    xlate(64'h18004, 0, cyc);
    check("invalid page", {resp_exc, resp_refill}, 2'b10); check("invalid code", resp_code, EXC_TLBL);
    xlate(64'hFFFF_FFFF_8000_1234, 0, cyc);
    check("kseg0 pa", resp_pa, 40'h1234); check("kseg0 cached", resp_uncached, 0); check("kseg0 1 cycle", cyc, 1);
    xlate(64'hFFFF_FFFF_A000_1234, 1, cyc);
    check("kseg1 pa", resp_pa, 40'h1234); check("kseg1 uncached", resp_uncached, 1);
    xlate(64'h9000_0000_7f80_4018, 0, cyc);
    check("xkphys pa", resp_pa, 40'h7f80_4018); check("xkphys uncached", resp_uncached, 1);
    xlate(64'h9800_0000_0000_0040, 0, cyc);
    check("xkphys cached", resp_uncached, 0); check("xkphys 1 cycle", cyc, 1);
    check("miss counter", n_miss, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
