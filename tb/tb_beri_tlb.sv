// tb_beri_tlb: checks the TLB (16 associative + 128 direct-mapped entries).
//
// Drives CP0-style operations and lookups. Checked: write random places an
// entry in its hashed direct-mapped slot, a second page with the same hash
// moves the first into the associative victim entries (round-robin from
// WIRED) where it is still found; probe returns associative indices 0-15
// and direct-mapped indices 16 + hash; read returns either kind; write
// indexed below 16 fills an associative entry and at 16 or above the page's
// hashed slot; ASID and global matching; and the lookup latency of two
// cycles after acceptance.
module tb_beri_tlb;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        lk_val, lk_rdy, lk_tag, res_val, res_hit, res_tag;
  logic [26:0] lk_vpn2;
  logic [1:0]  lk_r;
  logic [7:0]  lk_asid;
  tlb_entry_t  res_entry, op_entry, read_entry;
  logic        op_val, op_rdy, op_done, probe_miss, tlb_write;
  cp0_op_e     op;
  logic [7:0]  op_index, probe_index;
  logic [3:0]  wired;
  logic [31:0] n_victim_moves;

  beri_tlb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic do_op(input cp0_op_e o, input int idx, input tlb_entry_t e);
    @(negedge clk); op_val = 1; op = o; op_index = 8'(idx); op_entry = e;
    do @(posedge clk); while (!op_rdy);
    @(negedge clk) op_val = 0;
    while (!op_done) @(negedge clk);
  endtask

  task automatic lookup(input logic [26:0] v, input logic [7:0] as, output logic hit,
                        output tlb_entry_t e, output int cyc);
    @(negedge clk); lk_val = 1; lk_vpn2 = v; lk_r = 2'b00; lk_asid = as; lk_tag = 1'b1;
    do @(posedge clk); while (!lk_rdy);
    @(negedge clk) lk_val = 0; cyc = 1;
    while (!res_val) begin @(negedge clk); cyc++; end
    hit = res_hit; e = res_entry;
    checks++; if (res_tag !== 1'b1) begin failures++; $display("FAIL tag"); end
  endtask

  function automatic tlb_entry_t mk(input logic [26:0] v, input logic [7:0] as, input logic g,
                                    input logic [27:0] p);
    tlb_entry_t e;
    e = '0; e.vpn2 = v; e.asid = as; e.g = g; e.pfn0 = p; e.pfn1 = p + 1; e.v0 = 1; e.v1 = 1;
    return e;
  endfunction

  initial begin
    logic hit; tlb_entry_t e; int cyc;
    tlb_entry_t A, B, C, D, G;
    lk_val = 0; lk_vpn2 = 0; lk_r = 0; lk_asid = 0; lk_tag = 0;
    op_val = 0; op = C0_NONE; op_index = 0; op_entry = '0; wired = 0;
    A = mk(27'h200, 8'd1, 0, 28'hA0);   // hash 0x00 ^ 0x04 = 4
    B = mk(27'h004, 8'd1, 0, 28'hB0);   // hash 4
    C = mk(27'h333, 8'd1, 0, 28'hC0);
    D = mk(27'h1234, 8'd1, 0, 28'hD0);  // hash 0x34 ^ 0x24 = 0x10
    G = mk(27'h5, 8'd7, 1, 28'hE0);     // global
    repeat (3) @(negedge clk); rst = 0;

    lookup(A.vpn2, 8'd1, hit, e, cyc); check("empty: miss", hit, 0);
    check("lookup latency 2 cycles", cyc, 2);
    do_op(C0_TLBWR, 0, A);
    lookup(A.vpn2, 8'd1, hit, e, cyc); check("A hit", hit, 1); check("A pfn", e.pfn0, 28'hA0);
    lookup(A.vpn2, 8'd2, hit, e, cyc); check("A other asid: miss", hit, 0);
    do_op(C0_TLBP, 0, A); check("probe A in slot 16+4", {probe_miss, probe_index}, 9'd20);
    do_op(C0_TLBWR, 0, B);
    check("victim move counted", n_victim_moves, 1);
    lookup(B.vpn2, 8'd1, hit, e, cyc); check("B hit", hit, 1); check("B pfn", e.pfn0, 28'hB0);
    lookup(A.vpn2, 8'd1, hit, e, cyc); check("A still found (victim buffer)", hit, 1);
    check("A pfn from victim", e.pfn0, 28'hA0); check("victim lookup latency", cyc, 2);
    do_op(C0_TLBP, 0, A); check("probe A in associative 0", {probe_miss, probe_index}, 9'd0);
    do_op(C0_TLBP, 0, B); check("probe B in slot 20", {probe_miss, probe_index}, 9'd20);
    do_op(C0_TLBR, 20, '0); check("read 20", read_entry.pfn0, 28'hB0);
    do_op(C0_TLBR, 0, '0);  check("read 0", read_entry.pfn0, 28'hA0);
    do_op(C0_TLBWI, 3, C);
    do_op(C0_TLBP, 0, C); check("probe C at 3", {probe_miss, probe_index}, 9'd3);
    lookup(C.vpn2, 8'd1, hit, e, cyc); check("C hit", hit, 1);
    do_op(C0_TLBWI, 50, D);
    do_op(C0_TLBP, 0, D); check("write indexed >= 16 goes to hash slot", {probe_miss, probe_index}, 9'd32);
    do_op(C0_TLBWR, 0, G);
    lookup(G.vpn2, 8'd99, hit, e, cyc); check("global hit any asid", hit, 1);
    do_op(C0_TLBP, 0, mk(27'h7777, 8'd1, 0, 0)); check("probe miss", probe_miss, 1);
    // with WIRED = 2 the next victim goes to entry 2 or above
    wired = 4'd2;
    do_op(C0_TLBWR, 0, mk(27'h200 ^ 27'h3, 8'd1, 0, 28'hF0)); // hash 7, empty: no move
    do_op(C0_TLBWR, 0, mk(27'h7, 8'd1, 0, 28'hF1));           // hash 7, moves previous
    do_op(C0_TLBP, 0, mk(27'h200 ^ 27'h3, 8'd1, 0, 0));
    check("victim placed at or above WIRED", {probe_miss, probe_index}, 9'd2);
    check("two victim moves", n_victim_moves, 2);
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
