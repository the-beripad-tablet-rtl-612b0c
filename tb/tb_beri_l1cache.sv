// tb_beri_l1cache: checks a level-1 cache together with the request merge
// and the level-2 cache in front of a memory model.
//
// Random loads and stores of bytes to doublewords, to addresses chosen so
// that lines collide in the 16 KB level-1 cache but not in the 64 KB
// level-2 cache, are compared with a reference byte memory; the memory
// model must see every store (write-through). Checked cycle counts: a load
// hit answers one cycle after acceptance; a level-1 miss that hits in
// level 2 gets its line three cycles after the level-1 request leaves (one
// cycle through the merge, the one-cycle level-2 hit, one cycle back). Also
// checked: no allocation on a store miss, and uncached (kseg1) loads always
// go to memory.
module tb_beri_l1cache;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        req_val, req_rdy, req_wr, resp_val, resp_rdy, resp_exc, resp_refill;
  word_t       req_va, req_wdata, resp_data;
  logic [7:0]  req_be;
  exc_code_e   resp_code;
  logic        lk_val, lk_rdy, res_val, res_hit, res_tag, tlb_write;
  logic [26:0] lk_vpn2;
  logic [1:0]  lk_r;
  logic [7:0]  lk_asid;
  tlb_entry_t  res_entry;
  logic        mreq_val, mreq_rdy, mresp_val;
  mem_req_t    mreq;
  mem_resp_t   mresp;
  logic [31:0] n_hit, n_miss, n_tlb_miss;

  assign lk_rdy = 1'b0; assign res_val = 1'b0; assign res_hit = 1'b0; assign res_tag = 1'b0;
  assign res_entry = '0; assign tlb_write = 1'b0;

  beri_l1cache dut (.clk, .rst, .asid(8'd0), .req_val, .req_rdy, .req_va, .req_wr, .req_wdata,
    .req_be, .resp_val, .resp_rdy, .resp_data, .resp_exc, .resp_refill, .resp_code,
    .lk_val, .lk_rdy, .lk_vpn2, .lk_r, .lk_asid, .res_val, .res_hit, .res_entry, .res_tag,
    .tlb_write, .mreq_val, .mreq_rdy, .mreq, .mresp_val, .mresp, .n_hit, .n_miss, .n_tlb_miss);

  logic      l2_val, l2_rdy, l2_resp_val, m_val, m_rdy, m_resp_val;
  mem_req_t  l2_req, m_req;
  mem_resp_t l2_resp;
  line_t     m_resp_data;
  logic [31:0] l2_hit, l2_miss;

  beri_merge u_merge (.clk, .rst, .i_val(1'b0), .i_rdy(), .i_req('0),
    .d_val(mreq_val), .d_rdy(mreq_rdy), .d_req(mreq), .o_val(l2_val), .o_rdy(l2_rdy), .o_req(l2_req),
    .l2_resp_val, .l2_resp, .resp_val(mresp_val), .resp(mresp));
  beri_l2cache u_l2 (.clk, .rst, .req_val(l2_val), .req_rdy(l2_rdy), .req(l2_req),
    .resp_val(l2_resp_val), .resp(l2_resp), .mreq_val(m_val), .mreq_rdy(m_rdy), .mreq(m_req),
    .mresp_val(m_resp_val), .mresp_data(m_resp_data), .n_hit(l2_hit), .n_miss(l2_miss));

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // memory model: bytes, big-endian line images, 2-cycle read latency
  logic [7:0] mem [logic [39:0]];
  logic [7:0] refm [logic [39:0]];
  function automatic logic [7:0] init_b(input logic [39:0] a); return a[7:0] ^ a[15:8] ^ 8'h5A; endfunction
  function automatic logic [7:0] mb(input logic [39:0] a); return mem.exists(a) ? mem[a] : init_b(a); endfunction
  function automatic logic [7:0] rb(input logic [39:0] a); return refm.exists(a) ? refm[a] : init_b(a); endfunction
  int n_mem_rd = 0, n_mem_wr = 0;
  logic [39:0] pend_a; int pend = 0;
  assign m_rdy = (pend == 0);
  always_ff @(posedge clk) begin
    m_resp_val <= 1'b0;
    if (m_val && m_rdy) begin
      if (m_req.write) begin
        n_mem_wr++;
        for (int j = 0; j < 32; j++) if (m_req.be[j]) mem[m_req.addr + 40'(31 - j)] = m_req.data[8*j +: 8];
      end else begin n_mem_rd++; pend_a <= m_req.addr; pend <= 2; end
    end
    if (pend == 1) begin
      for (int j = 0; j < 32; j++) m_resp_data[255 - 8*j -: 8] <= mb(pend_a + 40'(j));
      m_resp_val <= 1'b1;
    end
    if (pend != 0) pend <= pend - 1;
  end

  // level-1 request out -> line back, measured in cycles
  int t_out = -1, lat_l2hit = -1, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mreq_val && mreq_rdy && !mreq.write) t_out <= cyc;
    if (mresp_val && t_out >= 0) begin lat_l2hit <= cyc - t_out; t_out <= -1; end
  end

  localparam word_t K0 = 64'hFFFF_FFFF_8000_0000, K1 = 64'hFFFF_FFFF_A000_0000;

  task automatic access(input word_t va, input logic w, input word_t d, input logic [7:0] be,
                        output word_t q, output int lat);
    @(negedge clk); req_val = 1; req_va = va; req_wr = w; req_wdata = d; req_be = be;
    do @(posedge clk); while (!req_rdy);
    @(negedge clk) req_val = 0; lat = 1;
    while (!resp_val) begin @(negedge clk); lat++; end
    q = resp_data;
  endtask

  function automatic word_t ref_dw(input logic [39:0] a);
    word_t v;
    for (int i = 0; i < 8; i++) v[63 - 8*i -: 8] = rb({a[39:3], 3'd0} + 40'(i));
    return v;
  endfunction

  initial begin
    word_t q; int lat, h0, m0, r0;
    logic [39:0] pa;
    req_val = 0; req_va = 0; req_wr = 0; req_wdata = 0; req_be = 0; resp_rdy = 1;
    repeat (3) @(negedge clk); rst = 0;
    // directed timing
    access(K0 + 64'h100, 0, 0, 8'hFF, q, lat);
    check("cold load", q, ref_dw(40'h100));
    access(K0 + 64'h108, 0, 0, 8'hFF, q, lat);
    check("hit data", q, ref_dw(40'h108)); check("L1 hit: 1 cycle", lat, 1);
    access(K0 + 64'h4100, 0, 0, 8'hFF, q, lat);      // same L1 set, other L2 set
    access(K0 + 64'h110, 0, 0, 8'hFF, q, lat);
    check("L1 miss L2 hit data", q, ref_dw(40'h110));
    check("L1 miss that hits L2: 3 cycles", lat_l2hit, 3);
    // store miss: no allocation
    m0 = n_miss;
    access(K0 + 64'h8000, 1, 64'h1122334455667788, 8'hFF, q, lat);
    for (int i = 0; i < 8; i++) refm[40'h8000 + 40'(i)] = 8'h11 * 8'(i + 1);
    access(K0 + 64'h8000, 0, 0, 8'hFF, q, lat);
    check("store miss then load", q, 64'h1122334455667788);
    check("no allocate on store miss", n_miss - m0, 1);
    // uncached loads always reach memory
    r0 = n_mem_rd;
    access(K1 + 64'h200, 0, 0, 8'hFF, q, lat); check("uncached data", q, ref_dw(40'h200));
    access(K1 + 64'h200, 0, 0, 8'hFF, q, lat);
    check("uncached loads reach memory", n_mem_rd - r0, 2);
    // random traffic
    for (int n = 0; n < 400; n++) begin
      logic [7:0] be; word_t d;
      pa = 40'(($urandom % 4) * 32'h4000 + ($urandom % 8) * 32 + ($urandom % 4) * 8);
      if ($urandom % 3 == 0) begin
        be = 8'($urandom); d = {$urandom, $urandom};
        access(K0 + 64'(pa), 1, d, be, q, lat);
        for (int i = 0; i < 8; i++) if (be[7 - i]) refm[pa + 40'(i)] = d[63 - 8*i -: 8];
      end else begin
        access(K0 + 64'(pa), 0, 0, 8'hFF, q, lat);
        check("random load", q, ref_dw(pa));
      end
    end
    repeat (10) @(negedge clk);
    foreach (refm[a]) begin checks++; if (mb(a) !== refm[a]) begin failures++; $display("FAIL memory %h", a); end end
    $display("L1 hits %0d misses %0d, L2 hits %0d misses %0d", n_hit, n_miss, l2_hit, l2_miss);
    check("hits happened", 64'(n_hit > 20), 1);
    check("L2 hits happened", 64'(l2_hit > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
