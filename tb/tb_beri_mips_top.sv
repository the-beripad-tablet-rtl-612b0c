// tb_beri_mips_top: runs a sorting program on the processor alone.
//
// The processor's line-request memory port is served by a byte memory
// model with a random 2-6 cycle read latency (answers in order, stores
// applied at once, big-endian lanes: byte offset i of a line in bits
// 255-8i downwards, byte enable j covering bits 8j+7:8j). Small caches
// (1 KB level 1, 2 KB level 2) are used so that misses are frequent.
// The program starts from a reset vector in the cached unmapped kernel
// segment and bubble-sorts 16 random signed doublewords in place, using
// loads and stores, set-less-than, forward and backward branches with delay
// slots and immediate arithmetic; then it stores a completion flag and
// spins. The testbench checks the sorted array against its own sort of the
// same numbers, checks that every store was seen by memory (write-through)
// and that forwarding, scheduler stalls, mispredictions, dropped wrong-path
// instructions and cache hits and misses all happened.
module tb_beri_mips_top;
  import beri_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mreq_val, mreq_rdy, mresp_val, dbg_cmd_val, dbg_cmd_rdy, dbg_rsp_val, dbg_rsp_rdy;
  mem_req_t mreq;
  line_t mresp_data;
  logic [7:0] dbg_cmd_byte, dbg_rsp_byte;
  stats_t stats;

  localparam word_t KSEG0 = 64'hFFFF_FFFF_8000_0000;
  beri_mips_top #(.RESET_VECTOR(KSEG0 + 64'h1000), .L1_KB(1), .L2_KB(2)) dut (
    .clk, .rst, .mreq_val, .mreq_rdy, .mreq, .mresp_val, .mresp_data, .hw_irq(5'd0),
    .dbg_cmd_val, .dbg_cmd_rdy, .dbg_cmd_byte, .dbg_rsp_val, .dbg_rsp_rdy, .dbg_rsp_byte, .stats);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ---------------- memory model
  logic [7:0] mem [logic [39:0]];
  function automatic logic [7:0] rdb(input logic [39:0] a); return mem.exists(a) ? mem[a] : 8'h00; endfunction
  function automatic logic [63:0] get64(input logic [39:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[63 - 8*i -: 8] = rdb(a + 40'(i));
    return v;
  endfunction
  task automatic put64(input logic [39:0] a, input logic [63:0] v);
    for (int i = 0; i < 8; i++) mem[a + 40'(i)] = v[63 - 8*i -: 8];
  endtask
  logic [39:0] rq[$];
  int delay = 0, n_stores = 0;
  logic done_seen = 0;
  always @(negedge clk) mreq_rdy <= ($urandom % 4) != 0;
  // cycles the instruction cache spends writing words 1..3 of a filled line
  // into its 8-byte array (state encoding 4 is its fill state)
  int n_fill = 0;
  always @(posedge clk) if (!rst && 3'(dut.u_icache.st) == 3'd4) n_fill++;
  always @(posedge clk) begin
    mresp_val <= 1'b0;
    if (!rst) begin
      if (mreq_val && mreq_rdy) begin
        logic [39:0] base;
        base = {mreq.addr[39:5], 5'd0};
        if (mreq.write) begin
          n_stores++;
          for (int j = 0; j < 32; j++)
            if (mreq.be[j]) mem[base + 40'(31 - j)] = mreq.data[8*j +: 8];
          if (base == 40'h3000) done_seen <= 1'b1;
        end else rq.push_back(base);
      end
      if (rq.size() != 0) begin
        if (delay == 0) begin
          logic [39:0] a;
          a = rq.pop_front();
          for (int i = 0; i < 32; i++) mresp_data[255 - 8*i -: 8] <= rdb(a + 40'(i));
          mresp_val <= 1'b1;
          delay = 2 + $urandom % 5;
        end else delay--;
      end
    end
  end

  // ---------------- program
  logic [39:0] pcw;
  task automatic emit(input logic [31:0] w);
    for (int i = 0; i < 4; i++) mem[pcw + 40'(i)] = w[31 - 8*i -: 8];
    pcw += 4;
  endtask

  localparam int N = 16;
  logic signed [63:0] vals [N];

  initial begin
    int cyc;
    logic signed [63:0] t;
    dbg_cmd_val = 0; dbg_cmd_byte = 0; dbg_rsp_rdy = 1;
    pcw = 40'h1000;
    emit(LUI(1, 16'h8000));          // r1 = array base (kseg0 0x2000)
    emit(ORI(1, 1, 16'h2000));
    emit(DADDIU(5, 0, 0));           // outer: swapped = 0
    emit(DADDU(3, 1, 0));            //        p = base
    emit(DADDIU(4, 0, N - 1));       //        count
    emit(LD(6, 0, 3));               // inner: a = p[0]
    emit(LD(7, 8, 3));               //        b = p[1]
    emit(SLT(8, 7, 6));              //        b < a ?
    emit(BEQ(8, 0, 4));              //        no: skip
    emit(NOP());
    emit(SD(7, 0, 3));               //        swap
    emit(SD(6, 8, 3));
    emit(DADDIU(5, 0, 1));           //        swapped = 1
    emit(DADDIU(4, 4, -1));          // skip:  count--
    emit(BNE(4, 0, -10));            //        to inner
    emit(DADDIU(3, 3, 8));           //        (delay slot) p++
    emit(BNE(5, 0, -15));            //        to outer while swapping
    emit(NOP());
    emit(LUI(9, 16'h8000));          // completion flag at 0x3000
    emit(ORI(9, 9, 16'h3000));
    emit(DADDIU(10, 0, 1));
    emit(SD(10, 0, 9));
    emit(J(KSEG0 + 64'(pcw)));       // spin
    emit(NOP());
    for (int i = 0; i < N; i++) begin
      vals[i] = $signed({$urandom, $urandom});
      if (i % 5 == 0) vals[i] = 64'(i) - 7;     // some small values too
      put64(40'h2000 + 40'(8 * i), vals[i]);
    end
    repeat (3) @(negedge clk); rst = 0;
    cyc = 0;
    while (!done_seen && cyc < 300000) begin @(posedge clk); cyc++; end
    check("program finished", done_seen, 1);
    // reference sort
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (vals[j] > vals[j + 1]) begin t = vals[j]; vals[j] = vals[j + 1]; vals[j + 1] = t; end
    for (int i = 0; i < N; i++) check("sorted element", get64(40'h2000 + 40'(8 * i)), vals[i]);
    check("completion flag", get64(40'h3000), 64'd1);
    check("stores reached memory", n_stores > N, 1);
    check("forwarding happened", stats.fwd > 0, 1);
    check("scheduler stalls happened", stats.sched_stall > 0, 1);
    check("mispredictions happened", stats.mispredict > 0, 1);
    check("wrong-path instructions dropped", stats.dropped > 0, 1);
    check("instruction cache hits and misses", {stats.ic_hit > 0, stats.ic_miss > 0}, 2'b11);
    check("data cache hits and misses", {stats.dc_hit > 0, stats.dc_miss > 0}, 2'b11);
    check("level-2 misses", stats.l2_miss > 0, 1);
    check("instruction-cache fill: 4 words per line", 64'(n_fill), 64'(3 * stats.ic_miss));
    check("no exceptions", stats.exc, 0);
    $display("cycles=%0d commits=%0d fwd=%0d stalls=%0d mispredicts=%0d dropped=%0d",
             cyc, stats.commit, stats.fwd, stats.sched_stall, stats.mispredict, stats.dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
