// tb_beri_fifo1: checks the single-element pipeline FIFO.
//
// A producer and a consumer with random valid/ready push a numbered stream
// through the FIFO; every item must arrive once, in order. Also checked: the
// FIFO refuses a second item while full, first shows the item in the cycle
// after enq, and a lone FIFO passes one item every second cycle.
module tb_beri_fifo1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enq_val, enq_rdy, deq_val, deq_rdy;
  logic [31:0] enq_data, first;
  beri_fifo1 #(.T(logic [31:0])) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  int sent = 0, got_n = 0;
  logic rnd_v, rnd_r;
  always @(negedge clk) begin rnd_v <= ($urandom % 4 != 0); rnd_r <= ($urandom % 3 != 0); end

  initial begin
    int t0;
    enq_val = 0; deq_rdy = 0; enq_data = 0;
    repeat (3) @(negedge clk); rst = 0;
    check("empty after reset", {enq_rdy, deq_val}, 2'b10);
    @(negedge clk); enq_val = 1; enq_data = 32'hABCD;
    @(negedge clk); enq_val = 1; enq_data = 32'h1111;
    check("full: first shows item", first, 32'hABCD); check("full: refuses", enq_rdy, 0);
    @(negedge clk); enq_val = 0;
    check("second item not taken", first, 32'hABCD);
    deq_rdy = 1; @(negedge clk); deq_rdy = 0;
    check("empty after deq", deq_val, 0);
    // throughput when both sides are always ready
    t0 = 0; enq_val = 1; deq_rdy = 1;
    for (int c = 0; c < 20; c++) begin @(posedge clk); if (deq_val) t0++; end
    @(negedge clk); enq_val = 0; deq_rdy = 0;
    check("one item every second cycle", t0, 10);
    @(negedge clk); deq_rdy = 1; @(negedge clk); deq_rdy = 0;
    // random stream
    fork
      while (sent < 300) begin
        @(negedge clk); enq_val = rnd_v; enq_data = sent;
        @(posedge clk); if (enq_val && enq_rdy) sent++;
      end
      while (got_n < 300) begin
        @(negedge clk); deq_rdy = rnd_r;
        @(posedge clk);
        if (deq_rdy && deq_val) begin check("order", first, got_n); got_n++; end
      end
    join
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
