// tb_beri_debug: checks the debug unit's command stream.
//
// Sends pause/resume, status and last-PC queries, and sets a breakpoint;
// plays the part of fetch (checkPC) and writeback (commit, bp_hit). Checked:
// the status byte, the 8-byte last committed PC (most significant byte
// first), the breakpoint firing only on its address and only while set,
// the pause after a hit, and that after resume the same address passes once
// and fires again on the next visit.
module tb_beri_debug;
  import beri_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cmd_val, cmd_rdy, rsp_val, rsp_rdy, pause, check_val, breakpoint, bp_hit, commit_val;
  logic [7:0] cmd_byte, rsp_byte;
  word_t check_pc, commit_pc;
  beri_debug dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic send(input logic [7:0] b);
    @(negedge clk); cmd_val = 1; cmd_byte = b;
    do @(posedge clk); while (!cmd_rdy);
    @(negedge clk) cmd_val = 0;
  endtask
  task automatic recv(output logic [7:0] b);
    @(negedge clk); rsp_rdy = 1;
    while (!rsp_val) @(negedge clk);
    b = rsp_byte; @(posedge clk); @(negedge clk) rsp_rdy = 0;
  endtask
  task automatic status(output logic [7:0] b); send(8'h53); recv(b); endtask
  task automatic fetch(input word_t pc, output logic bp);
    @(negedge clk); check_pc = pc; check_val = 1; #1 bp = breakpoint;
    @(negedge clk) check_val = 0;
  endtask

  initial begin
    logic [7:0] b; logic bp; word_t q, pc;
    cmd_val = 0; cmd_byte = 0; rsp_rdy = 0; check_val = 0; check_pc = 0;
    bp_hit = 0; commit_val = 0; commit_pc = 0;
    repeat (3) @(negedge clk); rst = 0;
    status(b); check("reset status", b, 0);
    send(8'h50); check("pause", pause, 1); status(b); check("paused status", b, 8'h01);
    send(8'h52); check("resume", pause, 0);
    // last committed PC
    pc = {$urandom, $urandom};
    @(negedge clk); commit_val = 1; commit_pc = pc; @(negedge clk); commit_val = 0;
    send(8'h51); q = 0;
    for (int i = 0; i < 8; i++) begin recv(b); q = {q[55:0], b}; end
    check("last PC", q, pc);
    // breakpoint
    pc = 64'hFFFF_FFFF_8000_1234;
    send(8'h42); for (int i = 7; i >= 0; i--) send(pc[8*i +: 8]);
    status(b); check("breakpoint enabled", b, 8'h02);
    fetch(pc + 4, bp); check("other pc passes", bp, 0);
    fetch(pc, bp); check("breakpoint fires", bp, 1);
    @(negedge clk); bp_hit = 1; @(negedge clk); bp_hit = 0;
    check("paused after hit", pause, 1);
    status(b); check("stopped status", b, 8'h07);
    send(8'h52);
    check("resumed", pause, 0);
    fetch(pc, bp); check("same pc passes once after resume", bp, 0);
    fetch(pc, bp); check("fires on next visit", bp, 1);
    send(8'h43);
    fetch(pc, bp); check("cleared", bp, 0);
    status(b); check("status after clear", b, 8'h00);
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
