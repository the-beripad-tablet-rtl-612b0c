// beri_debug: debug unit commanded over a byte stream.
//
// Commands arrive one byte at a time on a valid/ready stream (normally
// carried over an Avalon streaming interface). The command set is this
// design's own:
//   'P'            pause the pipeline (instruction fetch stops)
//   'R'            resume
//   'B' + 8 bytes  set the breakpoint address (most significant byte first)
//   'C'            clear the breakpoint
//   'S'            reply one byte: bit0 = paused, bit1 = breakpoint enabled,
//                  bit2 = stopped at the breakpoint
//   'Q'            reply 8 bytes: PC of the last committed instruction
// Fetch asks checkPC for each PC it issues. A hit marks the instruction dead
// and flush; when it reaches writeback the pipeline restarts at that PC and
// reports bp_hit, and the unit pauses. After a resume the same PC passes the
// check once, so execution continues past the breakpoint.
// Replies go out on a byte stream with valid/ready; while a reply is being
// sent no new command is taken.
module beri_debug
  import beri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       cmd_val,
  output logic       cmd_rdy,
  input  logic [7:0] cmd_byte,
  output logic       rsp_val,
  input  logic       rsp_rdy,
  output logic [7:0] rsp_byte,
  output logic       pause,
  input  word_t      check_pc,
  input  logic       check_val,   // fetch issues check_pc this cycle
  output logic       breakpoint,
  input  logic       bp_hit,
  input  logic       commit_val,
  input  word_t      commit_pc
);
  logic       bp_en, skip, stopped;
  word_t      bp, last_pc, shreg;
  logic [3:0] arg_cnt, rsp_cnt;

  assign breakpoint = bp_en && !skip && check_pc == bp;
  assign cmd_rdy    = (rsp_cnt == 4'd0);
  assign rsp_val    = (rsp_cnt != 4'd0);
  assign rsp_byte   = shreg[63:56];

  always_ff @(posedge clk) begin
    if (rst) begin
      pause <= 1'b0; bp_en <= 1'b0; skip <= 1'b0; stopped <= 1'b0;
      bp <= '0; last_pc <= '0; shreg <= '0; arg_cnt <= '0; rsp_cnt <= '0;
    end else begin
      if (commit_val) last_pc <= commit_pc;
      if (check_val && bp_en && check_pc == bp && skip) skip <= 1'b0;
      if (bp_hit) begin pause <= 1'b1; stopped <= 1'b1; end
      if (rsp_val && rsp_rdy) begin
        rsp_cnt <= rsp_cnt - 4'd1;
        shreg   <= {shreg[55:0], 8'd0};
      end
      if (cmd_val && cmd_rdy) begin
        if (arg_cnt != 4'd0) begin
          bp      <= {bp[55:0], cmd_byte};
          arg_cnt <= arg_cnt - 4'd1;
          if (arg_cnt == 4'd1) bp_en <= 1'b1;
        end else begin
          unique case (cmd_byte)
            8'h50: pause <= 1'b1;                                       // 'P'
            8'h52: begin pause <= 1'b0; skip <= stopped; stopped <= 1'b0; end // 'R'
            8'h42: begin arg_cnt <= 4'd8; bp_en <= 1'b0; end            // 'B'
            8'h43: bp_en <= 1'b0;                                       // 'C'
            8'h53: begin shreg <= {5'd0, stopped, bp_en, pause, 56'd0}; rsp_cnt <= 4'd1; end
            8'h51: begin shreg <= last_pc; rsp_cnt <= 4'd8; end         // 'Q'
            default: ;
          endcase
        end
      end
    end
  end
endmodule
