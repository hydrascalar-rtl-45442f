// tb_path_ctx: directed scenario on the path-context manager.
//  1. fork from context 0 (predicted taken): 0 becomes "1", 1 becomes "0";
//  2. fork from context 1 (predicted not taken): 1 becomes "00", 2 becomes
//     "10" (bit 0 first); IDs, free count and predicted flag are checked;
//  3. forked branch at the root resolves not-taken: the taken subtree
//     (context 0) is freed, the predicted flag moves to a survivor;
//  4. a non-forked branch of path "0" mispredicts: contexts below "0" are
//     squashed, the lowest is restored to "0";
//  5. retiring the forked root branch advances the head pointer;
//  6. forking is refused when no context is free, and when the ID is full.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_path_ctx;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ctx_active [NPATH], ctx_pred [NPATH], kill [NPATH];
  pid_t ctx_pid [NPATH];
  logic [PTRW-1:0] head, ret_pos;
  logic [2:0] nfree;
  logic fork_valid, fork_pdir, fork_ok, res_valid, res_forked, res_dir, res_rst_valid, ret_valid;
  logic [1:0] fork_ctx, fork_new, res_rst_ctx;
  pid_t res_pid;
  int checks = 0, failures = 0;

  path_ctx dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    fork_valid = 0; res_valid = 0; ret_valid = 0; res_forked = 0; res_dir = 0; res_pid = '0;
    fork_ctx = 0; fork_pdir = 0; ret_pos = 0;
  endtask
  function automatic logic same(input pid_t a, input logic [PIDB-1:0] bits, input int len);
    logic [PIDB-1:0] m;
    m = (PIDB'(1) << len) - 1;
    return ((a.bits & m) == (bits & m)) && int'(a.tail) == len;
  endfunction

  pid_t root;
  initial begin
    idle();
    @(posedge clk); #1 rst_n = 1;
    chk(ctx_active[0] && !ctx_active[1] && nfree == 3 && ctx_pred[0], "reset state");
    // 1. fork at root, predicted taken
    root = ctx_pid[0];
    fork_valid = 1; fork_ctx = 0; fork_pdir = 1; #1;
    chk(fork_ok && fork_new == 1, "fork 1 accepted into ctx1");
    @(posedge clk); #1 idle();
    chk(same(ctx_pid[0], 8'b1, 1) && same(ctx_pid[1], 8'b0, 1), "ids after fork 1");
    chk(ctx_pred[0] && !ctx_pred[1] && nfree == 2, "pred flag / nfree after fork 1");
    // 2. fork from ctx1 (path 0), predicted not taken: ctx1 -> "00", ctx2 -> "10"
    fork_valid = 1; fork_ctx = 1; fork_pdir = 0; #1;
    chk(fork_ok && fork_new == 2, "fork 2 into ctx2");
    @(posedge clk); #1 idle();
    chk(same(ctx_pid[1], 8'b00, 2) && same(ctx_pid[2], 8'b10, 2), "ids after fork 2");
    // 3. root forked branch resolves not taken: kill subtree "1" (ctx0)
    res_valid = 1; res_forked = 1; res_pid = root; res_dir = 0; #1;
    chk(kill[0] && !kill[1] && !kill[2] && !res_rst_valid, "forked resolve kills only ctx0");
    @(posedge clk); #1 idle();
    chk(!ctx_active[0] && ctx_active[1] && ctx_active[2] && nfree == 2, "ctx0 freed");
    chk(ctx_pred[1] && !ctx_pred[0], "predicted flag moved to ctx1");
    // 4. non-forked branch on path "0" (older than fork 2) mispredicts
    res_valid = 1; res_forked = 0; res_pid = '{bits: 8'b0, tail: 3'd1}; res_dir = 1; #1;
    chk(res_rst_valid && res_rst_ctx == 1 && kill[2] && !kill[1], "mispredict restores ctx1, kills ctx2");
    @(posedge clk); #1 idle();
    chk(same(ctx_pid[1], 8'b0, 1) && !ctx_active[2] && nfree == 3, "ctx1 back to id 0");
    // 5. retire the root forked branch (position 0)
    ret_valid = 1; ret_pos = 0;
    @(posedge clk); #1 idle();
    chk(head == 1, "head advanced");
    ret_valid = 1; ret_pos = 5;          // not the head: no move
    @(posedge clk); #1 idle();
    chk(head == 1, "head holds for non-head position");
    chk(int'(pid_len(ctx_pid[1].tail, head)) == 0, "ctx1 id length 0 after head moved");
    // 6. fill all contexts, then fork is refused
    for (int i = 0; i < 3; i++) begin
      fork_valid = 1; fork_ctx = 1; fork_pdir = 1;
      @(posedge clk); #1 idle();
    end
    chk(nfree == 0, "all contexts in use");
    fork_valid = 1; fork_ctx = 1; #1;
    chk(!fork_ok, "fork refused without free context");
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
