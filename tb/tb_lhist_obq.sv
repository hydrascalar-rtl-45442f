// tb_lhist_obq: directed test of the outstanding branch queue and BHT.
//  - a lookup of an unknown branch gives history 0;
//  - speculative entries: each new prediction of the same PC sees the
//    previous entry's history shifted with its predicted direction;
//  - fix sets the newest bit to the real direction;
//  - a squash drops younger entries of the squashed path but keeps those of
//    another path;
//  - commit writes live entries into the BHT, dropped ones are discarded, and
//    the BHT keeps two PCs mapping to the same set (two ways).
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_lhist_obq;
  import hs_pkg::*;
  localparam int LW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pc_t rd_pc [NPATH];
  logic [LW-1:0] rd_hist [NPATH];
  logic alloc_valid [NPATH], alloc_dir [NPATH];
  pid_t alloc_pid [NPATH];
  logic [4:0] alloc_idx [NPATH], fix_idx, sq_idx;
  logic alloc_ready, fix_valid, fix_dir, sq_valid, sq_forked, sq_dir, commit_valid, empty;
  pid_t sq_pid;
  logic [PTRW-1:0] pid_head;
  int checks = 0, failures = 0;

  lhist_obq dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    for (int p = 0; p < NPATH; p++) begin alloc_valid[p] = 0; alloc_dir[p] = 0; alloc_pid[p] = '0; rd_pc[p] = 0; end
    fix_valid = 0; fix_idx = 0; fix_dir = 0; sq_valid = 0; sq_forked = 0; sq_idx = 0; sq_dir = 0; sq_pid = '0;
    commit_valid = 0;
  endtask
  // predict branch 'pc' on path port p with direction d; returns its OBQ index
  task automatic predict(input int p, input pc_t pc, input logic d, input pid_t id, output logic [4:0] idx);
    rd_pc[p] = pc; alloc_valid[p] = 1; alloc_dir[p] = d; alloc_pid[p] = id; #1;
    idx = alloc_idx[p];
    @(posedge clk); #1 idle();
  endtask

  logic [4:0] i0, i1, i2, i3, i4;
  pid_t pa, pb;
  initial begin
    pid_head = 0;
    pa = '{bits: 8'b0, tail: 3'd1};
    pb = '{bits: 8'b1, tail: 3'd1};
    idle();
    @(posedge clk); #1 rst_n = 1;
    rd_pc[0] = 100; #1; chk(rd_hist[0] == 0 && empty, "unknown branch history 0");
    predict(0, 100, 1, pa, i0);                   // hist 1
    rd_pc[0] = 100; #1; chk(rd_hist[0] == 8'b1, "obq forwards first prediction");
    predict(0, 100, 0, pa, i1);                   // hist 10
    predict(0, 100, 1, pa, i2);                   // hist 101
    rd_pc[0] = 100; #1; chk(rd_hist[0] == 8'b101, "obq chains speculative history");
    // path b predicts the same PC (newest entry wins regardless of path)
    predict(1, 100, 1, pb, i3);                   // hist 1011
    rd_pc[0] = 100; #1; chk(rd_hist[0] == 8'b1011, "newest entry from other path");
    // branch i1 resolved taken (mispredicted): fix and squash younger entries of path a
    fix_valid = 1; fix_idx = i1; fix_dir = 1;
    sq_valid = 1; sq_forked = 0; sq_idx = i1; sq_pid = pa;
    @(posedge clk); #1 idle();
    chk(dut.q[i2].live == 0, "younger entry of squashed path dropped");
    chk(dut.q[i3].live == 1, "entry of other path kept");
    chk(dut.q[i1].hist == 8'b11, "fixed entry holds real direction");
    // commits: i0, i1 live -> BHT; i2 dropped; i3 live
    commit_valid = 1; @(posedge clk); #1;
    commit_valid = 1; @(posedge clk); #1;
    commit_valid = 1; @(posedge clk); #1;
    commit_valid = 1; @(posedge clk); #1 idle();
    rd_pc[0] = 100; #1; chk(rd_hist[0] == 8'b1011 && empty, "BHT holds last committed history");
    // second PC in the same set (128 sets) goes to the other way
    predict(0, 228, 0, pa, i4);
    commit_valid = 1; @(posedge clk); #1 idle();
    rd_pc[0] = 228; rd_pc[1] = 100; #1;
    chk(rd_hist[0] == 8'b0 && rd_hist[1] == 8'b1011, "two ways in one set");
    predict(0, 228, 1, pa, i4);
    commit_valid = 1; @(posedge clk); #1 idle();
    rd_pc[0] = 228; rd_pc[1] = 100; #1;
    chk(rd_hist[0] == 8'b01 && rd_hist[1] == 8'b1011, "BHT hit updates in place");
    // forked squash: drop the not-taken side only
    predict(0, 500, 1, pa, i4);                   // the forking branch
    predict(0, 300, 1, pid_child(pa, 1'b0), i0);
    predict(1, 300, 1, pid_child(pa, 1'b1), i1);
    fix_valid = 1; fix_idx = i4; fix_dir = 1;
    sq_valid = 1; sq_forked = 1; sq_idx = i4; sq_pid = pa; sq_dir = 1;
    @(posedge clk); #1 idle();
    chk(dut.q[i0].live == 0 && dut.q[i1].live == 1, "forked squash keeps taken side");
    // capacity
    for (int k = 0; k < 40 && alloc_ready; k++) predict(0, 400, 1, pa, i2);
    chk(!alloc_ready, "queue reports full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
