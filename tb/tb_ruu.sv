// tb_ruu: directed test of the unified window.
// Checks dispatch tags, dependence wake-up, oldest-first issue across paths,
// the issue-width and one-branch / one-load limits, load completion by
// ld_done and the hold input, selective squash by path-ID subtree (forked and
// non-forked), holes reclaimed at commit, commit stopping after a branch,
// per-path occupancy and the full indication.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_ruu;
  import hs_pkg::*;
  localparam int N = 64, DW = 8, IW = 4, CW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PTRW-1:0] pid_head = 0;
  logic ds_v [DW], ds_src_busy [DW], ds_ready, is_v [IW], is_hold, ld_done_v [2], sq_v;
  uop_t ds_uop [DW], is_uop [IW], cm_uop [CW];
  logic [5:0] ds_src_tag [DW], ds_tag [DW], is_tag [IW], ld_done_tag [2], sq_tag, cm_tag [CW];
  pid_t sq_root;
  logic cm_v [CW], cm_hole [CW];
  logic [6:0] ctx_cnt [NPATH], count;
  int checks = 0, failures = 0;
  int ncommit, nhole;
  int issued_order [$];

  ruu dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    for (int d = 0; d < DW; d++) begin ds_v[d] = 0; ds_uop[d] = '0; ds_src_busy[d] = 0; ds_src_tag[d] = 0; end
    is_hold = 0; sq_v = 0; sq_tag = 0; sq_root = '0;
    for (int l = 0; l < 2; l++) begin ld_done_v[l] = 0; ld_done_tag[l] = 0; end
  endtask
  task automatic put(input int d, input kind_e k, input pid_t id, input int ctx, input logic sb, input int st);
    ds_v[d] = 1; ds_uop[d] = '0; ds_uop[d].kind = k; ds_uop[d].pid = id; ds_uop[d].ctx = 2'(ctx);
    ds_uop[d].pc = pc_t'(100 + d); ds_src_busy[d] = sb; ds_src_tag[d] = 6'(st);
  endtask

  // monitors
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < CW; c++) if (cm_v[c]) begin ncommit++; if (cm_hole[c]) nhole++; end
    for (int s = 0; s < IW; s++) if (is_v[s]) issued_order.push_back(int'(is_tag[s]));
  end

  pid_t a, a0, a1, b;
  int nis, nbr;
  initial begin
    a = '{bits: 8'b0, tail: 3'd1}; b = '{bits: 8'b1, tail: 3'd1};
    a0 = pid_child(a, 0); a1 = pid_child(a, 1);
    ncommit = 0; nhole = 0;
    idle();
    @(posedge clk); #1 rst_n = 1;
    // ---- dependence and oldest-first issue ----
    put(0, K_ALU, a, 0, 0, 0);
    put(1, K_ALU, a, 0, 1, 0);        // waits for tag 0
    put(2, K_COND, b, 1, 0, 0);
    #1 chk(ds_tag[0] == 0 && ds_tag[1] == 1 && ds_tag[2] == 2 && ds_ready, "dispatch tags");
    @(posedge clk); #1 idle();
    chk(ctx_cnt[0] == 2 && ctx_cnt[1] == 1 && count == 3, "occupancy per path");
    chk(is_v[0] && is_tag[0] == 0 && is_v[1] && is_tag[1] == 2 && !is_v[2], "ready ones issue, oldest first");
    @(posedge clk); #1;
    chk(is_v[0] && is_tag[0] == 1, "consumer wakes after producer");
    @(posedge clk); #1;
    repeat (2) @(posedge clk); #1;
    chk(ncommit == 3 && count == 0, "all committed");
    // ---- issue width, one branch, one load, hold ----
    issued_order.delete();
    for (int d = 0; d < 8; d++) put(d, (d == 1 || d == 2) ? K_COND : (d == 3 || d == 4) ? K_LOAD : K_ALU, a, 0, 0, 0);
    is_hold = 0;
    @(posedge clk); #1 idle();
    nis = 0; nbr = 0;
    for (int s = 0; s < IW; s++) if (is_v[s]) begin nis++; if (is_uop[s].kind == K_COND) nbr++; end
    chk(nis == 4 && nbr == 1, "4 issued, one branch");
    chk(is_tag[0] == 3 && is_tag[1] == 4 && is_tag[2] == 6 && is_tag[3] == 8, "skips 2nd branch and 2nd load");
    is_hold = 1;
    @(posedge clk); #1;
    for (int s = 0; s < IW; s++) chk(!(is_v[s] && is_uop[s].kind == K_LOAD), "hold blocks loads");
    is_hold = 0;
    repeat (3) @(posedge clk); #1;
    chk(count > 0, "load not done without ld_done");
    ld_done_v[0] = 1; ld_done_tag[0] = 6; ld_done_v[1] = 1; ld_done_tag[1] = 7;
    @(posedge clk); #1 idle();
    repeat (4) @(posedge clk); #1;
    chk(count == 0, "loads done by ld_done, window drains");
    // ---- forked squash ----
    ncommit = 0; nhole = 0;
    is_hold = 1;                             // keep loads waiting so nothing drains
    put(0, K_LOAD, a, 0, 0, 0);              // tag 11 older, blocks commit
    put(1, K_COND, a, 0, 0, 0);              // tag 12: forking branch
    put(2, K_LOAD, a1, 0, 0, 0);             // taken side
    put(3, K_LOAD, a0, 1, 0, 0);             // not-taken side
    put(4, K_LOAD, b, 2, 0, 0);              // unrelated path
    put(5, K_LOAD, pid_child(a0, 1), 3, 0, 0); // grandchild on not-taken side
    #1 chk(ds_tag[1] == 12, "tag of forking branch");
    @(posedge clk); #1 idle(); is_hold = 1;
    sq_v = 1; sq_tag = 12; sq_root = a0;     // branch resolved taken
    @(posedge clk); #1 idle(); is_hold = 1;
    chk(dut.e[13].hole == 0 && dut.e[14].hole == 1 && dut.e[15].hole == 0 && dut.e[16].hole == 1, "forked squash hits the x0 subtree only");
    chk(ctx_cnt[1] == 0 && ctx_cnt[3] == 0 && ctx_cnt[2] == 1, "holes leave occupancy");
    // ---- non-forked squash by older branch on path a ----
    sq_v = 1; sq_tag = 11; sq_root = a;
    @(posedge clk); #1 idle(); is_hold = 1;
    chk(dut.e[11].hole == 0 && dut.e[12].hole == 1 && dut.e[13].hole == 1 && dut.e[15].hole == 0, "mispredict squash: younger on path a");
    is_hold = 0;
    ld_done_v[0] = 1; ld_done_tag[0] = 11;
    repeat (20) begin
      @(posedge clk); #1 idle();
      for (int s = 0; s < IW; s++)
        if (is_v[s] && is_uop[s].kind == K_LOAD) begin
          ld_done_v[s % 2] = 1; ld_done_tag[s % 2] = is_tag[s];
        end
    end
    chk(count == 0 && ncommit == 6 && nhole == 4, "holes reclaimed at commit");
    // ---- full ----
    for (int r = 0; r < 8; r++) begin
      for (int d = 0; d < DW; d++) put(d, K_LOAD, a, 0, 0, 0);
      is_hold = 1;
      @(posedge clk); #1 idle(); is_hold = 1;
    end
    chk(!ds_ready && count == 64, "window full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
