// tb_rename_unit: directed test of per-path renaming with shadow maps.
// Checks intra-group bypass, independence of paths, checkpoint and restore
// after a misprediction, copy on fork, clearing on commit (maps and
// shadows), and the shadow-pool low-water mark that stalls fetch.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_rename_unit;
  import hs_pkg::*;
  localparam int W = 8, CMW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ren_v [NPATH][W], src_busy [NPATH][W], ck_req [NPATH], sh_low, rst_v, cp_v;
  logic [4:0] ren_src [NPATH][W], ren_dst [NPATH][W];
  logic [5:0] ren_tag [NPATH][W], src_tag [NPATH][W], cm_tag [CMW];
  logic [2:0] ck_idx [NPATH], rst_idx, fr_idx [CMW];
  logic [1:0] rst_ctx, cp_src, cp_dst;
  logic cm_v [CMW], fr_v [CMW];
  int checks = 0, failures = 0;

  rename_unit dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle();
    for (int p = 0; p < NPATH; p++) begin
      ck_req[p] = 0;
      for (int s = 0; s < W; s++) begin ren_v[p][s] = 0; ren_src[p][s] = 0; ren_dst[p][s] = 0; ren_tag[p][s] = 0; end
    end
    rst_v = 0; rst_idx = 0; rst_ctx = 0; cp_v = 0; cp_src = 0; cp_dst = 0;
    for (int c = 0; c < CMW; c++) begin cm_v[c] = 0; cm_tag[c] = 0; fr_v[c] = 0; fr_idx[c] = 0; end
  endtask
  // look up register r on path p through slot 7 (no writer before it)
  task automatic look(input int p, input int r, output logic b, output logic [5:0] t);
    ren_src[p][7] = 5'(r); #1; b = src_busy[p][7]; t = src_tag[p][7];
  endtask

  logic b; logic [5:0] t; logic [2:0] sh;
  initial begin
    idle();
    @(posedge clk); #1 rst_n = 1;
    look(0, 5, b, t); chk(!b, "reset: not busy");
    // group on path 0: r5 <- tag10, then reader of r5 in the same group
    ren_v[0][0] = 1; ren_dst[0][0] = 5; ren_tag[0][0] = 10;
    ren_v[0][1] = 1; ren_src[0][1] = 5; #1;
    chk(src_busy[0][1] && src_tag[0][1] == 10, "intra-group bypass");
    @(posedge clk); #1 idle();
    look(0, 5, b, t); chk(b && t == 10, "map updated");
    look(1, 5, b, t); chk(!b, "other path unaffected");
    // branch group: r6 <- tag11, checkpoint
    ren_v[0][0] = 1; ren_dst[0][0] = 6; ren_tag[0][0] = 11; ck_req[0] = 1; #1;
    sh = ck_idx[0];
    @(posedge clk); #1 idle();
    // wrong path writes r5 <- tag12
    ren_v[0][0] = 1; ren_dst[0][0] = 5; ren_tag[0][0] = 12;
    @(posedge clk); #1 idle();
    look(0, 5, b, t); chk(b && t == 12, "wrong-path rename");
    rst_v = 1; rst_ctx = 0; rst_idx = sh;
    @(posedge clk); #1 idle();
    look(0, 5, b, t); chk(b && t == 10, "restore r5");
    look(0, 6, b, t); chk(b && t == 11, "restore r6");
    // fork copy 0 -> 2
    cp_v = 1; cp_src = 0; cp_dst = 2;
    @(posedge clk); #1 idle();
    look(2, 5, b, t); chk(b && t == 10, "fork copy");
    // commit tag 10
    cm_v[0] = 1; cm_tag[0] = 10;
    @(posedge clk); #1 idle();
    look(0, 5, b, t); chk(!b, "commit clears path 0");
    look(2, 5, b, t); chk(!b, "commit clears path 2");
    chk(dut.sh[sh][5].busy == 0 && dut.sh[sh][6].busy == 1, "commit clears shadow entry");
    // shadow pool: 1 used; take 4 more -> 3 free < 4 -> low
    chk(!sh_low, "pool not low");
    for (int p = 0; p < NPATH; p++) ck_req[p] = 1;
    #1; chk(ck_idx[0] != sh && ck_idx[1] != ck_idx[0] && ck_idx[3] != ck_idx[2], "distinct shadows");
    @(posedge clk); #1 idle();
    chk(sh_low, "pool low stalls fetch");
    fr_v[0] = 1; fr_idx[0] = sh; fr_v[1] = 1; fr_idx[1] = 3'(sh + 1);
    @(posedge clk); #1 idle();
    chk(!sh_low, "released shadows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
