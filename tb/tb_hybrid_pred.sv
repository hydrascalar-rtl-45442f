// tb_hybrid_pred: random training on a few branch PCs and history values,
// with every read port compared each cycle against a model of the counter
// tables written independently (associative arrays keyed by the index
// fields, weakly-not-taken when untouched).
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_hybrid_pred;
  import hs_pkg::*;
  localparam int GB = 8, LB = 8, AB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pc_t rd_pc [NPATH], upd_pc;
  logic [GB-1:0] rd_g [NPATH], upd_g;
  logic [LB-1:0] rd_l [NPATH], upd_l;
  logic rd_taken [NPATH], upd_valid, upd_taken;
  int checks = 0, failures = 0, n_t = 0, n_nt = 0;

  hybrid_pred dut (.*);
  int gp [int], lp [int], ch [int];
  function automatic int g1(input int k); return gp.exists(k) ? gp[k] : 1; endfunction
  function automatic int l1(input int k); return lp.exists(k) ? lp[k] : 1; endfunction
  function automatic int c1(input int k); return ch.exists(k) ? ch[k] : 1; endfunction
  function automatic int sat(input int v, input logic up); return up ? (v < 3 ? v + 1 : 3) : (v > 0 ? v - 1 : 0); endfunction
  function automatic logic predict(input pc_t pc, input logic [GB-1:0] g, input logic [LB-1:0] l);
    int gk, lk;
    gk = int'(g) * 16 + int'(pc) % 16; lk = int'(l) * 16 + int'(pc) % 16;
    return (c1(int'(pc) % 1024) >= 2) ? (g1(gk) >= 2) : (l1(lk) >= 2);
  endfunction
  task automatic train();
    int gk, lk, ck;
    logic gok, lok;
    gk = int'(upd_g) * 16 + int'(upd_pc) % 16; lk = int'(upd_l) * 16 + int'(upd_pc) % 16; ck = int'(upd_pc) % 1024;
    gok = (g1(gk) >= 2) == upd_taken; lok = (l1(lk) >= 2) == upd_taken;
    if (gok != lok) ch[ck] = sat(c1(ck), gok);
    gp[gk] = sat(g1(gk), upd_taken); lp[lk] = sat(l1(lk), upd_taken);
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_g = 0; upd_l = 0; upd_taken = 0;
    for (int p = 0; p < NPATH; p++) begin rd_pc[p] = 0; rd_g[p] = 0; rd_l[p] = 0; end
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      upd_valid = $urandom % 4 != 0;
      upd_pc = pc_t'(($urandom % 4) * 1024 + $urandom % 6);
      upd_g = GB'($urandom % 3); upd_l = LB'($urandom % 3);
      upd_taken = ($urandom % 10) < (int'(upd_pc) % 6 < 3 ? 8 : 3);
      for (int p = 0; p < NPATH; p++) begin
        rd_pc[p] = pc_t'($urandom % 6); rd_g[p] = GB'($urandom % 3); rd_l[p] = LB'($urandom % 3);
      end
      #1;
      for (int p = 0; p < NPATH; p++) begin
        checks++;
        if (rd_taken[p] !== predict(rd_pc[p], rd_g[p], rd_l[p])) begin
          failures++; if (failures < 5) $display("FAIL port %0d pc %0d", p, rd_pc[p]);
        end
        if (rd_taken[p]) n_t++; else n_nt++;
      end
      @(posedge clk);
      if (upd_valid) train();
      #1;
    end
    checks++;
    if (n_t == 0 || n_nt == 0) begin failures++; $display("FAIL predictions never vary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
