// tb_fetch_arb: random eligibility, predicted-path marks and window
// occupancies under all four policies. The model hands out blocks one by one
// following each policy's rule, using the round-robin position it tracks
// itself (advancing by one every cycle from reset).
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_fetch_arb;
  import hs_pkg::*;
  localparam int NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fetch_pol_e pol;
  logic elig [NPATH], is_pred [NPATH];
  logic [6:0] ruu_cnt [NPATH];
  logic [1:0] grant [NPATH];
  int checks = 0, failures = 0;
  int rr;

  fetch_arb #(.NBLK(NB)) dut (.*);

  task automatic model(output int g [NPATH]);
    int left, fav, best;
    for (int i = 0; i < NPATH; i++) g[i] = 0;
    left = NB; fav = -1; best = 1000;
    if (pol == FB_PRED_RUU) begin
      for (int i = 0; i < NPATH; i++) if (elig[i] && int'(ruu_cnt[i]) < best) begin fav = i; best = ruu_cnt[i]; end
    end else if (pol != FB_SIMPLE)
      for (int i = NPATH-1; i >= 0; i--) if (elig[i] && is_pred[i]) fav = i;
    if (fav >= 0) begin g[fav]++; left--; end
    if (pol == FB_SIMPLE || pol == FB_PRED_PRI) begin
      for (int r = 0; r < NB; r++)
        for (int k = 0; k < NPATH; k++)
          if (left > 0 && elig[(rr + k) % NPATH]) begin g[(rr + k) % NPATH]++; left--; end
    end else begin
      for (int k = 0; k < NPATH; k++)
        if (left > 0 && elig[(rr + k) % NPATH] && (rr + k) % NPATH != fav) begin g[(rr + k) % NPATH]++; left--; end
      if (fav >= 0) g[fav] += left;
    end
  endtask

  initial begin
    int g [NPATH];
    pol = FB_SIMPLE;
    for (int i = 0; i < NPATH; i++) begin elig[i] = 0; is_pred[i] = 0; ruu_cnt[i] = 0; end
    @(posedge clk); #1 rst_n = 1; rr = 0;
    for (int t = 0; t < 4000; t++) begin
      pol = fetch_pol_e'($urandom % 4);
      for (int i = 0; i < NPATH; i++) begin
        elig[i] = $urandom % 3 != 0;
        is_pred[i] = 0;
        ruu_cnt[i] = 7'($urandom % 64);
      end
      is_pred[$urandom % NPATH] = 1;
      #1;
      model(g);
      for (int i = 0; i < NPATH; i++) begin
        checks++;
        if (int'(grant[i]) != g[i]) begin
          failures++;
          if (failures < 5) $display("FAIL pol=%0d path %0d grant %0d exp %0d", pol, i, grant[i], g[i]);
        end
      end
      @(posedge clk); rr = (rr + 1) % NPATH; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
