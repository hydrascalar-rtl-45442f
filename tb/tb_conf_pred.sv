// tb_conf_pred: random updates on a small set of PCs under each counter
// discipline; every lookup port is compared each cycle with a model that
// keeps the outcome sequence per table entry and recomputes the confidence
// value from it (ones count of the last N, saturating sum, or corrects since
// the last mispredict).
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_conf_pred;
  import hs_pkg::*;
  localparam int E = 1024, N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  conf_kind_e kind;
  pc_t rd_pc [NPATH];
  logic [N-1:0] rd_conf [NPATH];
  logic upd_valid, upd_correct;
  pc_t upd_pc;
  int checks = 0, failures = 0;

  conf_pred dut (.*);

  // model: list of outcomes per entry (newest last)
  int hist [E][$];
  function automatic int model(input int i, input conf_kind_e k);
    int v, n;
    v = 0; n = hist[i].size();
    if (k == CONF_ONES) begin
      for (int j = (n > N ? n - N : 0); j < n; j++) v += hist[i][j];
      return v;
    end
    for (int j = 0; j < n; j++)
      if (k == CONF_SAT) v = hist[i][j] ? (v < 2**N-1 ? v + 1 : v) : (v > 0 ? v - 1 : 0);
      else               v = hist[i][j] ? (v < 2**N-1 ? v + 1 : v) : 0;
    return v;
  endfunction

  initial begin
    conf_kind_e kinds [3] = '{CONF_ONES, CONF_SAT, CONF_RESET};
    for (int k = 0; k < 3; k++) begin
      kind = kinds[k];
      rst_n = 0; upd_valid = 0; upd_pc = 0; upd_correct = 0;
      for (int p = 0; p < NPATH; p++) rd_pc[p] = 0;
      for (int i = 0; i < E; i++) hist[i].delete();
      @(posedge clk); #1 rst_n = 1;
      for (int t = 0; t < 600; t++) begin
        upd_valid   = $urandom % 4 != 0;
        upd_pc      = pc_t'(($urandom % 6) * 1024 + ($urandom % 8)); // aliasing PCs too
        upd_correct = $urandom % 3 != 0;
        for (int p = 0; p < NPATH; p++) rd_pc[p] = pc_t'($urandom % 8);
        #1;
        for (int p = 0; p < NPATH; p++) begin
          checks++;
          if (int'(rd_conf[p]) != model(int'(rd_pc[p]) % E, kind)) begin
            failures++;
            if (failures < 5) $display("FAIL kind=%0d pc=%0d got %0d exp %0d", kind, rd_pc[p], rd_conf[p], model(int'(rd_pc[p]) % E, kind));
          end
        end
        @(posedge clk);
        if (upd_valid) hist[int'(upd_pc) % E].push_back(int'(upd_correct));
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
