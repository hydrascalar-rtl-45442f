// tb_ras_bank: random pushes, pops, repairs and fork copies on all path
// stacks, compared with a queue-per-path model that stores the whole stack
// as a circular array. Repairs restore the checkpoint taken a few cycles
// earlier on the same path, as a misprediction would.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_ras_bank;
  import hs_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push [NPATH], pop [NPATH], rst_valid [NPATH], cp_valid;
  pc_t push_val [NPATH], top [NPATH], ckpt_top [NPATH], below [NPATH], rst_top [NPATH];
  logic [3:0] ckpt_tos [NPATH], rst_tos [NPATH];
  logic [1:0] cp_src, cp_dst;
  int checks = 0, failures = 0;

  ras_bank dut (.*);

  pc_t m [NPATH][D];
  int  mt [NPATH];
  int  sv_tos [NPATH];
  pc_t sv_top [NPATH];

  initial begin
    for (int p = 0; p < NPATH; p++) begin
      push[p] = 0; pop[p] = 0; rst_valid[p] = 0; push_val[p] = 0; rst_top[p] = 0; rst_tos[p] = 0;
      mt[p] = 0; sv_tos[p] = 0; sv_top[p] = 0;
      for (int d = 0; d < D; d++) m[p][d] = 0;
    end
    cp_valid = 0; cp_src = 0; cp_dst = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      cp_valid = ($urandom % 10 == 0);
      cp_src = 2'($urandom); cp_dst = 2'($urandom);
      for (int p = 0; p < NPATH; p++) begin
        int r;
        r = $urandom % 10;
        push[p] = r < 4; pop[p] = r >= 4 && r < 7;
        push_val[p] = pc_t'($urandom);
        rst_valid[p] = (r == 9);
        rst_tos[p] = 4'(sv_tos[p]); rst_top[p] = sv_top[p];
        if ($urandom % 4 == 0) begin sv_tos[p] = mt[p]; sv_top[p] = m[p][mt[p]]; end
      end
      #1;
      for (int p = 0; p < NPATH; p++) begin
        checks++;
        if (top[p] !== m[p][mt[p]] || int'(ckpt_tos[p]) != mt[p] || below[p] !== m[p][(mt[p] + D - 1) % D]) begin
          failures++;
          if (failures < 5) $display("FAIL path %0d top %0d exp %0d", p, top[p], m[p][mt[p]]);
        end
      end
      @(posedge clk);
      begin
        pc_t nm [NPATH][D];
        int nt [NPATH];
        nm = m; nt = mt;
        for (int p = 0; p < NPATH; p++)
          if (rst_valid[p]) begin nt[p] = rst_tos[p]; nm[p][rst_tos[p]] = rst_top[p]; end
          else if (cp_valid && cp_dst == p) begin nt[p] = mt[cp_src]; nm[p] = m[cp_src]; end
          else if (push[p]) begin nt[p] = (mt[p] + 1) % D; nm[p][(mt[p] + 1) % D] = push_val[p]; end
          else if (pop[p]) nt[p] = (mt[p] + D - 1) % D;
        m = nm; mt = nt;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
