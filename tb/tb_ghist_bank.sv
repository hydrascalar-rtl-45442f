// tb_ghist_bank: random speculative shifts, restores (with and without the
// direction bit) and fork copies on every path; an integer model shifts with
// multiplication and masks.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_ghist_bank;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] hist [NPATH], rst_ckpt [NPATH], cp_ckpt;
  logic shift [NPATH], shift_dir [NPATH], rst_valid [NPATH], rst_dir [NPATH], rst_shift [NPATH];
  logic cp_valid, cp_dir;
  logic [1:0] cp_dst;
  int checks = 0, failures = 0;
  int m [NPATH];

  ghist_bank dut (.*);

  initial begin
    for (int p = 0; p < NPATH; p++) begin shift[p] = 0; shift_dir[p] = 0; rst_valid[p] = 0; rst_dir[p] = 0; rst_shift[p] = 0; rst_ckpt[p] = 0; m[p] = 0; end
    cp_valid = 0; cp_dir = 0; cp_dst = 0; cp_ckpt = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < NPATH; p++) begin
        shift[p] = 1'($urandom); shift_dir[p] = 1'($urandom);
        rst_valid[p] = ($urandom % 6 == 0); rst_dir[p] = 1'($urandom); rst_shift[p] = 1'($urandom);
        rst_ckpt[p] = 8'($urandom);
      end
      cp_valid = ($urandom % 5 == 0); cp_dst = 2'($urandom); cp_dir = 1'($urandom); cp_ckpt = 8'($urandom);
      @(posedge clk);
      for (int p = 0; p < NPATH; p++)
        if (rst_valid[p]) m[p] = rst_shift[p] ? (int'(rst_ckpt[p]) * 2 + int'(rst_dir[p])) % 256 : int'(rst_ckpt[p]);
        else if (cp_valid && cp_dst == p) m[p] = (int'(cp_ckpt) * 2 + int'(cp_dir)) % 256;
        else if (shift[p]) m[p] = (m[p] * 2 + int'(shift_dir[p])) % 256;
      #1;
      for (int p = 0; p < NPATH; p++) begin
        checks++;
        if (int'(hist[p]) != m[p]) begin failures++; if (failures < 5) $display("FAIL p%0d %0d exp %0d", p, hist[p], m[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
