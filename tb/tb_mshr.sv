// tb_mshr: random load misses against a memory model with a random latency.
// The model tracks, per line, the loads still waiting; every completion must
// name a waiting load, each load must complete exactly once, misses must be
// refused only when the design says it is full, and merging (second miss to
// a line already waiting) and running full must both occur.
// Timing: inputs change after each rising clock edge and outputs are
// compared before the next one; the model advances on the same edges.
// A watchdog ends a hung run with a failure. The expected behaviour is
// the rule set in the module's own header; the stimulus and reference
// model are this testbench's choices.
`timescale 1ns/1ps
module tb_mshr;
  import hs_pkg::*;
  localparam int NM = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic full, alloc_v, req_v, fill_v, done_v;
  pc_t alloc_line, req_line;
  logic [5:0] alloc_tag, done_tag;
  logic [2:0] req_idx, fill_idx;
  logic [3:0] busy_cnt;
  int checks = 0, failures = 0;

  mshr dut (.*);

  int pending [int];        // tag -> line, loads waiting
  int lat [NM];
  logic inmem [NM];
  int n_merge = 0, n_full = 0, n_done = 0, n_alloc = 0;
  int next_tag = 0;

  always_comb begin
    fill_v = 0; fill_idx = 0;
    for (int m = NM-1; m >= 0; m--) if (inmem[m] && lat[m] == 0) begin fill_v = 1; fill_idx = 3'(m); end
  end

  initial begin
    for (int m = 0; m < NM; m++) begin inmem[m] = 0; lat[m] = 0; end
    alloc_v = 0; alloc_line = 0; alloc_tag = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      // new miss, only when not full and the tag is free
      alloc_v = 0;
      if ($urandom % 2 == 0 && !pending.exists(next_tag)) begin
        if (full) n_full++;
        else begin
          alloc_v = 1; alloc_line = pc_t'($urandom % 12); alloc_tag = 6'(next_tag);
          if (dut.mhit) n_merge++;
        end
      end
      #1;
      if (done_v) begin
        checks++;
        if (!pending.exists(int'(done_tag))) begin failures++; $display("FAIL unexpected completion %0d", done_tag); end
        else pending.delete(int'(done_tag));
        n_done++;
      end
      if (req_v) begin
        checks++;
        if (inmem[req_idx]) begin failures++; $display("FAIL request twice"); end
      end
      @(posedge clk);
      if (alloc_v) begin pending[int'(alloc_tag)] = int'(alloc_line); next_tag = (next_tag + 1) % 64; n_alloc++; end
      for (int m = 0; m < NM; m++) if (inmem[m]) begin
        if (fill_v && fill_idx == m) inmem[m] = 0; else if (lat[m] > 0) lat[m]--;
      end
      if (req_v) begin inmem[req_idx] = 1; lat[req_idx] = 5 + $urandom % 30; end
      #1;
    end
    alloc_v = 0;
    repeat (400) begin
      #1; if (done_v) begin checks++; if (!pending.exists(int'(done_tag))) failures++; else pending.delete(int'(done_tag)); n_done++; end
      @(posedge clk);
      for (int m = 0; m < NM; m++) if (inmem[m]) begin
        if (fill_v && fill_idx == m) inmem[m] = 0; else if (lat[m] > 0) lat[m]--;
      end
      if (req_v) begin inmem[req_idx] = 1; lat[req_idx] = 5; end
      #1;
    end
    checks += 3;
    if (pending.size() != 0) begin failures++; $display("FAIL %0d loads never completed", pending.size()); end
    if (n_merge == 0) begin failures++; $display("FAIL no merge"); end
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("allocs=%0d merges=%0d full=%0d done=%0d", n_alloc, n_merge, n_full, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
