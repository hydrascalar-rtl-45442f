// ras_bank: per-path return-address stacks with speculative repair.
//
// Each path context owns a private circular return-address stack of DEPTH
// entries (a shared stack would be corrupted by calls and returns on paths
// that are later squashed). Calls push and returns pop in the fetch stage,
// speculatively. For repair, each in-flight branch saves the stack's
// top-of-stack pointer and top-of-stack contents (ckpt_tos / ckpt_top); on a
// misprediction both are written back (rst_*), which is enough to undo the
// pushes and pops made down the wrong path in nearly all cases. When a path
// forks, the new context receives a copy of the parent's whole stack and
// pointer (cp_*) in one cycle. 'below' is the entry under the top, so
// that a return can checkpoint the state after its own pop.
// Per-path stacks, fetch-time update and pointer+contents repair follow the
// description. DEPTH and the single-cycle whole-stack copy (the description
// allows copying the deeper entries later) are this design's choices.
// Interface: per path push / pop, per path restore, one copy per cycle.
// Priority within a path in one cycle: restore, then copy-in, then push/pop.
// Timing: top / checkpoint outputs are combinational from state; updates take
// effect at the next clock edge.
module ras_bank
  import hs_pkg::*;
#(
  parameter int NP    = NPATH,
  parameter int DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push     [NP],
  input  pc_t                     push_val [NP],
  input  logic                    pop      [NP],
  output pc_t                     top      [NP],
  output logic [$clog2(DEPTH)-1:0] ckpt_tos [NP],
  output pc_t                     ckpt_top [NP],
  output pc_t                     below    [NP],
  input  logic                    rst_valid[NP],
  input  logic [$clog2(DEPTH)-1:0] rst_tos  [NP],
  input  pc_t                     rst_top  [NP],
  input  logic                    cp_valid,
  input  logic [$clog2(NP)-1:0]   cp_src,
  input  logic [$clog2(NP)-1:0]   cp_dst
);
  localparam int DW = $clog2(DEPTH);

  pc_t          stk [NP][DEPTH];
  logic [DW-1:0] tos [NP];   // index of the top entry

  always_comb
    for (int p = 0; p < NP; p++) begin
      top[p]      = stk[p][tos[p]];
      ckpt_tos[p] = tos[p];
      ckpt_top[p] = stk[p][tos[p]];
      below[p]    = stk[p][tos[p] - 1'b1];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        tos[p] <= '0;
        for (int d = 0; d < DEPTH; d++) stk[p][d] <= '0;
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (rst_valid[p]) begin
          tos[p]              <= rst_tos[p];
          stk[p][rst_tos[p]]  <= rst_top[p];
        end else if (cp_valid && cp_dst == $clog2(NP)'(p)) begin
          tos[p] <= tos[cp_src];
          for (int d = 0; d < DEPTH; d++) stk[p][d] <= stk[cp_src][d];
        end else if (push[p]) begin
          tos[p]                   <= tos[p] + 1'b1;
          stk[p][tos[p] + 1'b1]    <= push_val[p];
        end else if (pop[p]) begin
          tos[p] <= tos[p] - 1'b1;
        end
      end
    end
endmodule
