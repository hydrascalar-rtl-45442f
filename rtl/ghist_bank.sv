// ghist_bank: per-path speculative global branch history with fixup.
//
// Each path keeps a GW-bit global history register that is shifted with the
// predicted direction as soon as a conditional branch is predicted
// (speculative update), so that following branches see up-to-date history.
// The value before the shift is the branch's checkpoint; on a misprediction
// the history is rebuilt from the checkpoint and the correct direction
// (rst_*; with rst_shift = 0 the checkpoint is restored unchanged, for
// branches that do not enter the history, such as returns). On a fork the new context gets the parent's pre-branch history
// shifted with the other direction (cp_*).
// Speculative update with checkpoint/restore follows the description; the
// width is this design's. Priority per path: restore, copy, shift.
// Timing: hist is the registered value; updates take effect next edge.
module ghist_bank
  import hs_pkg::*;
#(
  parameter int NP = NPATH,
  parameter int GW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic [GW-1:0]         hist      [NP],
  input  logic                  shift     [NP],
  input  logic                  shift_dir [NP],
  input  logic                  rst_valid [NP],
  input  logic [GW-1:0]         rst_ckpt  [NP],
  input  logic                  rst_dir   [NP],
  input  logic                  rst_shift [NP],
  input  logic                  cp_valid,
  input  logic [$clog2(NP)-1:0] cp_dst,
  input  logic [GW-1:0]         cp_ckpt,
  input  logic                  cp_dir
);
  logic [GW-1:0] h [NP];
  assign hist = h;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) h[p] <= '0;
    end else begin
      for (int p = 0; p < NP; p++)
        if (rst_valid[p])                                    h[p] <= rst_shift[p] ? {rst_ckpt[p][GW-2:0], rst_dir[p]} : rst_ckpt[p];
        else if (cp_valid && cp_dst == $clog2(NP)'(p))       h[p] <= {cp_ckpt[GW-2:0], cp_dir};
        else if (shift[p])                                   h[p] <= {h[p][GW-2:0], shift_dir[p]};
    end
endmodule
