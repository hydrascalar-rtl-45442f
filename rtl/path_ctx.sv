// path_ctx: path-context manager and path-ID allocator (fork control state).
//
// Holds NCTX path contexts. Each live context owns a path ID (circular
// bitmap + tail pointer, see hs_pkg) and a "predicted path" flag that marks
// the context following every branch prediction. A global head pointer marks
// the bitmap position of the oldest forked branch not yet retired.
//
//  * Fork (fork_valid, fork_ctx, fork_pdir): the branch's path ID is x. The
//    forking context keeps the predicted direction and becomes x.pdir; the
//    lowest free context starts the other direction as x.!pdir. Forking is
//    refused when no context is free or the ID would reach PIDB-1 bits (the
//    tail would overtake the head).
//  * Resolution of a forked branch (res_forked=1): the correct direction
//    res_dir is broadcast; every context in the subtree x.!res_dir is freed.
//  * Misprediction of a conventionally speculated branch (res_forked=0):
//    every context in x's subtree is squashed; the lowest of them is reused
//    for the corrected path and gets ID x back (res_rst_ctx, for redirection).
//  * Retirement of a forked branch whose bitmap position equals the head
//    advances the head.
// Resolution has priority over a fork in the same cycle; a fork by a context
// that the resolution touches is dropped (fork_ok = 0).
// The ID scheme follows the description; the choice of which context keeps
// which side, one fork per cycle and the hand-over of the predicted flag to
// the lowest surviving context are this design's choices.
// Timing: fork_ok / fork_new / res_rst_ctx are combinational; state changes
// at the next clock edge.
module path_ctx
  import hs_pkg::*;
#(
  parameter int NCTX = NPATH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // state
  output logic                     ctx_active [NCTX],
  output pid_t                     ctx_pid    [NCTX],
  output logic                     ctx_pred   [NCTX],
  output logic [PTRW-1:0]          head,
  output logic [$clog2(NCTX+1)-1:0] nfree,
  // fork
  input  logic                     fork_valid,
  input  logic [$clog2(NCTX)-1:0]  fork_ctx,
  input  logic                     fork_pdir,
  output logic                     fork_ok,
  output logic [$clog2(NCTX)-1:0]  fork_new,
  // resolution
  input  logic                     res_valid,
  input  logic                     res_forked,
  input  pid_t                     res_pid,
  input  logic                     res_dir,
  output logic                     kill       [NCTX],
  output logic                     res_rst_valid,
  output logic [$clog2(NCTX)-1:0]  res_rst_ctx,
  // retirement of a forked branch
  input  logic                     ret_valid,
  input  logic [PTRW-1:0]          ret_pos
);
  localparam int CW = $clog2(NCTX);

  logic act_q [NCTX];
  pid_t pid_q [NCTX];
  logic prd_q [NCTX];
  logic [PTRW-1:0] head_q;

  assign ctx_active = act_q;
  assign ctx_pid    = pid_q;
  assign ctx_pred   = prd_q;
  assign head       = head_q;

  // ---- resolution: which contexts are hit ----
  pid_t wrong_root;
  logic hit [NCTX];
  logic surv_found, pred_lost;
  logic [CW-1:0] surv;
  always_comb begin
    wrong_root = pid_child(res_pid, ~res_dir);
    surv_found = 1'b0;
    surv       = '0;
    pred_lost  = 1'b0;
    for (int c = 0; c < NCTX; c++) begin
      hit[c] = res_valid && act_q[c] &&
               (res_forked ? pid_descends(pid_q[c], wrong_root, head_q)
                           : pid_descends(pid_q[c], res_pid, head_q));
      kill[c] = 1'b0;
    end
    res_rst_valid = 1'b0;
    res_rst_ctx   = '0;
    if (res_valid && !res_forked) begin
      for (int c = NCTX-1; c >= 0; c--)
        if (hit[c]) begin res_rst_valid = 1'b1; res_rst_ctx = CW'(c); end
    end
    for (int c = 0; c < NCTX; c++) begin
      kill[c] = hit[c] && !(res_rst_valid && res_rst_ctx == CW'(c));
      if (kill[c] && prd_q[c]) pred_lost = 1'b1;
    end
    // lowest survivor on the correct side of a forked branch
    for (int c = NCTX-1; c >= 0; c--)
      if (res_valid && res_forked && act_q[c] && !hit[c] &&
          pid_descends(pid_q[c], pid_child(res_pid, res_dir), head_q)) begin
        surv_found = 1'b1; surv = CW'(c);
      end
  end

  // ---- fork ----
  logic free_found;
  logic [CW-1:0] free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    nfree      = '0;
    for (int c = NCTX-1; c >= 0; c--)
      if (!act_q[c]) begin free_found = 1'b1; free_idx = CW'(c); end
    for (int c = 0; c < NCTX; c++) if (!act_q[c]) nfree = nfree + 1'b1;
    fork_new = free_idx;
    fork_ok  = fork_valid && free_found && act_q[fork_ctx] && !hit[fork_ctx] &&
               (pid_len(pid_q[fork_ctx].tail, head_q) < PTRW'(PIDB-2));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++) begin
        act_q[c] <= (c == 0);
        pid_q[c] <= '0;
        prd_q[c] <= (c == 0);
      end
      head_q <= '0;
    end else begin
      for (int c = 0; c < NCTX; c++)
        if (kill[c]) begin act_q[c] <= 1'b0; prd_q[c] <= 1'b0; end
      if (res_rst_valid) begin
        pid_q[res_rst_ctx] <= res_pid;
        if (pred_lost) prd_q[res_rst_ctx] <= 1'b1;
      end
      if (res_valid && res_forked && pred_lost && surv_found) prd_q[surv] <= 1'b1;
      if (fork_ok) begin
        pid_q[fork_ctx] <= pid_child(pid_q[fork_ctx], fork_pdir);
        pid_q[free_idx] <= pid_child(pid_q[fork_ctx], ~fork_pdir);
        act_q[free_idx] <= 1'b1;
        prd_q[free_idx] <= 1'b0;
      end
      if (ret_valid && ret_pos == head_q) head_q <= head_q + 1'b1;
    end
endmodule
