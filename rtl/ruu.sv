// ruu: unified instruction window (register update unit) shared by all paths.
//
// A circular window of N entries holds instructions from all live paths,
// interleaved in fetch order; each entry is tagged with its path ID. There are
// no per-path windows, so a single path can use the whole window.
//  * Dispatch: up to DW instructions per cycle enter at the tail; the k-th
//    valid slot gets tag tail+k (ds_tag). ds_ready says DW entries are free.
//  * Wake-up: an entry waits while its source operand's producer (src tag) is
//    not done; producers wake consumers by being done.
//  * Issue: the oldest ready instructions, regardless of path, up to IW per
//    cycle, at most one conditional branch or return (one resolution port)
//    and at most one load (one memory port). Non-load instructions finish
//    in one cycle; loads finish when one of the two ld_done ports (cache hit,
//    miss fill) names their tag.
//  * Selective squash: a squash names the resolving branch's slot and the root
//    of the subtree of path IDs to cancel; younger entries inside that subtree
//    become holes. Holes are not issued; they stay in place until commit.
//    A load that became a hole after issue is kept until it finishes, so
//    its slot is never reused while a fill can still name it.
//  * Commit: in order from the head, up to CW finished entries or holes per
//    cycle, stopping after a conditional branch (at most one branch's branch
//    state is retired per cycle). Each commit reports whether it was a hole.
// The unified window, path tags, oldest-first issue and holes reclaimed at
// commit follow the description; sizes, widths, the one-cycle execute and the
// per-cycle limits are this design's.
// Timing: ds_tag, issue and commit selections are combinational from state;
// all state changes at the next edge.
module ruu
  import hs_pkg::*;
#(
  parameter int N  = 64,
  parameter int DW = 8,
  parameter int IW = 4,
  parameter int CW = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PTRW-1:0]       pid_head,
  // dispatch
  input  logic                  ds_v        [DW],
  input  uop_t                  ds_uop      [DW],
  input  logic                  ds_src_busy [DW],
  input  logic [$clog2(N)-1:0]  ds_src_tag  [DW],
  output logic [$clog2(N)-1:0]  ds_tag      [DW],
  output logic                  ds_ready,
  // issue
  output logic                  is_v   [IW],
  output logic [$clog2(N)-1:0]  is_tag [IW],
  output uop_t                  is_uop [IW],
  input  logic                  is_hold,       // refuse the load this cycle
  input  logic                  ld_done_v   [2],
  input  logic [$clog2(N)-1:0]  ld_done_tag [2],
  // selective squash
  input  logic                  sq_v,
  input  logic [$clog2(N)-1:0]  sq_tag,
  input  pid_t                  sq_root,
  // commit
  output logic                  cm_v    [CW],
  output logic [$clog2(N)-1:0]  cm_tag  [CW],
  output uop_t                  cm_uop  [CW],
  output logic                  cm_hole [CW],
  // occupancy per path context
  output logic [$clog2(N+1)-1:0] ctx_cnt [NPATH],
  output logic [$clog2(N+1)-1:0] count
);
  localparam int TW = $clog2(N);

  typedef struct packed {
    logic          valid;
    logic          hole;
    logic          issued;
    logic          done;
    logic          sbusy;
    logic [TW-1:0] stag;
    uop_t          uop;
  } ent_t;

  ent_t          e [N];
  logic [TW-1:0] hd, tl;
  logic [TW:0]   cnt;

  assign count    = cnt;
  assign ds_ready = (int'(cnt) <= N - DW);

  function automatic logic is_res(input kind_e k);
    return (k == K_COND) || (k == K_RET);
  endfunction

  // dispatch tags
  always_comb begin
    int n;
    n = 0;
    for (int d = 0; d < DW; d++) begin
      ds_tag[d] = tl + TW'(n);
      if (ds_v[d]) n++;
    end
  end

  // ready and issue selection, oldest first
  logic rdy [N];
  always_comb begin
    int  ni;
    logic br_used, ld_used;
    logic [TW-1:0] i;
    for (int k = 0; k < N; k++)
      rdy[k] = e[k].valid && !e[k].hole && !e[k].issued &&
               (!e[k].sbusy || e[e[k].stag].done || !e[e[k].stag].valid);
    ni = 0; br_used = 1'b0; ld_used = 1'b0;
    for (int s = 0; s < IW; s++) begin is_v[s] = 1'b0; is_tag[s] = '0; is_uop[s] = '0; end
    for (int k = 0; k < N; k++) begin
      i = hd + TW'(k);
      if (k < int'(cnt) && rdy[i] && ni < IW &&
          !(is_res(e[i].uop.kind) && br_used) &&
          !(e[i].uop.kind == K_LOAD && (ld_used || is_hold))) begin
        is_v[ni] = 1'b1; is_tag[ni] = i; is_uop[ni] = e[i].uop;
        if (is_res(e[i].uop.kind)) br_used = 1'b1;
        if (e[i].uop.kind == K_LOAD) ld_used = 1'b1;
        ni++;
      end
    end
  end

  // squash selection
  logic kill [N];
  always_comb begin
    logic [TW-1:0] ab, ai;
    ab = sq_tag - hd;
    for (int k = 0; k < N; k++) begin
      ai = TW'(k) - hd;
      kill[k] = sq_v && e[k].valid && ai > ab &&
                pid_descends(e[k].uop.pid, sq_root, pid_head);
    end
  end

  // commit selection
  always_comb begin
    logic stop;
    logic [TW-1:0] i;
    stop = 1'b0;
    for (int c = 0; c < CW; c++) begin
      i = hd + TW'(c);
      cm_tag[c]  = i;
      cm_uop[c]  = e[i].uop;
      cm_hole[c] = e[i].hole;
      cm_v[c]    = 1'b0;
      if (!stop && c < int'(cnt) && e[i].valid && (e[i].done || (e[i].hole && !e[i].issued))) begin
        cm_v[c] = 1'b1;
        if (e[i].uop.kind == K_COND) stop = 1'b1;
      end else stop = 1'b1;
    end
  end

  // occupancy per context (live, non-hole)
  always_comb begin
    for (int p = 0; p < NPATH; p++) ctx_cnt[p] = '0;
    for (int k = 0; k < N; k++)
      if (e[k].valid && !e[k].hole) ctx_cnt[e[k].uop.ctx] = ctx_cnt[e[k].uop.ctx] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hd <= '0; tl <= '0; cnt <= '0;
      for (int k = 0; k < N; k++) e[k] <= '0;
    end else begin
      int nd, nc;
      nd = 0; nc = 0;
      for (int k = 0; k < N; k++) begin
        if (e[k].sbusy && (e[e[k].stag].done || !e[e[k].stag].valid)) e[k].sbusy <= 1'b0;
        if (kill[k]) e[k].hole <= 1'b1;
      end
      for (int s = 0; s < IW; s++)
        if (is_v[s]) begin
          e[is_tag[s]].issued <= 1'b1;
          if (is_uop[s].kind != K_LOAD) e[is_tag[s]].done <= 1'b1;
        end
      for (int l = 0; l < 2; l++) if (ld_done_v[l]) e[ld_done_tag[l]].done <= 1'b1;
      for (int c = 0; c < CW; c++)
        if (cm_v[c]) begin e[cm_tag[c]].valid <= 1'b0; nc++; end
      for (int d = 0; d < DW; d++)
        if (ds_v[d]) begin
          e[ds_tag[d]] <= '{valid: 1'b1, hole: 1'b0, issued: 1'b0, done: 1'b0,
                            sbusy: ds_src_busy[d], stag: ds_src_tag[d], uop: ds_uop[d]};
          nd++;
        end
      hd  <= hd + TW'(nc);
      tl  <= tl + TW'(nd);
      cnt <= cnt + (TW+1)'(nd) - (TW+1)'(nc);
    end
endmodule
