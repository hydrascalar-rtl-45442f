// hydra_mp: multipath out-of-order processor front end and instruction window.
//
// Up to NPATH control-flow paths run at once. At a conditional branch that
// the confidence predictor rates as likely mispredicted, the fork control
// starts the other direction in a free path context, so whichever way the
// branch goes, the right instructions are already in flight. Branches that
// do not fork are predicted and speculated as usual.
//
// Per cycle:
//  Fetch   fetch_arb splits NBLK cache-line fetch blocks among eligible
//          paths; each path fetches up to its grant of contiguous lines
//          (if_pc / if_pd: the instruction cache with predecode bits is
//          outside). A block ends at the first control instruction, which is
//          predicted (alloyed or hybrid predictor, pred_sel), rated by
//          conf_pred and judged by fork_decide. Calls push and returns pop
//          the path's own return stack; the global history is shifted and an
//          OBQ entry allocated. At most one path forks per cycle; the new
//          context fetches from the next cycle.
//  Rename  each path renames through its own map; non-forked conditional
//          branches and returns take a shadow map.
//  Window  ruu holds all paths' instructions, tagged with path IDs; issue
//          picks the oldest ready instructions of any path.
//  Resolve a conditional branch or return resolves at issue against the
//          outside world (ex_*: real direction / return address). A forked
//          branch cancels the wrong side's subtree of paths; a mispredicted
//          non-forked branch cancels its own younger instructions and those
//          of its descendants, and redirects one context with restored
//          register map, history and return stack. Fetch pauses in a cycle
//          that cancels instructions.
//  Memory  loads issue one per cycle; ld_hit comes from the data cache
//          outside; misses go through the MSHRs to memory (mem_*).
//  Commit  in order; cancelled instructions (holes) are reclaimed here and
//          release their shadow maps; retiring the oldest forked branch
//          advances the path-ID head pointer. cm_* reports the commits.
// Mechanisms, sizes of paths and fetch blocks follow the description; the
// remaining widths, the one-branch-per-block fetch and the pause on squash
// are this design's choices (see each unit).
module hydra_mp
  import hs_pkg::*;
#(
  parameter int NBLK = 2,                // fetch blocks (cache lines) per cycle
  parameter int RUU_N = 64,              // window entries
  parameter int IW   = 4,                // issue width
  parameter int CMW  = 4,                // commit width
  parameter int NM   = 8                 // MSHRs
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  fork_pol_e   fork_pol,
  input  conf_kind_e  conf_kind,
  input  fetch_pol_e  fetch_pol,
  input  logic        pred_sel,          // 0 alloyed, 1 hybrid
  input  logic [3:0]  thr_conf,
  input  logic [3:0]  thr_cat [4],
  input  logic [3:0]  thr_res [NPATH],
  // instruction fetch
  output logic        if_v   [NPATH][NBLK],
  output pc_t         if_pc  [NPATH][NBLK],
  input  predecode_t  if_pd  [NPATH][NBLK][FETCH_W],
  // branch / return resolution
  output logic        ex_v,
  output pc_t         ex_pc,
  output logic [$clog2(RUU_N)-1:0] ex_tag,
  input  logic        ex_taken,
  input  pc_t         ex_ret_tgt,
  // data cache and memory
  output logic        ld_v,
  output pc_t         ld_pc,
  input  logic        ld_hit,
  input  pc_t         ld_line,
  output logic        mem_req_v,
  output pc_t         mem_req_line,
  output logic [$clog2(NM)-1:0] mem_req_idx,
  input  logic        mem_fill_v,
  input  logic [$clog2(NM)-1:0] mem_fill_idx,
  // commit trace
  output logic        cm_v    [CMW],
  output logic        cm_hole [CMW],
  output pc_t         cm_pc   [CMW],
  output logic [$clog2(RUU_N)-1:0] cm_tag [CMW]
);
  localparam int NP  = NPATH;
  localparam int PW  = $clog2(NP);
  localparam int W   = NBLK * FETCH_W;   // slots per path per cycle
  localparam int DW  = NBLK * FETCH_W;   // dispatch slots per cycle
  localparam int TW  = $clog2(RUU_N);
  localparam int SHW = $clog2(NSH);
  localparam int RDW = $clog2(RAS_D);

  // ------------------------------------------------------------------
  // path state
  // ------------------------------------------------------------------
  pc_t  pc_q [NP];
  logic ctx_active [NP];
  pid_t ctx_pid [NP];
  logic ctx_pred [NP];
  logic [PTRW-1:0] pid_head;
  logic [$clog2(NP+1)-1:0] nfree;

  // resolution (from issue)
  logic res_v, res_forked, res_mis, res_dir, res_squash;
  uop_t res_uop;
  logic [TW-1:0] res_tag;
  pc_t  res_next;
  logic res_rst_valid;
  logic [PW-1:0] res_rst_ctx;
  logic kill [NP];
  logic ret_v;
  logic [PTRW-1:0] ret_pos;

  // global stall conditions
  logic ds_ready, sh_low, obq_ready, fetch_go;

  // ------------------------------------------------------------------
  // fetch arbitration and fetch blocks
  // ------------------------------------------------------------------
  logic [$clog2(RUU_N+1)-1:0] ctx_cnt [NP];
  logic [$clog2(RUU_N+1)-1:0] ruu_count;
  logic elig [NP];
  logic [$clog2(NBLK+1)-1:0] grant [NP];

  assign fetch_go = ds_ready && !sh_low && obq_ready && !res_squash;
  always_comb for (int p = 0; p < NP; p++) elig[p] = ctx_active[p] && fetch_go;

  fetch_arb #(.NP(NP), .NBLK(NBLK), .CW($clog2(RUU_N+1))) u_arb (
    .clk, .rst_n, .pol(fetch_pol), .elig, .is_pred(ctx_pred), .ruu_cnt(ctx_cnt), .grant);

  pc_t         bpc    [NP][NBLK];
  logic [FETCH_W-1:0] bslot [NP][NBLK];
  logic        bctrl  [NP][NBLK];
  logic [$clog2(FETCH_W)-1:0] bcslot [NP][NBLK];
  pc_t         bcpc   [NP][NBLK];
  pc_t         bseq   [NP][NBLK];

  for (genvar p = 0; p < NP; p++) begin : g_path
    for (genvar j = 0; j < NBLK; j++) begin : g_blk
      assign bpc[p][j] = (j == 0) ? pc_q[p]
                                  : (pc_q[p] & ~pc_t'(FETCH_W-1)) + pc_t'(j*FETCH_W);
      fetch_block #(.W(FETCH_W)) u_fb (
        .start_pc(bpc[p][j]), .pd(if_pd[p][j]), .slot_v(bslot[p][j]),
        .has_ctrl(bctrl[p][j]), .ctrl_slot(bcslot[p][j]), .ctrl_pc(bcpc[p][j]),
        .seq_pc(bseq[p][j]));
    end
  end

  // per path: blocks actually fetched and the control instruction ending them
  logic       blk_on  [NP][NBLK];
  logic       fetched [NP];
  logic       c_has   [NP];
  predecode_t c_pd    [NP];
  pc_t        c_pc    [NP];
  pc_t        f_seq   [NP];
  always_comb
    for (int p = 0; p < NP; p++) begin
      logic stop;
      stop = 1'b0;
      c_has[p] = 1'b0; c_pd[p] = '0; c_pc[p] = '0; f_seq[p] = pc_q[p];
      fetched[p] = 1'b0;
      for (int j = 0; j < NBLK; j++) begin
        blk_on[p][j] = !stop && (32'(j) < 32'(grant[p]));
        if (blk_on[p][j]) begin
          fetched[p] = 1'b1;
          f_seq[p]   = bseq[p][j];
          if (bctrl[p][j]) begin
            stop = 1'b1; c_has[p] = 1'b1;
            c_pd[p] = if_pd[p][j][bcslot[p][j]]; c_pc[p] = bcpc[p][j];
          end
        end
      end
    end

  always_comb
    for (int p = 0; p < NP; p++)
      for (int j = 0; j < NBLK; j++) begin
        if_v[p][j]  = blk_on[p][j];
        if_pc[p][j] = bpc[p][j];
      end

  // ------------------------------------------------------------------
  // prediction: direction, confidence, histories, return stack
  // ------------------------------------------------------------------
  logic [GHW-1:0] ghist [NP];
  logic [LHW-1:0] lhist [NP];
  logic a_taken [NP], h_taken [NP], p_taken [NP];
  logic [3:0] conf [NP];
  pc_t  ras_top [NP], ras_below [NP], ras_ckpt_top [NP];
  logic [RDW-1:0] ras_tos [NP];
  logic is_cond [NP];

  always_comb
    for (int p = 0; p < NP; p++) begin
      is_cond[p] = fetched[p] && c_has[p] && c_pd[p].kind == K_COND;
      p_taken[p] = pred_sel ? h_taken[p] : a_taken[p];
    end

  // resolution-side update signals
  logic upd_v;
  assign upd_v = res_v && res_uop.kind == K_COND;

  alloyed_pred #(.NP(NP), .GB(5), .LB(3), .AB(4)) u_alloy (
    .clk, .rst_n, .rd_pc(c_pc), .rd_g('{ghist[0][4:0], ghist[1][4:0], ghist[2][4:0], ghist[3][4:0]}),
    .rd_l('{lhist[0][2:0], lhist[1][2:0], lhist[2][2:0], lhist[3][2:0]}), .rd_taken(a_taken),
    .upd_valid(upd_v), .upd_pc(res_uop.pc), .upd_g(res_uop.gh[4:0]), .upd_l(res_uop.lh[2:0]),
    .upd_taken(res_dir));

  hybrid_pred #(.NP(NP), .GB(GHW), .LB(LHW), .AB(4), .CB(10)) u_hyb (
    .clk, .rst_n, .rd_pc(c_pc), .rd_g(ghist), .rd_l(lhist), .rd_taken(h_taken),
    .upd_valid(upd_v), .upd_pc(res_uop.pc), .upd_g(res_uop.gh), .upd_l(res_uop.lh),
    .upd_taken(res_dir));

  conf_pred #(.ENTRIES(1024), .N(4), .NPORT(NP)) u_conf (
    .clk, .rst_n, .kind(conf_kind), .rd_pc(c_pc), .rd_conf(conf),
    .upd_valid(upd_v), .upd_pc(res_uop.pc), .upd_correct(res_dir == res_uop.pred_taken));

  // fork decision: lowest path that wants to fork
  logic want [NP];
  logic fork_v, fork_ok;
  logic [PW-1:0] fork_ctx, fork_new;
  for (genvar p = 0; p < NP; p++) begin : g_fd
    fork_decide #(.N(4), .NCTX(NP), .CATW(2)) u_fd (
      .pol(fork_pol), .is_cond(is_cond[p]), .conf(conf[p]), .cat(c_pd[p].cat),
      .prof_fork(c_pd[p].pfork), .nfree, .thr_conf, .thr_cat, .thr_res, .fork_o(want[p]));
  end
  always_comb begin
    fork_v = 1'b0; fork_ctx = '0;
    for (int p = NP-1; p >= 0; p--) if (want[p]) begin fork_v = 1'b1; fork_ctx = PW'(p); end
  end

  path_ctx #(.NCTX(NP)) u_ctx (
    .clk, .rst_n, .ctx_active, .ctx_pid, .ctx_pred, .head(pid_head), .nfree,
    .fork_valid(fork_v), .fork_ctx, .fork_pdir(p_taken[fork_ctx]), .fork_ok, .fork_new,
    .res_valid(res_v && (res_forked || res_mis)), .res_forked, .res_pid(res_uop.pid),
    .res_dir, .kill, .res_rst_valid, .res_rst_ctx,
    .ret_valid(ret_v), .ret_pos(ret_pos));

  logic forks [NP];
  always_comb for (int p = 0; p < NP; p++) forks[p] = fork_ok && fork_ctx == PW'(p);

  // OBQ / local history
  logic obq_alloc [NP];
  logic [$clog2(OBQ_N)-1:0] obq_idx [NP];
  logic obq_commit;
  always_comb for (int p = 0; p < NP; p++) obq_alloc[p] = is_cond[p];

  lhist_obq #(.NP(NP), .SETS(128), .WAYS(2), .LW(LHW), .Q(OBQ_N)) u_obq (
    .clk, .rst_n, .pid_head, .rd_pc(c_pc), .rd_hist(lhist), .alloc_valid(obq_alloc),
    .alloc_dir(p_taken), .alloc_pid(ctx_pid), .alloc_idx(obq_idx), .alloc_ready(obq_ready),
    .fix_valid(upd_v), .fix_idx(res_uop.obq_idx), .fix_dir(res_dir),
    .sq_valid(res_squash), .sq_forked(res_forked), .sq_idx(res_uop.obq_idx),
    .sq_pid(res_uop.pid), .sq_dir(res_dir), .commit_valid(obq_commit), .empty());

  // global history
  logic gh_shift [NP], gh_rst [NP], gh_rst_shift [NP], gh_rst_dir [NP];
  logic [GHW-1:0] gh_rst_ck [NP];
  always_comb
    for (int p = 0; p < NP; p++) begin
      gh_shift[p]     = is_cond[p];
      gh_rst[p]       = res_rst_valid && res_rst_ctx == PW'(p);
      gh_rst_ck[p]    = res_uop.gh;
      gh_rst_dir[p]   = res_dir;
      gh_rst_shift[p] = res_uop.kind == K_COND;
    end
  ghist_bank #(.NP(NP), .GW(GHW)) u_gh (
    .clk, .rst_n, .hist(ghist), .shift(gh_shift), .shift_dir(p_taken),
    .rst_valid(gh_rst), .rst_ckpt(gh_rst_ck), .rst_dir(gh_rst_dir), .rst_shift(gh_rst_shift),
    .cp_valid(fork_ok), .cp_dst(fork_new), .cp_ckpt(ghist[fork_ctx]), .cp_dir(~p_taken[fork_ctx]));

  // return-address stacks
  logic ras_push [NP], ras_pop [NP], ras_rst [NP];
  pc_t  ras_pval [NP], ras_rst_top [NP];
  logic [RDW-1:0] ras_rst_tos [NP];
  always_comb
    for (int p = 0; p < NP; p++) begin
      ras_push[p]    = fetched[p] && c_has[p] && c_pd[p].kind == K_CALL;
      ras_pop[p]     = fetched[p] && c_has[p] && c_pd[p].kind == K_RET;
      ras_pval[p]    = c_pc[p] + 1'b1;
      ras_rst[p]     = res_rst_valid && res_rst_ctx == PW'(p);
      ras_rst_tos[p] = res_uop.ras_tos;
      ras_rst_top[p] = res_uop.ras_top;
    end
  ras_bank #(.NP(NP), .DEPTH(RAS_D)) u_ras (
    .clk, .rst_n, .push(ras_push), .push_val(ras_pval), .pop(ras_pop), .top(ras_top),
    .ckpt_tos(ras_tos), .ckpt_top(ras_ckpt_top), .below(ras_below),
    .rst_valid(ras_rst), .rst_tos(ras_rst_tos), .rst_top(ras_rst_top),
    .cp_valid(fork_ok), .cp_src(fork_ctx), .cp_dst(fork_new));

  // next PC per path
  pc_t npc [NP];
  always_comb
    for (int p = 0; p < NP; p++) begin
      npc[p] = f_seq[p];
      if (c_has[p])
        unique case (c_pd[p].kind)
          K_COND:         npc[p] = p_taken[p] ? c_pd[p].target : c_pc[p] + 1'b1;
          K_JUMP, K_CALL: npc[p] = c_pd[p].target;
          K_RET:          npc[p] = ras_top[p];
          default:        npc[p] = f_seq[p];
        endcase
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) pc_q[p] <= '0;
    end else begin
      for (int p = 0; p < NP; p++) if (fetched[p]) pc_q[p] <= npc[p];
      if (fork_ok)
        pc_q[fork_new] <= p_taken[fork_ctx] ? c_pc[fork_ctx] + 1'b1 : c_pd[fork_ctx].target;
      if (res_rst_valid) pc_q[res_rst_ctx] <= res_next;
    end

  // ------------------------------------------------------------------
  // rename and dispatch
  // ------------------------------------------------------------------
  logic          ren_v   [NP][W];
  logic [4:0]    ren_src [NP][W], ren_dst [NP][W];
  logic [TW-1:0] ren_tag [NP][W];
  logic          ren_busy[NP][W];
  logic [TW-1:0] ren_stag[NP][W];
  logic          ck_req  [NP];
  logic [SHW-1:0] ck_idx [NP];
  logic          ds_v    [DW];
  uop_t          ds_uop  [DW];
  logic          ds_sb   [DW];
  logic [TW-1:0] ds_st   [DW];
  logic [TW-1:0] ds_tag  [DW];
  int            slot_of [NP][W];

  always_comb begin
    int n;
    n = 0;
    for (int d = 0; d < DW; d++) begin ds_v[d] = 1'b0; ds_uop[d] = '0; end
    for (int p = 0; p < NP; p++) begin
      ck_req[p] = fetched[p] && c_has[p] &&
                  ((c_pd[p].kind == K_COND && !forks[p]) || c_pd[p].kind == K_RET);
      for (int j = 0; j < NBLK; j++)
        for (int s = 0; s < FETCH_W; s++) begin
          int w;
          w = j*FETCH_W + s;
          ren_v[p][w]   = blk_on[p][j] && bslot[p][j][s];
          ren_src[p][w] = if_pd[p][j][s].src;
          ren_dst[p][w] = if_pd[p][j][s].dst;
          slot_of[p][w] = n;
          if (ren_v[p][w] && n < DW) begin
            ds_v[n] = 1'b1;
            ds_uop[n].pc   = bpc[p][j] & ~pc_t'(FETCH_W-1) | pc_t'(s);
            ds_uop[n].kind = if_pd[p][j][s].kind;
            ds_uop[n].ctx  = PW'(p);
            ds_uop[n].pid  = ctx_pid[p];
            ds_uop[n].dst  = if_pd[p][j][s].dst;
            if (if_pd[p][j][s].kind != K_ALU && if_pd[p][j][s].kind != K_LOAD) begin
              ds_uop[n].pred_taken = (if_pd[p][j][s].kind == K_COND) ? p_taken[p] : 1'b1;
              ds_uop[n].pred_tgt   = (if_pd[p][j][s].kind == K_RET) ? ras_top[p]
                                                                      : if_pd[p][j][s].target;
              ds_uop[n].forked     = forks[p];
              ds_uop[n].sh_idx     = ck_idx[p];
              ds_uop[n].obq_idx    = obq_idx[p];
              ds_uop[n].gh         = ghist[p];
              ds_uop[n].lh         = lhist[p];
              ds_uop[n].ras_tos    = (if_pd[p][j][s].kind == K_RET) ? ras_tos[p] - 1'b1 : ras_tos[p];
              ds_uop[n].ras_top    = (if_pd[p][j][s].kind == K_RET) ? ras_below[p] : ras_ckpt_top[p];
            end
            n++;
          end
        end
    end
  end

  always_comb
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < W; w++) ren_tag[p][w] = ds_tag[slot_of[p][w] % DW];

  always_comb begin
    for (int d = 0; d < DW; d++) begin ds_sb[d] = 1'b0; ds_st[d] = '0; end
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < W; w++)
        if (ren_v[p][w] && slot_of[p][w] < DW) begin
          ds_sb[slot_of[p][w]] = ren_busy[p][w];
          ds_st[slot_of[p][w]] = ren_stag[p][w];
        end
  end

  // commit-side signals for rename
  logic          cm_ren_v [CMW], fr_v [CMW];
  logic [TW-1:0] cm_ren_tag [CMW];
  logic [SHW-1:0] fr_idx [CMW];
  uop_t          cm_uop [CMW];
  logic          cm_hole_i [CMW];
  logic          cm_v_i [CMW];
  logic [TW-1:0] cm_tag_i [CMW];

  rename_unit #(.NP(NP), .NREG(32), .TW(TW), .NSH(NSH), .W(W), .CMW(CMW)) u_ren (
    .clk, .rst_n, .ren_v, .ren_src, .ren_dst, .ren_tag, .src_busy(ren_busy), .src_tag(ren_stag),
    .ck_req, .ck_idx, .sh_low, .rst_v(res_rst_valid), .rst_ctx(res_rst_ctx),
    .rst_idx(res_uop.sh_idx), .cp_v(fork_ok), .cp_src(fork_ctx), .cp_dst(fork_new),
    .cm_v(cm_ren_v), .cm_tag(cm_ren_tag), .fr_v, .fr_idx);

  // ------------------------------------------------------------------
  // window, issue, resolution, memory
  // ------------------------------------------------------------------
  logic          is_v [IW];
  logic [TW-1:0] is_tag [IW];
  uop_t          is_uop [IW];
  logic          mshr_full;
  logic          ldd_v [2];
  logic [TW-1:0] ldd_tag [2];
  logic          hit_q;
  logic [TW-1:0] hit_tag_q;
  pid_t          sq_root;

  ruu #(.N(RUU_N), .DW(DW), .IW(IW), .CW(CMW)) u_ruu (
    .clk, .rst_n, .pid_head, .ds_v, .ds_uop, .ds_src_busy(ds_sb), .ds_src_tag(ds_st),
    .ds_tag, .ds_ready, .is_v, .is_tag, .is_uop, .is_hold(mshr_full),
    .ld_done_v(ldd_v), .ld_done_tag(ldd_tag), .sq_v(res_squash), .sq_tag(res_tag),
    .sq_root, .cm_v(cm_v_i), .cm_tag(cm_tag_i), .cm_uop, .cm_hole(cm_hole_i),
    .ctx_cnt, .count(ruu_count));

  // the (single) resolving instruction and the (single) load of this cycle
  logic          ld_sel;
  logic [TW-1:0] ld_tag;
  always_comb begin
    res_v = 1'b0; res_uop = '0; res_tag = '0;
    ld_sel = 1'b0; ld_tag = '0; ld_pc = '0;
    for (int s = 0; s < IW; s++) begin
      if (is_v[s] && (is_uop[s].kind == K_COND || is_uop[s].kind == K_RET)) begin
        res_v = 1'b1; res_uop = is_uop[s]; res_tag = is_tag[s];
      end
      if (is_v[s] && is_uop[s].kind == K_LOAD) begin
        ld_sel = 1'b1; ld_tag = is_tag[s]; ld_pc = is_uop[s].pc;
      end
    end
    ex_v   = res_v;
    ex_pc  = res_uop.pc;
    ex_tag = res_tag;
    ld_v   = ld_sel;
    res_forked = res_v && res_uop.kind == K_COND && res_uop.forked;
    res_dir    = (res_uop.kind == K_COND) ? ex_taken : 1'b1;
    res_next   = (res_uop.kind == K_RET) ? ex_ret_tgt
               : (ex_taken ? res_uop.pred_tgt : res_uop.pc + 1'b1);
    res_mis    = res_v && !res_forked &&
                 ((res_uop.kind == K_COND) ? (ex_taken != res_uop.pred_taken)
                                           : (ex_ret_tgt != res_uop.pred_tgt));
    res_squash = res_forked || res_mis;
    sq_root    = res_forked ? pid_child(res_uop.pid, ~res_dir) : res_uop.pid;
  end

  mshr #(.NM(NM), .NT(4), .TW(TW), .LAW(PCW)) u_mshr (
    .clk, .rst_n, .full(mshr_full), .alloc_v(ld_sel && !ld_hit), .alloc_line(ld_line),
    .alloc_tag(ld_tag), .req_v(mem_req_v), .req_line(mem_req_line), .req_idx(mem_req_idx),
    .fill_v(mem_fill_v), .fill_idx(mem_fill_idx), .done_v(ldd_v[1]), .done_tag(ldd_tag[1]),
    .busy_cnt());

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin hit_q <= 1'b0; hit_tag_q <= '0; end
    else begin hit_q <= ld_sel && ld_hit; hit_tag_q <= ld_tag; end
  assign ldd_v[0]   = hit_q;
  assign ldd_tag[0] = hit_tag_q;

  // ------------------------------------------------------------------
  // commit
  // ------------------------------------------------------------------
  always_comb begin
    obq_commit = 1'b0; ret_v = 1'b0; ret_pos = '0;
    for (int c = 0; c < CMW; c++) begin
      cm_v[c]       = cm_v_i[c];
      cm_hole[c]    = cm_hole_i[c];
      cm_pc[c]      = cm_uop[c].pc;
      cm_tag[c]     = cm_tag_i[c];
      cm_ren_v[c]   = cm_v_i[c];
      cm_ren_tag[c] = cm_tag_i[c];
      fr_v[c]       = cm_v_i[c] && ((cm_uop[c].kind == K_COND && !cm_uop[c].forked) ||
                                    cm_uop[c].kind == K_RET);
      fr_idx[c]     = cm_uop[c].sh_idx;
      if (cm_v_i[c] && cm_uop[c].kind == K_COND) begin
        obq_commit = 1'b1;
        if (cm_uop[c].forked && !cm_hole_i[c]) begin ret_v = 1'b1; ret_pos = cm_uop[c].pid.tail; end
      end
    end
  end
endmodule
