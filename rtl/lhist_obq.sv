// lhist_obq: local branch history with an outstanding branch queue (OBQ)
// in front of a tagged, set-associative branch history table (BHT).
//
// The BHT holds only committed per-branch local histories. Each predicted
// conditional branch gets an OBQ entry holding its PC, its speculative local
// history (previous history shifted with the predicted direction) and its
// path ID. A lookup returns the history of the newest live OBQ entry with the
// same PC, otherwise the BHT entry on a tag hit, otherwise zero. When a branch
// resolves its entry's newest bit is set to the real direction (fix_*). On a
// misprediction or a forked-branch resolution, younger entries on the squashed
// paths are dropped (sq_*, same rule as the instruction window). When the
// branch commits, the oldest entry is popped and, if live, written into the
// BHT (a dead entry is simply discarded).
// The OBQ/BHT split and tagged set-associative BHT follow the description;
// sizes, replacement (victim pointer per set, true LRU for 2 ways), one
// commit per cycle and lookup regardless of path are this design's choices.
// Interface: NP lookup/allocation ports (one per path, allocated in port
// order), alloc_ready tells whether NP entries are free.
// Timing: lookups and alloc_idx are combinational; everything else updates at
// the next clock edge.
module lhist_obq
  import hs_pkg::*;
#(
  parameter int NP   = NPATH,
  parameter int SETS = 128,
  parameter int WAYS = 2,
  parameter int LW   = 8,
  parameter int Q    = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PTRW-1:0]     pid_head,
  input  pc_t                 rd_pc      [NP],
  output logic [LW-1:0]       rd_hist    [NP],
  input  logic                alloc_valid[NP],
  input  logic                alloc_dir  [NP],
  input  pid_t                alloc_pid  [NP],
  output logic [$clog2(Q)-1:0] alloc_idx [NP],
  output logic                alloc_ready,
  input  logic                fix_valid,
  input  logic [$clog2(Q)-1:0] fix_idx,
  input  logic                fix_dir,
  input  logic                sq_valid,
  input  logic                sq_forked,
  input  logic [$clog2(Q)-1:0] sq_idx,
  input  pid_t                sq_pid,
  input  logic                sq_dir,
  input  logic                commit_valid,
  output logic                empty
);
  localparam int QW = $clog2(Q);
  localparam int SW = $clog2(SETS);
  localparam int TW = PCW - SW;
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic          live;
    pc_t           pc;
    logic [LW-1:0] hist;
    pid_t          pid;
  } obq_t;

  obq_t           q [Q];
  logic [QW-1:0]  hd, tl;
  logic [QW:0]    cnt;

  logic           bv  [SETS][WAYS];
  logic [TW-1:0]  btg [SETS][WAYS];
  logic [LW-1:0]  bh  [SETS][WAYS];
  logic [WW-1:0]  vic [SETS];

  function automatic logic [SW-1:0] set_of(input pc_t pc); return SW'(pc); endfunction
  function automatic logic [TW-1:0] tag_of(input pc_t pc); return TW'(pc >> SW); endfunction

  function automatic logic [LW-1:0] lookup(input pc_t pc);
    logic [LW-1:0] h;
    logic found;
    logic [QW-1:0] i;
    h = '0;
    found = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (bv[set_of(pc)][w] && btg[set_of(pc)][w] == tag_of(pc)) h = bh[set_of(pc)][w];
    // newest matching OBQ entry wins
    for (int k = Q-1; k >= 0; k--) begin
      i = hd + QW'(k);
      if (!found && (k < int'(cnt)) && q[i].live && q[i].pc == pc) begin
        h = q[i].hist; found = 1'b1;
      end
    end
    return h;
  endfunction

  always_comb begin
    int n;
    n = 0;
    for (int p = 0; p < NP; p++) begin
      rd_hist[p]   = lookup(rd_pc[p]);
      alloc_idx[p] = tl + QW'(n);
      if (alloc_valid[p]) n++;
    end
  end
  assign alloc_ready = (int'(cnt) <= Q - NP);
  assign empty       = (cnt == '0);

  // ---- squash selection ----
  pid_t root;
  logic kill [Q];
  always_comb begin
    logic [QW-1:0] a_br, a_i;
    root = sq_forked ? pid_child(sq_pid, ~sq_dir) : sq_pid;
    a_br = sq_idx - hd;
    for (int i = 0; i < Q; i++) begin
      a_i = QW'(i) - hd;
      kill[i] = sq_valid && (QW+1)'(a_i) < cnt && a_i > a_br &&
                pid_descends(q[i].pid, root, pid_head);
    end
  end

  // ---- BHT write on commit ----
  obq_t          c_e;
  logic [SW-1:0] c_set;
  logic [WW-1:0] c_way;
  logic          c_hit;
  always_comb begin
    c_e   = q[hd];
    c_set = set_of(c_e.pc);
    c_hit = 1'b0;
    c_way = vic[c_set];
    for (int w = 0; w < WAYS; w++)
      if (bv[c_set][w] && btg[c_set][w] == tag_of(c_e.pc)) begin c_hit = 1'b1; c_way = WW'(w); end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hd <= '0; tl <= '0; cnt <= '0;
      for (int i = 0; i < Q; i++) q[i] <= '0;
      for (int s = 0; s < SETS; s++) begin
        vic[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin bv[s][w] <= 1'b0; btg[s][w] <= '0; bh[s][w] <= '0; end
      end
    end else begin
      int n;
      n = 0;
      for (int i = 0; i < Q; i++) if (kill[i]) q[i].live <= 1'b0;
      if (fix_valid) q[fix_idx].hist[0] <= fix_dir;
      for (int p = 0; p < NP; p++)
        if (alloc_valid[p]) begin
          q[alloc_idx[p]] <= '{live: 1'b1, pc: rd_pc[p],
                                hist: {rd_hist[p][LW-2:0], alloc_dir[p]}, pid: alloc_pid[p]};
          n++;
        end
      tl <= tl + QW'(n);
      if (commit_valid && cnt != '0) begin
        hd <= hd + 1'b1;
        if (c_e.live) begin
          bv [c_set][c_way] <= 1'b1;
          btg[c_set][c_way] <= tag_of(c_e.pc);
          bh [c_set][c_way] <= (fix_valid && fix_idx == hd) ? {c_e.hist[LW-1:1], fix_dir} : c_e.hist;
          vic[c_set]        <= (c_way == WW'(WAYS-1)) ? '0 : c_way + 1'b1;
        end
        cnt <= cnt + (QW+1)'(n) - 1'b1;
      end else begin
        cnt <= cnt + (QW+1)'(n);
      end
    end
endmodule
