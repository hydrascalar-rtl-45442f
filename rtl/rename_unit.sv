// rename_unit: per-path register maps with a pool of shadow maps.
//
// Each path context has its own map from architectural register to the
// window slot (tag) of the newest in-flight producer, or "not busy" when the
// value is already committed. There are no renaming dependences between
// paths. Up to W instructions per path per cycle are renamed; a source that
// is written by an earlier instruction of the same group gets that
// instruction's tag (intra-group bypass).
//  * Checkpoint (ck_req): a conditional branch ends its group; the map after
//    the group is saved in a free shadow map from a pool of NSH, whose index
//    (ck_idx) travels with the branch. The pool size is the limit on
//    in-flight branches: with fewer than NP free shadows, sh_low asks fetch
//    to stall.
//  * Restore (rst_*): on a misprediction the path's map is reloaded from the
//    branch's shadow.
//  * Copy (cp_*): on a fork the new path receives the parent's map.
//  * Commit (cm_*): a committing producer clears "busy" in every map and
//    shadow that still points at it. Shadows are returned to the pool when
//    their branch (or the hole it became) is reclaimed at commit (fr_*).
// Per-path maps, copying on fork and shadow maps for unforked branches follow
// the description; the shared pool, sizes and commit-time release are this
// design's choices.
// Timing: src_busy/src_tag/ck_idx combinational; state at the next edge.
module rename_unit
  import hs_pkg::*;
#(
  parameter int NP   = NPATH,
  parameter int NREG = 32,
  parameter int TW   = 6,
  parameter int NSH  = 8,
  parameter int W    = 8,
  parameter int CMW  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ren_v    [NP][W],
  input  logic [4:0]            ren_src  [NP][W],
  input  logic [4:0]            ren_dst  [NP][W],
  input  logic [TW-1:0]         ren_tag  [NP][W],
  output logic                  src_busy [NP][W],
  output logic [TW-1:0]         src_tag  [NP][W],
  input  logic                  ck_req   [NP],
  output logic [$clog2(NSH)-1:0] ck_idx  [NP],
  output logic                  sh_low,
  input  logic                  rst_v,
  input  logic [$clog2(NP)-1:0] rst_ctx,
  input  logic [$clog2(NSH)-1:0] rst_idx,
  input  logic                  cp_v,
  input  logic [$clog2(NP)-1:0] cp_src,
  input  logic [$clog2(NP)-1:0] cp_dst,
  input  logic                  cm_v     [CMW],
  input  logic [TW-1:0]         cm_tag   [CMW],
  input  logic                  fr_v     [CMW],
  input  logic [$clog2(NSH)-1:0] fr_idx  [CMW]
);
  localparam int SHW = $clog2(NSH);

  typedef struct packed { logic busy; logic [TW-1:0] tag; } ment_t;

  ment_t map [NP][NREG];
  ment_t sh  [NSH][NREG];
  logic  sh_used [NSH];

  // map after commit clearing and this cycle's group
  ment_t nmap [NP][NREG];
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int r = 0; r < NREG; r++) begin
        nmap[p][r] = map[p][r];
        for (int c = 0; c < CMW; c++)
          if (cm_v[c] && map[p][r].busy && map[p][r].tag == cm_tag[c]) nmap[p][r].busy = 1'b0;
      end
      for (int s = 0; s < W; s++) begin
        src_busy[p][s] = map[p][ren_src[p][s]].busy;
        src_tag[p][s]  = map[p][ren_src[p][s]].tag;
        for (int c = 0; c < CMW; c++)
          if (cm_v[c] && src_tag[p][s] == cm_tag[c]) src_busy[p][s] = 1'b0;
        for (int e = 0; e < s; e++)
          if (ren_v[p][e] && ren_dst[p][e] != 5'd0 && ren_dst[p][e] == ren_src[p][s]) begin
            src_busy[p][s] = 1'b1; src_tag[p][s] = ren_tag[p][e];
          end
        if (ren_src[p][s] == 5'd0) src_busy[p][s] = 1'b0;
        if (ren_v[p][s] && ren_dst[p][s] != 5'd0)
          nmap[p][ren_dst[p][s]] = '{busy: 1'b1, tag: ren_tag[p][s]};
      end
    end
  end

  // shadow allocation: lowest free ones, in path order
  logic taken [NSH];
  int   nfree;
  always_comb begin
    nfree = 0;
    for (int i = 0; i < NSH; i++) begin
      taken[i] = sh_used[i];
      if (!sh_used[i]) nfree++;
    end
    for (int p = 0; p < NP; p++) begin
      ck_idx[p] = '0;
      if (ck_req[p])
        for (int i = NSH-1; i >= 0; i--)
          if (!taken[i]) ck_idx[p] = SHW'(i);
      if (ck_req[p]) taken[ck_idx[p]] = 1'b1;
    end
    sh_low = (nfree < NP);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NP; p++)
        for (int r = 0; r < NREG; r++) map[p][r] <= '0;
      for (int i = 0; i < NSH; i++) begin
        sh_used[i] <= 1'b0;
        for (int r = 0; r < NREG; r++) sh[i][r] <= '0;
      end
    end else begin
      for (int p = 0; p < NP; p++)
        for (int r = 0; r < NREG; r++) map[p][r] <= nmap[p][r];
      for (int i = 0; i < NSH; i++)
        for (int r = 0; r < NREG; r++)
          for (int c = 0; c < CMW; c++)
            if (cm_v[c] && sh[i][r].busy && sh[i][r].tag == cm_tag[c]) sh[i][r].busy <= 1'b0;
      for (int c = 0; c < CMW; c++)
        if (fr_v[c]) sh_used[fr_idx[c]] <= 1'b0;
      for (int p = 0; p < NP; p++)
        if (ck_req[p]) begin
          sh_used[ck_idx[p]] <= 1'b1;
          for (int r = 0; r < NREG; r++) sh[ck_idx[p]][r] <= nmap[p][r];
        end
      if (cp_v)
        for (int r = 0; r < NREG; r++) map[cp_dst][r] <= nmap[cp_src][r];
      if (rst_v)
        for (int r = 0; r < NREG; r++) begin
          map[rst_ctx][r] <= sh[rst_idx][r];
          for (int c = 0; c < CMW; c++)
            if (cm_v[c] && sh[rst_idx][r].tag == cm_tag[c]) map[rst_ctx][r].busy <= 1'b0;
        end
    end
endmodule
