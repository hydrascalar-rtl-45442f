// fetch_arb: allocation of instruction-fetch bandwidth among paths.
//
// Every cycle NBLK fetch blocks (cache lines) can be fetched in total; a path
// may get several, which it then fetches as contiguous lines. 'elig' marks
// paths that are live and not stalled. Policies (input 'pol'):
//   FB_SIMPLE     round robin: starting at a pointer that advances each cycle,
//                 eligible paths receive one block in turn until the
//                 bandwidth is used (a lone path gets all of it);
//   FB_PRED_PRI   round robin, but the predicted path first gets one block,
//                 so it fetches every cycle;
//   FB_PRED_EXTRA the predicted path gets one block, every other eligible path
//                 at most one (round robin), the predicted path all the rest;
//   FB_PRED_RUU   as FB_PRED_EXTRA with the favoured path being the eligible
//                 path with the fewest instructions in the window (lowest
//                 index on a tie).
// The four policies follow the description; giving the predicted path its
// first block before the others under FB_PRED_EXTRA, and the tie rule, are
// this design's reading.
// Timing: grants are combinational; the round-robin pointer moves each clock.
module fetch_arb
  import hs_pkg::*;
#(
  parameter int NP   = NPATH,
  parameter int NBLK = 2,
  parameter int CW   = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  fetch_pol_e                 pol,
  input  logic                       elig     [NP],
  input  logic                       is_pred  [NP],
  input  logic [CW-1:0]              ruu_cnt  [NP],
  output logic [$clog2(NBLK+1)-1:0]  grant    [NP]
);
  localparam int GW = $clog2(NBLK+1);
  localparam int PW = $clog2(NP);

  logic [PW-1:0] rr;

  always_comb begin
    int left, fav;
    logic fav_ok;
    logic [CW-1:0] best;
    logic [PW-1:0] p;
    for (int i = 0; i < NP; i++) grant[i] = '0;
    left   = NBLK;
    fav    = 0;
    fav_ok = 1'b0;
    best   = '1;
    if (pol == FB_PRED_RUU) begin
      for (int i = 0; i < NP; i++)
        if (elig[i] && (!fav_ok || ruu_cnt[i] < best)) begin
          fav = i; fav_ok = 1'b1; best = ruu_cnt[i];
        end
    end else if (pol != FB_SIMPLE) begin
      for (int i = 0; i < NP; i++)
        if (elig[i] && is_pred[i] && !fav_ok) begin fav = i; fav_ok = 1'b1; end
    end
    if (fav_ok && left > 0) begin grant[fav] = GW'(1); left--; end
    if (pol == FB_SIMPLE || pol == FB_PRED_PRI) begin
      // round robin, possibly several rounds
      for (int r = 0; r < NBLK; r++)
        for (int k = 0; k < NP; k++) begin
          p = rr + PW'(k);
          if (left > 0 && elig[p]) begin grant[p] = grant[p] + 1'b1; left--; end
        end
    end else begin
      for (int k = 0; k < NP; k++) begin
        p = rr + PW'(k);
        if (left > 0 && elig[p] && !(fav_ok && 32'(p) == fav)) begin
          grant[p] = GW'(1); left--;
        end
      end
      if (fav_ok) grant[fav] = grant[fav] + GW'(left);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rr <= '0;
    else        rr <= rr + 1'b1;
endmodule
