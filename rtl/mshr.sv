// mshr: miss status holding registers for non-blocking loads.
//
// A finite set of NM registers tracks cache-line misses in flight. A missing
// load (alloc_v) either merges into the register already waiting for the same
// line (while that register has a free target slot) or takes a free
// register; each register remembers up to NT waiting loads (window tags).
// Registers not yet sent to memory are requested one per cycle (req_*).
// When memory returns a line (fill_v, fill_idx) its waiting loads are
// released one per cycle on done_*, and the register frees once empty.
// 'full' (no free register) tells issue to hold loads back, which is how a
// finite number of outstanding misses limits the machine.
// A finite MSHR count follows the description; NM, NT, merging and the
// request / release order are this design's choices.
// Timing: full, req_* and done_* are combinational from state; updates at the
// next edge. A register allocated in one cycle is requested the next.
module mshr
  import hs_pkg::*;
#(
  parameter int NM  = 8,
  parameter int NT  = 4,
  parameter int TW  = 6,
  parameter int LAW = PCW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  full,
  input  logic                  alloc_v,
  input  logic [LAW-1:0]        alloc_line,
  input  logic [TW-1:0]         alloc_tag,
  output logic                  req_v,
  output logic [LAW-1:0]        req_line,
  output logic [$clog2(NM)-1:0] req_idx,
  input  logic                  fill_v,
  input  logic [$clog2(NM)-1:0] fill_idx,
  output logic                  done_v,
  output logic [TW-1:0]         done_tag,
  output logic [$clog2(NM+1)-1:0] busy_cnt
);
  localparam int MW = $clog2(NM);
  localparam int NW = $clog2(NT+1);
  localparam int TIW = (NT > 1) ? $clog2(NT) : 1;

  logic           val  [NM];
  logic           sent [NM];
  logic           fild [NM];
  logic [LAW-1:0] line [NM];
  logic [NW-1:0]  nt   [NM];
  logic [TW-1:0]  tg   [NM][NT];

  logic          mhit, ffound, dfound;
  logic [MW-1:0] midx, fidx, didx;
  always_comb begin
    mhit = 1'b0; midx = '0; ffound = 1'b0; fidx = '0;
    req_v = 1'b0; req_idx = '0; dfound = 1'b0; didx = '0;
    busy_cnt = '0;
    for (int m = NM-1; m >= 0; m--) begin
      if (val[m] && !fild[m] && line[m] == alloc_line && int'(nt[m]) < NT) begin
        mhit = 1'b1; midx = MW'(m);
      end
      if (!val[m]) begin ffound = 1'b1; fidx = MW'(m); end
      if (val[m] && !sent[m]) begin req_v = 1'b1; req_idx = MW'(m); end
      if (val[m] && fild[m]) begin dfound = 1'b1; didx = MW'(m); end
    end
    for (int m = 0; m < NM; m++) if (val[m]) busy_cnt = busy_cnt + 1'b1;
    full     = !ffound;
    req_line = line[req_idx];
    done_v   = dfound && nt[didx] != '0;
    done_tag = tg[didx][TIW'(nt[didx] - 1'b1)];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int m = 0; m < NM; m++) begin
        val[m] <= 1'b0; sent[m] <= 1'b0; fild[m] <= 1'b0; line[m] <= '0; nt[m] <= '0;
        for (int t = 0; t < NT; t++) tg[m][t] <= '0;
      end
    end else begin
      if (req_v) sent[req_idx] <= 1'b1;
      if (fill_v) fild[fill_idx] <= 1'b1;
      if (dfound) begin
        if (nt[didx] <= NW'(1)) begin val[didx] <= 1'b0; nt[didx] <= '0; end
        else nt[didx] <= nt[didx] - 1'b1;
      end
      if (alloc_v) begin
        if (mhit) begin
          tg[midx][TIW'(nt[midx])] <= alloc_tag;
          nt[midx]           <= nt[midx] + 1'b1;
        end else if (ffound) begin
          val[fidx] <= 1'b1; sent[fidx] <= 1'b0; fild[fidx] <= 1'b0;
          line[fidx] <= alloc_line; nt[fidx] <= NW'(1); tg[fidx][0] <= alloc_tag;
        end
      end
    end
endmodule
