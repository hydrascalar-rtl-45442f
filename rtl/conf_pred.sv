// conf_pred: branch-confidence predictor.
//
// A table indexed by low bits of the branch PC estimates whether the branch
// predictor will be right for that branch. Each entry is an N-bit cell used
// in one of three disciplines selected by 'kind' at run time:
//   CONF_ONES  - shift register of the last N outcomes (1 = correct); the
//                confidence value is the number of ones;
//   CONF_SAT   - saturating counter, +1 on correct, -1 on mispredict;
//   CONF_RESET - +1 (saturating) on correct, cleared to 0 on mispredict.
// The larger the value, the higher the confidence; the comparison against a
// threshold is made by fork_decide. The three disciplines follow the
// description; table size, cell width and the PC hash are this design's.
//
// Interface: NPORT combinational lookup ports (one per path, so every path
// can look up a branch in the cycle it fetches it, like the branch
// predictor), one update port written at branch resolution.
// Timing: lookup is combinational (a single-cycle response), update is
// visible the cycle after upd_valid. Reset clears every cell.
module conf_pred
  import hs_pkg::*;
#(
  parameter int ENTRIES = 1024,
  parameter int N       = 4,
  parameter int NPORT   = NPATH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  conf_kind_e        kind,
  input  pc_t               rd_pc    [NPORT],
  output logic [N-1:0]      rd_conf  [NPORT],
  input  logic              upd_valid,
  input  pc_t               upd_pc,
  input  logic              upd_correct
);
  localparam int IW = $clog2(ENTRIES);

  logic [N-1:0] tbl [ENTRIES];

  function automatic logic [IW-1:0] idx(input pc_t pc);
    return IW'(pc);
  endfunction

  function automatic logic [N-1:0] value(input logic [N-1:0] c, input conf_kind_e k);
    logic [N-1:0] n;
    if (k == CONF_ONES) begin
      n = '0;
      for (int i = 0; i < N; i++) n += N'(c[i]);
      return n;
    end
    return c;
  endfunction

  always_comb
    for (int p = 0; p < NPORT; p++) rd_conf[p] = value(tbl[idx(rd_pc[p])], kind);

  logic [N-1:0] cur, nxt;
  always_comb begin
    cur = tbl[idx(upd_pc)];
    unique case (kind)
      CONF_ONES: nxt = {cur[N-2:0], upd_correct};
      CONF_SAT:  nxt = upd_correct ? ((&cur) ? cur : cur + 1'b1)
                                   : ((|cur) ? cur - 1'b1 : cur);
      default:   nxt = upd_correct ? ((&cur) ? cur : cur + 1'b1) : '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (upd_valid) begin
      tbl[idx(upd_pc)] <= nxt;
    end
endmodule
