// alloyed_pred: alloyed branch predictor (global + local history in one
// two-level structure).
//
// One pattern history table of 2-bit saturating counters is indexed by the
// concatenation {global history (GB bits), local history (LB bits), branch
// address (AB bits)}. Prediction is the counter's upper bit. Counters are
// trained with the real direction when the branch resolves, using the
// histories that were current when it was predicted.
// The concatenated index follows the description; the bit split (5/3/4,
// 4096 counters) and the weakly-not-taken reset value are this design's.
// Interface: NP combinational prediction ports, one update port.
// Timing: prediction combinational; update visible after the next edge.
module alloyed_pred
  import hs_pkg::*;
#(
  parameter int NP = NPATH,
  parameter int GB = 5,
  parameter int LB = 3,
  parameter int AB = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  pc_t            rd_pc   [NP],
  input  logic [GB-1:0]  rd_g    [NP],
  input  logic [LB-1:0]  rd_l    [NP],
  output logic           rd_taken[NP],
  input  logic           upd_valid,
  input  pc_t            upd_pc,
  input  logic [GB-1:0]  upd_g,
  input  logic [LB-1:0]  upd_l,
  input  logic           upd_taken
);
  localparam int IW = GB + LB + AB;
  logic [1:0] pht [2**IW];

  function automatic logic [IW-1:0] index(input pc_t pc, input logic [GB-1:0] g,
                                          input logic [LB-1:0] l);
    return {g, l, pc[AB-1:0]};
  endfunction

  always_comb
    for (int p = 0; p < NP; p++) rd_taken[p] = pht[index(rd_pc[p], rd_g[p], rd_l[p])][1];

  logic [IW-1:0] ui;
  logic [1:0]    uc;
  assign ui = index(upd_pc, upd_g, upd_l);
  assign uc = pht[ui];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 2**IW; i++) pht[i] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_taken && uc != 2'b11)      pht[ui] <= uc + 1'b1;
      else if (!upd_taken && uc != 2'b00) pht[ui] <= uc - 1'b1;
    end
endmodule
