// hybrid_pred: hybrid predictor with two two-level components.
//
// A global-history component (table indexed by {global history, address
// bits}, GAs style) and a local-history component (table indexed by {local
// history, address bits}, PAs style) each predict with 2-bit counters. A
// chooser table of 2-bit counters indexed by the branch address selects the
// component (upper bit 1 = global). On update both components are trained,
// and the chooser moves toward the component that was right when they
// disagreed.
// A hybrid of a global and a local two-level component follows the
// description; table sizes, indexing and chooser training are this design's
// (the usual arrangement for this kind of hybrid).
// Interface and timing as alloyed_pred: NP combinational prediction ports,
// one update port applied at the next edge.
module hybrid_pred
  import hs_pkg::*;
#(
  parameter int NP = NPATH,
  parameter int GB = 8,
  parameter int LB = 8,
  parameter int AB = 4,
  parameter int CB = 10
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
  logic [1:0] gpht [2**(GB+AB)];
  logic [1:0] lpht [2**(LB+AB)];
  logic [1:0] ch   [2**CB];

  always_comb
    for (int p = 0; p < NP; p++)
      rd_taken[p] = ch[rd_pc[p][CB-1:0]][1] ? gpht[{rd_g[p], rd_pc[p][AB-1:0]}][1]
                                            : lpht[{rd_l[p], rd_pc[p][AB-1:0]}][1];

  function automatic logic [1:0] sat(input logic [1:0] c, input logic up);
    if (up)  return (c == 2'b11) ? c : c + 1'b1;
    return (c == 2'b00) ? c : c - 1'b1;
  endfunction

  logic [GB+AB-1:0] gi;
  logic [LB+AB-1:0] li;
  logic [CB-1:0]    ci;
  logic             gok, lok;
  assign gi  = {upd_g, upd_pc[AB-1:0]};
  assign li  = {upd_l, upd_pc[AB-1:0]};
  assign ci  = upd_pc[CB-1:0];
  assign gok = (gpht[gi][1] == upd_taken);
  assign lok = (lpht[li][1] == upd_taken);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 2**(GB+AB); i++) gpht[i] <= 2'b01;
      for (int i = 0; i < 2**(LB+AB); i++) lpht[i] <= 2'b01;
      for (int i = 0; i < 2**CB; i++)      ch[i]   <= 2'b01;
    end else if (upd_valid) begin
      gpht[gi] <= sat(gpht[gi], upd_taken);
      lpht[li] <= sat(lpht[li], upd_taken);
      if (gok != lok) ch[ci] <= sat(ch[ci], gok);
    end
endmodule
