// fetch_block: formation of one fetch block inside one cache line.
//
// A fetch block is at most one cache line (FETCH_W instructions, aligned):
// it starts at 'start_pc' and runs to the end of the line. It also ends at
// the first control-transfer instruction (conditional branch, jump, call or
// return), which gets predicted this cycle; slots after it are dropped.
// Outputs: a valid mask over the line's slots, whether a control instruction
// ends the block and which slot, and the sequential continuation (first
// instruction of the next line).
// Fetching from a single line per block follows the description. Ending the
// block at the first control instruction (one prediction per block) is this
// design's simplification: the description also lets a path fetch past
// not-taken branches within a cycle.
// Timing: purely combinational.
module fetch_block
  import hs_pkg::*;
#(
  parameter int W = FETCH_W
) (
  input  pc_t             start_pc,
  input  predecode_t      pd       [W],
  output logic [W-1:0]    slot_v,
  output logic            has_ctrl,
  output logic [$clog2(W)-1:0] ctrl_slot,
  output pc_t             ctrl_pc,
  output pc_t             seq_pc
);
  localparam int SW = $clog2(W);
  pc_t line;
  always_comb begin
    logic stop;
    line      = start_pc & ~pc_t'(W-1);
    seq_pc    = line + pc_t'(W);
    slot_v    = '0;
    has_ctrl  = 1'b0;
    ctrl_slot = '0;
    stop      = 1'b0;
    for (int s = 0; s < W; s++)
      if (!stop && SW'(s) >= start_pc[SW-1:0]) begin
        slot_v[s] = 1'b1;
        if (pd[s].kind != K_ALU && pd[s].kind != K_LOAD) begin
          stop = 1'b1; has_ctrl = 1'b1; ctrl_slot = SW'(s);
        end
      end
    ctrl_pc = line | pc_t'(ctrl_slot);
  end
endmodule
