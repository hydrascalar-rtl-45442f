// hs_pkg: types, constants and helper functions shared by the multipath
// processor front end and instruction window.
//
// A multipath processor forks execution at hard-to-predict conditional
// branches and follows both directions at once. Every path carries a path
// ID: a circular bitmap holding one bit per fork on its history (1 = taken
// side, 0 = not-taken side), read from a global head pointer up to a
// per-path / per-instruction tail pointer. pid_descends() decides whether one
// ID lies in the subtree rooted at another, which is all selective squashing
// needs. The path count (4) and the fetch-block size (4 instructions) follow
// the description; the other widths are this design's own choices.
package hs_pkg;

  localparam int NPATH   = 4;            // path contexts
  localparam int FETCH_W = 4;            // instructions per fetch block (one cache line)
  localparam int PCW     = 32;           // instruction-address width (PC counts instructions)
  localparam int PIDB    = 8;            // path-ID bitmap length
  localparam int PTRW    = $clog2(PIDB); // head / tail pointer width

  typedef logic [PCW-1:0] pc_t;

  // Path ID: bitmap plus tail pointer. The head pointer is global.
  typedef struct packed {
    logic [PIDB-1:0] bits;
    logic [PTRW-1:0] tail;
  } pid_t;

  // Instruction classes seen by the front end (from predecode bits).
  typedef enum logic [2:0] {
    K_ALU  = 3'd0,
    K_COND = 3'd1,
    K_JUMP = 3'd2,
    K_CALL = 3'd3,
    K_RET  = 3'd4,
    K_LOAD = 3'd5
  } kind_e;

  // Predecode information delivered with each fetched instruction slot.
  typedef struct packed {
    kind_e       kind;
    pc_t         target;   // direct target of COND/JUMP/CALL
    logic [4:0]  dst;      // destination register, 0 = none
    logic [4:0]  src;      // source register, 0 = none
    logic [1:0]  cat;      // profile category of a conditional branch
    logic        pfork;    // profile class "fork aggressively"
  } predecode_t;

  // Confidence-counter disciplines.
  typedef enum logic [1:0] {
    CONF_ONES  = 2'd0,   // n-bit shift register, count of corrects
    CONF_SAT   = 2'd1,   // saturating up/down counter
    CONF_RESET = 2'd2    // up on correct, cleared on mispredict
  } conf_kind_e;

  // Fork policies.
  typedef enum logic [2:0] {
    FORK_NONE         = 3'd0, // single-path speculation only
    FORK_NAIVE        = 3'd1, // fork at every conditional branch
    FORK_CONF         = 3'd2, // one confidence threshold
    FORK_RESOURCE     = 3'd3, // threshold chosen by number of free contexts
    FORK_PROFILE      = 3'd4, // static profile class only
    FORK_PROFILE_CONF = 3'd5, // per-profile-class confidence threshold
    FORK_PROFILE_RES  = 3'd6  // profile category against free contexts
  } fork_pol_e;

  // Fetch-bandwidth policies.
  typedef enum logic [1:0] {
    FB_SIMPLE     = 2'd0,
    FB_PRED_PRI   = 2'd1,
    FB_PRED_EXTRA = 2'd2,
    FB_PRED_RUU   = 2'd3
  } fetch_pol_e;

  // Sizes of the per-branch state carried through the window.
  localparam int NSH   = 8;   // shadow register maps (in-flight branch limit)
  localparam int OBQ_N = 32;  // outstanding branch queue entries
  localparam int GHW   = 8;   // global history bits
  localparam int LHW   = 8;   // local history bits
  localparam int RAS_D = 16;  // return-address stack depth

  // One instruction as held in the instruction window.
  typedef struct packed {
    pc_t                      pc;
    kind_e                    kind;
    logic [$clog2(NPATH)-1:0] ctx;       // fetching path context
    pid_t                     pid;       // path ID at fetch
    logic [4:0]               dst;
    logic                     pred_taken;
    pc_t                      pred_tgt;  // predicted next PC (control only)
    logic                     forked;    // branch forked: both sides fetched
    logic [$clog2(NSH)-1:0]   sh_idx;
    logic [$clog2(OBQ_N)-1:0] obq_idx;
    logic [GHW-1:0]           gh;        // global history before the branch
    logic [LHW-1:0]           lh;        // local history before the branch
    logic [$clog2(RAS_D)-1:0] ras_tos;   // return-stack checkpoint
    pc_t                      ras_top;
  } uop_t;

  // Position of a tail pointer relative to the head: the ID length.
  function automatic logic [PTRW-1:0] pid_len(input logic [PTRW-1:0] tail,
                                               input logic [PTRW-1:0] head);
    return tail - head;
  endfunction

  // 1 when ID 'a' equals ID 'p' or extends it (a lies in p's subtree).
  function automatic logic pid_descends(input pid_t a, input pid_t p,
                                        input logic [PTRW-1:0] head);
    logic [PTRW-1:0] la, lp, pos;
    logic ok;
    la = pid_len(a.tail, head);
    lp = pid_len(p.tail, head);
    ok = (la >= lp);
    for (int i = 0; i < PIDB; i++) begin
      pos = head + PTRW'(i);
      if (PTRW'(i) < lp && a.bits[pos] != p.bits[pos]) ok = 1'b0;
    end
    return ok;
  endfunction

  // Child ID of 'p' on one side of a fork at position p.tail.
  function automatic pid_t pid_child(input pid_t p, input logic side);
    pid_t c;
    c = p;
    c.bits[p.tail] = side;
    c.tail = p.tail + 1'b1;
    return c;
  endfunction

endpackage
