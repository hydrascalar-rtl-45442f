// fork_decide: fork control decision for one conditional branch.
//
// Combines the dynamic confidence value of the branch, its static profile
// class and the number of free path contexts into a fork / do-not-fork
// decision. With no free context the answer is always "do not fork".
// Policies (input 'pol'):
//   FORK_NAIVE        fork at every conditional branch;
//   FORK_CONF         fork when conf <= thr_conf (a value above the threshold
//                     means high confidence);
//   FORK_RESOURCE     as FORK_CONF, but the threshold is thr_res[nfree]:
//                     program it lower for fewer free contexts so that
//                     marginal branches stop forking when contexts are scarce;
//   FORK_PROFILE      fork only branches profiled "fork aggressively"
//                     (prof_fork), no table needed;
//   FORK_PROFILE_CONF each profile category has its own threshold thr_cat[cat];
//                     fork unless conf exceeds it;
//   FORK_PROFILE_RES  fork when the profile category is below nfree, so
//                     category 0 forks whenever a context is free and
//                     category NPATH never forks.
// The policies follow the description; the oracle "fork exactly on
// mispredictions" bound is a simulation device and is not built.
// Timing: purely combinational.
module fork_decide
  import hs_pkg::*;
#(
  parameter int N     = 4,
  parameter int NCTX  = NPATH,
  parameter int CATW  = 2
) (
  input  fork_pol_e               pol,
  input  logic                    is_cond,
  input  logic [N-1:0]            conf,
  input  logic [CATW-1:0]         cat,
  input  logic                    prof_fork,
  input  logic [$clog2(NCTX+1)-1:0] nfree,
  input  logic [N-1:0]            thr_conf,
  input  logic [N-1:0]            thr_cat [2**CATW],
  input  logic [N-1:0]            thr_res [NCTX],
  output logic                    fork_o
);
  logic want;
  logic [N-1:0] thr_r;

  always_comb begin
    thr_r = thr_res[NCTX-1];
    for (int i = 0; i < NCTX; i++) if (32'(nfree) == i) thr_r = thr_res[i];
    unique case (pol)
      FORK_NAIVE:        want = 1'b1;
      FORK_CONF:         want = (conf <= thr_conf);
      FORK_RESOURCE:     want = (conf <= thr_r);
      FORK_PROFILE:      want = prof_fork;
      FORK_PROFILE_CONF: want = (conf <= thr_cat[cat]);
      FORK_PROFILE_RES:  want = (32'(cat) < 32'(nfree));
      default:           want = 1'b0;
    endcase
    fork_o = is_cond && (nfree != '0) && want;
  end
endmodule
