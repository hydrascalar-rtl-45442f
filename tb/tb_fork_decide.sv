// tb_fork_decide: random inputs for every fork policy, compared with the
// policy rules written out directly: no fork without a free context or on a
// non-conditional instruction; naive always; confidence and per-category
// thresholds fork unless the value exceeds the threshold; the resource
// threshold is chosen by the free-context count; profile-resource forks when
// the category is below the free count.
// Timing: no clock; each input set is applied and the outputs are compared
// one time unit later. A watchdog ends a hung run with a failure.
// The expected behaviour is the rule set in the module's own header; the
// random stimulus and the reference model are this testbench's choices.
`timescale 1ns/1ps
module tb_fork_decide;
  import hs_pkg::*;
  fork_pol_e pol;
  logic is_cond, prof_fork, fork_o;
  logic [3:0] conf, thr_conf, thr_cat [4], thr_res [NPATH];
  logic [1:0] cat;
  logic [2:0] nfree;
  int checks = 0, failures = 0;
  int seen_fork = 0, seen_nofork = 0;

  fork_decide dut (.*);

  function automatic logic model();
    if (!is_cond || nfree == 0) return 0;
    case (pol)
      FORK_NAIVE:        return 1;
      FORK_CONF:         return !(conf > thr_conf);
      FORK_RESOURCE:     return !(conf > thr_res[nfree > 3 ? 3 : nfree]);
      FORK_PROFILE:      return prof_fork;
      FORK_PROFILE_CONF: return !(conf > thr_cat[cat]);
      FORK_PROFILE_RES:  return int'(cat) < int'(nfree);
      default:           return 0;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      pol = fork_pol_e'($urandom % 7);
      is_cond = $urandom % 8 != 0;
      prof_fork = 1'($urandom);
      conf = 4'($urandom); thr_conf = 4'($urandom);
      for (int i = 0; i < 4; i++) thr_cat[i] = 4'($urandom);
      for (int i = 0; i < NPATH; i++) thr_res[i] = 4'(i * 3);
      cat = 2'($urandom);
      nfree = 3'($urandom % 4);
      #1;
      checks++;
      if (fork_o !== model()) begin
        failures++;
        if (failures < 5) $display("FAIL pol=%0d conf=%0d cat=%0d nfree=%0d got %0b", pol, conf, cat, nfree, fork_o);
      end
      if (fork_o) seen_fork++; else seen_nofork++;
    end
    checks++;
    if (seen_fork == 0 || seen_nofork == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
