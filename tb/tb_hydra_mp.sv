// tb_hydra_mp: end-to-end test of the multipath processor.
//
// The testbench plays instruction cache, execution oracle, data cache and
// memory around the design. The program is synthetic and defined by a
// function of the PC: a main loop with conditional branches of four biases
// (always, 90 %, 50 %, never taken), loads, calls to small functions that each
// have one caller and one inner branch, and a jump back to the start. One
// function sometimes returns one instruction past its call site, which the
// return stack cannot foresee.
// Outcomes of conditional branches are drawn at random when the design asks
// for them and remembered per window tag, so the committed stream can be
// checked exactly: each committed PC must be the architectural successor of
// the previous committed instruction. The run is repeated under every fork,
// confidence, fetch and predictor policy. The test also counts how often each
// mechanism occurred (forks, forked-branch resolutions, misprediction
// restores, holes reclaimed, return-stack use, MSHR merges and stalls,
// shadow-map and window stalls, head-pointer advances) and fails if one never
// did.
`timescale 1ns/1ps
module tb_hydra_mp;
  import hs_pkg::*;
  localparam int NBLK = 2, RUU_N = 64, CMW = 4, NM = 8, TW = $clog2(RUU_N);
  localparam int CYC = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fork_pol_e  fork_pol;
  conf_kind_e conf_kind;
  fetch_pol_e fetch_pol;
  logic       pred_sel;
  logic [3:0] thr_conf, thr_cat [4], thr_res [NPATH];
  logic       if_v [NPATH][NBLK];
  pc_t        if_pc [NPATH][NBLK];
  predecode_t if_pd [NPATH][NBLK][FETCH_W];
  logic       ex_v, ex_taken;
  pc_t        ex_pc, ex_ret_tgt;
  logic [TW-1:0] ex_tag;
  logic       ld_v, ld_hit;
  pc_t        ld_pc, ld_line;
  logic       mem_req_v, mem_fill_v;
  pc_t        mem_req_line;
  logic [$clog2(NM)-1:0] mem_req_idx, mem_fill_idx;
  logic       cm_v [CMW], cm_hole [CMW];
  pc_t        cm_pc [CMW];
  logic [TW-1:0] cm_tag [CMW];

  hydra_mp dut (.*);

  // ---------------- synthetic program ----------------
  function automatic predecode_t pd_of(input pc_t pc);
    predecode_t d;
    int w, k;
    w = int'(pc);
    d = '0;
    d.kind = K_ALU;
    d.dst  = 5'((w % 5) + 1);
    d.src  = 5'((w % 3) + 1);
    if (w < 256) begin
      if (w == 255)            begin d.kind = K_JUMP; d.target = 0; d.dst = 0; end
      else if (w % 64 == 60)   begin d.kind = K_CALL; d.target = pc_t'(512 + (w/64)*32); d.dst = 0; end
      else if (w % 16 == 7)    begin d.kind = K_COND; d.target = pc_t'(w + 5); d.dst = 0;
                                     d.cat = 2'(cls(pc) == 2 ? 0 : cls(pc) == 1 ? 1 : 3);
                                     d.pfork = (cls(pc) == 2); end
      else if (w % 4 == 1)      begin d.kind = K_LOAD; d.dst = 2; d.src = 0; end
    end else if (w >= 512 && w < 640) begin
      k = (w - 512) % 32;
      if (k == 31)      begin d.kind = K_RET; d.dst = 0; end
      else if (k == 10) begin d.kind = K_COND; d.target = pc + 20; d.dst = 0; d.cat = 0; d.pfork = 1; end
      else if (k == 5)  begin d.kind = K_LOAD; d.dst = 3; end
    end else begin
      if (w % 8 == 7) begin d.kind = K_JUMP; d.target = 0; d.dst = 0; end
    end
    return d;
  endfunction

  function automatic int cls(input pc_t pc);   // 0 always, 1 90%, 2 50%, 3 never
    if (pc >= 512) return 2;
    return (int'(pc) >> 4) % 4;
  endfunction

  function automatic pc_t ret_tgt(input pc_t pc);
    if (pc < 512 || pc >= 640) return 0;
    return pc_t'(((int'(pc) - 512) / 32) * 64 + 61);
  endfunction

  always_comb
    for (int p = 0; p < NPATH; p++)
      for (int j = 0; j < NBLK; j++)
        for (int s = 0; s < FETCH_W; s++)
          if_pd[p][j][s] = pd_of((if_pc[p][j] & ~pc_t'(FETCH_W-1)) | pc_t'(s));

  // ---------------- execution oracle ----------------
  logic taken_of [RUU_N];
  logic draw;
  always @(negedge clk) begin
    draw = 1'b0;
    if (ex_v) begin
      unique case (cls(ex_pc))
        0: draw = 1'b1;
        1: draw = ($urandom % 10) != 0;
        2: draw = $urandom % 2;
        default: draw = 1'b0;
      endcase
    end
    ex_taken   = draw;
    // returns of function 1 sometimes go back one instruction further
    // (an indirect return the stack cannot know about)
    ex_ret_tgt = ret_tgt(ex_pc) + ((ex_pc >= 544 && ex_pc < 576 && ($urandom % 4) == 0) ? 1 : 0);
    ld_hit     = ($urandom % 10) < 5;
    ld_line    = (ld_pc >> 3) + pc_t'($urandom % 4);
  end
  pc_t rtgt_of [RUU_N];
  always @(posedge clk) if (ex_v) begin taken_of[ex_tag] <= ex_taken; rtgt_of[ex_tag] <= ex_ret_tgt; end

  // ---------------- memory: fixed 40-cycle latency ----------------
  int   mem_t [NM];
  logic mem_busy [NM];
  always @(posedge clk) begin
    if (!rst_n) for (int m = 0; m < NM; m++) mem_busy[m] <= 1'b0;
    else begin
      if (mem_req_v) begin mem_busy[mem_req_idx] <= 1'b1; mem_t[mem_req_idx] <= 40; end
      for (int m = 0; m < NM; m++)
        if (mem_busy[m] && !(mem_req_v && mem_req_idx == m)) begin
          mem_t[m] <= mem_t[m] - 1;
          if (mem_fill_v && mem_fill_idx == m) mem_busy[m] <= 1'b0;
        end
    end
  end
  always_comb begin
    mem_fill_v = 1'b0; mem_fill_idx = '0;
    for (int m = NM-1; m >= 0; m--)
      if (mem_busy[m] && mem_t[m] <= 0) begin mem_fill_v = 1'b1; mem_fill_idx = m[$clog2(NM)-1:0]; end
  end

  // ---------------- commit checking ----------------
  int checks = 0, failures = 0;
  pc_t exp_pc;
  int commits, holes;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < CMW; c++)
      if (cm_v[c]) begin
        if (cm_hole[c]) holes++;
        else begin
          predecode_t d;
          d = pd_of(cm_pc[c]);
          checks++;
          if (cm_pc[c] !== exp_pc) begin
            failures++;
            if (failures < 10) $display("FAIL commit pc %0d expected %0d", cm_pc[c], exp_pc);
          end
          commits++;
          unique case (d.kind)
            K_JUMP, K_CALL: exp_pc = d.target;
            K_RET:          exp_pc = rtgt_of[cm_tag[c]];
            K_COND:         exp_pc = taken_of[cm_tag[c]] ? d.target : cm_pc[c] + 1'b1;
            default:        exp_pc = cm_pc[c] + 1'b1;
          endcase
        end
      end
  end

  // ---------------- mechanism counters ----------------
  int n_fork, n_fres, n_mis, n_push, n_pop, n_merge, n_mfull, n_shlow, n_wfull, n_head, n_retmis, n_multi;
  always @(posedge clk) if (rst_n) begin
    if (dut.fork_ok) n_fork++;
    if (dut.res_forked) n_fres++;
    if (dut.res_rst_valid) n_mis++;
    if (dut.res_mis && dut.res_uop.kind == K_RET) n_retmis++;
    for (int p = 0; p < NPATH; p++) begin
      if (dut.ras_push[p]) n_push++;
      if (dut.ras_pop[p]) n_pop++;
      if (dut.grant[p] > 1) n_multi++;
    end
    if (dut.u_mshr.alloc_v && dut.u_mshr.mhit) n_merge++;
    if (dut.mshr_full) n_mfull++;
    if (dut.sh_low) n_shlow++;
    if (!dut.ds_ready) n_wfull++;
    if (dut.ret_v && dut.ret_pos == dut.pid_head) n_head++;
  end

  task automatic run_phase(input fork_pol_e fp, input conf_kind_e ck, input fetch_pol_e fb,
                           input logic ps);
    int c0;
    fork_pol = fp; conf_kind = ck; fetch_pol = fb; pred_sel = ps;
    rst_n = 0;
    exp_pc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = commits;
    repeat (CYC) @(posedge clk);
    checks++;
    if (commits - c0 < CYC / 4) begin
      failures++;
      $display("FAIL phase fork=%0d conf=%0d fetch=%0d pred=%0d: only %0d commits",
               fp, ck, fb, ps, commits - c0);
    end
    $display("phase fork=%0d conf=%0d fetch=%0d pred=%0d: commits=%0d forks=%0d mispredict-restores=%0d",
             fp, ck, fb, ps, commits - c0, n_fork, n_mis);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %s: %0d", what, n);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr_conf = 4'd3;
    thr_cat  = '{4'd8, 4'd3, 4'd1, 4'd0};
    thr_res  = '{4'd0, 4'd1, 4'd2, 4'd3};
    commits = 0; holes = 0;
    {n_fork, n_fres, n_mis, n_push, n_pop, n_merge, n_mfull, n_shlow, n_wfull, n_head, n_retmis, n_multi} = '0;
    run_phase(FORK_CONF,         CONF_RESET, FB_PRED_EXTRA, 1'b0);
    run_phase(FORK_NAIVE,        CONF_ONES,  FB_SIMPLE,     1'b1);
    run_phase(FORK_RESOURCE,     CONF_SAT,   FB_PRED_PRI,   1'b0);
    run_phase(FORK_PROFILE_RES,  CONF_RESET, FB_PRED_RUU,   1'b1);
    run_phase(FORK_PROFILE_CONF, CONF_SAT,   FB_PRED_EXTRA, 1'b0);
    run_phase(FORK_PROFILE,      CONF_ONES,  FB_SIMPLE,     1'b0);
    run_phase(FORK_NONE,         CONF_RESET, FB_PRED_EXTRA, 1'b1);
    need("fork", n_fork);
    need("forked-branch resolution", n_fres);
    need("misprediction restore", n_mis);
    need("return misprediction", n_retmis);
    need("hole reclaimed at commit", holes);
    need("return-stack push", n_push);
    need("return-stack pop", n_pop);
    need("multi-line fetch grant", n_multi);
    need("MSHR merge", n_merge);
    need("MSHR full", n_mfull);
    need("shadow-map stall", n_shlow);
    need("window full", n_wfull);
    need("path-ID head advance", n_head);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
