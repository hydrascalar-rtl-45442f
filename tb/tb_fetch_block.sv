// tb_fetch_block: random start PCs and random predecode for a line; the
// expected valid mask, control slot and fall-through PC are computed by
// scanning the line slot by slot.
// Timing: no clock; each input set is applied and the outputs are compared
// one time unit later. A watchdog ends a hung run with a failure.
// The expected behaviour is the rule set in the module's own header; the
// random stimulus and the reference model are this testbench's choices.
`timescale 1ns/1ps
module tb_fetch_block;
  import hs_pkg::*;
  pc_t start_pc, ctrl_pc, seq_pc;
  predecode_t pd [FETCH_W];
  logic [FETCH_W-1:0] slot_v;
  logic has_ctrl;
  logic [1:0] ctrl_slot;
  int checks = 0, failures = 0;

  fetch_block dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [FETCH_W-1:0] ev;
      int es;
      logic eh;
      start_pc = pc_t'($urandom);
      for (int s = 0; s < FETCH_W; s++) begin
        pd[s] = '0;
        pd[s].kind = kind_e'(($urandom % 3 == 0) ? ($urandom % 6) : 0);
      end
      ev = '0; eh = 0; es = 0;
      for (int s = longint'(start_pc) % FETCH_W; s < FETCH_W; s++) begin
        ev[s] = 1;
        if (pd[s].kind inside {K_COND, K_JUMP, K_CALL, K_RET}) begin eh = 1; es = s; break; end
      end
      #1;
      checks++;
      if (slot_v !== ev || has_ctrl !== eh || (eh && int'(ctrl_slot) != es) ||
          seq_pc !== pc_t'((longint'(start_pc) / FETCH_W + 1) * FETCH_W) ||
          (eh && ctrl_pc !== pc_t'((longint'(start_pc) / FETCH_W) * FETCH_W + es))) begin
        failures++;
        if (failures < 5) $display("FAIL pc=%0d slot_v=%b exp %b", start_pc, slot_v, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
