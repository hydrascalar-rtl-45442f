// tb_hs_pkg: checks the path-ID helpers of hs_pkg against a bit-by-bit
// model that walks the circular bitmap with integer arithmetic. Random IDs
// are built by extending a random parent, so both "inside the subtree" and
// "outside" cases occur, including wrap-around of the circular bitmap.
// Timing: no clock; each input set is applied and the outputs are compared
// one time unit later. A watchdog ends a hung run with a failure.
// The expected behaviour is the rule set in the module's own header; the
// random stimulus and the reference model are this testbench's choices.
`timescale 1ns/1ps
module tb_hs_pkg;
  import hs_pkg::*;
  int checks = 0, failures = 0;

  function automatic logic ref_desc(input pid_t a, input pid_t p, input int head);
    int la, lp;
    la = (int'(a.tail) - head + PIDB) % PIDB;
    lp = (int'(p.tail) - head + PIDB) % PIDB;
    if (la < lp) return 0;
    for (int i = 0; i < lp; i++)
      if (a.bits[(head + i) % PIDB] != p.bits[(head + i) % PIDB]) return 0;
    return 1;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int head, lp, ext;
      pid_t p, a, c;
      logic side;
      head = $urandom % PIDB;
      lp   = $urandom % (PIDB - 2);
      p.bits = PIDB'($urandom);
      p.tail = PTRW'((head + lp) % PIDB);
      a = p;
      ext = $urandom % (PIDB - 1 - lp);
      for (int i = 0; i < ext; i++) a = pid_child(a, 1'($urandom));
      if ($urandom % 3 == 0) a.bits[(head + ($urandom % (lp + 1))) % PIDB] ^= 1'b1;
      if ($urandom % 5 == 0) a.tail = PTRW'((head + ($urandom % (PIDB - 1))) % PIDB);
      checks++;
      if (pid_descends(a, p, PTRW'(head)) !== ref_desc(a, p, head)) begin
        failures++; $display("FAIL descends head=%0d a=%b/%0d p=%b/%0d", head, a.bits, a.tail, p.bits, p.tail);
      end
      // a child is always inside its parent's subtree and outside its sibling's
      side = 1'($urandom);
      c = pid_child(p, side);
      checks += 3;
      if (!pid_descends(c, p, PTRW'(head))) failures++;
      if (pid_descends(c, pid_child(p, ~side), PTRW'(head))) failures++;
      if (int'(pid_len(c.tail, PTRW'(head))) != lp + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
