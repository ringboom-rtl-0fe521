// tb_issue_slot: random slot states and wakeups. Expected next state: a fast
// wakeup readies an operand speculatively, load/slow/chain wakeups ready it
// for good, and kill_prev returns last cycle's speculative operands to
// waiting; requests follow from the current state only.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_issue_slot;
  import rb_pkg::*;
  iq_ent_t ent, nxt; wake_t fast_wk, load_wk, slow_wk, chain_wk; logic kill_prev, req, creq;
  int checks = 0, failures = 0;
  issue_slot dut (.*);
  initial begin
    for (int t = 0; t < 20000; t++) begin
      iq_ent_t e; logic er, ec;
      ent = '0;
      ent.valid = $urandom_range(0, 7) != 0; ent.iss = $urandom_range(0, 3) == 0;
      ent.u.prs1 = preg_t'($urandom_range(0, 7)); ent.u.prs2 = preg_t'($urandom_range(0, 7));
      ent.u.p1_wait = $urandom_range(0, 1); ent.u.p2_wait = $urandom_range(0, 1);
      ent.u.dummy = $urandom_range(0, 3) == 0; ent.u.pdst = preg_t'($urandom());
      ent.spec1 = !ent.u.p1_wait && $urandom_range(0, 1); ent.spec2 = !ent.u.p2_wait && $urandom_range(0, 1);
      fast_wk = '{valid: $urandom_range(0, 1), tag: preg_t'($urandom_range(0, 7))};
      load_wk = '{valid: $urandom_range(0, 3) == 0, tag: preg_t'($urandom_range(0, 7))};
      slow_wk = '{valid: $urandom_range(0, 3) == 0, tag: preg_t'($urandom_range(0, 7))};
      chain_wk = '{valid: $urandom_range(0, 3) == 0, tag: preg_t'($urandom_range(0, 7))};
      kill_prev = $urandom_range(0, 2) == 0;
      #1;
      e = ent;
      e.u.p1_wait = ent.u.p1_wait || (kill_prev && ent.spec1);
      e.u.p2_wait = ent.u.p2_wait || (kill_prev && ent.spec2);
      e.spec1 = e.u.p1_wait && fast_wk.valid && fast_wk.tag == ent.u.prs1;
      e.spec2 = e.u.p2_wait && fast_wk.valid && fast_wk.tag == ent.u.prs2;
      if (e.spec1) e.u.p1_wait = 0;
      if (e.spec2) e.u.p2_wait = 0;
      if ((load_wk.valid && load_wk.tag == ent.u.prs1) || (slow_wk.valid && slow_wk.tag == ent.u.prs1) || (chain_wk.valid && chain_wk.tag == ent.u.prs1)) begin e.u.p1_wait = 0; e.spec1 = 0; end
      if ((load_wk.valid && load_wk.tag == ent.u.prs2) || (slow_wk.valid && slow_wk.tag == ent.u.prs2) || (chain_wk.valid && chain_wk.tag == ent.u.prs2)) begin e.u.p2_wait = 0; e.spec2 = 0; end
      if (!ent.valid) e = '0;
      er = ent.valid && !ent.iss && !ent.u.dummy && !ent.u.p1_wait && !ent.u.p2_wait;
      ec = ent.valid && ent.u.dummy && !ent.u.p2_wait && !ent.spec2;
      checks += 3;
      if (nxt !== e) failures++;
      if (req !== er) failures++;
      if (creq !== ec) failures++;
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
