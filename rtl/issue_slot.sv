// issue_slot: wakeup and request logic of one issue-queue slot.
//
// Each operand tag is compared against four wakeup ports, in the order of the
// issue-slot figure: fast (ALU issued this cycle in the previous column,
// speculative), load (load-hit wakeup, broadcast to every column), slow
// (register written into the previous column's bank this cycle) and chain
// (tag forwarded by a dummy micro-op through the chained wakeup crossbar).
// A fast wakeup is speculative for one cycle: if the previous column's ARB
// stage kills the producer in the next cycle (`kill_prev`), the operand goes
// back to not-ready. The slot requests issue when both operands are ready and
// it is not already issued; a dummy micro-op never issues and instead requests
// chain selection once its watched operand (prs2) is ready and no longer
// speculative.
//
// Combinational: `nxt` is the slot state for the next cycle without the
// queue-level effects (issue, removal, compaction), which issue_queue adds.
//
// Follows the design: the four wakeup ports and the revert of operands woken by
// a killed producer. Own choice: the one-cycle speculative flag and the
// chain-request rule.
module issue_slot
  import rb_pkg::*;
(
  input  iq_ent_t ent,
  input  wake_t   fast_wk,
  input  wake_t   load_wk,
  input  wake_t   slow_wk,
  input  wake_t   chain_wk,
  input  logic    kill_prev,
  output iq_ent_t nxt,
  output logic    req,        // issue request
  output logic    creq        // chain-selection request (dummy only)
);

  function automatic logic hit(wake_t w, preg_t t);
    return w.valid && w.tag == t;
  endfunction

  always_comb begin
    nxt = ent;
    // revert speculative wakeups whose producer lost arbitration
    if (kill_prev && ent.spec1) nxt.u.p1_wait = 1'b1;
    if (kill_prev && ent.spec2) nxt.u.p2_wait = 1'b1;
    nxt.spec1 = 1'b0;
    nxt.spec2 = 1'b0;
    if (nxt.u.p1_wait && hit(fast_wk, ent.u.prs1)) begin nxt.u.p1_wait = 1'b0; nxt.spec1 = 1'b1; end
    if (nxt.u.p2_wait && hit(fast_wk, ent.u.prs2)) begin nxt.u.p2_wait = 1'b0; nxt.spec2 = 1'b1; end
    if (hit(load_wk, ent.u.prs1) || hit(slow_wk, ent.u.prs1) || hit(chain_wk, ent.u.prs1)) begin
      nxt.u.p1_wait = 1'b0; nxt.spec1 = 1'b0;
    end
    if (hit(load_wk, ent.u.prs2) || hit(slow_wk, ent.u.prs2) || hit(chain_wk, ent.u.prs2)) begin
      nxt.u.p2_wait = 1'b0; nxt.spec2 = 1'b0;
    end
    if (!ent.valid) nxt = '0;
    req  = ent.valid && !ent.u.dummy && !ent.iss && !ent.u.p1_wait && !ent.u.p2_wait;
    creq = ent.valid && ent.u.dummy && !ent.u.p2_wait && !ent.spec2;
  end

endmodule
