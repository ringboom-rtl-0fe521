// tb_issue_queue: one column's issue queue under random dispatch, random
// wakeups on all four ports, random ARB verdicts (pass / kill back to the
// queue) and random chain grants. A reference model keeps the entries in age
// order and predicts, every cycle, the issued micro-op (oldest ready, a
// high-priority request first), the chain request (oldest ready dummy) and the
// free-slot count. The directed part checks the one-cycle wakeup-to-issue
// latency that allows back-to-back issue of dependent micro-ops.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_issue_queue;
  import rb_pkg::*;
  localparam int SIZE = 8, D = 2;
  typedef struct { ren_uop_t u; bit w1, w2, s1, s2, iss; } ment_t;
  logic clk = 0, rst = 1, flush = 0;
  logic [D-1:0] disp_v; ren_uop_t [D-1:0] disp_uop; logic [1:0] room;
  wake_t fast_wk, load_wk, slow_wk, chain_wk; logic kill_prev;
  logic iss_v, iss_hp, arb_pass, arb_kill, chain_req, chain_gnt; iss_uop_t iss_uop;
  preg_t chain_tag; col_t chain_col;
  ment_t m [$];
  int checks = 0, failures = 0, seq = 0, nis = 0, nhp = 0, nch = 0, nkill = 0;
  issue_queue #(.SIZE(SIZE), .DISP_PER_Q(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit hit(wake_t w, preg_t t); return w.valid && w.tag == t; endfunction
  function automatic ment_t wake(ment_t e);
    if (kill_prev && e.s1) e.w1 = 1;
    if (kill_prev && e.s2) e.w2 = 1;
    e.s1 = 0; e.s2 = 0;
    if (e.w1 && hit(fast_wk, e.u.prs1)) begin e.w1 = 0; e.s1 = 1; end
    if (e.w2 && hit(fast_wk, e.u.prs2)) begin e.w2 = 0; e.s2 = 1; end
    if (hit(load_wk, e.u.prs1) || hit(slow_wk, e.u.prs1) || hit(chain_wk, e.u.prs1)) begin e.w1 = 0; e.s1 = 0; end
    if (hit(load_wk, e.u.prs2) || hit(slow_wk, e.u.prs2) || hit(chain_wk, e.u.prs2)) begin e.w2 = 0; e.s2 = 0; end
    return e;
  endfunction
  function automatic wake_t rw(int pct);
    wake_t w; w.valid = $urandom_range(0, 99) < pct; w.tag = preg_t'($urandom_range(1, 12)); return w;
  endfunction

  task automatic step(input bit rand_disp, input int ndisp, input bit pass_all);
    int ei, ehp, ec, n, free;
    bit last_iss;
    @(negedge clk);
    last_iss = 0;
    foreach (m[j]) if (m[j].iss) last_iss = 1;
    // ARB verdict for last cycle's issue
    arb_pass = 0; arb_kill = 0;
    if (last_iss) begin
      if (pass_all || $urandom_range(0, 3) != 0) arb_pass = 1; else arb_kill = 1;
    end
    free = SIZE - m.size();
    n = rand_disp ? $urandom_range(0, D) : ndisp;
    if (n > free) n = free;
    if (n > D) n = D;
    disp_v = 0;
    for (int k = 0; k < D; k++) begin
      disp_uop[k] = '0;
      if (k < n && rand_disp) begin
        disp_v[k] = 1;
        disp_uop[k].prs1 = preg_t'($urandom_range(0, 12)); disp_uop[k].prs2 = preg_t'($urandom_range(0, 12));
        disp_uop[k].p1_wait = disp_uop[k].prs1 != 0 && $urandom_range(0, 1);   // p0 never waits
        disp_uop[k].p2_wait = disp_uop[k].prs2 != 0 && $urandom_range(0, 1);
        disp_uop[k].dummy = $urandom_range(0, 5) == 0; disp_uop[k].hp = $urandom_range(0, 5) == 0;
        disp_uop[k].chain_col = col_t'($urandom()); disp_uop[k].pdst = preg_t'($urandom());
        disp_uop[k].rob_idx = robidx_t'(seq); seq++;
      end
    end
    if (rand_disp) begin
      fast_wk = rw(40); load_wk = rw(40); slow_wk = rw(40); chain_wk = rw(30);
      kill_prev = $urandom_range(0, 3) == 0;
    end else begin
      load_wk = '{valid: 1'b1, tag: preg_t'(seq % 13)}; seq++;   // drain: wake every tag in turn
    end
    chain_gnt = $urandom_range(0, 1);
    #1;
    // expected selections over the resident entries
    ei = -1; ehp = -1; ec = -1;
    foreach (m[j]) begin
      bit r;
      r = !m[j].u.dummy && !m[j].iss && !m[j].w1 && !m[j].w2;
      if (r && ei < 0) ei = j;
      if (r && m[j].u.hp && ehp < 0) ehp = j;
      if (m[j].u.dummy && !m[j].w2 && !m[j].s2 && ec < 0) ec = j;
    end
    if (ehp >= 0) ei = ehp;
    checks += 4;
    if (room !== 2'((SIZE - m.size()) > D ? D : SIZE - m.size())) failures++;
    if (iss_v !== (ei >= 0)) failures++;
    else if (iss_v && (iss_uop.rob_idx !== m[ei].u.rob_idx || iss_uop.spec1 !== m[ei].s1 || iss_uop.spec2 !== m[ei].s2)) failures++;
    if (chain_req !== (ec >= 0)) failures++;
    else if (chain_req && (chain_tag !== m[ec].u.prs2 || chain_col !== m[ec].u.chain_col)) failures++;
    if (failures > 0 && failures < 4) $display("%0t room %0d iss %b/%0d rob %0d chain %b/%0d", $time, room, iss_v, ei, iss_uop.rob_idx, chain_req, ec);
    nis += iss_v; nhp += iss_hp; nch += chain_req && chain_gnt; nkill += arb_kill;
    // model update
    begin
      ment_t nm [$];
      foreach (m[j]) begin
        ment_t e; bit keep;
        e = wake(m[j]); keep = 1;
        if (m[j].iss && arb_pass) keep = 0;
        if (m[j].iss && arb_kill) e.iss = 0;
        if (j == ec && chain_gnt) keep = 0;
        if (j == ei) e.iss = 1;
        if (keep) nm.push_back(e);
      end
      for (int k = 0; k < D; k++) if (disp_v[k]) begin
        ment_t e;
        e.u = disp_uop[k]; e.w1 = disp_uop[k].p1_wait; e.w2 = disp_uop[k].p2_wait; e.s1 = 0; e.s2 = 0; e.iss = 0;
        nm.push_back(wake(e));
      end
      m = nm;
    end
  endtask

  initial begin
    disp_v = 0; disp_uop = '0; fast_wk = '0; load_wk = '0; slow_wk = '0; chain_wk = '0;
    kill_prev = 0; arb_pass = 0; arb_kill = 0; chain_gnt = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 6000; t++) step(1, 0, 0);
    // drain, then directed latency check: dispatch a micro-op waiting on p9,
    // wake p9 once, and it must issue in the very next cycle
    fast_wk = '0; load_wk = '0; slow_wk = '0; chain_wk = '0; kill_prev = 0;
    for (int t = 0; t < 60; t++) step(0, 0, 1);
    load_wk = '0;
    @(negedge clk);
    checks++;
    if (m.size() != 0 || iss_v) begin failures++; $display("queue did not drain: %0d left", m.size()); end
    disp_v = 1; disp_uop[0] = '0; disp_uop[0].prs1 = 9; disp_uop[0].p1_wait = 1; disp_uop[0].rob_idx = 7'd100;
    @(posedge clk); #1 disp_v = 0;
    @(negedge clk);
    checks++;
    if (iss_v) failures++;              // still waiting
    slow_wk = '{valid: 1'b1, tag: 7'd9};
    @(posedge clk); #1 slow_wk = '0;
    @(negedge clk);
    checks++;
    if (!(iss_v && iss_uop.rob_idx == 7'd100)) begin failures++; $display("wakeup-to-issue latency is not one cycle"); end
    $display("issued %0d, high-priority %0d, chain grants %0d, ARB kills %0d", nis, nhp, nch, nkill);
    checks++;
    if (nhp == 0 || nch == 0 || nkill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
