// tb_rename_stage: random decoded bundles through the rename stage, with a
// reference rename model (map table, busy and load tables, allocated
// registers) and an in-order commit queue standing in for the ROB.
// For every accepted lane it checks the source and stale mappings, the wait
// bits (with same-cycle wakeup bypass), that the destination is a free
// register of the chosen column's bank, the column rules (after the producer
// of a waiting non-load operand, prs1 first), the creation of a dummy
// micro-op for two-waiting instructions and the per-column dispatch limit.
// Flushes at random points check the commit snapshot restore: the map goes
// back to the committed map and the uncommitted destinations become free.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_rename_stage;
  import rb_pkg::*;
  localparam int NWK = 6, D = 2;
  typedef struct { logic has_dst; lreg_t lrd; preg_t pdst, stale; } rent_t;
  logic clk = 0, rst = 1, flush = 0;
  logic [NCOL-1:0] in_valid; dec_uop_t [NCOL-1:0] in_uop; logic [2:0] accept;
  logic dq_ready, out_valid; logic [2*NCOL-1:0] out_v; ren_uop_t [2*NCOL-1:0] out_uop;
  robidx_t rob_tail; logic [ROB_W:0] rob_space;
  logic [NCOL-1:0] rob_enq, rob_has_dst, rob_is_st; lreg_t [NCOL-1:0] rob_lrd; preg_t [NCOL-1:0] rob_pdst, rob_stale;
  wake_t [NWK-1:0] wk;
  logic [NCOL-1:0] cmt_v, cmt_has_dst; lreg_t [NCOL-1:0] cmt_lrd; preg_t [NCOL-1:0] cmt_pdst, cmt_stale;
  logic two_wait_split;

  preg_t map [NLREG], cmap [NLREG];
  bit busy [NPREG], ldt [NPREG], alloc [NPREG];
  rent_t rq [$];
  int checks = 0, failures = 0, nacc = 0, ndum = 0, nflush = 0, tail = 0;

  rename_stage #(.DISP_PER_Q(D), .NWK(NWK)) dut (.*);
  always #5 clk = ~clk;

  task automatic err(input string s);
    failures++;
    if (failures < 8) $display("%0t: %s", $time, s);
  endtask

  function automatic col_t nx(preg_t p); return bank_of(p) + col_t'(1); endfunction

  initial begin
    in_valid = 0; in_uop = '0; dq_ready = 0; rob_tail = 0; rob_space = 128; wk = '0;
    cmt_v = 0; cmt_has_dst = 0; cmt_lrd = '0; cmt_pdst = '0; cmt_stale = '0;
    for (int r = 0; r < NLREG; r++) begin map[r] = preg_t'({col_t'(r % NCOL), 5'(r / NCOL)}); cmap[r] = map[r]; end
    for (int p = 0; p < NPREG; p++) begin busy[p] = 0; ldt[p] = 0; alloc[p] = 0; end
    for (int r = 0; r < NLREG; r++) alloc[map[r]] = 1;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 5000; t++) begin
      bit clr [NPREG]; int ncmt, cnt [NCOL]; bit stopped;
      @(negedge clk);
      flush = (t % 700 == 699);
      in_valid = NCOL'($urandom());
      for (int i = 0; i < NCOL; i++) begin
        int r;
        r = $urandom_range(0, 9);
        in_uop[i].op = r < 5 ? OP_ADD : r == 5 ? OP_MUL : r == 6 ? OP_DIV : r < 9 ? OP_LD : OP_ST;
        in_uop[i].lrd = lreg_t'($urandom_range(0, 7)); in_uop[i].lrs1 = lreg_t'($urandom_range(0, 7));
        in_uop[i].lrs2 = lreg_t'($urandom_range(0, 7)); in_uop[i].use_imm = in_uop[i].op == OP_LD || $urandom_range(0, 2) == 0;
        in_uop[i].imm = $urandom();
      end
      dq_ready = $urandom_range(0, 4) != 0;
      rob_tail = robidx_t'(tail); rob_space = (ROB_W+1)'(128 - rq.size());
      for (int p = 0; p < NPREG; p++) clr[p] = 0;
      for (int k = 0; k < NWK; k++) begin
        int p;
        p = $urandom_range(1, NPREG-1);
        wk[k].valid = alloc[p] && busy[p] && $urandom_range(0, 1); wk[k].tag = preg_t'(p);
        if (wk[k].valid) clr[p] = 1;
      end
      ncmt = $urandom_range(0, NCOL);
      if (ncmt > rq.size()) ncmt = rq.size();
      cmt_v = 0;
      for (int i = 0; i < NCOL; i++) if (i < ncmt) begin
        cmt_v[i] = 1; cmt_has_dst[i] = rq[i].has_dst; cmt_lrd[i] = rq[i].lrd; cmt_pdst[i] = rq[i].pdst; cmt_stale[i] = rq[i].stale;
      end
      #1;
      // ---- check the rename outputs against the model ----
      for (int c = 0; c < NCOL; c++) cnt[c] = 0;
      stopped = 0;
      checks++;
      if (flush && accept != 0) err("renamed during flush");
      for (int i = 0; i < NCOL; i++) begin
        bit hd, w1, w2, l1, l2, b1, b2, ed; ren_uop_t m, d;
        if (!rob_enq[i]) begin stopped = 1; continue; end
        checks++;
        if (stopped || !in_valid[i] || i >= accept) err($sformatf("lane %0d accepted out of order", i));
        m = out_uop[2*i]; d = out_uop[2*i+1];
        hd = in_uop[i].lrd != 0 && in_uop[i].op != OP_ST;
        w1 = busy[map[in_uop[i].lrs1]] && !clr[map[in_uop[i].lrs1]];
        w2 = uses_rs2(in_uop[i].op, in_uop[i].use_imm) && busy[map[in_uop[i].lrs2]] && !clr[map[in_uop[i].lrs2]];
        l1 = ldt[map[in_uop[i].lrs1]]; l2 = ldt[map[in_uop[i].lrs2]];
        b1 = w1 && !l1; b2 = w2 && !l2;
        checks += 8;
        if (!out_v[2*i] || m.dummy) err("main micro-op missing");
        if (m.prs1 !== map[in_uop[i].lrs1] || m.prs2 !== map[in_uop[i].lrs2]) err($sformatf("lane %0d source mapping", i));
        if (m.p1_wait !== w1 || m.p2_wait !== w2) err($sformatf("lane %0d wait bits %b%b want %b%b", i, m.p1_wait, m.p2_wait, w1, w2));
        if (m.has_dst !== hd || rob_has_dst[i] !== hd) err("has_dst");
        if (m.rob_idx !== robidx_t'(tail + i)) err("rob index");
        if (b1 ? m.col !== nx(m.prs1) : (b2 && m.col !== nx(m.prs2))) err($sformatf("lane %0d column %0d rule", i, m.col));
        if (m.hp !== (in_uop[i].op == OP_ADD && in_uop[i].use_imm && hd && in_uop[i].lrd == in_uop[i].lrs1)) err("hp flag");
        ed = b1 && b2 && nx(m.prs2) != m.col;
        if (out_v[2*i+1] !== ed) err($sformatf("lane %0d dummy %b want %b", i, out_v[2*i+1], ed));
        else if (ed && (!d.dummy || d.col !== nx(m.prs2) || d.chain_col !== m.col || d.prs2 !== m.prs2 || d.has_dst)) err("dummy fields");
        ndum += ed;
        cnt[m.col]++; if (ed) cnt[d.col]++;
        if (hd) begin
          checks += 2;
          if (rob_stale[i] !== map[in_uop[i].lrd]) err("stale mapping");
          if (bank_of(m.pdst) !== m.col || m.pdst == 0 || alloc[m.pdst]) err($sformatf("lane %0d bad destination %0d", i, m.pdst));
          map[in_uop[i].lrd] = m.pdst; alloc[m.pdst] = 1; busy[m.pdst] = 1; ldt[m.pdst] = in_uop[i].op == OP_LD;
        end
        rq.push_back('{hd, in_uop[i].lrd, hd ? m.pdst : preg_t'(0), rob_stale[i]});
        nacc++;
      end
      for (int c = 0; c < NCOL; c++) begin checks++; if (cnt[c] > D) err("column over-subscribed"); end
      // ---- model update for the clock edge ----
      for (int k = 0; k < NWK; k++) if (wk[k].valid) begin
        // a destination renamed this cycle is set busy after the clears
        bit fresh; fresh = 0;
        for (int i = 0; i < accept; i++) if (rob_has_dst[i] && rob_pdst[i] == wk[k].tag) fresh = 1;
        if (!fresh) begin busy[wk[k].tag] = 0; ldt[wk[k].tag] = 0; end
      end
      tail += accept;
      for (int i = 0; i < ncmt; i++) begin
        rent_t e; e = rq.pop_front();
        if (e.has_dst) begin cmap[e.lrd] = e.pdst; if (e.stale != 0) alloc[e.stale] = 0; end
      end
      if (flush) begin
        foreach (rq[j]) if (rq[j].has_dst) alloc[rq[j].pdst] = 0;
        rq.delete();
        for (int r = 0; r < NLREG; r++) map[r] = cmap[r];
        for (int p = 0; p < NPREG; p++) begin busy[p] = 0; ldt[p] = 0; end
        nflush++;
      end
    end
    $display("accepted %0d, dummies %0d, flushes %0d", nacc, ndum, nflush);
    checks++;
    if (nacc < 3000 || ndum == 0 || nflush == 0) err("too little renamed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
