// rename_stage: register rename with column steering and per-column physical
// register allocation (query + allocate of the column-steering rename
// pipeline).
//
// For each lane of a decoded bundle (lanes in program order) the stage
//  * reads the rename table, with intra-bundle bypass from older lanes,
//  * reads the busy table and the load table (registers produced by loads),
//  * picks a column with column_arbiter: an operand that only waits on a load
//    does not constrain the column, because load wakeups reach every column,
//  * allocates the destination from the chosen column's free list, so the
//    destination bank equals the column (no writeback bank conflicts),
//  * splits a two-waiting instruction (both operands wait on non-loads) into
//    the main micro-op, placed after the producer of prs1, and a dummy
//    micro-op placed after the producer of prs2 that will chain-wake the main.
// Lanes are accepted as an in-order prefix: a lane stops the bundle when its
// column already got DISP_PER_Q micro-ops this cycle, its free list is empty,
// the ROB is full or the dispatch queue cannot take the bundle. `accept` tells
// the front end how many lanes were consumed.
//
// Timing: one cycle. Table writes land at the clock edge; writeback wakeups of
// the same cycle are bypassed into the busy lookup. A committed copy of the
// rename table is kept; `flush` restores the rename table from it, clears the
// busy and load tables and restores the free lists in one cycle (commit
// snapshot recovery). Physical register 0 holds x0 forever and is never busy.
// The design splits this work over two or three pipeline stages (map, query,
// allocate); here it is done in one cycle, which gives the same result
// without the cross-stage bypasses.
//
// Follows the design: per-column free lists, column steering, dummy micro-ops
// for two-waiting instructions, load tracking, high-priority marking of index
// bumps and the commit snapshot. Own choices: the one-cycle stage, the
// acceptance rules and the reset mapping.
module rename_stage
  import rb_pkg::*;
#(
  parameter int DISP_PER_Q = 2,   // micro-ops one issue queue accepts per cycle
  parameter int NWK        = 9    // writeback wakeups that clear busy bits
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      flush,
  // front end
  input  logic     [NCOL-1:0]       in_valid,
  input  dec_uop_t [NCOL-1:0]       in_uop,
  output logic     [$clog2(NCOL+1)-1:0] accept,
  // to the dispatch queue: lane i main micro-op at 2i, its dummy at 2i+1
  input  logic                      dq_ready,
  output logic                      out_valid,
  output logic     [2*NCOL-1:0]     out_v,
  output ren_uop_t [2*NCOL-1:0]     out_uop,
  // ROB allocation
  input  robidx_t                   rob_tail,
  input  logic     [ROB_W:0]        rob_space,
  output logic     [NCOL-1:0]       rob_enq,
  output logic     [NCOL-1:0]       rob_has_dst,
  output lreg_t    [NCOL-1:0]       rob_lrd,
  output preg_t    [NCOL-1:0]       rob_pdst,
  output preg_t    [NCOL-1:0]       rob_stale,
  output logic     [NCOL-1:0]       rob_is_st,
  // writeback wakeups clear busy bits
  input  wake_t    [NWK-1:0]        wk,
  // commit
  input  logic     [NCOL-1:0]       cmt_v,
  input  logic     [NCOL-1:0]       cmt_has_dst,
  input  lreg_t    [NCOL-1:0]       cmt_lrd,
  input  preg_t    [NCOL-1:0]       cmt_pdst,
  input  preg_t    [NCOL-1:0]       cmt_stale,
  // statistics
  output logic                      two_wait_split   // a dummy micro-op was created
);

  localparam int IW = PREG_W - COL_W;
  localparam int AW = $clog2(DISP_PER_Q+1);

  preg_t       map  [NLREG];
  preg_t       cmap [NLREG];
  logic [NPREG-1:0] busy, ldt;
  logic [15:0] lfsr;

  // free lists
  logic [NCOL-1:0][DISP_PER_Q-1:0]         fl_avail;
  logic [NCOL-1:0][DISP_PER_Q-1:0][IW-1:0] fl_idx;
  logic [NCOL-1:0][AW-1:0]                 fl_take;
  logic [NCOL-1:0][NCOL-1:0]               fl_free_v, fl_cmt_v;
  logic [NCOL-1:0][NCOL-1:0][IW-1:0]       fl_free_idx, fl_cmt_idx;

  for (genvar c = 0; c < NCOL; c++) begin : g_fl
    free_list #(.REGS(BANK_REGS), .ALLOC(DISP_PER_Q), .FREES(NCOL), .INIT_USED(NLREG/NCOL)) u_fl (
      .clk, .rst, .avail(fl_avail[c]), .alloc_idx(fl_idx[c]), .take(fl_take[c]),
      .free_v(fl_free_v[c]), .free_idx(fl_free_idx[c]),
      .cmt_v(fl_cmt_v[c]), .cmt_idx(fl_cmt_idx[c]), .flush);
  end

  always_comb begin
    for (int c = 0; c < NCOL; c++)
      for (int f = 0; f < NCOL; f++) begin
        fl_free_v[c][f]   = cmt_v[f] && cmt_has_dst[f] && bank_of(cmt_stale[f]) == col_t'(c) && cmt_stale[f] != '0;
        fl_free_idx[c][f] = cmt_stale[f][IW-1:0];
        fl_cmt_v[c][f]    = cmt_v[f] && cmt_has_dst[f] && bank_of(cmt_pdst[f]) == col_t'(c);
        fl_cmt_idx[c][f]  = cmt_pdst[f][IW-1:0];
      end
  end

  // ---- lookup with intra-bundle bypass ----
  logic [NPREG-1:0] clr;
  always_comb begin
    clr = '0;
    for (int w = 0; w < NWK; w++) if (wk[w].valid) clr[wk[w].tag] = 1'b1;
  end

  preg_t    [NCOL-1:0] prs1, prs2, stale;
  logic     [NCOL-1:0] u1, u2, w1, w2, l1, l2, has_dst;
  logic     [NCOL-1:0][NCOL-1:0] byp1, byp2;
  colmask_t [NCOL-1:0] col1, col2, req;

  always_comb begin
    for (int i = 0; i < NCOL; i++) begin
      has_dst[i] = in_uop[i].lrd != '0 && in_uop[i].op != OP_ST && !is_br(in_uop[i].op);
      u1[i] = 1'b1;
      u2[i] = uses_rs2(in_uop[i].op, in_uop[i].use_imm);
      prs1[i]  = map[in_uop[i].lrs1];
      prs2[i]  = map[in_uop[i].lrs2];
      stale[i] = map[in_uop[i].lrd];
      w1[i] = busy[prs1[i]] && !clr[prs1[i]];
      w2[i] = busy[prs2[i]] && !clr[prs2[i]];
      l1[i] = ldt[prs1[i]];
      l2[i] = ldt[prs2[i]];
      byp1[i] = '0;
      byp2[i] = '0;
      for (int j = 0; j < i; j++) begin   // youngest older producer wins
        if (has_dst[j] && in_uop[j].lrd == in_uop[i].lrs1) begin
          byp1[i] = '0; byp1[i][j] = 1'b1; w1[i] = 1'b1; l1[i] = in_uop[j].op == OP_LD;
        end
        if (has_dst[j] && in_uop[j].lrd == in_uop[i].lrs2) begin
          byp2[i] = '0; byp2[i][j] = 1'b1; w2[i] = 1'b1; l2[i] = in_uop[j].op == OP_LD;
        end
      end
      w1[i] &= u1[i];
      w2[i] &= u2[i];
      col1[i] = colmask_t'(1) << bank_of(prs1[i]);
      col2[i] = colmask_t'(1) << bank_of(prs2[i]);
    end
  end

  logic [NCOL-1:0] b1, b2;
  assign b1 = w1 & ~l1;
  assign b2 = w2 & ~l2;

  column_arbiter #(.LANES(NCOL)) u_carb (
    .rnd(colmask_t'(1) << lfsr[COL_W-1:0]), .busy1(b1), .busy2(b2),
    .col1, .col2, .byp1, .byp2, .req);

  // ---- acceptance, allocation, dummy creation ----
  logic [NCOL-1:0] acc, dum;
  col_t [NCOL-1:0] mcol, dcol;
  preg_t [NCOL-1:0] pdst;

  always_comb begin
    logic stop;
    int   qm, qd, am;
    int   qcnt [NCOL];
    int   acnt [NCOL];
    stop = !dq_ready || flush;
    for (int c = 0; c < NCOL; c++) begin qcnt[c] = 0; acnt[c] = 0; end
    acc = '0; dum = '0; pdst = '0;
    for (int i = 0; i < NCOL; i++) begin
      mcol[i] = oh2bin(req[i]);
      // dummy goes after the producer of prs2 (intra-bundle producer column if bypassed)
      dcol[i] = bank_of(prs2[i]) + col_t'(1);
      for (int j = 0; j < i; j++) if (byp2[i][j]) dcol[i] = mcol[j] + col_t'(1);
      dum[i] = b1[i] && b2[i] && dcol[i] != mcol[i];  // same column: the main catches both
      qm = 0; qd = 0; am = 0;
      for (int c = 0; c < NCOL; c++) begin
        if (mcol[i] == col_t'(c)) begin qm = qcnt[c]; am = acnt[c]; end
        if (dcol[i] == col_t'(c)) qd = qcnt[c];
      end
      if (!stop && in_valid[i] && int'(rob_space) > i
          && qm < DISP_PER_Q
          && (!has_dst[i] || (am < DISP_PER_Q && fl_avail[mcol[i]][am]))
          && (!dum[i] || qd < DISP_PER_Q)) begin
        acc[i] = 1'b1;
        if (has_dst[i]) pdst[i] = {mcol[i], fl_idx[mcol[i]][am]};
        for (int c = 0; c < NCOL; c++) begin
          if (mcol[i] == col_t'(c)) begin
            qcnt[c] = qcnt[c] + 1;
            if (has_dst[i]) acnt[c] = acnt[c] + 1;
          end
          if (dum[i] && dcol[i] == col_t'(c)) qcnt[c] = qcnt[c] + 1;
        end
      end else begin
        stop = 1'b1;
      end
    end
    for (int c = 0; c < NCOL; c++) fl_take[c] = AW'(acnt[c]);
  end

  // intra-bundle bypass of the destination registers into the sources
  preg_t [NCOL-1:0] rs1f, rs2f, stalef;
  always_comb begin
    for (int i = 0; i < NCOL; i++) begin
      rs1f[i] = prs1[i]; rs2f[i] = prs2[i]; stalef[i] = stale[i];
      for (int j = 0; j < i; j++) begin
        if (byp1[i][j]) rs1f[i] = pdst[j];
        if (byp2[i][j]) rs2f[i] = pdst[j];
        if (has_dst[j] && in_uop[j].lrd == in_uop[i].lrd) stalef[i] = pdst[j];
      end
    end
  end

  always_comb begin
    accept = '0;
    for (int i = 0; i < NCOL; i++) if (acc[i]) accept = accept + 1'b1;
    out_valid = |acc;
    two_wait_split = |(acc & dum);
    for (int i = 0; i < NCOL; i++) begin
      ren_uop_t m;
      m.op        = in_uop[i].op;
      m.has_dst   = has_dst[i];
      m.pdst      = pdst[i];
      m.prs1      = rs1f[i];
      m.prs2      = rs2f[i];
      m.p1_wait   = w1[i];
      m.p2_wait   = w2[i];
      m.use_imm   = in_uop[i].use_imm;
      m.imm       = in_uop[i].imm;
      m.rob_idx   = rob_tail + robidx_t'(i);
      m.col       = mcol[i];
      m.dummy     = 1'b0;
      m.chain_col = mcol[i];
      m.hp        = in_uop[i].op == OP_ADD && in_uop[i].use_imm && has_dst[i]
                    && in_uop[i].lrd == in_uop[i].lrs1;
      out_uop[2*i]   = m;
      out_v[2*i]     = acc[i];
      m.has_dst   = 1'b0;
      m.p1_wait   = 1'b0;
      m.col       = dcol[i];
      m.dummy     = 1'b1;
      m.hp        = 1'b0;
      out_uop[2*i+1] = m;
      out_v[2*i+1]   = acc[i] && dum[i];
      rob_enq[i]     = acc[i];
      rob_has_dst[i] = has_dst[i];
      rob_lrd[i]     = in_uop[i].lrd;
      rob_pdst[i]    = pdst[i];
      rob_stale[i]   = stalef[i];
      rob_is_st[i]   = in_uop[i].op == OP_ST;
    end
  end

  // ---- state ----
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NLREG; r++) begin
        map[r]  <= preg_t'({col_t'(r % NCOL), IW'(r / NCOL)});
        cmap[r] <= preg_t'({col_t'(r % NCOL), IW'(r / NCOL)});
      end
      busy <= '0;
      ldt  <= '0;
      lfsr <= 16'hACE1;
    end else begin
      preg_t nc [NLREG];
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      nc = cmap;
      for (int i = 0; i < NCOL; i++)
        if (cmt_v[i] && cmt_has_dst[i]) nc[cmt_lrd[i]] = cmt_pdst[i];
      cmap <= nc;
      if (flush) begin
        map  <= nc;
        busy <= '0;
        ldt  <= '0;
      end else begin
        logic [NPREG-1:0] nb, nl;
        nb = busy & ~clr;
        nl = ldt & ~clr;
        for (int i = 0; i < NCOL; i++)
          if (acc[i] && has_dst[i]) begin
            map[in_uop[i].lrd] <= pdst[i];
            nb[pdst[i]] = 1'b1;
            nl[pdst[i]] = in_uop[i].op == OP_LD;
          end
        busy <= nb;
        ldt  <= nl;
      end
    end
  end

endmodule
