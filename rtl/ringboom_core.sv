// ringboom_core: a RingScalar-style banked out-of-order integer execution core
// with NCOL columns, from rename to commit.
//
// Pipeline (one micro-op per column per stage after rename):
//   REN  rename_stage: rename/busy/load tables, column steering, allocation
//        from the chosen column's free list, ROB allocation
//   DIS  dispatch_queue (two bundles) + dispatch_xbar into the issue queues
//   ISS  issue_queue per column: wakeup and selection, chain selection
//   ARB  eu_arbiter, rf_read_arbiter, wb_arbiter; losers are killed back into
//        their slot and the wakeups they gave are reverted
//   RRD  regfile_bank read through the read-address/data crossbars and
//        bypass_select into the operand registers
//   EXE  column_alu per column; shared unit operand crossbar to the memory
//        port, mul_unit and divider
//   WB   fast_wb_xbar (ALUs, multiplier) and slow_wb_xbar (loads, divider)
//   CMT  rob, in order, releasing stale registers to their bank's free list
//
// The ring: column c's issue queue is woken by the ALU issued in column c-1
// (fast, at issue, speculative until ARB), by writes into bank c-1 (slow), by
// load hits (every column) and by chained wakeups; column c's operands bypass
// from column c-1's ALU and from bank c-1's fast writeback register, and from
// the load-hit path. Single-cycle ALU micro-ops run back to back across
// neighbouring columns.
//
// Interfaces: the front end offers up to NCOL decoded micro-ops and is told how
// many were taken (`in_accept`). The memory port sends one load or store
// address per cycle; stores complete at once and are performed by the memory
// system when they commit (`cmt_is_st`, `cmt_rob`). A load answers with a
// wakeup (`ld_wk_*`, tag and ROB index) and exactly LD_DATA_DLY cycles later
// its data on `ld_data`; the memory system must not answer more than one load
// per cycle. Register writes (`rf_*`) and commits are brought out so that a
// checker can follow the architectural state. Branch micro-ops (BEQ/BNE/BLT/
// BGE, predicted direction in imm[0]) are resolved in the column ALUs; the
// oldest mispredict of each cycle is chosen by mispredict_sel and reported on
// `br_mis_*` for the front end to redirect. The core itself does not flush on
// a mispredict (the front end that would fetch a wrong path is not part of
// it), so the commit-snapshot flush input stays tied low. Jumps, exceptions
// and the load/store unit are outside this core.
//
// Follows the design: the column organisation, the stages after rename (DIS,
// ISS, ARB), the ring wakeup and bypass, the two writeback crossbars and the
// shared units. Own choices: a one-cycle rename, one memory port, the
// multiplier latency and the load data delay. The read arbiter's per-port
// enables are left unused, because the register-file banks read on every port
// each cycle.
module ringboom_core
  import rb_pkg::*;
#(
  parameter int IQ_SIZE    = 8,   // slots per column (32-entry window)
  parameter int RD_PORTS   = 3,   // register-file read ports per bank
  parameter int DISP_PER_Q = 2,   // micro-ops per issue queue per cycle
  parameter int MUL_LAT    = 3,
  parameter bit READ_SHARE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  // front end
  input  logic     [NCOL-1:0]    in_valid,
  input  dec_uop_t [NCOL-1:0]    in_uop,
  output logic     [$clog2(NCOL+1)-1:0] in_accept,
  // memory port
  output logic                   mem_v,
  output logic                   mem_st,
  output word_t                  mem_addr,
  output word_t                  mem_wdata,
  output preg_t                  mem_pdst,
  output robidx_t                mem_rob,
  input  logic                   ld_wk_v,
  input  preg_t                  ld_wk_tag,
  input  robidx_t                ld_wk_rob,
  input  word_t                  ld_data,
  // register writes
  output logic     [NCOL-1:0]    rf_fast_we,
  output preg_t    [NCOL-1:0]    rf_fast_tag,
  output word_t    [NCOL-1:0]    rf_fast_data,
  output logic     [NCOL-1:0]    rf_slow_we,
  output preg_t    [NCOL-1:0]    rf_slow_tag,
  output word_t    [NCOL-1:0]    rf_slow_data,
  // commit
  output logic     [NCOL-1:0]    cmt_v,
  output logic     [NCOL-1:0]    cmt_has_dst,
  output lreg_t    [NCOL-1:0]    cmt_lrd,
  output preg_t    [NCOL-1:0]    cmt_pdst,
  output logic     [NCOL-1:0]    cmt_is_st,
  output robidx_t  [NCOL-1:0]    cmt_rob,
  // branch resolution: oldest mispredicted branch of the cycle
  output logic                   br_mis_v,
  output robidx_t                br_mis_rob,
  output col_t                   br_mis_col,
  output events_t                ev
);

  localparam int LD_DATA_DLY = 3;
  localparam int NWK   = NCOL + 2;   // fast writebacks, divider write, load wakeup
  localparam int NDONE = NCOL + 3;   // fast writebacks, divider, load data, store
  localparam int PW    = (RD_PORTS > 1) ? $clog2(RD_PORTS) : 1;
  localparam int IW    = PREG_W - COL_W;
  localparam int RW    = $clog2(DISP_PER_Q+1);

  function automatic int prv(int c);
    return (c + NCOL - 1) % NCOL;
  endfunction

  function automatic word_t sext(logic [31:0] i);
    return word_t'(signed'(i));
  endfunction

  logic flush;
  assign flush = 1'b0;   // no recovery source inside this core (see header)

  // ------------------------------------------------------------ wakeups
  wake_t [NWK-1:0]  wk;          // writeback-time: busy clear, dispatch snoop
  wake_t            load_wk;
  wake_t [NCOL-1:0] fast_wk, slow_wk, chain_wk;

  // ------------------------------------------------------------ REN
  logic     [NCOL-1:0]   rob_enq, rob_has_dst, rob_is_st;
  lreg_t    [NCOL-1:0]   rob_lrd;
  preg_t    [NCOL-1:0]   rob_pdst, rob_stale;
  robidx_t               rob_tail, rob_head;
  logic     [ROB_W:0]    rob_space;
  logic                  dq_ready, ren_v, split;
  logic     [2*NCOL-1:0] ren_sv;
  ren_uop_t [2*NCOL-1:0] ren_u;
  preg_t    [NCOL-1:0]   cmt_stale;

  rename_stage #(.DISP_PER_Q(DISP_PER_Q), .NWK(NWK)) u_ren (
    .clk, .rst, .flush, .in_valid, .in_uop, .accept(in_accept),
    .dq_ready, .out_valid(ren_v), .out_v(ren_sv), .out_uop(ren_u),
    .rob_tail, .rob_space, .rob_enq, .rob_has_dst, .rob_lrd, .rob_pdst, .rob_stale, .rob_is_st,
    .wk, .cmt_v, .cmt_has_dst, .cmt_lrd, .cmt_pdst, .cmt_stale, .two_wait_split(split));

  // ------------------------------------------------------------ DIS
  logic                  dq_hv, disp_fire;
  logic     [2*NCOL-1:0] dq_hsv;
  ren_uop_t [2*NCOL-1:0] dq_hu;
  logic     [NCOL-1:0][RW-1:0]              iq_room;
  logic     [NCOL-1:0][DISP_PER_Q-1:0]      dq_v;
  ren_uop_t [NCOL-1:0][DISP_PER_Q-1:0]      dq_u;

  dispatch_queue #(.W(2*NCOL), .NWK(NWK)) u_dq (
    .clk, .rst, .flush, .enq(ren_v), .enq_v(ren_sv), .enq_uop(ren_u), .enq_ready(dq_ready),
    .head_valid(dq_hv), .head_v(dq_hsv), .head_uop(dq_hu), .deq(disp_fire), .wk);

  dispatch_xbar #(.W(2*NCOL), .DISP_PER_Q(DISP_PER_Q)) u_dxb (
    .in_valid(dq_hv), .in_v(dq_hsv), .in_uop(dq_hu), .iq_room, .fire(disp_fire),
    .q_v(dq_v), .q_uop(dq_u));

  // ------------------------------------------------------------ ISS
  logic     [NCOL-1:0] iss_v, iss_hp, arb_pass, kill, chain_req, chain_gnt;
  iss_uop_t [NCOL-1:0] iss_u;
  preg_t    [NCOL-1:0] chain_tag;
  col_t     [NCOL-1:0] chain_col;

  for (genvar c = 0; c < NCOL; c++) begin : g_iq
    issue_queue #(.SIZE(IQ_SIZE), .DISP_PER_Q(DISP_PER_Q)) u_iq (
      .clk, .rst, .flush, .disp_v(dq_v[c]), .disp_uop(dq_u[c]), .room(iq_room[c]),
      .fast_wk(fast_wk[c]), .load_wk, .slow_wk(slow_wk[c]), .chain_wk(chain_wk[c]),
      .kill_prev(kill[prv(c)]), .iss_v(iss_v[c]), .iss_uop(iss_u[c]), .iss_hp(iss_hp[c]),
      .arb_pass(arb_pass[c]), .arb_kill(kill[c]),
      .chain_req(chain_req[c]), .chain_tag(chain_tag[c]), .chain_col(chain_col[c]),
      .chain_gnt(chain_gnt[c]));
  end

  chain_xbar u_cxb (.clk, .rst, .flush, .req(chain_req), .tag(chain_tag), .dst(chain_col),
                    .gnt(chain_gnt), .wk(chain_wk));

  always_comb
    for (int c = 0; c < NCOL; c++) begin
      fast_wk[c].valid = iss_v[prv(c)] && unit_of(iss_u[prv(c)].op) == U_ALU && iss_u[prv(c)].has_dst;
      fast_wk[c].tag   = iss_u[prv(c)].pdst;
    end

  // ------------------------------------------------------------ ARB
  logic     [NCOL-1:0] a_v;
  iss_uop_t [NCOL-1:0] a_u;
  logic     [NCOL-1:0] kill_q;
  always_ff @(posedge clk) begin
    if (rst || flush) begin a_v <= '0; kill_q <= '0; end
    else begin a_v <= iss_v; kill_q <= kill; end
    a_u <= iss_u;
  end

  // stage registers further down, declared here for the bypass predictions
  logic     [NCOL-1:0] r_v, x_v;
  iss_uop_t [NCOL-1:0] r_u, x_u;
  word_t    [NCOL-1:0] alu_y;
  logic                mul_ov, mul_owe;
  col_t                mul_ocol;
  preg_t               mul_opdst;
  robidx_t             mul_orob;
  word_t               mul_oy;
  wake_t [LD_DATA_DLY:1] ld_d;
  robidx_t [LD_DATA_DLY:1] ld_rob;

  // will tag p of an operand in column c be on a bypass path next cycle?
  function automatic logic byp_next(int c, preg_t p,
      logic [NCOL-1:0] rv, iss_uop_t [NCOL-1:0] ru, logic [NCOL-1:0] xv, iss_uop_t [NCOL-1:0] xu,
      logic mv, preg_t mp, wake_t l2);
    int q;
    q = (c + NCOL - 1) % NCOL;
    return (rv[q] && unit_of(ru[q].op) == U_ALU && ru[q].has_dst && ru[q].pdst == p)
        || (xv[q] && unit_of(xu[q].op) == U_ALU && xu[q].has_dst && xu[q].pdst == p)
        || (mv && mp == p && p != '0 && bank_of(mp) == col_t'(q))
        || (l2.valid && l2.tag == p);
  endfunction

  logic  [NCOL-1:0][1:0]          rd_req, rd_ok;
  preg_t [NCOL-1:0][1:0]          rd_tag;
  logic  [NCOL-1:0][1:0][PW-1:0]  rd_port;
  logic  [NCOL-1:0][RD_PORTS-1:0] bank_en;
  logic  [NCOL-1:0][RD_PORTS-1:0][IW-1:0] bank_addr;
  logic                           rd_shared;
  unit_e [NCOL-1:0]               a_unit;
  logic  [NCOL-1:0]               eu_ok, div_cancel, wb_ok, alu_req, dep_kill;
  logic                           div_busy, div_pend, mul_take;
  col_t                           mul_bank;

  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      a_unit[c]    = unit_of(a_u[c].op);
      rd_tag[c][0] = a_u[c].prs1;
      rd_tag[c][1] = a_u[c].prs2;
      rd_req[c][0] = a_v[c] && a_u[c].prs1 != '0
                     && !byp_next(c, a_u[c].prs1, r_v, r_u, x_v, x_u, mul_ov && mul_owe, mul_opdst, ld_d[2]);
      rd_req[c][1] = a_v[c] && uses_rs2(a_u[c].op, a_u[c].use_imm) && a_u[c].prs2 != '0
                     && !byp_next(c, a_u[c].prs2, r_v, r_u, x_v, x_u, mul_ov && mul_owe, mul_opdst, ld_d[2]);
      alu_req[c]   = a_v[c] && a_unit[c] == U_ALU;
      dep_kill[c]  = a_v[c] && (a_u[c].spec1 || a_u[c].spec2) && kill_q[prv(c)];
      kill[c]      = a_v[c] && (!eu_ok[c] || !(&rd_ok[c]) || !wb_ok[c] || dep_kill[c]);
      arb_pass[c]  = a_v[c] && !kill[c];
    end
    mul_take = 1'b0;
    mul_bank = '0;
    for (int c = 0; c < NCOL; c++)
      if (arb_pass[c] && a_unit[c] == U_MUL) begin mul_take = 1'b1; mul_bank = col_t'(c); end
  end

  rf_read_arbiter #(.RD(RD_PORTS), .SHARE(READ_SHARE)) u_rfarb (
    .clk, .rst, .req(rd_req), .tag(rd_tag), .ok(rd_ok), .port(rd_port),
    .bank_en, .bank_addr, .shared(rd_shared));

  eu_arbiter u_euarb (.clk, .rst, .valid(a_v), .unit(a_unit), .div_busy, .taken(arb_pass),
                      .ok(eu_ok), .div_cancel);

  wb_arbiter #(.ALU_OFS(3), .SHARED_OFS(2 + MUL_LAT)) u_wbarb (
    .clk, .rst, .flush, .alu_req, .alu_ok(wb_ok), .shr_take(mul_take), .shr_bank(mul_bank));

  // ------------------------------------------------------------ RRD
  logic [NCOL-1:0][1:0][PW-1:0]           r_port;
  logic [NCOL-1:0][RD_PORTS-1:0][IW-1:0]  r_addr;
  always_ff @(posedge clk) begin
    if (rst || flush) r_v <= '0;
    else              r_v <= arb_pass;
    r_u    <= a_u;
    r_port <= rd_port;
    r_addr <= bank_addr;
  end

  word_t [NCOL-1:0][RD_PORTS-1:0] rdata;
  logic  [NCOL-1:0]               fwb_v, fwb_we;
  preg_t [NCOL-1:0]               fwb_tag;
  robidx_t [NCOL-1:0]             fwb_rob;
  word_t [NCOL-1:0]               fwb_data;
  logic  [NCOL-1:0]               swb_we;
  preg_t [NCOL-1:0]               swb_tag;
  word_t [NCOL-1:0]               swb_data;

  for (genvar b = 0; b < NCOL; b++) begin : g_bank
    regfile_bank #(.REGS(BANK_REGS), .RD(RD_PORTS)) u_bank (
      .clk, .rst, .raddr(r_addr[b]), .rdata(rdata[b]),
      .we({swb_we[b], fwb_we[b]}),
      .waddr({swb_tag[b][IW-1:0], fwb_tag[b][IW-1:0]}),
      .wdata({swb_data[b], fwb_data[b]}));
  end

  word_t [NCOL-1:0][1:0] opnd;
  logic  [NCOL-1:0][1:0][1:0] opsrc;
  for (genvar c = 0; c < NCOL; c++) begin : g_opnd
    for (genvar k = 0; k < 2; k++) begin : g_k
      localparam int P = (c + NCOL - 1) % NCOL;
      preg_t t;
      wake_t at, xt;
      assign t  = k ? r_u[c].prs2 : r_u[c].prs1;
      assign at = '{valid: x_v[P] && unit_of(x_u[P].op) == U_ALU && x_u[P].has_dst, tag: x_u[P].pdst};
      assign xt = '{valid: fwb_we[P], tag: fwb_tag[P]};
      bypass_select u_bsel (
        .clk, .en(1'b1), .tag(t),
        .rf_data(rdata[bank_of(t)][r_port[c][k]]),   // read-data crossbar
        .alu_tag(at), .alu_data(alu_y[P]),
        .xbar_tag(xt), .xbar_data(fwb_data[P]),
        .load_tag(ld_d[LD_DATA_DLY]), .load_data(ld_data),
        .src(opsrc[c][k]), .operand(opnd[c][k]));
    end
  end

  // ------------------------------------------------------------ EXE
  always_ff @(posedge clk) begin
    if (rst || flush) x_v <= '0;
    else              x_v <= r_v;
    x_u <= r_u;
  end

  word_t [NCOL-1:0] alu_b;
  logic  [NCOL-1:0] alu_v, alu_t, mis_v;
  robidx_t [NCOL-1:0] mis_rob;
  for (genvar c = 0; c < NCOL; c++) begin : g_alu
    assign alu_b[c] = (x_u[c].use_imm && !is_br(x_u[c].op)) ? sext(x_u[c].imm) : opnd[c][1];
    assign alu_v[c] = x_v[c] && unit_of(x_u[c].op) == U_ALU;
    column_alu u_alu (.op(x_u[c].op), .a(opnd[c][0]), .b(alu_b[c]), .y(alu_y[c]), .taken(alu_t[c]));
    // a branch mispredicts when its outcome differs from the prediction in imm[0]
    assign mis_v[c]   = x_v[c] && is_br(x_u[c].op) && alu_t[c] != x_u[c].imm[0];
    assign mis_rob[c] = x_u[c].rob_idx;
  end

  // oldest mispredict of the cycle, reported to the front end
  logic [NCOL-1:0] mis_sel;
  mispredict_sel #(.N(NCOL)) u_msel (
    .v(mis_v), .rob(mis_rob), .head(rob_head), .sel(mis_sel), .out_v(br_mis_v), .out_rob(br_mis_rob));
  assign br_mis_col = oh2bin(mis_sel);

  // shared unit operand crossbar: the column that won each shared unit in ARB
  logic    mul_iv, mul_iwe, div_start, store_done;
  col_t    mul_icol;
  word_t   mul_a, mul_b, div_a, div_b;
  preg_t   mul_ipdst, div_ipdst;
  robidx_t mul_irob, div_irob, st_rob;
  always_comb begin
    mul_iv = 1'b0; mul_iwe = 1'b0; mul_icol = '0; mul_a = '0; mul_b = '0; mul_ipdst = '0; mul_irob = '0;
    div_start = 1'b0; div_a = '0; div_b = '0; div_ipdst = '0; div_irob = '0;
    mem_v = 1'b0; mem_st = 1'b0; mem_addr = '0; mem_wdata = '0; mem_pdst = '0; mem_rob = '0;
    for (int c = 0; c < NCOL; c++)
      if (x_v[c])
        case (unit_of(x_u[c].op))
          U_MUL: begin
            mul_iv = 1'b1; mul_a = opnd[c][0]; mul_b = opnd[c][1];
            mul_iwe = x_u[c].has_dst; mul_icol = col_t'(c);
            mul_ipdst = x_u[c].pdst; mul_irob = x_u[c].rob_idx;
          end
          U_DIV: begin
            div_start = 1'b1; div_a = opnd[c][0]; div_b = opnd[c][1];
            div_ipdst = x_u[c].pdst; div_irob = x_u[c].rob_idx;
          end
          U_MEM: begin
            mem_v = 1'b1; mem_st = x_u[c].op == OP_ST;
            mem_addr = opnd[c][0] + sext(x_u[c].imm); mem_wdata = opnd[c][1];
            mem_pdst = x_u[c].pdst; mem_rob = x_u[c].rob_idx;
          end
          default: ;
        endcase
    store_done = mem_v && mem_st;
    st_rob = mem_rob;
  end

  mul_unit #(.LAT(MUL_LAT)) u_mul (
    .clk, .rst, .flush, .in_v(mul_iv), .a(mul_a), .b(mul_b), .in_pdst(mul_ipdst), .in_rob(mul_irob),
    .in_we(mul_iwe), .in_col(mul_icol),
    .out_v(mul_ov), .y(mul_oy), .out_pdst(mul_opdst), .out_rob(mul_orob),
    .out_we(mul_owe), .out_col(mul_ocol));

  logic    div_done, div_ack, div_unit_busy;
  word_t   div_q;
  preg_t   div_opdst;
  robidx_t div_orob;
  divider u_div (
    .clk, .rst, .flush, .start(div_start), .a(div_a), .b(div_b), .in_pdst(div_ipdst), .in_rob(div_irob),
    .busy(div_unit_busy), .done(div_done), .q(div_q), .out_pdst(div_opdst), .out_rob(div_orob),
    .ack(div_ack));

  // a divide that passed ARB holds the divider until it starts
  always_ff @(posedge clk) begin
    if (rst || flush) div_pend <= 1'b0;
    else if (div_start) div_pend <= 1'b0;
    else begin
      for (int c = 0; c < NCOL; c++)
        if (arb_pass[c] && a_unit[c] == U_DIV) div_pend <= 1'b1;
    end
  end
  assign div_busy = div_pend || div_unit_busy;

  // ------------------------------------------------------------ WB
  logic [NCOL-1:0] alu_we;
  preg_t [NCOL-1:0] alu_pdst;
  robidx_t [NCOL-1:0] alu_rob;
  always_comb
    for (int c = 0; c < NCOL; c++) begin
      alu_we[c] = x_u[c].has_dst; alu_pdst[c] = x_u[c].pdst; alu_rob[c] = x_u[c].rob_idx;
    end

  fast_wb_xbar u_fwb (
    .clk, .rst, .flush, .alu_v, .alu_we, .alu_pdst, .alu_rob, .alu_y,
    .shr_v(mul_ov), .shr_we(mul_owe), .shr_bank(mul_ocol), .shr_pdst(mul_opdst), .shr_rob(mul_orob), .shr_y(mul_oy),
    .wb_v(fwb_v), .wb_we(fwb_we), .wb_tag(fwb_tag), .wb_rob(fwb_rob), .wb_data(fwb_data));

  // load answer pipeline: wakeup at d0, data at d[LD_DATA_DLY]
  always_ff @(posedge clk) begin
    if (rst || flush) for (int d = 1; d <= LD_DATA_DLY; d++) ld_d[d] <= '0;
    else begin
      ld_d[1] <= '{valid: ld_wk_v, tag: ld_wk_tag};
      for (int d = 2; d <= LD_DATA_DLY; d++) ld_d[d] <= ld_d[d-1];
    end
    ld_rob[1] <= ld_wk_rob;
    for (int d = 2; d <= LD_DATA_DLY; d++) ld_rob[d] <= ld_rob[d-1];
  end
  assign load_wk = '{valid: ld_wk_v, tag: ld_wk_tag};

  slow_wb_xbar u_swb (
    .ld_v(ld_d[LD_DATA_DLY].valid), .ld_pdst(ld_d[LD_DATA_DLY].tag), .ld_data,
    .div_v(div_done), .div_pdst(div_opdst), .div_data(div_q), .fast_busy(fwb_we),
    .div_ack, .we(swb_we), .tag(swb_tag), .data(swb_data));

  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      int p;
      p = prv(c);
      slow_wk[c].valid = fwb_we[p] || swb_we[p];
      slow_wk[c].tag   = fwb_we[p] ? fwb_tag[p] : swb_tag[p];
      wk[c].valid = fwb_we[c];
      wk[c].tag   = fwb_tag[c];
    end
    wk[NCOL].valid   = div_ack;
    wk[NCOL].tag     = div_opdst;
    wk[NCOL+1]       = load_wk;
  end

  // ------------------------------------------------------------ CMT
  logic    [NDONE-1:0] done_v;
  robidx_t [NDONE-1:0] done_idx;
  always_comb begin
    for (int c = 0; c < NCOL; c++) begin done_v[c] = fwb_v[c]; done_idx[c] = fwb_rob[c]; end
    done_v[NCOL]   = div_ack;                 done_idx[NCOL]   = div_orob;
    done_v[NCOL+1] = ld_d[LD_DATA_DLY].valid; done_idx[NCOL+1] = ld_rob[LD_DATA_DLY];
    done_v[NCOL+2] = store_done;              done_idx[NCOL+2] = st_rob;
  end

  rob #(.ENTRIES(1 << ROB_W), .NDONE(NDONE)) u_rob (
    .clk, .rst, .flush, .enq(rob_enq), .enq_has_dst(rob_has_dst), .enq_lrd(rob_lrd),
    .enq_pdst(rob_pdst), .enq_stale(rob_stale), .enq_is_st(rob_is_st),
    .head(rob_head), .tail(rob_tail), .space(rob_space), .done_v, .done_idx,
    .cmt_v, .cmt_has_dst, .cmt_lrd, .cmt_pdst, .cmt_stale, .cmt_is_st, .cmt_idx(cmt_rob));

  assign rf_fast_we = fwb_we;  assign rf_fast_tag = fwb_tag;  assign rf_fast_data = fwb_data;
  assign rf_slow_we = swb_we;  assign rf_slow_tag = swb_tag;  assign rf_slow_data = swb_data;

  // ------------------------------------------------------------ events
  logic [NCOL-1:0] e_fw, e_ch, e_krf, e_keu, e_kwb;
  logic [NCOL-1:0][1:0] e_balu, e_bx, e_bld;
  for (genvar c = 0; c < NCOL; c++) begin : g_ev
    assign e_fw[c]  = fast_wk[c].valid;
    assign e_ch[c]  = chain_wk[c].valid;
    assign e_krf[c] = a_v[c] && !(&rd_ok[c]);
    assign e_keu[c] = a_v[c] && !eu_ok[c] && !div_cancel[c];
    assign e_kwb[c] = a_v[c] && !wb_ok[c];
    for (genvar k = 0; k < 2; k++) begin : g_k
      assign e_balu[c][k] = r_v[c] && opsrc[c][k] == 2'd1;
      assign e_bx[c][k]   = r_v[c] && opsrc[c][k] == 2'd2;
      assign e_bld[c][k]  = r_v[c] && opsrc[c][k] == 2'd3;
    end
  end
  assign ev.br_mis     = br_mis_v;
  assign ev.split      = split;
  assign ev.chain      = |e_ch;
  assign ev.fast_wake  = |e_fw;
  assign ev.kill_rf    = |e_krf;
  assign ev.kill_eu    = |e_keu;
  assign ev.kill_wb    = |e_kwb;
  assign ev.kill_dep   = |dep_kill;
  assign ev.div_cancel = |div_cancel;
  assign ev.byp_alu    = |e_balu;
  assign ev.byp_xbar   = |e_bx;
  assign ev.byp_load   = |e_bld;
  assign ev.read_share = rd_shared;
  assign ev.hp_issue   = |iss_hp;
  assign ev.div_wait   = div_done && !div_ack;
  assign ev.ren_stall  = in_valid[0] && in_accept == '0;
  assign ev.disp_stall = dq_hv && !disp_fire;

endmodule
