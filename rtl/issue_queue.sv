// issue_queue: the issue queue of one execution column.
//
// SIZE issue_slot entries kept in age order (entry 0 oldest) by compaction:
// every cycle the surviving entries move down over the removed ones and up to
// DISP_PER_Q dispatched micro-ops are appended behind them. Removal depends
// only on the ARB verdict of the previous cycle's issue and on chain grants,
// never on this cycle's issue grant, which keeps the grant off the compaction
// multiplexers.
//
// Each cycle two selections run in parallel:
//  * issue selection: the oldest ready micro-op that asked for high priority
//    (an index or pointer bump, x = x + imm), else the oldest ready micro-op.
//    It goes to the ARB stage and its slot is marked issued; the next cycle
//    the ARB verdict either removes the slot (`arb_pass`) or returns it to the
//    ready pool (`arb_kill`).
//  * chain selection: the oldest dummy micro-op whose watched operand is
//    ready sends that tag to the chained wakeup crossbar; the dummy leaves
//    when the crossbar grants it.
// Dispatched micro-ops see this cycle's wakeups while they are written.
// `room` is the number of free slots (saturated at DISP_PER_Q) before this
// cycle's removals.
//
// Follows the design: age order, compaction independent of the grant, one issue
// per column, a high-priority request port and chain selection. Own choices:
// queue size split evenly over columns and the room count.
module issue_queue
  import rb_pkg::*;
#(
  parameter int SIZE       = 8,  // 32-entry issue window over 4 columns
  parameter int DISP_PER_Q = 2
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          flush,
  input  logic     [DISP_PER_Q-1:0]     disp_v,
  input  ren_uop_t [DISP_PER_Q-1:0]     disp_uop,
  output logic     [$clog2(DISP_PER_Q+1)-1:0] room,
  input  wake_t                         fast_wk,
  input  wake_t                         load_wk,
  input  wake_t                         slow_wk,
  input  wake_t                         chain_wk,
  input  logic                          kill_prev,   // previous column's ARB killed its micro-op
  output logic                          iss_v,
  output iss_uop_t                      iss_uop,
  output logic                          iss_hp,      // issued through the high-priority request
  input  logic                          arb_pass,
  input  logic                          arb_kill,
  output logic                          chain_req,
  output preg_t                         chain_tag,
  output col_t                          chain_col,
  input  logic                          chain_gnt
);

  localparam int T = SIZE + DISP_PER_Q;

  iq_ent_t [SIZE-1:0] q;
  iq_ent_t [T-1:0]    cur, upd;
  logic    [T-1:0]    req, creq;

  always_comb begin
    for (int i = 0; i < SIZE; i++) cur[i] = q[i];
    for (int k = 0; k < DISP_PER_Q; k++) begin
      cur[SIZE+k] = '0;
      cur[SIZE+k].valid = disp_v[k];
      cur[SIZE+k].u     = disp_uop[k];
    end
  end

  for (genvar i = 0; i < T; i++) begin : g_slot
    issue_slot u_slot (.ent(cur[i]), .fast_wk, .load_wk, .slow_wk, .chain_wk, .kill_prev,
                       .nxt(upd[i]), .req(req[i]), .creq(creq[i]));
  end

  // selection (resident entries only)
  int isel, csel;
  always_comb begin
    int hsel;
    isel = -1; csel = -1; hsel = -1;
    for (int i = SIZE-1; i >= 0; i--) begin
      if (req[i]) isel = i;
      if (req[i] && q[i].u.hp) hsel = i;
      if (creq[i]) csel = i;
    end
    iss_hp = hsel >= 0 && hsel != isel;
    if (hsel >= 0) isel = hsel;
    iss_v = isel >= 0;
    iss_uop = '0;
    if (iss_v) begin
      iss_uop.op      = q[isel].u.op;
      iss_uop.has_dst = q[isel].u.has_dst;
      iss_uop.pdst    = q[isel].u.pdst;
      iss_uop.prs1    = q[isel].u.prs1;
      iss_uop.prs2    = q[isel].u.prs2;
      iss_uop.use_imm = q[isel].u.use_imm;
      iss_uop.imm     = q[isel].u.imm;
      iss_uop.rob_idx = q[isel].u.rob_idx;
      iss_uop.spec1   = q[isel].spec1;
      iss_uop.spec2   = q[isel].spec2;
    end
    chain_req = csel >= 0;
    chain_tag = chain_req ? q[csel].u.prs2 : '0;
    chain_col = chain_req ? q[csel].u.chain_col : '0;
  end

  // free slots
  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < SIZE; i++) n += q[i].valid ? 0 : 1;
    room = (n > DISP_PER_Q) ? DISP_PER_Q[$bits(room)-1:0] : n[$bits(room)-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      q <= '0;
    end else begin
      iq_ent_t [SIZE-1:0] n;
      int k;
      n = '0;
      k = 0;
      for (int i = 0; i < T; i++) begin
        iq_ent_t e;
        logic keep;
        e = upd[i];
        keep = cur[i].valid;
        if (i < SIZE) begin
          if (cur[i].iss && arb_pass) keep = 1'b0;
          if (cur[i].iss && arb_kill) e.iss = 1'b0;
          if (i == csel && chain_gnt) keep = 1'b0;
          if (i == isel) e.iss = 1'b1;
        end
        if (keep && k < SIZE) begin
          n[k] = e;
          k++;
        end
      end
      q <= n;
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(arb_pass && arb_kill)) else $error("ARB pass and kill together");

endmodule
