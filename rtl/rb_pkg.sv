// rb_pkg: shared constants, micro-op types and helpers of the RingBOOM-style
// banked execution core.
//
// The core is split into NCOL execution columns. Physical register p lives in
// register-file bank p[PREG_W-1 -: COL_W]; the bank index is also the column
// that produced it, because a column only allocates destinations from its own
// bank. The column count, register count, issue window and ROB size follow the
// execution core configuration of the design (4 columns, 128 physical
// registers, 32-entry issue window, 128-entry ROB); the micro-op encodings,
// widths of immediates and the tiny operation set are this implementation's
// own choices.
//
// Follows the design: 4 columns, 128 physical registers in 4 banks of 32, a
// 128-entry ROB. This package's own choices: 64-bit data, the micro-op
// encodings and the event list. bank_of() reads only the bank bits of a
// register number, so lint reports its index bits as unused; that is intended.
// Linted on its own, the package also shows BANK_REGS and NLREG as unused;
// the modules that import it use them.
package rb_pkg;

  localparam int XLEN      = 64;           // datapath width (operand registers are 64 bits)
  localparam int NCOL      = 4;            // columns = dispatch width = ALU pipelines
  localparam int COL_W     = 2;
  localparam int NPREG     = 128;          // physical registers
  localparam int PREG_W    = 7;
  localparam int BANK_REGS = NPREG / NCOL; // 32 registers per bank
  localparam int NLREG     = 32;           // architectural integer registers
  localparam int LREG_W    = 5;
  localparam int ROB_W     = 7;            // index width for a 128-entry ROB

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [COL_W-1:0]  col_t;
  typedef logic [NCOL-1:0]   colmask_t;    // one-hot column
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [ROB_W-1:0]  robidx_t;
  typedef logic [XLEN-1:0]   word_t;

  typedef enum logic [4:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
    OP_SLT, OP_SLTU, OP_MUL, OP_DIV, OP_LD, OP_ST,
    OP_BEQ, OP_BNE, OP_BLT, OP_BGE   // branches: resolved in the column ALU, imm[0] = predicted taken
  } op_e;

  typedef enum logic [1:0] { U_ALU, U_MUL, U_DIV, U_MEM } unit_e;

  // Decoded micro-op delivered by the front end.
  typedef struct packed {
    op_e          op;
    lreg_t        lrd;      // 0: no destination
    lreg_t        lrs1;
    lreg_t        lrs2;
    logic         use_imm;  // second ALU operand is imm (for ST: address offset)
    logic [31:0]  imm;      // sign-extended to XLEN
  } dec_uop_t;

  // Micro-op after rename, as held in the dispatch queue and the issue slots.
  typedef struct packed {
    op_e          op;
    logic         has_dst;
    preg_t        pdst;
    preg_t        prs1;
    preg_t        prs2;
    logic         p1_wait;  // operand not yet produced
    logic         p2_wait;
    logic         use_imm;
    logic [31:0]  imm;
    robidx_t      rob_idx;
    col_t         col;      // column (issue queue) it is steered to
    logic         dummy;    // chain-wakeup micro-op of a two-waiting instruction
    col_t         chain_col;// dummy only: column of the main micro-op
    logic         hp;       // high-priority request (index/pointer bump)
  } ren_uop_t;

  // Micro-op leaving issue towards ARB / register read / execute.
  typedef struct packed {
    op_e          op;
    logic         has_dst;
    preg_t        pdst;
    preg_t        prs1;
    preg_t        prs2;
    logic         use_imm;
    logic [31:0]  imm;
    robidx_t      rob_idx;
    logic         spec1;    // operand woken speculatively by the previous column last cycle
    logic         spec2;
  } iss_uop_t;

  // Wakeup broadcast: tag of a physical register that became (or will become) available.
  typedef struct packed {
    logic  valid;
    preg_t tag;
  } wake_t;

  // Issue queue entry.
  typedef struct packed {
    logic     valid;
    ren_uop_t u;        // p1_wait / p2_wait are the operands' not-ready bits
    logic     spec1;    // operand woken by a fast wakeup in the previous cycle
    logic     spec2;
    logic     iss;      // issued, waiting for the ARB stage verdict
  } iq_ent_t;

  // One-cycle event pulses of the core, for performance counting.
  typedef struct packed {
    logic br_mis;       // a branch resolved against its prediction
    logic split;        // a two-waiting instruction was split into main + dummy
    logic chain;        // a chained wakeup was delivered
    logic fast_wake;    // an ALU issue woke the next column
    logic kill_rf;      // ARB kill: register-file read-port conflict
    logic kill_eu;      // ARB kill: shared execution unit conflict
    logic kill_wb;      // ARB kill: fast writeback port conflict
    logic kill_dep;     // ARB kill: its speculatively woken producer was killed
    logic div_cancel;   // a divide cancelled in ARB because the divider is busy
    logic byp_alu;      // operand taken from the single-cycle ALU bypass
    logic byp_xbar;     // operand taken from the fast writeback crossbar bypass
    logic byp_load;     // operand taken from the load-hit bypass
    logic read_share;   // two operands shared one read port
    logic hp_issue;     // high-priority request overtook an older ready micro-op
    logic div_wait;     // divider result waited for the slow write port
    logic ren_stall;    // rename could not take a valid lane
    logic disp_stall;   // dispatch held a bundle for lack of issue-queue room
  } events_t;

  function automatic col_t bank_of(preg_t p);
    return p[PREG_W-1 -: COL_W];
  endfunction

  function automatic unit_e unit_of(op_e op);
    case (op)
      OP_MUL:       return U_MUL;
      OP_DIV:       return U_DIV;
      OP_LD, OP_ST: return U_MEM;
      default:      return U_ALU;
    endcase
  endfunction

  function automatic logic is_br(op_e op);
    return op inside {OP_BEQ, OP_BNE, OP_BLT, OP_BGE};
  endfunction

  function automatic logic uses_rs2(op_e op, logic use_imm);
    return !use_imm || op == OP_ST || is_br(op);
  endfunction

  // One-hot "+1": rotate a one-hot column vector towards the next column.
  function automatic colmask_t rot1(colmask_t c);
    return {c[NCOL-2:0], c[NCOL-1]};
  endfunction

  function automatic col_t oh2bin(colmask_t c);
    col_t r = '0;
    for (int i = 0; i < NCOL; i++) if (c[i]) r = col_t'(i);
    return r;
  endfunction

endpackage
