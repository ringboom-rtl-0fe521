// tb_ringboom_core: end-to-end test of the banked execution core.
//
// A random program of ALU, multiply, divide, load and store micro-ops over a
// few architectural registers (so that dependences are dense) is generated and
// executed by a reference model in program order. The testbench acts as the
// front end, as the memory system (loads answer after a random delay, stores
// are applied when they commit) and as a checker: it mirrors every register
// write, and at each commit compares the committed register value with the
// reference. A second phase runs a chain of dependent single-cycle adds and
// checks that it commits at one instruction per cycle (back-to-back execution
// across neighbouring columns through the ring bypass). Branch micro-ops with
// random predictions are resolved by the core: each cycle the reported
// mispredict must be the oldest mispredicting branch resolved in that cycle,
// and every mispredicting branch (and no other) must resolve as one. Every
// mechanism of the core is counted; one that never happened is a failure.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_ringboom_core;
  import rb_pkg::*;

  localparam int NRAND = 3000;
  localparam int NCHAIN = 200;
  localparam int N = NRAND + NCHAIN;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic     [NCOL-1:0] in_valid;
  dec_uop_t [NCOL-1:0] in_uop;
  logic     [$clog2(NCOL+1)-1:0] in_accept;
  logic mem_v, mem_st; word_t mem_addr, mem_wdata; preg_t mem_pdst; robidx_t mem_rob;
  logic ld_wk_v; preg_t ld_wk_tag; robidx_t ld_wk_rob; word_t ld_data;
  logic [NCOL-1:0] rf_fast_we, rf_slow_we; preg_t [NCOL-1:0] rf_fast_tag, rf_slow_tag;
  word_t [NCOL-1:0] rf_fast_data, rf_slow_data;
  logic [NCOL-1:0] cmt_v, cmt_has_dst, cmt_is_st; lreg_t [NCOL-1:0] cmt_lrd;
  preg_t [NCOL-1:0] cmt_pdst; robidx_t [NCOL-1:0] cmt_rob;
  events_t ev;
  logic br_mis_v; robidx_t br_mis_rob; col_t br_mis_col;

  ringboom_core dut (.*);

  // ---------------- program and reference model
  dec_uop_t prog [N];
  word_t    gold [N];      // value written by instruction i (if any)
  word_t    arch [NLREG];
  word_t    st_addr_g [N], st_data_g [N];
  bit       mis_g [N], mis_seen [N];

  function automatic word_t memf(word_t a);
    return (a * 64'h9E3779B97F4A7C15) ^ (a >> 7) ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  function automatic word_t ref_div(word_t a, word_t b);
    if (b == 0) return '1;
    if (a == 64'h8000_0000_0000_0000 && b == '1) return a;
    return word_t'($signed(a) / $signed(b));
  endfunction

  function automatic word_t ref_exec(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;
      OP_AND: return a & b;   OP_OR:  return a | b;   OP_XOR: return a ^ b;
      OP_SLL: return a << b[5:0];  OP_SRL: return a >> b[5:0];
      OP_SRA: return word_t'($signed(a) >>> b[5:0]);
      OP_SLT: return {63'd0, $signed(a) < $signed(b)};
      OP_SLTU: return {63'd0, a < b};
      OP_MUL: return a * b;
      OP_DIV: return ref_div(a, b);
      default: return '0;
    endcase
  endfunction

  task automatic gen();
    for (int r = 0; r < NLREG; r++) arch[r] = '0;
    for (int i = 0; i < N; i++) begin
      dec_uop_t u;
      int k;
      word_t a, b;
      u = '0;
      if (i >= NRAND) begin           // dependent add chain on x7
        u.op = OP_ADD; u.lrd = 5'd7; u.lrs1 = 5'd7; u.use_imm = 1'b1; u.imm = 32'd3;
      end else begin
        k = $urandom_range(0, 99);
        u.lrd  = lreg_t'($urandom_range(0, 12));
        u.lrs1 = lreg_t'($urandom_range(0, 12));
        u.lrs2 = lreg_t'($urandom_range(0, 12));
        u.imm  = $urandom();
        u.use_imm = $urandom_range(0, 3) == 0;
        if (k < 50)      u.op = op_e'($urandom_range(0, 9));
        else if (k < 60) begin u.op = OP_ADD; u.use_imm = 1; u.lrs1 = u.lrd; u.imm = 32'd8; end
        else if (k < 72) begin u.op = OP_MUL; u.use_imm = 0; end
        else if (k < 76) begin u.op = OP_DIV; u.use_imm = 0; end
        else if (k < 88) begin u.op = OP_LD;  u.use_imm = 1; end
        else if (k < 95) begin u.op = OP_ST;  u.use_imm = 1; u.lrd = 0; end
        else begin                      // branch, imm[0] = predicted direction
          u.op = op_e'($urandom_range(int'(OP_BEQ), int'(OP_BGE))); u.use_imm = 0; u.lrd = 0;
          if ($urandom_range(0, 2) == 0) u.lrs2 = u.lrs1;
        end
        if (u.op inside {OP_SLL, OP_SRL, OP_SRA} && u.use_imm) u.imm = u.imm & 32'h3f;
      end
      prog[i] = u;
      a = arch[u.lrs1];
      b = u.use_imm ? word_t'(signed'(u.imm)) : arch[u.lrs2];
      if (u.op == OP_LD)      gold[i] = memf(a + word_t'(signed'(u.imm)));
      else if (u.op == OP_ST) begin
        st_addr_g[i] = a + word_t'(signed'(u.imm)); st_data_g[i] = arch[u.lrs2]; gold[i] = '0;
      end
      else if (is_br(u.op)) begin
        bit t;
        case (u.op)
          OP_BEQ: t = a == b;  OP_BNE: t = a != b;
          OP_BLT: t = $signed(a) < $signed(b);
          default: t = $signed(a) >= $signed(b);
        endcase
        mis_g[i] = t != u.imm[0]; gold[i] = '0;
      end
      else gold[i] = ref_exec(u.op, a, b);
      if (u.lrd != 0 && u.op != OP_ST && !is_br(u.op)) arch[u.lrd] = gold[i];
    end
  endtask

  // ---------------- front end
  int fe_ptr;
  int checks = 0, failures = 0, committed = 0;
  int chain_first = -1, chain_last = -1;
  always_comb
    for (int l = 0; l < NCOL; l++) begin
      // the chain starts on an empty machine
      in_valid[l] = !rst && fe_ptr + l < N && (fe_ptr + l < NRAND || committed >= NRAND);
      in_uop[l]   = (fe_ptr + l < N) ? prog[fe_ptr + l] : '0;
    end
  always_ff @(posedge clk)
    if (rst) fe_ptr <= 0;
    else begin
      if (fe_ptr == NRAND && in_accept != 0) chain_first <= cyc;
      fe_ptr <= fe_ptr + int'(in_accept);
    end

  // ---------------- memory system
  typedef struct { preg_t tag; robidx_t rob; word_t data; int due; } ld_t;
  ld_t ldq[$];
  word_t data_pipe [4];
  word_t st_buf_a [1 << ROB_W], st_buf_d [1 << ROB_W];
  word_t st_mem [word_t];
  int cyc;
  always_ff @(posedge clk) begin
    if (rst) begin
      ldq.delete();
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (mem_v && !mem_st) begin
        ld_t l;
        l.tag = mem_pdst; l.rob = mem_rob; l.data = memf(mem_addr);
        l.due = cyc + $urandom_range(1, 4);
        ldq.push_back(l);
      end
      if (mem_v && mem_st) begin st_buf_a[mem_rob] <= mem_addr; st_buf_d[mem_rob] <= mem_wdata; end
      for (int l = 0; l < NCOL; l++)
        if (cmt_v[l] && cmt_is_st[l]) st_mem[st_buf_a[cmt_rob[l]]] = st_buf_d[cmt_rob[l]];
    end
  end
  // one load answer per cycle: wakeup now, data three cycles later
  always_ff @(posedge clk) begin
    if (rst) begin
      ld_wk_v <= 0; ld_wk_tag <= '0; ld_wk_rob <= '0;
      for (int d = 0; d < 4; d++) data_pipe[d] <= '0;
    end else begin
      ld_wk_v <= 0;
      data_pipe[0] <= '0;
      if (ldq.size() > 0 && ldq[0].due <= cyc) begin
        ld_wk_v <= 1; ld_wk_tag <= ldq[0].tag; ld_wk_rob <= ldq[0].rob;
        data_pipe[0] <= ldq[0].data;
        void'(ldq.pop_front());
      end
      for (int d = 1; d < 4; d++) data_pipe[d] <= data_pipe[d-1];
    end
  end
  // data_pipe[0] is aligned with the wakeup; the core wants it 3 cycles later
  assign ld_data = data_pipe[3];

  // ---------------- checker
  word_t shadow [NPREG];
  always_ff @(posedge clk) begin
    if (rst) for (int p = 0; p < NPREG; p++) shadow[p] = '0;
    else begin
      for (int l = 0; l < NCOL; l++) begin
        if (rf_fast_we[l]) shadow[rf_fast_tag[l]] = rf_fast_data[l];
        if (rf_slow_we[l]) shadow[rf_slow_tag[l]] = rf_slow_data[l];
      end
      for (int l = 0; l < NCOL; l++) if (cmt_v[l]) begin
        dec_uop_t u;
        u = prog[committed];
        checks++;
        if (u.lrd != 0 && u.op != OP_ST && !is_br(u.op)) begin
          if (!cmt_has_dst[l] || cmt_lrd[l] != u.lrd || shadow[cmt_pdst[l]] != gold[committed]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH instr %0d op %s x%0d: got %h (p%0d) want %h", committed, u.op.name(),
                       u.lrd, shadow[cmt_pdst[l]], cmt_pdst[l], gold[committed]);
          end
        end else if (cmt_has_dst[l] || cmt_is_st[l] != (u.op == OP_ST)) failures++;
        if (committed == N - 1) chain_last = cyc;
        committed++;
      end
    end
  end

  // ---------------- mechanism counters
  localparam int NEV = $bits(events_t);
  int evc [NEV];
  initial for (int e = 0; e < NEV; e++) evc[e] = 0;
  always_ff @(posedge clk)
    if (!rst) begin
      for (int e = 0; e < NEV; e++) if (ev[e]) evc[e]++;
    end

  string evn [NEV] = '{"disp_stall", "ren_stall", "div_wait", "hp_issue", "read_share",
                       "byp_load", "byp_xbar", "byp_alu", "div_cancel", "kill_dep", "kill_wb",
                       "kill_eu", "kill_rf", "fast_wake", "chain", "split", "br_mis"};

  // ---------------- branch resolution: in-flight instruction i has ROB index i % 128
  int nmis_g = 0, nmis_seen = 0;
  always_ff @(posedge clk)
    if (!rst) begin
      int oldest; oldest = -1;
      for (int c = 0; c < NCOL; c++) if (dut.mis_v[c]) begin
        int i; i = -1;
        for (int j = committed; j < committed + 128 && j < N; j++) if (robidx_t'(j) == dut.mis_rob[c]) i = j;
        checks++;
        if (i < 0 || !mis_g[i] || mis_seen[i]) begin failures++; $display("unexpected mispredict rob %0d", dut.mis_rob[c]); end
        else begin mis_seen[i] = 1; nmis_seen++; if (oldest < 0 || i < oldest) oldest = i; end
      end
      checks++;
      if (br_mis_v !== (oldest >= 0) || (oldest >= 0 && (br_mis_rob !== robidx_t'(oldest) || !dut.mis_v[br_mis_col]
          || dut.mis_rob[br_mis_col] !== robidx_t'(oldest)))) begin
        failures++; $display("mispredict select: got %b rob %0d, want instr %0d", br_mis_v, br_mis_rob, oldest);
      end
    end

  initial begin
    gen();
    repeat (3) @(posedge clk);
    rst = 0;
    wait (committed == N);
    repeat (5) @(posedge clk);
    // stores
    for (int i = 0; i < NRAND; i++) if (prog[i].op == OP_ST) begin
      checks++;
      // a later store to the same address overwrites; only check the last one
      begin
        bit last = 1;
        for (int j = i + 1; j < NRAND; j++) if (prog[j].op == OP_ST && st_addr_g[j] == st_addr_g[i]) last = 0;
        if (last && (!st_mem.exists(st_addr_g[i]) || st_mem[st_addr_g[i]] != st_data_g[i])) begin
          failures++;
          $display("STORE mismatch at instr %0d", i);
        end
      end
    end
    for (int i = 0; i < N; i++) nmis_g += mis_g[i];
    checks++;
    if (nmis_seen != nmis_g) begin failures++; $display("mispredicts resolved %0d of %0d", nmis_seen, nmis_g); end
    $display("mispredicting branches %0d, resolved %0d", nmis_g, nmis_seen);
    // dependent chain: one per cycle through the ring
    checks++;
    // rename..commit of the first add is ~9 cycles, then one add per cycle
    if (chain_last - chain_first > NCHAIN + 12) begin
      failures++;
      $display("chain of %0d dependent adds took %0d cycles", NCHAIN, chain_last - chain_first);
    end
    $display("chain of %0d dependent adds committed in %0d cycles", NCHAIN, chain_last - chain_first);
    for (int e = 0; e < NEV; e++) begin
      checks++;
      $display("event %-10s %0d", evn[e], evc[e]);
      if (evc[e] == 0) begin failures++; $display("mechanism %s never happened", evn[e]); end
    end
    $display("cycles %0d for %0d instructions", cyc, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: committed %0d of %0d", committed, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
