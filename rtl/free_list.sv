// free_list: free list of the physical registers of one register-file bank.
//
// Each column owns the bank it writes, so it allocates destination registers
// only from its own free list (one free list per column, as in the rename
// pipeline figures). The list is a bit vector, one bit per register of the
// bank. Each cycle it offers the lowest ALLOC free registers; the rename stage
// takes the first `take` of them. Registers released at commit are set again
// (up to FREES per cycle). A second vector tracks the committed state (a
// register is committed-free when no committed mapping holds it) so that a
// flush restores the speculative list from it in one cycle (commit snapshot).
//
// Timing: offers are combinational from the state; take/free/commit updates
// take effect at the next clock edge. After reset registers 0..INIT_USED-1 hold
// the initial architectural mappings and are not free.
//
// Follows the design: one free list per column. Own choices: the bit-vector
// organisation and the committed copy used for flushes.
module free_list #(
  parameter int REGS      = 32,  // registers per bank
  parameter int ALLOC     = 2,   // registers offered per cycle (dispatch limit per queue)
  parameter int FREES     = 4,   // registers released per cycle (commit width)
  parameter int INIT_USED = 8,   // registers holding architectural state at reset
  localparam int IW       = $clog2(REGS)
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic [ALLOC-1:0]          avail,      // avail[k]: a k-th free register exists
  output logic [ALLOC-1:0][IW-1:0]  alloc_idx,  // lowest free registers
  input  logic [$clog2(ALLOC+1)-1:0] take,      // how many of the offered are allocated
  input  logic [FREES-1:0]          free_v,     // commit: stale register released
  input  logic [FREES-1:0][IW-1:0]  free_idx,
  input  logic [FREES-1:0]          cmt_v,      // commit: register becomes committed state
  input  logic [FREES-1:0][IW-1:0]  cmt_idx,
  input  logic                      flush       // restore from committed state
);

  logic [REGS-1:0] fl, cfl, mask;

  always_comb begin
    logic [REGS-1:0] m;
    m = fl;
    avail = '0;
    alloc_idx = '0;
    for (int k = 0; k < ALLOC; k++) begin
      for (int i = REGS-1; i >= 0; i--)
        if (m[i]) begin
          avail[k] = 1'b1;
          alloc_idx[k] = IW'(i);
        end
      if (avail[k]) m[alloc_idx[k]] = 1'b0;
    end
  end

  always_comb begin
    mask = '0;
    for (int k = 0; k < ALLOC; k++)
      if (avail[k] && k < int'(take)) mask[alloc_idx[k]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < REGS; i++) begin
        fl[i]  <= (i >= INIT_USED);
        cfl[i] <= (i >= INIT_USED);
      end
    end else begin
      logic [REGS-1:0] n, c;
      c = cfl;
      for (int f = 0; f < FREES; f++) begin
        if (cmt_v[f])  c[cmt_idx[f]]  = 1'b0;
        if (free_v[f]) c[free_idx[f]] = 1'b1;
      end
      n = fl & ~mask;
      for (int f = 0; f < FREES; f++)
        if (free_v[f]) n[free_idx[f]] = 1'b1;
      cfl <= c;
      fl  <= flush ? c : n;
    end
  end

  // a register may only be offered once
  always_ff @(posedge clk)
    if (!rst && ALLOC > 1) assert (!(avail[0] && avail[ALLOC-1] && alloc_idx[0] == alloc_idx[ALLOC-1]));

endmodule
