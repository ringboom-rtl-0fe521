// eu_arbiter: execution-unit arbiter of the ARB stage.
//
// Each column has its own ALU, so ALU micro-ops always win here. The shared
// units (the memory pipeline, the pipelined multiplier and the iterative
// divider) accept one micro-op per cycle. Among the columns that want the same
// shared unit, priority rotates: the search starts one column after the last
// winner of that unit, so micro-ops woken in the same cycle in different
// columns take turns (the rotation matters most for the memory unit, where it
// reduces memory-ordering failures). A divide is cancelled while the divider
// is busy, instead of fanning a readiness bit out to every issue slot.
// `taken` reports the micro-ops that finally passed ARB, so the rotation only
// advances past a real winner. Combinational grant, registered rotation.
//
// Follows the design: shared-unit arbitration in ARB with rotating priority,
// and cancelling DIV when the divider is busy. Own choice: using the same
// rotation for every shared unit.
module eu_arbiter
  import rb_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic  [NCOL-1:0]  valid,
  input  unit_e [NCOL-1:0]  unit,
  input  logic              div_busy,
  input  logic  [NCOL-1:0]  taken,     // final ARB pass of each column
  output logic  [NCOL-1:0]  ok,        // unit available for this micro-op
  output logic  [NCOL-1:0]  div_cancel // divide cancelled because the divider is busy
);

  col_t ptr [4];   // rotation pointer per unit class

  always_comb begin
    ok = '0;
    div_cancel = '0;
    for (int c = 0; c < NCOL; c++)
      if (valid[c] && unit[c] == U_ALU) ok[c] = 1'b1;
    for (int u = 1; u < 4; u++) begin
      logic found;
      found = 1'b0;
      for (int o = 0; o < NCOL; o++)   // ring order from the pointer (NCOL is a power of two)
        if (!found && valid[ptr[u] + col_t'(o)] && unit[ptr[u] + col_t'(o)] == unit_e'(u)) begin
          if (unit_e'(u) == U_DIV && div_busy) div_cancel[ptr[u] + col_t'(o)] = 1'b1;
          else begin ok[ptr[u] + col_t'(o)] = 1'b1; found = 1'b1; end
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int u = 0; u < 4; u++) ptr[u] <= '0;
    end else begin
      for (int c = 0; c < NCOL; c++)
        if (taken[c] && unit[c] != U_ALU) ptr[unit[c]] <= col_t'(c + 1);
    end
  end

endmodule
