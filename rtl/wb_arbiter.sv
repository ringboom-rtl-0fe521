// wb_arbiter: fast-writeback collision check of the ARB stage.
//
// Every bank has one fast write port, fed by the fast writeback crossbar from
// the column's ALU and from the pipelined shared units. Those units have fixed
// latencies, so a collision can be ruled out before the micro-op leaves ARB and
// no stall logic is needed on the crossbar. A shared pipelined micro-op that
// passes ARB reserves the fast port of its destination bank SHARED_OFS cycles
// later; an ALU micro-op needs the port of its own bank ALU_OFS cycles later
// and fails if that cycle is already reserved. Since SHARED_OFS > ALU_OFS, a
// shared micro-op always arbitrates before any ALU micro-op that could collide
// with it, so only the shared units need to reserve.
//
// Follows the design: fast-writeback collisions are prevented before execution,
// with no stall on the crossbar. Own choices: a reservation shift register per
// bank, and killing the ALU micro-op that would collide.
module wb_arbiter
  import rb_pkg::*;
#(
  parameter int ALU_OFS    = 3,   // ARB to fast-writeback register, ALU
  parameter int SHARED_OFS = 5    // ARB to fast-writeback register, multiplier
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic [NCOL-1:0]  alu_req,     // ALU micro-op in ARB of column c
  output logic [NCOL-1:0]  alu_ok,
  input  logic             shr_take,    // a shared pipelined micro-op passed ARB
  input  col_t             shr_bank
);

  // res[b][d]: fast port of bank b taken d+1 cycles from now. A reservation
  // made now for SHARED_OFS cycles ahead is stored, one edge later, at
  // SHARED_OFS-2.
  logic [NCOL-1:0][SHARED_OFS-2:0] res;

  always_comb
    for (int c = 0; c < NCOL; c++) alu_ok[c] = !(alu_req[c] && res[c][ALU_OFS-1]);

  always_ff @(posedge clk) begin
    if (rst || flush) res <= '0;
    else begin
      logic [NCOL-1:0][SHARED_OFS-2:0] n;
      for (int b = 0; b < NCOL; b++) n[b] = res[b] >> 1;
      if (shr_take) n[shr_bank][SHARED_OFS-2] = 1'b1;
      res <= n;
    end
  end


endmodule
