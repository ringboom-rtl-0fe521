// regfile_bank: one bank of the banked physical register file.
//
// REGS registers of XLEN bits with RD combinational read ports, addressed by
// the read-address crossbar, and two write ports: port 0 is written by the
// fast writeback crossbar and port 1 by the slow writeback crossbar. The two
// writers never target the same register in a cycle (a register has one
// producer). A write at a clock edge is seen by reads from the next cycle on.
// All registers reset to zero; bank 0 register 0 is the x0 register and is
// never written.
//
// Follows the design: 32 registers per bank, RD read ports, a fast and a slow
// write port. Own choices: reset to zero and the read-during-write behaviour.
module regfile_bank
  import rb_pkg::*;
#(
  parameter int REGS = BANK_REGS,
  parameter int RD   = 3,
  localparam int AW  = $clog2(REGS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [RD-1:0][AW-1:0] raddr,
  output word_t [RD-1:0]       rdata,
  input  logic [1:0]           we,
  input  logic [1:0][AW-1:0]   waddr,
  input  word_t [1:0]          wdata
);

  word_t mem [REGS];

  always_comb
    for (int p = 0; p < RD; p++) rdata[p] = mem[raddr[p]];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < REGS; r++) mem[r] <= '0;
    end else begin
      for (int w = 0; w < 2; w++)
        if (we[w]) mem[waddr[w]] <= wdata[w];
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(we[0] && we[1] && waddr[0] == waddr[1])) else $error("write-port collision");

endmodule
