// fast_wb_xbar: fast writeback crossbar.
//
// Routes the results of units with fixed latency (each column's ALU and the
// shared pipelined multiplier) to the fast write port of their destination
// bank. A column's ALU always writes its own bank; a shared unit writes the
// bank of its destination register, which is the column it issued from (the
// column is carried along, since a result without destination has no bank).
// Collisions are excluded at ARB, so there is no stall path: at most one
// source per bank per cycle (asserted). The crossbar output is registered;
// that register drives the bank's fast write port in the next cycle, the
// crossbar bypass path of the next column and the writeback-time wakeups.
// Results without a destination still pass through to complete in the ROB
// (`we` low).
//
// Follows the design: a fast crossbar for predictable-latency units whose
// output is bypassable. Own choice: registering the output.
module fast_wb_xbar
  import rb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 flush,
  input  logic    [NCOL-1:0]   alu_v,
  input  logic    [NCOL-1:0]   alu_we,
  input  preg_t   [NCOL-1:0]   alu_pdst,
  input  robidx_t [NCOL-1:0]   alu_rob,
  input  word_t   [NCOL-1:0]   alu_y,
  input  logic                 shr_v,
  input  logic                 shr_we,
  input  col_t                 shr_bank,    // issuing column = destination bank
  input  preg_t                shr_pdst,
  input  robidx_t              shr_rob,
  input  word_t                shr_y,
  output logic    [NCOL-1:0]   wb_v,    // result leaves the crossbar (ROB completion)
  output logic    [NCOL-1:0]   wb_we,   // write the bank
  output preg_t   [NCOL-1:0]   wb_tag,
  output robidx_t [NCOL-1:0]   wb_rob,
  output word_t   [NCOL-1:0]   wb_data
);

  logic    [NCOL-1:0] nv, nwe;
  preg_t   [NCOL-1:0] ntag;
  robidx_t [NCOL-1:0] nrob;
  word_t   [NCOL-1:0] ndata;

  always_comb begin
    for (int b = 0; b < NCOL; b++) begin
      nv[b] = alu_v[b]; nwe[b] = alu_v[b] && alu_we[b];
      ntag[b] = alu_pdst[b]; nrob[b] = alu_rob[b]; ndata[b] = alu_y[b];
      if (shr_v && shr_bank == col_t'(b)) begin
        nv[b] = 1'b1; nwe[b] = shr_we;
        ntag[b] = shr_pdst; nrob[b] = shr_rob; ndata[b] = shr_y;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wb_v <= '0; wb_we <= '0;
    end else begin
      wb_v <= nv; wb_we <= nwe;
    end
    wb_tag <= ntag; wb_rob <= nrob; wb_data <= ndata;
  end

  always_ff @(posedge clk)
    if (!rst && shr_v) assert (!alu_v[shr_bank]) else $error("fast writeback collision");

endmodule
