// mul_unit: the shared, fully pipelined integer multiplier.
//
// Takes one multiply per cycle from the shared-unit operand crossbar and
// returns the low XLEN bits of the product LAT cycles later counting the
// entry cycle (LAT-1 pipeline registers; the product is formed in the first
// cycle and carried through, so synthesis can retime it). The latency is
// fixed, which lets the ARB stage reserve the fast writeback port and makes
// the result bypassable from the fast writeback crossbar. The latency value is
// this implementation's choice.
//
// Follows the design: a shared, fully pipelined unit on the fast writeback
// crossbar. Own choice: the latency.
module mul_unit
  import rb_pkg::*;
#(
  parameter int LAT = 3
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    flush,
  input  logic    in_v,
  input  word_t   a,
  input  word_t   b,
  input  preg_t   in_pdst,
  input  robidx_t in_rob,
  input  logic    in_we,     // has a destination register
  input  col_t    in_col,    // issuing column = destination bank
  output logic    out_v,
  output word_t   y,
  output preg_t   out_pdst,
  output robidx_t out_rob,
  output logic    out_we,
  output col_t    out_col
);

  logic    v   [LAT];
  word_t   p   [LAT];
  preg_t   pd  [LAT];
  robidx_t rb  [LAT];
  logic    we  [LAT];
  col_t    cl  [LAT];

  always_comb begin
    v[0]  = in_v;
    p[0]  = a * b;
    pd[0] = in_pdst;
    rb[0] = in_rob;
    we[0] = in_we;
    cl[0] = in_col;
  end

  for (genvar s = 1; s < LAT; s++) begin : g_pipe
    always_ff @(posedge clk) begin
      v[s]  <= (rst || flush) ? 1'b0 : v[s-1];
      p[s]  <= p[s-1];
      pd[s] <= pd[s-1];
      rb[s] <= rb[s-1];
      we[s] <= we[s-1];
      cl[s] <= cl[s-1];
    end
  end

  assign out_v    = v[LAT-1];
  assign y        = p[LAT-1];
  assign out_pdst = pd[LAT-1];
  assign out_rob  = rb[LAT-1];
  assign out_we   = we[LAT-1];
  assign out_col  = cl[LAT-1];

endmodule
