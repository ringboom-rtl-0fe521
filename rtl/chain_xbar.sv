// chain_xbar: chained wakeup crossbar between the column issue queues.
//
// A dummy micro-op selected by its column's chain selection offers the tag it
// caught together with the column of the main micro-op. Every target column
// accepts one chained wakeup per cycle; among several sources the one nearest
// after the target in ring order wins (fixed priority, no starvation because
// a winner leaves its queue). Losers are not granted and retry. The accepted
// tag is registered and presented on the target column's chain wakeup port in
// the next cycle, so a chained wakeup crosses the pipeline boundary drawn under
// the issue queues.
//
// Follows the design: a crossbar carrying chained wakeups between columns. Own
// choices: ring-order priority and the registered output.
module chain_xbar
  import rb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  flush,
  input  logic  [NCOL-1:0]      req,
  input  preg_t [NCOL-1:0]      tag,
  input  col_t  [NCOL-1:0]      dst,
  output logic  [NCOL-1:0]      gnt,
  output wake_t [NCOL-1:0]      wk      // chained wakeup port of each column
);

  wake_t [NCOL-1:0] nxt;

  always_comb begin
    gnt = '0;
    nxt = '0;
    for (int t = 0; t < NCOL; t++)
      for (int o = NCOL-1; o >= 0; o--) begin   // last assignment = highest priority
        int s;
        s = (t + 1 + o) % NCOL;
        if (req[s] && dst[s] == col_t'(t)) begin
          nxt[t].valid = 1'b1;
          nxt[t].tag   = tag[s];
        end
      end
    for (int t = 0; t < NCOL; t++)
      for (int s = 0; s < NCOL; s++)
        if (req[s] && dst[s] == col_t'(t) && nxt[t].tag == tag[s]) gnt[s] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) wk <= '0;
    else              wk <= nxt;
  end

endmodule
