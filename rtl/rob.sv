// rob: re-order buffer.
//
// A circular buffer of ENTRIES micro-ops in program order. Rename writes up to
// NCOL entries per cycle at the tail (destination, new and stale physical
// register, store flag). Completion ports mark entries done by index. Up to
// NCOL consecutive done entries leave from the head each cycle; for each the
// ROB reports the architectural destination, the new mapping and the stale
// register, which returns to the free list of its bank. `flush` empties the
// buffer (used with commit-snapshot recovery). `space` is the number of free
// entries.
//
// Follows the design: a 128-entry reorder buffer with in-order commit that
// returns stale registers. Own choice: 4-wide commit.
module rob
  import rb_pkg::*;
#(
  parameter int ENTRIES = 128,
  parameter int NDONE   = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    flush,
  input  logic    [NCOL-1:0]      enq,        // enqueued lanes form a prefix
  input  logic    [NCOL-1:0]      enq_has_dst,
  input  lreg_t   [NCOL-1:0]      enq_lrd,
  input  preg_t   [NCOL-1:0]      enq_pdst,
  input  preg_t   [NCOL-1:0]      enq_stale,
  input  logic    [NCOL-1:0]      enq_is_st,
  output robidx_t                 head,       // oldest entry
  output robidx_t                 tail,
  output logic    [ROB_W:0]       space,
  input  logic    [NDONE-1:0]     done_v,
  input  robidx_t [NDONE-1:0]     done_idx,
  output logic    [NCOL-1:0]      cmt_v,
  output logic    [NCOL-1:0]      cmt_has_dst,
  output lreg_t   [NCOL-1:0]      cmt_lrd,
  output preg_t   [NCOL-1:0]      cmt_pdst,
  output preg_t   [NCOL-1:0]      cmt_stale,
  output logic    [NCOL-1:0]      cmt_is_st,
  output robidx_t [NCOL-1:0]      cmt_idx
);

  typedef struct packed {
    logic  done;
    logic  has_dst;
    lreg_t lrd;
    preg_t pdst;
    preg_t stale;
    logic  is_st;
  } ent_t;

  ent_t    e [ENTRIES];
  logic [ROB_W:0] count;

  assign space = (ROB_W+1)'(ENTRIES) - count;

  always_comb begin
    logic stop;
    stop = 1'b0;
    for (int i = 0; i < NCOL; i++) begin
      robidx_t k;
      k = head + robidx_t'(i);
      cmt_idx[i]     = k;
      cmt_v[i]       = !stop && i < int'(count) && e[k].done;
      stop           = stop || !cmt_v[i];
      cmt_has_dst[i] = e[k].has_dst;
      cmt_lrd[i]     = e[k].lrd;
      cmt_pdst[i]    = e[k].pdst;
      cmt_stale[i]   = e[k].stale;
      cmt_is_st[i]   = e[k].is_st;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < ENTRIES; i++) e[i].done <= 1'b0;
    end else begin
      int ne, nc;
      ne = 0; nc = 0;
      for (int i = 0; i < NCOL; i++) if (cmt_v[i]) nc++;
      for (int d = 0; d < NDONE; d++) if (done_v[d]) e[done_idx[d]].done <= 1'b1;
      for (int i = 0; i < NCOL; i++)
        if (enq[i]) begin
          robidx_t k;
          k = tail + robidx_t'(i);
          e[k] <= '{done: 1'b0, has_dst: enq_has_dst[i], lrd: enq_lrd[i],
                    pdst: enq_pdst[i], stale: enq_stale[i], is_st: enq_is_st[i]};
          ne++;
        end
      head  <= head + robidx_t'(nc);
      tail  <= tail + robidx_t'(ne);
      count <= count + (ROB_W+1)'(ne) - (ROB_W+1)'(nc);
    end
  end

endmodule
