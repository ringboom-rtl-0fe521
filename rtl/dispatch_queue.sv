// dispatch_queue: the pipeline register between rename and dispatch, built as a
// two-entry compacting queue of rename bundles.
//
// Rename writes a bundle whenever the queue is not full (`enq_ready` depends
// only on the queue's own occupancy, so dispatch never back-pressures rename
// combinationally). The oldest bundle is always entry 0 and is offered to the
// dispatch crossbar; it leaves when `deq` is asserted, and entry 1 moves down.
// While a micro-op waits here it snoops the writeback wakeups and clears its
// operand wait bits, and the offered head already includes the wakeups of the
// current cycle, so no wakeup is lost between rename and the issue queues.
//
// Follows the design: a two-entry compacting queue after rename. Own choice:
// wakeup snooping while queued.
module dispatch_queue
  import rb_pkg::*;
#(
  parameter int W   = 2*NCOL,  // micro-op slots per bundle
  parameter int NWK = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 flush,
  input  logic                 enq,
  input  logic     [W-1:0]     enq_v,
  input  ren_uop_t [W-1:0]     enq_uop,
  output logic                 enq_ready,
  output logic                 head_valid,
  output logic     [W-1:0]     head_v,
  output ren_uop_t [W-1:0]     head_uop,
  input  logic                 deq,
  input  wake_t    [NWK-1:0]   wk
);

  logic              qv  [2];
  logic     [W-1:0]  qsv [2];
  ren_uop_t [W-1:0]  qu  [2];

  function automatic ren_uop_t snoop(ren_uop_t u, wake_t [NWK-1:0] w);
    for (int k = 0; k < NWK; k++) if (w[k].valid) begin
      if (w[k].tag == u.prs1) u.p1_wait = 1'b0;
      if (w[k].tag == u.prs2) u.p2_wait = 1'b0;
    end
    return u;
  endfunction

  ren_uop_t [W-1:0] s0, s1, se;
  always_comb begin
    for (int i = 0; i < W; i++) begin
      s0[i] = snoop(qu[0][i], wk);
      s1[i] = snoop(qu[1][i], wk);
      se[i] = snoop(enq_uop[i], wk);
    end
  end

  assign enq_ready  = !qv[1];
  assign head_valid = qv[0];
  assign head_v     = qsv[0];
  assign head_uop   = s0;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      qv[0] <= 1'b0; qv[1] <= 1'b0;
      qsv[0] <= '0; qsv[1] <= '0;
    end else begin
      logic do_enq, pop;
      do_enq = enq && enq_ready;
      pop    = deq && qv[0];
      if (pop) begin
        // compact: entry 1 moves down, a new bundle fills the freed place
        qv[0] <= qv[1] || do_enq;
        qsv[0] <= qv[1] ? qsv[1] : enq_v;
        qu[0]  <= qv[1] ? s1 : se;
        qv[1] <= qv[1] && do_enq;
        qsv[1] <= enq_v;
        qu[1]  <= se;
      end else begin
        qu[0] <= s0;
        qu[1] <= s1;
        if (do_enq) begin
          if (!qv[0]) begin qv[0] <= 1'b1; qsv[0] <= enq_v; qu[0] <= se; end
          else        begin qv[1] <= 1'b1; qsv[1] <= enq_v; qu[1] <= se; end
        end
      end
    end
  end

  always_ff @(posedge clk) if (!rst) assert (!(deq && !qv[0])) else $error("dequeue from empty dispatch queue");

endmodule
