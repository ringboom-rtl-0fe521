// tb_dispatch_queue: random enqueue/dequeue of bundles with random writeback
// wakeups. A queue-of-bundles model applies the same wakeups to every waiting
// micro-op; the offered head (including this cycle's wakeups), the valid bits
// and the two-entry full condition are compared every cycle.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_dispatch_queue;
  import rb_pkg::*;
  localparam int W = 8, NWK = 6;
  typedef struct { logic [W-1:0] v; ren_uop_t [W-1:0] u; } bundle_t;
  logic clk = 0, rst = 1, flush = 0;
  logic enq, enq_ready, head_valid, deq; logic [W-1:0] enq_v, head_v;
  ren_uop_t [W-1:0] enq_uop, head_uop; wake_t [NWK-1:0] wk;
  bundle_t m [$];
  int checks = 0, failures = 0, fulls = 0;
  dispatch_queue #(.W(W), .NWK(NWK)) dut (.*);
  always #5 clk = ~clk;

  function automatic ren_uop_t wake(ren_uop_t u, wake_t [NWK-1:0] w);
    for (int k = 0; k < NWK; k++) begin
      if (w[k].valid && w[k].tag == u.prs1) u.p1_wait = 0;
      if (w[k].valid && w[k].tag == u.prs2) u.p2_wait = 0;
    end
    return u;
  endfunction

  initial begin
    enq = 0; deq = 0; enq_v = 0; enq_uop = '0; wk = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      bundle_t nb; bit acc;
      @(negedge clk);
      enq = $urandom_range(0, 1); enq_v = W'($urandom());
      for (int i = 0; i < W; i++) begin
        enq_uop[i] = '0;
        enq_uop[i].prs1 = preg_t'($urandom_range(0, 15)); enq_uop[i].prs2 = preg_t'($urandom_range(0, 15));
        enq_uop[i].p1_wait = $urandom_range(0, 1); enq_uop[i].p2_wait = $urandom_range(0, 1);
        enq_uop[i].pdst = preg_t'($urandom()); enq_uop[i].rob_idx = robidx_t'($urandom());
      end
      for (int k = 0; k < NWK; k++) begin wk[k].valid = $urandom_range(0, 3) == 0; wk[k].tag = preg_t'($urandom_range(0, 15)); end
      deq = (m.size() > 0) && $urandom_range(0, 2) != 0;
      #1;
      checks += 2;
      if (enq_ready !== (m.size() < 2)) failures++;
      if (head_valid !== (m.size() > 0)) failures++;
      fulls += (m.size() == 2);
      if (m.size() > 0) begin
        for (int i = 0; i < W; i++) begin
          checks++;
          if (head_v[i] !== m[0].v[i] || (m[0].v[i] && head_uop[i] !== wake(m[0].u[i], wk))) begin
            failures++; if (failures < 5) $display("t%0d slot %0d mismatch", t, i);
          end
        end
      end
      // model update at the edge
      foreach (m[j]) for (int i = 0; i < W; i++) m[j].u[i] = wake(m[j].u[i], wk);
      nb.v = enq_v;
      for (int i = 0; i < W; i++) nb.u[i] = wake(enq_uop[i], wk);
      acc = enq && m.size() < 2;   // acceptance depends on occupancy only
      if (deq) void'(m.pop_front());
      if (acc) m.push_back(nb);
      @(posedge clk);
    end
    $display("cycles full %0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
