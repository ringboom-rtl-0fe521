// tb_rob: random enqueue bundles and out-of-order completions. Commits must
// come out in enqueue order, only for completed entries, at most NCOL per
// cycle, with the stored destination fields; `space` must track occupancy.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_rob;
  import rb_pkg::*;
  localparam int NDONE = 3;
  logic clk = 0, rst = 1, flush = 0;
  logic [NCOL-1:0] enq, enq_has_dst, enq_is_st; lreg_t [NCOL-1:0] enq_lrd;
  preg_t [NCOL-1:0] enq_pdst, enq_stale; robidx_t tail, head; logic [ROB_W:0] space;
  logic [NDONE-1:0] done_v; robidx_t [NDONE-1:0] done_idx;
  logic [NCOL-1:0] cmt_v, cmt_has_dst, cmt_is_st; lreg_t [NCOL-1:0] cmt_lrd;
  preg_t [NCOL-1:0] cmt_pdst, cmt_stale; robidx_t [NCOL-1:0] cmt_idx;
  int checks = 0, failures = 0;
  rob #(.ENTRIES(128), .NDONE(NDONE)) dut (.*);
  always #5 clk = ~clk;
  int seq_enq = 0, seq_cmt = 0;
  bit isdone [int];
  int pending [$];
  int dseq [NDONE];
  initial begin
    enq = 0; done_v = 0; enq_has_dst = 0; enq_is_st = 0; enq_lrd = 0; enq_pdst = 0; enq_stale = 0; done_idx = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 4000; it++) begin
      int n, nc;
      @(negedge clk);
      checks++;
      if (int'(space) != 128 - (seq_enq - seq_cmt)) begin failures++; $display("space %0d", space); end
      // check commits
      nc = 0;
      for (int l = 0; l < NCOL; l++) if (cmt_v[l]) begin
        checks++;
        if (l != nc || !isdone[seq_cmt] || cmt_idx[l] !== robidx_t'(seq_cmt)
            || cmt_pdst[l] !== preg_t'(seq_cmt * 3) || cmt_stale[l] !== preg_t'(seq_cmt * 5)
            || cmt_lrd[l] !== lreg_t'(seq_cmt) || cmt_is_st[l] !== seq_cmt[0]) failures++;
        seq_cmt++; nc++;
      end
      // the head pointer names the oldest entry
      checks++;
      if (head !== robidx_t'(seq_cmt - nc)) failures++;
      // the head entry, when done, must be committed
      checks++;
      if (seq_cmt < seq_enq && isdone[seq_cmt] && nc < NCOL) begin failures++; $display("missed commit %0d", seq_cmt); end
      n = $urandom_range(0, NCOL);
      if (seq_enq - seq_cmt + n > 128) n = 0;
      enq = '0;
      for (int l = 0; l < n; l++) begin
        int s;
        s = seq_enq + l;
        enq[l] = 1; enq_has_dst[l] = 1; enq_lrd[l] = lreg_t'(s); enq_pdst[l] = preg_t'(s * 3);
        enq_stale[l] = preg_t'(s * 5); enq_is_st[l] = s[0];
        pending.push_back(s);
      end
      done_v = '0;
      for (int d = 0; d < NDONE; d++)
        if (pending.size() > 0 && $urandom_range(0, 3) != 0) begin
          int k, s;
          k = $urandom_range(0, pending.size() - 1);
          s = pending[k];
          if (s < seq_enq) begin
            pending.delete(k);
            done_v[d] = 1; done_idx[d] = robidx_t'(s); dseq[d] = s;
          end
        end
      @(posedge clk);
      for (int d = 0; d < NDONE; d++) if (done_v[d]) isdone[dseq[d]] = 1;
      seq_enq += n;
    end
    $display("committed %0d", seq_cmt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
