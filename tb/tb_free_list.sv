// tb_free_list: random allocation, release, commit and flush against a set
// model. The offered registers must be the lowest free ones, allocation must
// remove them, release must return them, and flush must restore the
// committed state (registers not held by a committed mapping).
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_free_list;
  localparam int REGS = 32, ALLOC = 2, FREES = 4;
  logic clk = 0, rst = 1, flush;
  logic [ALLOC-1:0] avail; logic [ALLOC-1:0][4:0] alloc_idx; logic [1:0] take;
  logic [FREES-1:0] free_v, cmt_v; logic [FREES-1:0][4:0] free_idx, cmt_idx;
  bit fr [REGS], cf [REGS];
  int checks = 0, failures = 0;
  free_list #(.REGS(REGS), .ALLOC(ALLOC), .FREES(FREES), .INIT_USED(8)) dut (.*);
  always #5 clk = ~clk;
  int inflight [$];   // allocated, not yet committed
  int held [$];       // committed mappings that may be released
  initial begin
    for (int r = 0; r < REGS; r++) begin fr[r] = r >= 8; cf[r] = r >= 8; end
    for (int r = 0; r < 8; r++) held.push_back(r);
    take = 0; free_v = 0; cmt_v = 0; flush = 0; free_idx = 0; cmt_idx = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 3000; it++) begin
      int e0, e1;
      @(negedge clk);
      e0 = -1; e1 = -1;
      for (int r = REGS-1; r >= 0; r--) if (fr[r]) e0 = r;
      for (int r = REGS-1; r >= 0; r--) if (fr[r] && r != e0) e1 = r;
      checks++;
      if (avail[0] !== (e0 >= 0) || (e0 >= 0 && alloc_idx[0] !== 5'(e0))
          || avail[1] !== (e1 >= 0) || (e1 >= 0 && alloc_idx[1] !== 5'(e1))) begin
        failures++; if (failures < 5) $display("offer %0d %0d got %b %0d %0d", e0, e1, avail, alloc_idx[0], alloc_idx[1]);
      end
      take = 2'($urandom_range(0, 2));
      if (take > 0 && !avail[0]) take = 0;
      if (take > 1 && !avail[1]) take = 1;
      free_v = 0; cmt_v = 0;
      flush = (it % 97 == 96);
      // commit some in-flight registers, releasing an older committed one each
      for (int f = 0; f < FREES; f++)
        if (inflight.size() > 0 && held.size() > 4 && $urandom_range(0, 1)) begin
          cmt_v[f] = 1; cmt_idx[f] = 5'(inflight.pop_front());
          free_v[f] = 1; free_idx[f] = 5'(held.pop_front());
          held.push_back(cmt_idx[f]);
        end
      @(posedge clk);
      for (int f = 0; f < FREES; f++) if (cmt_v[f]) begin cf[cmt_idx[f]] = 0; cf[free_idx[f]] = 1; end
      if (flush) begin
        for (int r = 0; r < REGS; r++) fr[r] = cf[r];
        inflight.delete();
      end else begin
        if (take > 0) begin fr[alloc_idx[0]] = 0; inflight.push_back(alloc_idx[0]); end
        if (take > 1) begin fr[alloc_idx[1]] = 0; inflight.push_back(alloc_idx[1]); end
        for (int f = 0; f < FREES; f++) if (free_v[f]) fr[free_idx[f]] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
