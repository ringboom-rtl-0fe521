// tb_chain_xbar: random chained-wakeup requests. Each target column accepts
// one request per cycle, the source nearest after it in ring order (t+1, t+2,
// ...); the winner is granted in the same cycle and its tag appears on the
// target's wakeup port one edge later.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_chain_xbar;
  import rb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [NCOL-1:0] req, gnt; preg_t [NCOL-1:0] tag; col_t [NCOL-1:0] dst; wake_t [NCOL-1:0] wk;
  int checks = 0, failures = 0;
  chain_xbar dut (.*);
  always #5 clk = ~clk;
  initial begin
    req = 0; tag = 0; dst = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [NCOL-1:0] eg; wake_t [NCOL-1:0] ew;
      @(negedge clk);
      for (int c = 0; c < NCOL; c++) begin
        req[c] = $urandom_range(0, 1); dst[c] = col_t'($urandom()); tag[c] = {2'(c), 5'($urandom())};
      end
      #1;
      eg = 0; ew = 0;
      for (int tc = 0; tc < NCOL; tc++)
        for (int o = 1; o <= NCOL; o++) begin
          int s; s = (tc + o) % NCOL;
          if (req[s] && dst[s] == col_t'(tc)) begin eg[s] = 1; ew[tc].valid = 1; ew[tc].tag = tag[s]; break; end
        end
      checks++;
      if (gnt !== eg) begin failures++; if (failures < 5) $display("t%0d gnt %b want %b", t, gnt, eg); end
      @(posedge clk); #1;
      checks++;
      if (wk !== ew) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
