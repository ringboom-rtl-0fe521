// tb_column_arbiter: random bundles checked against the column request table
// (prs1 busy -> producer of prs1 + 1, else prs2 busy -> producer of prs2 + 1,
// else the random column advanced once per lane), with producers inside the
// bundle resolved to the older lane's own column.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_column_arbiter;
  import rb_pkg::*;
  colmask_t rnd;
  logic [NCOL-1:0] busy1, busy2;
  colmask_t [NCOL-1:0] col1, col2, req;
  logic [NCOL-1:0][NCOL-1:0] byp1, byp2;
  int checks = 0, failures = 0;
  column_arbiter dut (.*);
  initial begin
    for (int it = 0; it < 4000; it++) begin
      int r, c1 [NCOL], c2 [NCOL], j1 [NCOL], j2 [NCOL], exp [NCOL];
      r = $urandom_range(0, NCOL-1);
      rnd = colmask_t'(1) << r;
      byp1 = '0; byp2 = '0;
      for (int i = 0; i < NCOL; i++) begin
        c1[i] = $urandom_range(0, NCOL-1); c2[i] = $urandom_range(0, NCOL-1);
        col1[i] = colmask_t'(1) << c1[i]; col2[i] = colmask_t'(1) << c2[i];
        busy1[i] = $urandom_range(0, 1); busy2[i] = $urandom_range(0, 1);
        j1[i] = (i > 0 && $urandom_range(0, 2) == 0) ? $urandom_range(0, i-1) : -1;
        j2[i] = (i > 0 && $urandom_range(0, 2) == 0) ? $urandom_range(0, i-1) : -1;
        if (j1[i] >= 0) begin byp1[i][j1[i]] = 1; busy1[i] = 1; end
        if (j2[i] >= 0) begin byp2[i][j2[i]] = 1; busy2[i] = 1; end
      end
      for (int i = 0; i < NCOL; i++) begin
        int p1, p2;
        p1 = (j1[i] >= 0) ? exp[j1[i]] : c1[i];
        p2 = (j2[i] >= 0) ? exp[j2[i]] : c2[i];
        if (busy1[i])      exp[i] = (p1 + 1) % NCOL;
        else if (busy2[i]) exp[i] = (p2 + 1) % NCOL;
        else               exp[i] = (r + i + 1) % NCOL;
      end
      #1;
      for (int i = 0; i < NCOL; i++) begin
        checks++;
        if (req[i] !== colmask_t'(1) << exp[i]) begin
          failures++;
          if (failures < 5) $display("lane %0d: got %b want col %0d", i, req[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
