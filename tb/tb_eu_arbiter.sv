// tb_eu_arbiter: random ARB-stage traffic. ALU micro-ops always pass; each
// shared unit grants at most one column, the first requester in rotating
// order starting after that unit's last winner; a divide is cancelled while
// the divider is busy.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_eu_arbiter;
  import rb_pkg::*;
  logic clk = 0, rst = 1;
  logic [NCOL-1:0] valid, taken, ok, div_cancel; unit_e [NCOL-1:0] unit; logic div_busy;
  int ptr [4];
  int checks = 0, failures = 0;
  eu_arbiter dut (.*);
  always #5 clk = ~clk;
  initial begin
    valid = 0; unit = '{default: U_ALU}; div_busy = 0; taken = 0;
    for (int u = 0; u < 4; u++) ptr[u] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [NCOL-1:0] eok, ecan;
      @(negedge clk);
      valid = NCOL'($urandom());
      for (int c = 0; c < NCOL; c++) unit[c] = unit_e'($urandom_range(0, 3));
      div_busy = $urandom_range(0, 1);
      #1;
      eok = 0; ecan = 0;
      for (int c = 0; c < NCOL; c++) if (valid[c] && unit[c] == U_ALU) eok[c] = 1;
      for (int u = 1; u < 4; u++)
        for (int o = 0; o < NCOL; o++) begin
          int c;
          c = (ptr[u] + o) % NCOL;
          if (valid[c] && unit[c] == unit_e'(u)) begin
            if (u == int'(U_DIV) && div_busy) ecan[c] = 1;
            else begin eok[c] = 1; break; end
          end
        end
      checks++;
      if (ok !== eok || div_cancel !== ecan) begin
        failures++; if (failures < 5) $display("t%0d ok %b want %b cancel %b want %b", t, ok, eok, div_cancel, ecan);
      end
      taken = ok & NCOL'($urandom());
      #1;
      for (int c = 0; c < NCOL; c++) if (taken[c] && unit[c] != U_ALU) ptr[unit[c]] = (c + 1) % NCOL;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
