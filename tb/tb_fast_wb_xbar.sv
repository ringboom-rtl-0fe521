// tb_fast_wb_xbar: random ALU results per column plus a multiplier result for
// a bank whose ALU is idle; one edge later each bank's registered output must
// carry the right source, its tag, data, ROB index and write enable.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_fast_wb_xbar;
  import rb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [NCOL-1:0] alu_v, alu_we, wb_v, wb_we; preg_t [NCOL-1:0] alu_pdst, wb_tag;
  robidx_t [NCOL-1:0] alu_rob, wb_rob; word_t [NCOL-1:0] alu_y, wb_data;
  logic shr_v, shr_we; col_t shr_bank; preg_t shr_pdst; robidx_t shr_rob; word_t shr_y;
  int checks = 0, failures = 0;
  fast_wb_xbar dut (.*);
  always #5 clk = ~clk;
  initial begin
    alu_v = 0; shr_v = 0; alu_we = 0; alu_pdst = 0; alu_rob = 0; alu_y = 0;
    shr_we = 0; shr_bank = 0; shr_pdst = 0; shr_rob = 0; shr_y = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int c = 0; c < NCOL; c++) begin
        alu_v[c] = $urandom_range(0, 1); alu_we[c] = $urandom_range(0, 1);
        alu_pdst[c] = {col_t'(c), 5'($urandom())}; alu_rob[c] = robidx_t'($urandom());
        alu_y[c] = {$urandom(), $urandom()};
      end
      shr_bank = col_t'($urandom()); shr_v = $urandom_range(0, 1) && !alu_v[shr_bank];
      shr_we = $urandom_range(0, 1); shr_pdst = {shr_bank, 5'($urandom())};
      shr_rob = robidx_t'($urandom()); shr_y = {$urandom(), $urandom()};
      @(posedge clk); #1;
      for (int b = 0; b < NCOL; b++) begin
        checks++;
        if (shr_v && shr_bank == col_t'(b)) begin
          if (!wb_v[b] || wb_we[b] !== shr_we || wb_tag[b] !== shr_pdst || wb_data[b] !== shr_y || wb_rob[b] !== shr_rob) failures++;
        end else if (wb_v[b] !== alu_v[b] || wb_we[b] !== (alu_v[b] && alu_we[b])
                     || (alu_v[b] && (wb_tag[b] !== alu_pdst[b] || wb_data[b] !== alu_y[b] || wb_rob[b] !== alu_rob[b]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
