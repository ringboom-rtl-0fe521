// tb_mul_unit: one random multiply per cycle; each product, destination and
// ROB index must appear exactly LAT-1 clock edges after it entered.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_mul_unit;
  import rb_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst = 1, flush = 0;
  logic in_v, out_v, in_we, out_we; word_t a, b, y; preg_t in_pdst, out_pdst;
  robidx_t in_rob, out_rob; col_t in_col, out_col;
  int checks = 0, failures = 0;
  mul_unit #(.LAT(LAT)) dut (.*);
  always #5 clk = ~clk;
  typedef struct { logic v; word_t p; preg_t d; robidx_t r; col_t c; } e_t;
  e_t hist [$];
  initial begin
    in_v = 0; a = 0; b = 0; in_pdst = 0; in_rob = 0; in_we = 0; in_col = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (hist.size() == LAT - 1) begin
        e_t e;
        e = hist.pop_front();
        checks++;
        if (out_v !== e.v || (e.v && (y !== e.p || out_pdst !== e.d || out_rob !== e.r || out_col !== e.c))) begin
          failures++; if (failures < 5) $display("cycle %0d got v%0d %h want v%0d %h", i, out_v, y, e.v, e.p);
        end
      end
      in_v = $urandom_range(0, 3) != 0; a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      in_pdst = preg_t'($urandom()); in_rob = robidx_t'($urandom()); in_col = col_t'($urandom()); in_we = 1;
      hist.push_back('{in_v, a * b, in_pdst, in_rob, in_col});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
