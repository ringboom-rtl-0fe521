// tb_divider: random signed divides, including division by zero and the
// overflow case, against the RISC-V rules; checks that `busy` rises at once,
// that the result is ready XLEN+1 edges after start, that it is held until
// acknowledged and that the divider is free again after the acknowledge.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_divider;
  import rb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic start, busy, done, ack; word_t a, b, q; preg_t in_pdst, out_pdst; robidx_t in_rob, out_rob;
  int checks = 0, failures = 0;
  divider dut (.*);
  always #5 clk = ~clk;
  function automatic word_t refd(word_t x, word_t y);
    if (y == 0) return '1;
    if (x == 64'h8000_0000_0000_0000 && y == '1) return x;
    return word_t'($signed(x) / $signed(y));
  endfunction
  initial begin
    start = 0; ack = 0; a = 0; b = 0; in_pdst = 0; in_rob = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      int n;
      word_t x, y;
      x = {$urandom(), $urandom()};
      y = (i % 4 == 0) ? word_t'($urandom_range(1, 1000)) : {$urandom(), $urandom()};
      if (i % 3 == 0) y = -y;
      if (i == 5) y = 0;
      if (i == 6) begin x = 64'h8000_0000_0000_0000; y = '1; end
      @(negedge clk);
      start = 1; a = x; b = y; in_pdst = preg_t'(i); in_rob = robidx_t'(i);
      @(negedge clk);
      start = 0;
      checks++; if (!busy) failures++;
      n = 1;
      while (!done && n < 200) begin @(negedge clk); n++; end
      checks++;
      if (n != XLEN + 1) begin failures++; $display("latency %0d", n); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++;
      if (!done || q !== refd(x, y) || out_pdst !== preg_t'(i) || out_rob !== robidx_t'(i)) begin
        failures++; if (failures < 5) $display("%h / %h: got %h want %h", x, y, q, refd(x, y));
      end
      ack = 1;
      @(negedge clk);
      ack = 0;
      checks++; if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
