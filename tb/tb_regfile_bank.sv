// tb_regfile_bank: random writes on both write ports (never to the same
// register) and reads on all read ports, against an array model; a write is
// visible from the next cycle.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_regfile_bank;
  import rb_pkg::*;
  localparam int RD = 3;
  logic clk = 0, rst = 1;
  logic [RD-1:0][4:0] raddr; word_t [RD-1:0] rdata;
  logic [1:0] we; logic [1:0][4:0] waddr; word_t [1:0] wdata;
  word_t m [32];
  int checks = 0, failures = 0;
  regfile_bank #(.REGS(32), .RD(RD)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int r = 0; r < 32; r++) m[r] = '0;
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < RD; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p]]) begin failures++; if (failures < 5) $display("port %0d r%0d got %h want %h", p, raddr[p], rdata[p], m[raddr[p]]); end
      end
      we = 2'($urandom_range(0, 3));
      waddr[0] = 5'($urandom_range(0, 31));
      waddr[1] = waddr[0] + 5'($urandom_range(1, 31));
      wdata[0] = {$urandom(), $urandom()}; wdata[1] = {$urandom(), $urandom()};
      for (int p = 0; p < RD; p++) raddr[p] = 5'($urandom_range(0, 31));
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w]) m[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
