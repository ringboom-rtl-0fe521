// tb_bypass_select: random tags on the three bypass paths; the operand
// register must hold the path whose tag matches (ALU, then crossbar, then
// load), the register-file value otherwise, and zero for register 0, one
// clock after selection.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_bypass_select;
  import rb_pkg::*;
  logic clk = 0, en;
  preg_t tag; word_t rf_data, alu_data, xbar_data, load_data, operand;
  wake_t alu_tag, xbar_tag, load_tag; logic [1:0] src;
  int checks = 0, failures = 0;
  bypass_select dut (.*);
  always #5 clk = ~clk;
  initial begin
    en = 1;
    for (int i = 0; i < 3000; i++) begin
      word_t exp;
      @(negedge clk);
      tag = preg_t'($urandom_range(0, 7));
      rf_data = {$urandom(), $urandom()}; alu_data = {$urandom(), $urandom()};
      xbar_data = {$urandom(), $urandom()}; load_data = {$urandom(), $urandom()};
      alu_tag  = '{valid: 1'($urandom_range(0, 1)), tag: preg_t'($urandom_range(0, 7))};
      xbar_tag = '{valid: 1'($urandom_range(0, 1)), tag: preg_t'($urandom_range(0, 7))};
      load_tag = '{valid: 1'($urandom_range(0, 1)), tag: preg_t'($urandom_range(0, 7))};
      if (tag == 0) exp = '0;
      else if (alu_tag.valid && alu_tag.tag == tag) exp = alu_data;
      else if (xbar_tag.valid && xbar_tag.tag == tag) exp = xbar_data;
      else if (load_tag.valid && load_tag.tag == tag) exp = load_data;
      else exp = rf_data;
      @(posedge clk); #1;
      checks++;
      if (operand !== exp) begin failures++; if (failures < 5) $display("got %h want %h", operand, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
