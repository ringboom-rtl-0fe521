// tb_wb_arbiter: a multiply passing ARB at cycle t takes its bank's fast write
// port at t+SHARED_OFS; an ALU micro-op arbitrating at t' needs it at
// t'+ALU_OFS. Random traffic is checked against a slot-occupancy model.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_wb_arbiter;
  import rb_pkg::*;
  localparam int AO = 3, SO = 5;
  logic clk = 0, rst = 1, flush = 0;
  logic [NCOL-1:0] alu_req, alu_ok; logic shr_take; col_t shr_bank;
  bit busy [int][NCOL];
  int checks = 0, failures = 0, denied = 0;
  wb_arbiter #(.ALU_OFS(AO), .SHARED_OFS(SO)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    alu_req = 0; shr_take = 0; shr_bank = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      alu_req = NCOL'($urandom());
      shr_take = $urandom_range(0, 1); shr_bank = col_t'($urandom());
      #1;
      for (int c = 0; c < NCOL; c++) begin
        bit exp;
        exp = !(alu_req[c] && busy.exists(t + AO) && busy[t + AO][c]);
        checks++;
        if (alu_ok[c] !== exp) begin failures++; if (failures < 5) $display("t%0d c%0d ok %b", t, c, alu_ok[c]); end
        denied += !exp;
      end
      if (shr_take) busy[t + SO][shr_bank] = 1;
      @(posedge clk);
    end
    $display("ALU requests denied %0d", denied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
