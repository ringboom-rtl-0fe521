// tb_slow_wb_xbar: random load and divider results. A load always writes its
// bank; the divider is accepted only if its bank's slow port is free of a load
// and the bank's fast port is idle; register 0 is never written.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_slow_wb_xbar;
  import rb_pkg::*;
  logic ld_v, div_v, div_ack; preg_t ld_pdst, div_pdst; word_t ld_data, div_data;
  logic [NCOL-1:0] fast_busy, we; preg_t [NCOL-1:0] tag; word_t [NCOL-1:0] data;
  int checks = 0, failures = 0, acks = 0;
  slow_wb_xbar dut (.*);
  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic eack;
      ld_v = $urandom_range(0, 1); div_v = $urandom_range(0, 1);
      ld_pdst = preg_t'($urandom()); div_pdst = preg_t'($urandom());
      if (it % 50 == 0) div_pdst = '0;
      ld_data = {$urandom(), $urandom()}; div_data = {$urandom(), $urandom()};
      fast_busy = NCOL'($urandom());
      #1;
      eack = div_v && (div_pdst == 0 || (!(ld_v && bank_of(ld_pdst) == bank_of(div_pdst)) && !fast_busy[bank_of(div_pdst)]));
      checks++;
      if (div_ack !== eack) failures++;
      acks += eack;
      for (int b = 0; b < NCOL; b++) begin
        checks++;
        if (ld_v && ld_pdst != 0 && bank_of(ld_pdst) == col_t'(b)) begin
          if (!we[b] || tag[b] !== ld_pdst || data[b] !== ld_data) failures++;
        end else if (eack && div_pdst != 0 && bank_of(div_pdst) == col_t'(b)) begin
          if (!we[b] || tag[b] !== div_pdst || data[b] !== div_data) failures++;
        end else if (we[b]) failures++;
      end
    end
    $display("divider accepted %0d times", acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
