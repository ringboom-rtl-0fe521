// slow_wb_xbar: slow writeback crossbar.
//
// Routes results of units whose latency the issue logic cannot predict (load
// data from the memory unit and the iterative divider) to the second, slow,
// write port of the destination bank. Loads cannot wait and always win. The
// divider result is accepted only when its bank's slow port is free of a load
// and the bank's fast port is idle in the same cycle; the latter keeps at
// most one writeback-time wakeup per bank and cycle for the next column's slow
// wakeup port. A divide that is not accepted waits in the divider.
// Combinational: the chosen writes happen at the end of the cycle.
//
// Follows the design: a slow crossbar for loads and division on a second write
// port per bank. Own choice: the divider's waiting rule.
module slow_wb_xbar
  import rb_pkg::*;
(
  input  logic                ld_v,
  input  preg_t               ld_pdst,
  input  word_t               ld_data,
  input  logic                div_v,
  input  preg_t               div_pdst,
  input  word_t               div_data,
  input  logic  [NCOL-1:0]    fast_busy,   // fast port of bank b written this cycle
  output logic                div_ack,
  output logic  [NCOL-1:0]    we,
  output preg_t [NCOL-1:0]    tag,
  output word_t [NCOL-1:0]    data
);

  always_comb begin
    col_t db;
    db = bank_of(div_pdst);
    // register 0 (x0) is never written: such results only complete
    div_ack = div_v && (div_pdst == '0 || (!(ld_v && bank_of(ld_pdst) == db) && !fast_busy[db]));
    for (int b = 0; b < NCOL; b++) begin
      we[b] = 1'b0; tag[b] = '0; data[b] = '0;
      if (ld_v && ld_pdst != '0 && bank_of(ld_pdst) == col_t'(b)) begin
        we[b] = 1'b1; tag[b] = ld_pdst; data[b] = ld_data;
      end else if (div_ack && div_pdst != '0 && db == col_t'(b)) begin
        we[b] = 1'b1; tag[b] = div_pdst; data[b] = div_data;
      end
    end
  end

endmodule
