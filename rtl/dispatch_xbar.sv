// dispatch_xbar: the dispatch crossbar that hands the micro-ops of one bundle
// to the per-column issue queues.
//
// Slots of the bundle are in program order; each carries its target column.
// Issue queue c gets, on its DISP_PER_Q write ports, the first DISP_PER_Q
// valid micro-ops of the bundle steered to column c, oldest on port 0. The
// rename stage guarantees that no column gets more than DISP_PER_Q. The bundle
// is dispatched as a whole (`fire`) only when every queue has room for what it
// gets. Combinational.
//
// Follows the design: a crossbar feeding each queue up to two micro-ops per
// cycle. Own choice: all-or-nothing dispatch of a bundle.
module dispatch_xbar
  import rb_pkg::*;
#(
  parameter int W          = 2*NCOL,
  parameter int DISP_PER_Q = 2
) (
  input  logic                                  in_valid,
  input  logic     [W-1:0]                      in_v,
  input  ren_uop_t [W-1:0]                      in_uop,
  input  logic     [NCOL-1:0][$clog2(DISP_PER_Q+1)-1:0] iq_room,  // free slots, saturated
  output logic                                  fire,
  output logic     [NCOL-1:0][DISP_PER_Q-1:0]   q_v,
  output ren_uop_t [NCOL-1:0][DISP_PER_Q-1:0]   q_uop
);

  always_comb begin
    int n [NCOL];
    logic ok;
    q_v = '0;
    q_uop = '0;
    for (int c = 0; c < NCOL; c++) n[c] = 0;
    for (int i = 0; i < W; i++)
      if (in_v[i]) begin
        for (int c = 0; c < NCOL; c++)
          if (in_uop[i].col == col_t'(c) && n[c] < DISP_PER_Q) begin
            q_v[c][n[c]]   = 1'b1;
            q_uop[c][n[c]] = in_uop[i];
            n[c]++;
          end
      end
    ok = 1'b1;
    for (int c = 0; c < NCOL; c++) if (n[c] > int'(iq_room[c])) ok = 1'b0;
    fire = in_valid && ok;
    if (!fire) q_v = '0;
  end

endmodule
