// tb_dispatch_xbar: random bundles with random column steering and random
// issue-queue room. Each column's ports must receive that column's first
// DISP_PER_Q micro-ops in bundle order, and the bundle fires only when every
// queue has room for all it gets.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_dispatch_xbar;
  import rb_pkg::*;
  localparam int W = 8, D = 2;
  logic in_valid, fire; logic [W-1:0] in_v; ren_uop_t [W-1:0] in_uop;
  logic [NCOL-1:0][1:0] iq_room; logic [NCOL-1:0][D-1:0] q_v; ren_uop_t [NCOL-1:0][D-1:0] q_uop;
  int checks = 0, failures = 0, fires = 0;
  dispatch_xbar #(.W(W), .DISP_PER_Q(D)) dut (.*);
  initial begin
    for (int t = 0; t < 5000; t++) begin
      ren_uop_t lst [NCOL][$]; bit efire;
      in_valid = $urandom_range(0, 3) != 0; in_v = W'($urandom());
      for (int i = 0; i < W; i++) begin
        in_uop[i] = '0; in_uop[i].col = col_t'($urandom()); in_uop[i].pdst = preg_t'($urandom());
        in_uop[i].rob_idx = robidx_t'(i);
      end
      for (int c = 0; c < NCOL; c++) iq_room[c] = 2'($urandom_range(0, 2));
      #1;
      for (int c = 0; c < NCOL; c++) lst[c].delete();
      for (int i = 0; i < W; i++) if (in_v[i]) lst[in_uop[i].col].push_back(in_uop[i]);
      efire = in_valid;
      for (int c = 0; c < NCOL; c++) if ((lst[c].size() > D ? D : lst[c].size()) > iq_room[c]) efire = 0;
      checks++;
      if (fire !== efire) failures++;
      fires += efire;
      for (int c = 0; c < NCOL; c++)
        for (int p = 0; p < D; p++) begin
          checks++;
          if (q_v[c][p] !== (efire && p < lst[c].size())) failures++;
          else if (q_v[c][p] && q_uop[c][p] !== lst[c][p]) failures++;
        end
      #9;
    end
    $display("bundles fired %0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
