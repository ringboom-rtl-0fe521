// tb_mispredict_sel: random sets of mispredicting branches with distinct ROB
// indices inside a random in-flight window (up to a full ROB); the grant must
// be one-hot and name the requester nearest the ROB head, i.e. the oldest in
// program order.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_mispredict_sel;
  import rb_pkg::*;
  localparam int N = NCOL;
  logic [N-1:0] v, sel; robidx_t [N-1:0] rob; robidx_t head, out_rob; logic out_v;
  int checks = 0, failures = 0;
  mispredict_sel #(.N(N)) dut (.*);
  initial begin
    for (int t = 0; t < 20000; t++) begin
      int cnt, best, bage; int used [$];
      head = robidx_t'($urandom_range(0, 127)); cnt = $urandom_range(N, 128);
      used.delete();
      for (int i = 0; i < N; i++) begin
        int a;
        do a = $urandom_range(0, cnt - 1); while (a inside {used});   // age from head
        used.push_back(a);
        v[i] = $urandom_range(0, 1); rob[i] = robidx_t'(head + a);
      end
      #1;
      best = -1; bage = 1000;
      for (int i = 0; i < N; i++) if (v[i] && used[i] < bage) begin best = i; bage = used[i]; end
      checks += 3;
      if (out_v !== (best >= 0)) failures++;
      if (sel !== (best >= 0 ? N'(1) << best : '0)) begin failures++; if (failures < 5) $display("sel %b best %0d", sel, best); end
      if (best >= 0 && out_rob !== rob[best]) failures++;
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
