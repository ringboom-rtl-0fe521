// tb_rf_read_arbiter: random read requests from the four ARB-stage columns.
// A reference allocator (per-bank lists of addresses, served column by column
// from a start column that advances by one every cycle) gives the expected
// grant, port and per-port address; requests for an address already read
// from the same bank share its port.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_rf_read_arbiter;
  import rb_pkg::*;
  localparam int RD = 3, PW = 2;
  logic clk = 0, rst = 1;
  logic [NCOL-1:0][1:0] req, ok; preg_t [NCOL-1:0][1:0] tag;
  logic [NCOL-1:0][1:0][PW-1:0] port;
  logic [NCOL-1:0][RD-1:0] bank_en; logic [NCOL-1:0][RD-1:0][PREG_W-COL_W-1:0] bank_addr;
  logic shared;
  int checks = 0, failures = 0, nshare = 0, nfail = 0, prev_start = 0;
  rf_read_arbiter #(.RD(RD), .SHARE(1)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    req = 0; tag = 0;
    @(posedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int q [NCOL][$];
      bit eok [NCOL][2]; int eport [NCOL][2]; bit esh;
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        for (int k = 0; k < 2; k++) begin
          req[c][k] = $urandom_range(0, 3) != 0;
          tag[c][k] = {col_t'($urandom_range(0, 1)), 5'($urandom_range(0, 5))};  // crowd two banks
        end
      #1;
      esh = 0;
      for (int b = 0; b < NCOL; b++) q[b].delete();
      checks++;
      if (t > 0 && int'(dut.start) != (prev_start + 1) % NCOL) failures++;  // start column advances every cycle
      prev_start = int'(dut.start);
      for (int o = 0; o < NCOL; o++) begin
        int c; c = (int'(dut.start) + o) % NCOL;
        for (int k = 0; k < 2; k++) begin
          eok[c][k] = 1; eport[c][k] = 0;
          if (req[c][k]) begin
            int b, hit[$];
            b = tag[c][k] >> 5;
            hit = q[b].find_first_index(x) with (x == (tag[c][k] & 31));
            if (hit.size() > 0) begin eport[c][k] = hit[0]; esh = 1; end
            else if (q[b].size() < RD) begin eport[c][k] = q[b].size(); q[b].push_back(tag[c][k] & 31); end
            else eok[c][k] = 0;
          end
        end
      end
      for (int c = 0; c < NCOL; c++)
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (ok[c][k] !== eok[c][k] || (req[c][k] && eok[c][k] && port[c][k] !== PW'(eport[c][k]))) begin
            failures++; if (failures < 6) $display("t%0d c%0d k%0d ok %b/%b port %0d/%0d", t, c, k, ok[c][k], eok[c][k], port[c][k], eport[c][k]);
          end
          nfail += !eok[c][k];
        end
      for (int b = 0; b < NCOL; b++)
        for (int p = 0; p < RD; p++) begin
          checks++;
          if (bank_en[b][p] !== (p < q[b].size()) || (p < q[b].size() && bank_addr[b][p] !== 5'(q[b][p]))) failures++;
        end
      checks++;
      if (shared !== esh) failures++;
      nshare += esh;
    end
    $display("shared cycles %0d, refused reads %0d", nshare, nfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
