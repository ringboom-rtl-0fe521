// rf_read_arbiter: read-port arbiter of the ARB stage and the register-file
// read-address crossbar.
//
// Every column's micro-op in ARB may request up to two register reads (an
// operand is only requested when it is used, is not the zero register and
// will not be bypassed). A read goes to the bank that holds the register. The
// RD ports of each bank are allocated flexibly: any request may take any free
// port of its bank, in order of a rotating column priority. With SHARE set, a
// request for a register that already got a port of its bank this cycle reuses
// that port (read sharing). A request that finds no port fails, and the
// micro-op is killed in the ARB stage.
//
// Outputs are the per-request verdict and port index, and the per-port read
// address; the core registers them into the register-read stage.
//
// Follows the design: flexible allocation of RD ports per bank, requests only
// for operands that are needed and not bypassed, read sharing. Own choice: the
// rotating column order. The per-port enable output is not used by the core's
// register file, whose read ports are always active.
module rf_read_arbiter
  import rb_pkg::*;
#(
  parameter int RD    = 3,   // read ports per bank
  parameter bit SHARE = 1'b1,
  localparam int PW   = (RD > 1) ? $clog2(RD) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic  [NCOL-1:0][1:0]        req,
  input  preg_t [NCOL-1:0][1:0]        tag,
  output logic  [NCOL-1:0][1:0]        ok,       // request granted (or not requested)
  output logic  [NCOL-1:0][1:0][PW-1:0] port,    // port of bank_of(tag) serving it
  output logic  [NCOL-1:0][RD-1:0]     bank_en,  // per bank, per port: port in use
  output logic  [NCOL-1:0][RD-1:0][PREG_W-COL_W-1:0] bank_addr,
  output logic                         shared    // a read was shared this cycle
);

  col_t start;

  int   used [NCOL];   // ports handed out per bank so far (combinational)
  logic done;

  always_comb begin
    done = 1'b0;
    ok = '1;
    port = '0;
    bank_en = '0;
    bank_addr = '0;
    shared = 1'b0;
    for (int i = 0; i < NCOL; i++) used[i] = 0;
    for (int o = 0; o < NCOL; o++) begin   // columns in ring order from `start` (NCOL is a power of two)
      for (int k = 0; k < 2; k++)
        if (req[start + col_t'(o)][k])
          for (int bb = 0; bb < NCOL; bb++)
            if (bank_of(tag[start + col_t'(o)][k]) == col_t'(bb)) begin
              done = 1'b0;
              if (SHARE)
                for (int p = 0; p < RD; p++)
                  if (!done && p < used[bb] && bank_addr[bb][p] == tag[start + col_t'(o)][k][PREG_W-COL_W-1:0]) begin
                    port[start + col_t'(o)][k] = PW'(p);
                    done = 1'b1;
                    shared = 1'b1;
                  end
              if (!done) begin
                if (used[bb] < RD) begin
                  for (int p = 0; p < RD; p++)
                    if (p == used[bb]) begin
                      port[start + col_t'(o)][k] = PW'(p);
                      bank_en[bb][p] = 1'b1;
                      bank_addr[bb][p] = tag[start + col_t'(o)][k][PREG_W-COL_W-1:0];
                    end
                  used[bb] = used[bb] + 1;
                end else begin
                  ok[start + col_t'(o)][k] = 1'b0;
                end
              end
            end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) start <= '0;
    else     start <= start + col_t'(1);
  end

endmodule
