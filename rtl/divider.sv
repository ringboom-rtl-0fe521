// divider: the shared iterative (unpipelined) signed integer divider.
//
// Restoring division on the operand magnitudes, one quotient bit per cycle, so
// the unit is busy for XLEN cycles per divide, then the signs are applied.
// Division by zero returns all ones and the overflow case (most negative value
// divided by -1) returns the dividend, the usual RISC-V conventions. The result
// waits in the unit until the slow writeback crossbar accepts it (`ack`), since
// the divider's latency is not predictable by the issue logic. `busy` is high
// from `start` until the result has been accepted.
//
// Follows the design: a shared iterative divider busy for up to 64 cycles, on
// the slow writeback crossbar. Own choices: the radix-2 algorithm and the
// result conventions. Bit 64 of the partial remainder is only needed inside the
// subtraction and lint reports it as unused; it is kept so the compare stays
// one expression.
module divider
  import rb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    flush,
  input  logic    start,
  input  word_t   a,        // dividend
  input  word_t   b,        // divisor
  input  preg_t   in_pdst,
  input  robidx_t in_rob,
  output logic    busy,
  output logic    done,     // result valid, waiting for ack
  output word_t   q,
  output preg_t   out_pdst,
  output robidx_t out_rob,
  input  logic    ack
);

  typedef enum logic [1:0] { IDLE, RUN, DONE } st_e;
  st_e st;
  logic [$clog2(XLEN+1)-1:0] cnt;
  word_t dvd, dvs, quo;
  logic [XLEN:0] rem;
  logic neg;

  assign busy = st != IDLE;
  assign done = st == DONE;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      st <= IDLE;
      cnt <= '0;
    end else begin
      case (st)
        IDLE: if (start) begin
          dvd <= a[XLEN-1] ? -a : a;
          dvs <= b[XLEN-1] ? -b : b;
          neg <= (a[XLEN-1] ^ b[XLEN-1]) && (b != '0);
          rem <= '0;
          quo <= '0;
          cnt <= '0;
          out_pdst <= in_pdst;
          out_rob  <= in_rob;
          st <= RUN;
        end
        RUN: begin
          logic [XLEN:0] r;
          r = {rem[XLEN-1:0], dvd[XLEN-1]};
          dvd <= dvd << 1;
          if (r >= {1'b0, dvs}) begin
            rem <= r - {1'b0, dvs};
            quo <= {quo[XLEN-2:0], 1'b1};
          end else begin
            rem <= r;
            quo <= {quo[XLEN-2:0], 1'b0};
          end
          cnt <= cnt + 1'b1;
          if (int'(cnt) == XLEN-1) st <= DONE;
        end
        DONE: if (ack) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign q = neg ? -quo : quo;

endmodule
