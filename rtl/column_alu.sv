// column_alu: the single-cycle integer ALU replicated in every column.
//
// Add, subtract, logic, shifts (6-bit shift amount) and signed/unsigned
// set-less-than on XLEN-bit operands. Combinational; its result feeds the
// column's fast writeback crossbar input and the single-cycle bypass path of
// the next column. Branch micro-ops (BEQ, BNE, BLT, BGE) compare the two
// operands and report the outcome on `taken`; their `y` is not written
// anywhere. The operation set is this implementation's choice.
//
// Follows the design: an identical single-cycle ALU in every column, which
// also resolves branches. Own choice: the operation set.
module column_alu
  import rb_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y,
  output logic  taken   // branch outcome (branch micro-ops only)
);

  always_comb begin
    case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_SRA:  y = word_t'($signed(a) >>> b[5:0]);
      OP_SLT:  y = word_t'($signed(a) < $signed(b));
      OP_SLTU: y = word_t'(a < b);
      default: y = a + b;
    endcase
    case (op)
      OP_BEQ:  taken = a == b;
      OP_BNE:  taken = a != b;
      OP_BLT:  taken = $signed(a) < $signed(b);
      OP_BGE:  taken = $signed(a) >= $signed(b);
      default: taken = 1'b0;
    endcase
  end

endmodule
