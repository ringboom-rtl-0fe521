// tb_column_alu: random operands for every ALU operation, compared with a
// reference written with plain SystemVerilog operators; branch micro-ops are
// checked for their taken/not-taken outcome.
//
// The rules checked are those of the design described above; the stimulus mix,
// the reference model and the run lengths are this testbench's own choices.
module tb_column_alu;
  import rb_pkg::*;
  op_e op; word_t a, b, y; logic taken;
  int checks = 0, failures = 0;
  column_alu dut (.op, .a, .b, .y, .taken);
  function automatic word_t refm(op_e o, word_t x, word_t z);
    case (o)
      OP_ADD: return x + z;  OP_SUB: return x - z;  OP_AND: return x & z;
      OP_OR: return x | z;   OP_XOR: return x ^ z;
      OP_SLL: return x << z[5:0];  OP_SRL: return x >> z[5:0];
      OP_SRA: return word_t'($signed(x) >>> z[5:0]);
      OP_SLT: return ($signed(x) < $signed(z)) ? 64'd1 : 64'd0;
      OP_SLTU: return (x < z) ? 64'd1 : 64'd0;
      default: return x + z;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 5000; i++) begin
      op = (i % 4 == 3) ? op_e'($urandom_range(int'(OP_BEQ), int'(OP_BGE))) : op_e'($urandom_range(0, 9));
      a = {$urandom(), $urandom()};
      b = (i % 3 == 0) ? word_t'($urandom_range(0, 70)) : {$urandom(), $urandom()};
      if (i % 7 == 0) b = a;
      #1;
      checks++;
      if (is_br(op)) begin
        logic t;
        case (op)
          OP_BEQ: t = a == b;  OP_BNE: t = a != b;
          OP_BLT: t = $signed(a) < $signed(b);
          default: t = !($signed(a) < $signed(b));
        endcase
        if (taken !== t) failures++;
      end else if (taken !== 1'b0 || y !== refm(op, a, b)) begin
        failures++;
        if (failures < 5) $display("op %s a %h b %h: got %h", op.name(), a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
