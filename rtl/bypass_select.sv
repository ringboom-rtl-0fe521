// bypass_select: operand selection in front of one execution operand register.
//
// The operand register of a column takes its 64-bit value from one of four
// paths: the register-file read port that was allocated to it, the single-cycle
// ALU bypass from the previous column (that ALU's combinational result), the
// previous column's fast writeback crossbar output, or the load-hit bypass.
// The number of paths does not grow with the number of columns. The path is
// chosen by comparing the operand tag with the tag carried by each bypass
// path; the register-file value is used when none matches. The zero register
// reads as zero. The selected value is captured at the clock edge when `en`
// is set. `src` reports the path used (0 regfile, 1 ALU, 2 crossbar, 3 load).
//
// Follows the design: the four operand sources (register file, previous
// column's ALU, previous column's fast writeback output, load hit). Own choice:
// the priority among sources.
module bypass_select
  import rb_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  preg_t      tag,
  input  word_t      rf_data,
  input  wake_t      alu_tag,
  input  word_t      alu_data,
  input  wake_t      xbar_tag,
  input  word_t      xbar_data,
  input  wake_t      load_tag,
  input  word_t      load_data,
  output logic [1:0] src,
  output word_t      operand
);

  word_t sel;

  always_comb begin
    if (tag == '0)                                  begin sel = '0;        src = 2'd0; end
    else if (alu_tag.valid && alu_tag.tag == tag)   begin sel = alu_data;  src = 2'd1; end
    else if (xbar_tag.valid && xbar_tag.tag == tag) begin sel = xbar_data; src = 2'd2; end
    else if (load_tag.valid && load_tag.tag == tag) begin sel = load_data; src = 2'd3; end
    else                                            begin sel = rf_data;   src = 2'd0; end
  end

  always_ff @(posedge clk)
    if (en) operand <= sel;

endmodule
