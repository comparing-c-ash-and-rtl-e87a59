// function_unit: the arithmetic of the ALU ("fu").
//
// Combinational: y = a + b, a - b or a * b as op selects. Operands and result
// are 16-bit two's complement words; the result keeps the low 16 bits, so it
// wraps the way 16-bit integer arithmetic does. The three operations follow
// the design; the wrap-around and the opcode encoding (dfp_pkg::op_t) are this
// implementation's reading. An opcode outside the three gives 0.
module function_unit
  import dfp_pkg::*;
(
  input  op_t   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = word_t'(a * b);
      default: y = '0;
    endcase
  end

endmodule
