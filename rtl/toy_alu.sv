// toy_alu: the ALU used in the execution step of the toy pipeline.
//
// Two operations, as the execution steps of the toy ISA require:
//   ALU_ADD  y = in1 + in2                  (add, addi)
//   ALU_NZ   y = 1 if in1 != 0, 0 otherwise (if: compare the first input with 0)
// The operands come from the two ALU input registers loaded at the operand
// fetch step. Purely combinational; the result is captured by the output save
// step register. The addition wraps modulo 2**XLEN (overflow is not treated
// in the source material; wrapping is this design's choice).
module toy_alu
  import toy_pkg::*;
(
  input  alu_op_e op,
  input  word_t   in1,
  input  word_t   in2,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = in1 + in2;
      ALU_NZ:  y = (in1 != '0) ? word_t'(1) : word_t'(0);
      default: y = '0;
    endcase
  end

endmodule
