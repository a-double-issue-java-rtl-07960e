// Integer ALU of the execute stage.
//
// Computes the JVM int operations on the two stack operands: opd1 is the
// deeper operand (value1 in JVM terms, next-on-stack) and opd2 the top of
// stack (value2). Shifts use the low five bits of opd2, as the JVM
// specifies. imul keeps the low 32 bits of the product. Combinational.
// There is one ALU, so at most one ALU operation issues per cycle; the
// operation set is this implementation's choice of the JVM int bytecodes.
module jp_alu
  import jp_pkg::*;
(
  input  uop_e  op,
  input  word_t opd1,
  input  word_t opd2,
  output word_t y
);

  always_comb begin
    unique case (op)
      U_ADD:   y = opd1 + opd2;
      U_SUB:   y = opd1 - opd2;
      U_MUL:   y = opd1 * opd2;
      U_AND:   y = opd1 & opd2;
      U_OR:    y = opd1 | opd2;
      U_XOR:   y = opd1 ^ opd2;
      U_SHL:   y = opd1 << opd2[4:0];
      U_SHR:   y = word_t'($signed(opd1) >>> opd2[4:0]);
      U_USHR:  y = opd1 >> opd2[4:0];
      default: y = opd1;
    endcase
  end

endmodule
