// Operand Count ROM of the pre-translation stage.
//
// Gives the length in bytes (opcode plus operands) of every fixed-length
// JVM instruction, as defined by the JVM instruction set; the
// pre-translator subtracts one to get the number of operand bytes that
// follow. The variable-length bytecodes (tableswitch, lookupswitch, wide)
// are given length 1; this processor does not run them.
//
// Purely combinational.
module opcnt_rom (
  input  logic [7:0] bytecode,
  output logic [2:0] len
);

  always_comb begin
    unique casez (bytecode)
      8'h10, 8'h12,                                  // bipush, ldc
      8'h15, 8'h16, 8'h17, 8'h18, 8'h19,             // iload..aload
      8'h36, 8'h37, 8'h38, 8'h39, 8'h3a,             // istore..astore
      8'ha9, 8'hbc:                                  // ret, newarray
        len = 3'd2;
      8'h11, 8'h13, 8'h14, 8'h84,                    // sipush, ldc_w, ldc2_w, iinc
      8'h99, 8'h9a, 8'h9b, 8'h9c, 8'h9d, 8'h9e,      // if<cond>
      8'h9f, 8'ha0, 8'ha1, 8'ha2, 8'ha3, 8'ha4,      // if_icmp<cond>
      8'ha5, 8'ha6, 8'ha7, 8'ha8,                    // if_acmp<cond>, goto, jsr
      8'hb2, 8'hb3, 8'hb4, 8'hb5,                    // get/put static/field
      8'hb6, 8'hb7, 8'hb8,                           // invokevirtual/special/static
      8'hbb, 8'hbd, 8'hc0, 8'hc1, 8'hc6, 8'hc7:      // new, anewarray, checkcast, instanceof, ifnull, ifnonnull
        len = 3'd3;
      8'hc5:                                         // multianewarray
        len = 3'd4;
      8'hb9, 8'hba, 8'hc8, 8'hc9:                    // invokeinterface, invokedynamic, goto_w, jsr_w
        len = 3'd5;
      default:
        len = 3'd1;
    endcase
  end

endmodule
