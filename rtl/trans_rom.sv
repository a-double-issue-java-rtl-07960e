// Translation ROM of the pre-translation stage.
//
// Maps a Java bytecode to a tagged translation: a simple bytecode becomes a
// single native microcode (kind TK_ONE, data = ucode_t), a complex bytecode
// becomes the start address of a microcode sequence in ucode_rom (kind
// TK_MANY, data = address). Bytecodes this processor does not run (object,
// array, long/float/double and invocation bytecodes) map to U_ILL, which
// stops the processor. return/ireturn map to U_HALT, since method
// invocation is outside this design.
//
// kind is never TK_OPD here (so its upper bit is constant): operand bytes
// are recognised by the pre-translator's operand counter, not by this ROM.
//
// Purely combinational, one lookup per cycle. The split into one-to-one and
// one-to-many bytecodes follows the design; the supported bytecode subset
// and the microcode encoding are this implementation's own.
module trans_rom
  import jp_pkg::*;
(
  input  logic [7:0] bytecode,
  output tkind_e     kind,
  output logic [7:0] data
);

  // Start addresses of the microcode sequences in ucode_rom.
  localparam logic [7:0] SEQ_INEG   = 8'd0;
  localparam logic [7:0] SEQ_DUP_X1 = 8'd3;
  localparam logic [7:0] SEQ_DUP2   = 8'd5;
  localparam logic [7:0] SEQ_POP2   = 8'd7;

  function automatic logic [7:0] uc(uop_e op, logic [2:0] sub);
    ucode_t u;
    u.op  = op;
    u.sub = sub;
    return u;
  endfunction

  always_comb begin
    kind = TK_ONE;
    data = uc(U_ILL, 3'd0);
    unique casez (bytecode)
      8'h00: data = uc(U_NOP, 3'd0);
      8'h02, 8'h03, 8'h04, 8'h05,
      8'h06, 8'h07, 8'h08: data = uc(U_PUSHI, 3'(bytecode - 8'h02));  // iconst_m1..iconst_5
      8'h10, 8'h11:        data = uc(U_PUSHI, 3'd7);                  // bipush, sipush
      8'h15:               data = uc(U_LDL, 3'd4);                    // iload
      8'h1a, 8'h1b, 8'h1c, 8'h1d: data = uc(U_LDL, {1'b0, bytecode[1:0] - 2'd2}); // iload_0..3
      8'h36:               data = uc(U_STL, 3'd4);                    // istore
      8'h3b, 8'h3c, 8'h3d, 8'h3e: data = uc(U_STL, {1'b0, bytecode[1:0] - 2'd3}); // istore_0..3
      8'h57: data = uc(U_POP, 3'd0);
      8'h58: begin kind = TK_MANY; data = SEQ_POP2;   end
      8'h59: data = uc(U_DUP, 3'd0);
      8'h5a: begin kind = TK_MANY; data = SEQ_DUP_X1; end
      8'h5c: begin kind = TK_MANY; data = SEQ_DUP2;   end
      8'h5f: data = uc(U_SWAP, 3'd0);
      8'h60: data = uc(U_ADD, 3'd0);
      8'h64: data = uc(U_SUB, 3'd0);
      8'h68: data = uc(U_MUL, 3'd0);
      8'h74: begin kind = TK_MANY; data = SEQ_INEG;   end
      8'h78: data = uc(U_SHL, 3'd0);
      8'h7a: data = uc(U_SHR, 3'd0);
      8'h7c: data = uc(U_USHR, 3'd0);
      8'h7e: data = uc(U_AND, 3'd0);
      8'h80: data = uc(U_OR, 3'd0);
      8'h82: data = uc(U_XOR, 3'd0);
      8'h84: data = uc(U_IINC, 3'd0);
      8'h99, 8'h9a, 8'h9b, 8'h9c, 8'h9d, 8'h9e:
             data = uc(U_IF, 3'(bytecode - 8'h99));                   // ifeq..ifle
      8'h9f, 8'ha0, 8'ha1, 8'ha2, 8'ha3, 8'ha4:
             data = uc(U_IFCMP, 3'(bytecode - 8'h9f));                // if_icmpeq..if_icmple
      8'ha7: data = uc(U_GOTO, 3'd0);
      8'hac, 8'hb1: data = uc(U_HALT, 3'd0);                          // ireturn, return
      default: ;
    endcase
  end

endmodule
