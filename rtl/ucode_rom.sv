// Microcode sequence ROM.
//
// Holds the native microcode sequences of the one-to-many bytecodes. The
// translation ROM gives the start address of a sequence; the fetch stage
// reads two consecutive entries per cycle (ports a and b) so that two
// microcodes of a sequence can issue together. The last microcode of a
// sequence carries last = 1.
//
//   0 ineg    : PUSHI 0, SWAP, SUB          (x -> 0 - x)
//   3 dup_x1  : SWAP, OVER                  (a b -> b a b)
//   5 dup2    : OVER, OVER                  (a b -> a b a b)
//   7 pop2    : POP, POP
//
// Which bytecodes are complex and the sequences themselves are this
// implementation's choice. Combinational read.
module ucode_rom
  import jp_pkg::*;
#(
  parameter int AW = 4
) (
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output useq_t         data_a,
  output useq_t         data_b
);

  function automatic useq_t rom(logic [AW-1:0] a);
    useq_t e;
    e = '{last: 1'b1, uc: '{op: U_ILL, sub: 3'd0}};
    unique case (a)
      AW'(0): e = '{last: 1'b0, uc: '{op: U_PUSHI, sub: 3'd1}};
      AW'(1): e = '{last: 1'b0, uc: '{op: U_SWAP,  sub: 3'd0}};
      AW'(2): e = '{last: 1'b1, uc: '{op: U_SUB,   sub: 3'd0}};
      AW'(3): e = '{last: 1'b0, uc: '{op: U_SWAP,  sub: 3'd0}};
      AW'(4): e = '{last: 1'b1, uc: '{op: U_OVER,  sub: 3'd0}};
      AW'(5): e = '{last: 1'b0, uc: '{op: U_OVER,  sub: 3'd0}};
      AW'(6): e = '{last: 1'b1, uc: '{op: U_OVER,  sub: 3'd0}};
      AW'(7): e = '{last: 1'b0, uc: '{op: U_POP,   sub: 3'd0}};
      AW'(8): e = '{last: 1'b1, uc: '{op: U_POP,   sub: 3'd0}};
      default: ;
    endcase
    return e;
  endfunction

  assign data_a = rom(addr_a);
  assign data_b = rom(addr_b);

endmodule
