// Shared types and constants of the double-issue Java processor.
//
// The processor runs Java bytecode by translating each bytecode into one
// native "microcode" (one-to-one bytecodes) or into the address of a short
// microcode sequence held in a ROM (one-to-many bytecodes). The types below
// describe a pre-translated byte (tentry_t), a microcode (ucode_t), an entry
// of the microcode sequence ROM (useq_t), a fetched instruction slot (slot_t)
// and the pair of decoded instructions handed to the execute stage (xpair_t).
//
// The three-way classification of bytes (one-to-one, one-to-many, operand)
// follows the pre-translation scheme of the design. The microcode encoding,
// the widths and the memory sizes are this implementation's own choices.
package jp_pkg;

  localparam int PC_W   = 16;   // bytecode address width (JVM methods are < 64 KiB)
  localparam int SA_W   = 10;   // stack memory word address width (2 banks x 512 words)
  localparam int WORD_W = 32;   // Java int

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [SA_W-1:0]   saddr_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Class of a pre-translated byte.
  typedef enum logic [1:0] {
    TK_ONE  = 2'd0,   // bytecode mapped to a single microcode
    TK_MANY = 2'd1,   // bytecode mapped to a microcode sequence (data = ROM address)
    TK_OPD  = 2'd2    // operand byte of the preceding bytecode (data = the byte)
  } tkind_e;

  // One pre-translated byte. rem = operand bytes that follow this byte.
  typedef struct packed {
    tkind_e     kind;
    logic [7:0] data;
    logic [2:0] rem;
  } tentry_t;

  // Native operations.
  typedef enum logic [4:0] {
    U_NOP, U_HALT, U_ILL,
    U_PUSHI,            // push an immediate (iconst_x, bipush, sipush)
    U_LDL, U_STL,       // load / store a local variable
    U_IINC,             // local += signed constant
    U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR,
    U_POP, U_DUP, U_SWAP, U_OVER,
    U_GOTO,             // unconditional relative branch
    U_IF,               // compare TOS with zero, pop, branch
    U_IFCMP             // compare NOS with TOS, pop both, branch
  } uop_e;

  // Microcode: operation plus a 3-bit sub field.
  //   U_PUSHI : 0..6 -> constant sub-1; 7 -> constant from operand bytes
  //   U_LDL/U_STL : sub[2]=0 -> index sub[1:0]; sub[2]=1 -> index from operand byte
  //   U_IF/U_IFCMP: condition, 0 eq, 1 ne, 2 lt, 3 ge, 4 gt, 5 le
  typedef struct packed {
    uop_e       op;
    logic [2:0] sub;
  } ucode_t;

  // Entry of the microcode sequence ROM; last marks the end of a sequence.
  typedef struct packed {
    logic   last;
    ucode_t uc;
  } useq_t;

  // Instruction slot presented by fetch to decode.
  typedef struct packed {
    logic        valid;
    ucode_t      uc;
    logic [15:0] opd;    // operand bytes, first operand byte in [15:8]
    logic [2:0]  nopd;   // number of operand bytes
    pc_t         pc;     // address of the bytecode
  } slot_t;

  // Decoded instruction as seen by the execute stage.
  typedef struct packed {
    logic       valid;
    uop_e       op;
    logic [2:0] cond;
    word_t      imm;     // D_tmp: pushed constant, iinc constant or branch target
    saddr_t     laddr;   // local variable address
    logic       lport;   // read port (0: port 1, 1: port 2) returning the local
  } xslot_t;

  // Decoded pair, registered between decode and execute.
  typedef struct packed {
    logic   valid;
    xslot_t s1;
    xslot_t s2;
    saddr_t sp;          // stack pointer (address of top memory word) before the pair
    logic   m0port;      // read port returning memory word sp   (refill)
    logic   m1port;      // read port returning memory word sp-1 (refill)
  } xpair_t;

  // Stack behaviour of an operation, used by decode for pairing.
  typedef struct packed {
    logic [1:0]        depth;    // stack entries the operation reads
    logic signed [2:0] delta;    // net change of the stack depth
    logic              rd_local;
    logic              wr_local;
    logic              is_alu;   // needs the (single) ALU
    logic              is_ctrl;  // branch, halt or illegal: ends a pair
  } opinfo_t;

  function automatic opinfo_t op_info(uop_e op);
    opinfo_t i;
    i = '0;
    unique case (op)
      U_PUSHI:                       begin i.delta = 3'sd1; end
      U_LDL:                         begin i.delta = 3'sd1; i.rd_local = 1'b1; end
      U_STL:                         begin i.depth = 2'd1; i.delta = -3'sd1; i.wr_local = 1'b1; end
      U_IINC:                        begin i.rd_local = 1'b1; i.wr_local = 1'b1; end
      U_ADD, U_SUB, U_MUL, U_AND, U_OR,
      U_XOR, U_SHL, U_SHR, U_USHR:   begin i.depth = 2'd2; i.delta = -3'sd1; i.is_alu = 1'b1; end
      U_POP:                         begin i.depth = 2'd1; i.delta = -3'sd1; end
      U_DUP:                         begin i.depth = 2'd1; i.delta = 3'sd1; end
      U_SWAP:                        begin i.depth = 2'd2; end
      U_OVER:                        begin i.depth = 2'd2; i.delta = 3'sd1; end
      U_GOTO:                        begin i.is_ctrl = 1'b1; end
      U_IF:                          begin i.depth = 2'd1; i.delta = -3'sd1; i.is_ctrl = 1'b1; end
      U_IFCMP:                       begin i.depth = 2'd2; i.delta = -3'sd2; i.is_ctrl = 1'b1; end
      U_HALT, U_ILL:                 begin i.is_ctrl = 1'b1; end
      default:                       ;
    endcase
    return i;
  endfunction

  // Branch condition on two signed values (x compared with y).
  function automatic logic cond_true(logic [2:0] c, word_t x, word_t y);
    logic signed [WORD_W-1:0] sx, sy;
    sx = x;
    sy = y;
    unique case (c)
      3'd0:    return sx == sy;
      3'd1:    return sx != sy;
      3'd2:    return sx <  sy;
      3'd3:    return sx >= sy;
      3'd4:    return sx >  sy;
      3'd5:    return sx <= sy;
      default: return 1'b0;
    endcase
  endfunction

endpackage
