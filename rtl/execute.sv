// Execute stage.
//
// Holds the three top-of-stack registers, B (top of stack), A (next on
// stack) and C (third), and executes the one or two instructions of a
// decoded pair in one cycle. The rest of the operand stack is in the stack
// memory; SP addresses its top word.
//
// How it works: the pair operates on a seven-entry window
//   {B, A, C, M0, M1, -, -}
// where M0 and M1 are the memory words at SP and SP-1, read by decode in
// the previous cycle (refill values). Slot 1 and then slot 2 push, pop or
// rewrite the window, exactly as the JVM stack would change. Afterwards
// the first three entries become the new B, A and C. If the pair grew the
// stack by d > 0 entries, the d entries that fell below C are written
// (spilled) to the memory at SP+1..SP+d; if it shrank the stack, the refill
// values have moved up into the registers. Local-variable stores (istore,
// iinc) are written to the memory in the same cycle. Loaded locals and
// immediates (the D_tmp values from decode) enter the window as the load
// values of slots 1 and 2. There is a single ALU; decode issues at most one
// ALU operation per pair.
//
// Branches are resolved here: a taken branch, halt or illegal operation
// raises flush, which discards the pair being decoded in the same cycle
// and redirects fetch (one bubble per taken branch). sp_after gives decode
// the stack pointer to resume from.
//
// Follows the design: the registers A, B, C, the single ALU, the two load
// values and two write data paths to the banks, spill on push and refill
// on pop. This implementation's own: the window formulation of the
// register/multiplexer control, the register roles (B top, A next, C
// third) and branch resolution in this stage.
module execute
  import jp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  xpair_t xp,
  input  word_t  rdata1,
  input  word_t  rdata2,
  // stack memory writes
  output logic   we1,
  output saddr_t waddr1,
  output word_t  wdata1,
  output logic   we2,
  output saddr_t waddr2,
  output word_t  wdata2,
  // control
  output logic   flush,
  output logic   branch,
  output pc_t    branch_target,
  output logic   halt,
  output logic   illegal,
  output saddr_t sp_after,
  // top of stack
  output word_t  tos,
  output word_t  nos,
  output word_t  third
);

  typedef logic [6:0][WORD_W-1:0] win_t;

  word_t reg_a, reg_b, reg_c;

  function automatic word_t rd_port(logic p, word_t d1, word_t d2);
    return p ? d2 : d1;
  endfunction

  // Result of applying one instruction to the window.
  typedef struct packed {
    win_t              w;
    logic signed [3:0] d;        // stack change so far
    logic              lw;       // local-variable write
    word_t             lw_data;
    logic              br;       // branch taken
  } app_t;

  // Apply one instruction to the window.
  function automatic app_t apply(xslot_t s, word_t lv, word_t alu_y, win_t w_in,
                                 logic signed [3:0] d_in);
    app_t r;
    r.w       = w_in;
    r.d       = d_in;
    r.lw      = 1'b0;
    r.lw_data = '0;
    r.br      = 1'b0;
    if (s.valid) begin
      unique case (s.op)
        U_PUSHI, U_LDL: begin r.w = {w_in[5:0], lv};           r.d = d_in + 4'sd1; end
        U_STL:          begin r.lw = 1'b1; r.lw_data = w_in[0];
                              r.w = {{WORD_W{1'b0}}, w_in[6:1]}; r.d = d_in - 4'sd1; end
        U_IINC:         begin r.lw = 1'b1; r.lw_data = lv + s.imm; end
        U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR:
                        begin r.w = {{WORD_W{1'b0}}, w_in[6:2], alu_y}; r.d = d_in - 4'sd1; end
        U_POP:          begin r.w = {{WORD_W{1'b0}}, w_in[6:1]}; r.d = d_in - 4'sd1; end
        U_DUP:          begin r.w = {w_in[5:0], w_in[0]};        r.d = d_in + 4'sd1; end
        U_OVER:         begin r.w = {w_in[5:0], w_in[1]};        r.d = d_in + 4'sd1; end
        U_SWAP:         begin r.w = {w_in[6:2], w_in[0], w_in[1]}; end
        U_GOTO:         begin r.br = 1'b1; end
        U_IF:           begin r.br = cond_true(s.cond, w_in[0], '0);
                              r.w = {{WORD_W{1'b0}}, w_in[6:1]}; r.d = d_in - 4'sd1; end
        U_IFCMP:        begin r.br = cond_true(s.cond, w_in[1], w_in[0]);
                              r.w = {{2*WORD_W{1'b0}}, w_in[6:2]}; r.d = d_in - 4'sd2; end
        default: ;
      endcase
    end
    return r;
  endfunction

  word_t lv1, lv2, m0, m1;
  win_t  w0, w2;
  app_t  a_pre, a1, a2;
  logic signed [3:0] d2;
  logic  lw1, lw2, br1, br2;
  word_t lwd1, lwd2;
  word_t alu_a, alu_b, alu_y;
  uop_e  alu_op;
  logic  s1_alu;

  always_comb begin
    // Load values: memory data (locals) or D_tmp immediates.
    lv1 = (xp.s1.op == U_PUSHI) ? xp.s1.imm : rd_port(xp.s1.lport, rdata1, rdata2);
    lv2 = (xp.s2.op == U_PUSHI) ? xp.s2.imm : rd_port(xp.s2.lport, rdata1, rdata2);
    m0  = rd_port(xp.m0port, rdata1, rdata2);
    m1  = rd_port(xp.m1port, rdata1, rdata2);
    w0  = {{2*WORD_W{1'b0}}, m1, m0, reg_c, reg_a, reg_b};

    // Window after slot 1 as seen by a non-ALU slot 1 (selects ALU operands
    // of slot 2 without a path through the ALU).
    a_pre = apply(xp.s1, lv1, '0, w0, '0);

    s1_alu = xp.s1.valid && op_info(xp.s1.op).is_alu;
    alu_op = s1_alu ? xp.s1.op : xp.s2.op;
    alu_a  = s1_alu ? w0[1] : a_pre.w[1];
    alu_b  = s1_alu ? w0[0] : a_pre.w[0];
  end

  jp_alu u_alu (.op(alu_op), .opd1(alu_a), .opd2(alu_b), .y(alu_y));

  always_comb begin
    a1   = apply(xp.s1, lv1, alu_y, w0, '0);
    a2   = apply(xp.s2, lv2, alu_y, a1.w, a1.d);
    w2   = a2.w;
    d2   = xp.valid ? a2.d : '0;
    lw1  = a1.lw;
    lwd1 = a1.lw_data;
    br1  = a1.br;
    lw2  = a2.lw;
    lwd2 = a2.lw_data;
    br2  = a2.br;
  end

  // Stack memory writes: spills and local stores.
  always_comb begin
    we1 = 1'b0; waddr1 = '0; wdata1 = '0;
    we2 = 1'b0; waddr2 = '0; wdata2 = '0;
    if (xp.valid) begin
      if (d2 == 4'sd2) begin
        we1 = 1'b1; waddr1 = xp.sp + saddr_t'(2); wdata1 = w2[3];
        we2 = 1'b1; waddr2 = xp.sp + saddr_t'(1); wdata2 = w2[4];
      end else if (d2 == 4'sd1) begin
        we1 = 1'b1; waddr1 = xp.sp + saddr_t'(1); wdata1 = w2[3];
        we2 = lw1 || lw2;
        waddr2 = lw1 ? xp.s1.laddr : xp.s2.laddr;
        wdata2 = lw1 ? lwd1 : lwd2;
      end else begin
        we1 = lw1; waddr1 = xp.s1.laddr; wdata1 = lwd1;
        we2 = lw2; waddr2 = xp.s2.laddr; wdata2 = lwd2;
      end
    end
  end

  always_comb begin
    sp_after      = xp.sp + saddr_t'(d2);
    branch        = xp.valid && (br1 || br2);
    branch_target = br1 ? xp.s1.imm[PC_W-1:0] : xp.s2.imm[PC_W-1:0];
    illegal       = xp.valid && ((xp.s1.valid && xp.s1.op == U_ILL) || (xp.s2.valid && xp.s2.op == U_ILL));
    halt          = xp.valid && (illegal || (xp.s1.valid && xp.s1.op == U_HALT) ||
                                            (xp.s2.valid && xp.s2.op == U_HALT));
    flush         = branch || halt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_c <= '0;
    end else if (xp.valid) begin
      reg_b <= w2[0];
      reg_a <= w2[1];
      reg_c <= w2[2];
    end
  end

  assign tos   = reg_b;
  assign nos   = reg_a;
  assign third = reg_c;

endmodule
