// Test of the execute stage.
//
// The testbench keeps the whole Java operand stack as a list and the
// stack memory as an array that the stage writes through its two write
// ports. It forms random single instructions and pairs (only pairs whose
// memory reads and writes fall in different banks, with at most one ALU
// operation, as decode would issue them), supplies the read data of the two
// banks, and after every cycle checks the registers B, A, C against the top
// three list entries, the memory words at SP and SP-1 against the next two,
// the local variables, the stack pointer and the branch decision and target.
`timescale 1ns/1ps
module execute_tb;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0;
  xpair_t xp = '0;
  word_t rdata1, rdata2;
  logic we1, we2, flush, branch, halt, illegal;
  saddr_t waddr1, waddr2, sp_after;
  word_t wdata1, wdata2, tos, nos, third;
  pc_t branch_target;
  int checks = 0, failures = 0;

  execute dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NL = 8;
  word_t mem [1024];
  word_t st [$];
  int sp;

  function automatic void beh(uop_e op, output int rd, output int dl, output bit alu,
                              output bit ctrl, output bit rl, output bit wl);
    rd = 0; dl = 0; alu = 0; ctrl = 0; rl = 0; wl = 0;
    case (op)
      U_PUSHI: dl = 1;
      U_LDL:   begin dl = 1; rl = 1; end
      U_STL:   begin rd = 1; dl = -1; wl = 1; end
      U_IINC:  begin rl = 1; wl = 1; end
      U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR:
               begin rd = 2; dl = -1; alu = 1; end
      U_POP:   begin rd = 1; dl = -1; end
      U_DUP:   begin rd = 1; dl = 1; end
      U_SWAP:  rd = 2;
      U_OVER:  begin rd = 2; dl = 1; end
      U_GOTO:  ctrl = 1;
      U_IF:    begin rd = 1; dl = -1; ctrl = 1; end
      U_IFCMP: begin rd = 2; dl = -2; ctrl = 1; end
      default: ;
    endcase
  endfunction

  function automatic word_t alu(uop_e op, word_t a, word_t b);
    case (op)
      U_ADD: return a + b;
      U_SUB: return a - b;
      U_MUL: return a * b;
      U_AND: return a & b;
      U_OR:  return a | b;
      U_XOR: return a ^ b;
      U_SHL: return a << b[4:0];
      U_SHR: return word_t'($signed(a) >>> b[4:0]);
      default: return a >> b[4:0];
    endcase
  endfunction

  function automatic bit cmp(int c, word_t a, word_t b);
    case (c)
      0: return a == b;
      1: return a != b;
      2: return $signed(a) < $signed(b);
      3: return $signed(a) >= $signed(b);
      4: return $signed(a) > $signed(b);
      default: return $signed(a) <= $signed(b);
    endcase
  endfunction

  // Model one instruction; returns 1 if it branches.
  function automatic bit run(xslot_t s);
    word_t a, b;
    int li = int'(s.laddr);
    if (!s.valid) return 0;
    case (s.op)
      U_PUSHI: st.push_back(s.imm);
      U_LDL:   st.push_back(mem[li]);
      U_STL:   mem[li] = st.pop_back();
      U_IINC:  mem[li] = mem[li] + s.imm;
      U_POP:   a = st.pop_back();
      U_DUP:   st.push_back(st[$]);
      U_OVER:  st.push_back(st[$-1]);
      U_SWAP:  begin b = st.pop_back(); a = st.pop_back(); st.push_back(b); st.push_back(a); end
      U_GOTO:  return 1;
      U_IF:    begin a = st.pop_back(); return cmp(s.cond, a, '0); end
      U_IFCMP: begin b = st.pop_back(); a = st.pop_back(); return cmp(s.cond, a, b); end
      default: begin b = st.pop_back(); a = st.pop_back(); st.push_back(alu(s.op, a, b)); end
    endcase
    return 0;
  endfunction

  function automatic xslot_t rnd_slot(bit allow_ctrl);
    xslot_t s;
    uop_e all [20] = '{U_PUSHI, U_LDL, U_STL, U_IINC, U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR,
                       U_SHL, U_SHR, U_USHR, U_POP, U_DUP, U_SWAP, U_OVER, U_GOTO, U_IF, U_IFCMP};
    s = '0;
    s.valid = 1;
    s.op    = all[$urandom_range(0, allow_ctrl ? 19 : 16)];
    s.cond  = 3'($urandom_range(0, 5));
    s.imm   = (s.op == U_PUSHI && $urandom_range(0, 1)) ? word_t'($urandom_range(0, 3)) : $urandom;
    s.laddr = saddr_t'($urandom_range(0, NL - 1));
    s.lport = s.laddr[0];
    return s;
  endfunction

  int n_pair = 0, n_spill = 0, n_refill = 0, n_br = 0;
  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    st = {32'h0, 32'h0, 32'h0};       // the reset values of C, A, B
    sp = NL - 1;                      // memory stack starts above the locals
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 6000; n++) begin
      xslot_t s1, s2;
      int rd1, dl1, rd2, dl2, nread0, nread1, nwr0, nwr1, dep;
      bit a1, c1, r1, w1, a2, c2, r2, w2, pair, br_exp;
      word_t bank [2];
      pc_t tgt;
      // keep the stack deep enough and bounded
      s1 = rnd_slot(1);
      if (st.size() < 14) begin s1 = rnd_slot(0); s1.op = U_PUSHI; end
      if (st.size() > 40) begin s1 = rnd_slot(0); s1.op = U_POP; end
      s2 = rnd_slot(1);
      beh(s1.op, rd1, dl1, a1, c1, r1, w1);
      beh(s2.op, rd2, dl2, a2, c2, r2, w2);
      pair = $urandom_range(0, 2) != 0 && !c1 && !(a1 && a2) && dl1 + dl2 >= -2 && st.size() >= 12 &&
             !(w1 && r2 && s1.laddr == s2.laddr) && !(w1 && w2 && s1.laddr[0] == s2.laddr[0]);
      // bank usage of the pair (refill words counted when the stack shrinks)
      if (pair) begin
        nread0 = 0; nread1 = 0; nwr0 = 0; nwr1 = 0;
        dep = rd1; if (rd2 - dl1 > dep) dep = rd2 - dl1;
        if (r1) begin if (s1.laddr[0]) nread1++; else nread0++; end
        if (r2) begin if (s2.laddr[0]) nread1++; else nread0++; end
        if (dep >= 4 || dl1 + dl2 <= -1) begin if (sp % 2) nread1++; else nread0++; end
        if (dep >= 5 || dl1 + dl2 <= -2) begin if (sp % 2) nread0++; else nread1++; end
        if (w1) begin if (s1.laddr[0]) nwr1++; else nwr0++; end
        if (w2) begin if (s2.laddr[0]) nwr1++; else nwr0++; end
        for (int k = 1; k <= dl1 + dl2; k++) begin if ((sp + k) % 2) nwr1++; else nwr0++; end
        pair = nread0 <= 1 && nread1 <= 1 && nwr0 <= 1 && nwr1 <= 1;
      end
      if (!pair) s2 = '0;
      xp.valid  = 1;
      xp.s1     = s1;
      xp.s2     = s2;
      xp.sp     = saddr_t'(sp);
      xp.m0port = sp[0];
      xp.m1port = !sp[0];
      // bank read data: a local if one is read there, else the refill word
      bank[sp % 2]       = mem[sp];
      bank[(sp + 1) % 2] = mem[sp - 1];
      if (r1) bank[s1.laddr[0]] = mem[s1.laddr];
      if (pair && r2) bank[s2.laddr[0]] = mem[s2.laddr];
      rdata1 = bank[0];
      rdata2 = bank[1];
      // model
      br_exp = run(s1);
      tgt = s1.imm[15:0];
      if (pair) begin
        n_pair++;
        if (run(s2)) begin br_exp = 1; tgt = s2.imm[15:0]; end
      end
      if (br_exp) n_br++;
      if (dl1 + (pair ? dl2 : 0) > 0) n_spill++;
      if (dl1 + (pair ? dl2 : 0) < 0) n_refill++;
      sp += dl1 + (pair ? dl2 : 0);
      #1;
      checks++;
      if (branch != br_exp || (br_exp && branch_target != tgt) || int'(sp_after) != sp) begin
        failures++;
        $display("FAIL %s/%s: branch %0b exp %0b, sp %0d exp %0d", s1.op.name(), s2.op.name(),
                 branch, br_exp, sp_after, sp);
      end
      @(posedge clk);
      if (we1) mem[waddr1] = wdata1;
      if (we2) mem[waddr2] = wdata2;
      #1;
      checks++;
      if (tos != st[$] || nos != st[$-1] || third != st[$-2] ||
          (st.size() > 3 && mem[sp] != st[$-3]) || (st.size() > 4 && mem[sp-1] != st[$-4])) begin
        failures++;
        $display("FAIL after %s/%s: B=%h A=%h C=%h exp %h %h %h", s1.op.name(), s2.op.name(),
                 tos, nos, third, st[$], st[$-1], st[$-2]);
      end
    end
    checks++;
    if (n_pair < 500 || n_spill == 0 || n_refill == 0 || n_br == 0) begin failures++; $display("FAIL coverage"); end
    $display("pairs=%0d spills=%0d refills=%0d branches=%0d", n_pair, n_spill, n_refill, n_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
