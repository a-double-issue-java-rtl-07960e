// Test of the decode stage.
//
// Random pairs of instructions are offered as fetch slots. For each pair
// the testbench works out on its own whether both may issue: slot 1 must
// not end a pair, at most one ALU operation, at most two words popped from
// memory, no two reads and no two writes in one bank, no read of a local
// written by slot 1. Memory words needed for refill are found by tracking
// where every original stack entry moves, op by op. It then checks
// fetch_one, opd_cnt, the read address given to each bank, and, one cycle
// later, the registered pair (local addresses, immediates, branch target,
// SP) and the running SP. Flushes with a new SP and a halt are included.
`timescale 1ns/1ps
module decode_tb;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, wait_opd = 0, flush = 0, halt = 0;
  saddr_t init_sp = saddr_t'(300), init_vp = saddr_t'(100), flush_sp = '0;
  slot_t f1 = '0, f2 = '0;
  logic running, issue, fetch_one;
  logic [2:0] opd_cnt;
  saddr_t raddr1, raddr2;
  xpair_t xp;
  int checks = 0, failures = 0;

  decode dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stack behaviour of each operation: entries read, net change
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
      U_GOTO, U_HALT, U_ILL: ctrl = 1;
      U_IF:    begin rd = 1; dl = -1; ctrl = 1; end
      U_IFCMP: begin rd = 2; dl = -2; ctrl = 1; end
      default: ;
    endcase
  endfunction

  // Deepest original stack entry (0 = top) a sequence of ops needs.
  function automatic int deepest(uop_e ops [2], int n);
    int pos [16];
    int cnt = 12, mx = -1;
    for (int i = 0; i < 12; i++) pos[i] = i;     // pos[i]: original index at depth i
    for (int o = 0; o < n; o++) begin
      int rd, dl; bit a, c, rl, wl;
      beh(ops[o], rd, dl, a, c, rl, wl);
      for (int i = 0; i < rd; i++) if (pos[i] > mx) mx = pos[i];
      // remove the popped entries (rd - kept) and push new ones
      begin
        int pops = (dl < 0) ? -dl : 0;
        int pushes = (dl > 0) ? dl : 0;
        if (ops[o] inside {U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR}) begin pops = 2; pushes = 1; end
        for (int i = 0; i < cnt - pops; i++) pos[i] = pos[i + pops];
        cnt -= pops;
        for (int i = cnt - 1; i >= 0; i--) pos[i + pushes] = pos[i];
        for (int i = 0; i < pushes; i++) pos[i] = -1;
        cnt += pushes;
      end
    end
    for (int i = 0; i < 3; i++) if (pos[i] > mx) mx = pos[i];
    return mx;
  endfunction

  function automatic slot_t rnd_slot();
    slot_t s;
    uop_e all [23] = '{U_NOP, U_HALT, U_ILL, U_PUSHI, U_LDL, U_STL, U_IINC, U_ADD, U_SUB, U_MUL,
                       U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR, U_POP, U_DUP, U_SWAP, U_OVER,
                       U_GOTO, U_IF, U_IFCMP};
    s.valid  = 1;
    s.uc.op  = all[$urandom_range(0, 22)];
    if ($urandom_range(0, 2) != 0) s.uc.op = all[$urandom_range(3, 6)];   // favour locals
    s.uc.sub = 3'($urandom);
    s.opd    = 16'($urandom);
    s.opd[15:8] = 8'($urandom_range(0, 7));
    s.nopd   = 3'($urandom_range(0, 2));
    s.pc     = pc_t'($urandom);
    return s;
  endfunction

  function automatic int lidx(slot_t s);
    return (s.uc.sub[2] || s.uc.op == U_IINC) ? int'(s.opd[15:8]) : int'(s.uc.sub[1:0]);
  endfunction

  function automatic word_t eimm(slot_t s);
    case (s.uc.op)
      U_PUSHI: if (s.uc.sub != 7) return word_t'(int'(s.uc.sub) - 1);
               else if (s.nopd == 1) return word_t'(int'($signed(s.opd[15:8])));
               else return word_t'(int'($signed(s.opd)));
      U_IINC:  return word_t'(int'($signed(s.opd[7:0])));
      U_GOTO, U_IF, U_IFCMP: return {16'h0, 16'(int'(s.pc) + int'($signed(s.opd)))};
      default: return '0;
    endcase
  endfunction

  int sp, vp = 100;
  int n_pair = 0, n_single = 0, n_conf = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    start <= 1;
    @(posedge clk);
    start <= 0;
    sp = 300;
    for (int n = 0; n < 5000; n++) begin
      uop_e ops [2];
      int rd1, dl1, rd2, dl2, need, rb[2], wb[2], l1, l2, a1, a2;
      bit al1, ct1, rl1, wl1, al2, ct2, rl2, wl2, ok, flush_now;
      int exp_sp;
      slot_t e1, e2;
      f1 = rnd_slot();
      f2 = rnd_slot();
      f2.valid = $urandom_range(0, 4) != 0;
      flush_now = $urandom_range(0, 40) == 0;
      flush = flush_now;
      flush_sp = saddr_t'($urandom_range(200, 400));
      #1;
      beh(f1.uc.op, rd1, dl1, al1, ct1, rl1, wl1);
      beh(f2.uc.op, rd2, dl2, al2, ct2, rl2, wl2);
      a1 = vp + lidx(f1);
      a2 = vp + lidx(f2);
      ops[0] = f1.uc.op; ops[1] = f2.uc.op;
      need = deepest(ops, 2);
      rb = '{0, 0}; wb = '{0, 0};
      if (rl1) rb[a1 % 2]++;
      if (rl2) rb[a2 % 2]++;
      if (need >= 3 || dl1 + dl2 <= -1) rb[sp % 2]++;
      if (need >= 4 || dl1 + dl2 <= -2) rb[(sp + 1) % 2]++;
      if (wl1) wb[a1 % 2]++;
      if (wl2) wb[a2 % 2]++;
      for (int s = 1; s <= dl1 + dl2; s++) wb[(sp + s) % 2]++;
      ok = f2.valid && !ct1 && !(al1 && al2) && dl1 + dl2 >= -2 && rb[0] <= 1 && rb[1] <= 1 &&
           wb[0] <= 1 && wb[1] <= 1 && !(wl1 && rl2 && a1 == a2);
      checks++;
      if (fetch_one != !ok) begin
        failures++;
        $display("FAIL pair %s,%s sp=%0d: fetch_one=%0b", f1.uc.op.name(), f2.uc.op.name(), sp, fetch_one);
      end
      if (f2.valid && !ok) n_conf++;
      checks++;
      if (opd_cnt != f1.nopd + (ok ? f2.nopd : 0)) begin failures++; $display("FAIL opd_cnt"); end
      // bank read addresses
      begin
        int ra [2];
        ra[sp % 2] = sp; ra[(sp + 1) % 2] = sp - 1;
        if (rl1) ra[a1 % 2] = a1;
        if (ok && rl2) ra[a2 % 2] = a2;
        checks++;
        if (int'(raddr1) != ra[0] % 1024 || int'(raddr2) != ra[1] % 1024) begin
          failures++;
          $display("FAIL raddr %0d %0d expected %0d %0d", raddr1, raddr2, ra[0], ra[1]);
        end
      end
      e1 = f1; e2 = f2;
      exp_sp = flush_now ? int'(flush_sp) : sp + dl1 + (ok ? dl2 : 0);
      @(posedge clk);
      #1;
      checks++;
      if (flush_now) begin
        if (xp.valid) begin failures++; $display("FAIL: pair issued during flush"); end
      end else if (!xp.valid || xp.s1.op != e1.uc.op || int'(xp.s1.laddr) != a1 ||
                   xp.s1.imm != eimm(e1) || int'(xp.sp) != sp ||
                   xp.s2.valid != ok || (ok && (xp.s2.op != e2.uc.op || int'(xp.s2.laddr) != a2 ||
                   xp.s2.imm != eimm(e2)))) begin
        failures++;
        $display("FAIL xp for %s,%s: imm %h exp %h laddr %0d exp %0d sp %0d s2v %0b", e1.uc.op.name(), e2.uc.op.name(), xp.s1.imm, eimm(e1), xp.s1.laddr, a1, xp.sp, xp.s2.valid);
      end
      if (!flush_now) begin if (ok) n_pair++; else n_single++; end
      sp = exp_sp;
      checks++;
      if (int'(dut.sp_dec) != sp) begin failures++; $display("FAIL sp %0d expected %0d", dut.sp_dec, sp); end
    end
    // halt stops decode
    flush = 1; halt = 1;
    @(posedge clk);
    #1;
    flush = 0; halt = 0;
    checks++;
    if (running || issue) begin failures++; $display("FAIL: still running after halt"); end
    checks++;
    if (n_pair == 0 || n_single == 0 || n_conf == 0) begin failures++; $display("FAIL coverage"); end
    $display("pairs=%0d singles=%0d refused=%0d", n_pair, n_single, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
