// End-to-end test of the double-issue Java processor.
//
// Loads bytecode programs over the word bus, runs them and compares the
// final local variables and operand stack with a bytecode interpreter
// written in this testbench. Programs:
//   1. sum of 1..20 in a loop (iinc, if_icmple, goto);
//   2. iterative factorial of 10 with imul and a countdown loop (ifgt);
//   3. a rate test: 16 blocks of {iconst_1, iconst_2, iadd, pop}, which
//      must issue as pairs, two instructions per cycle;
//   4. an unsupported bytecode (new), which must stop with illegal set;
//   5. 200 random straight-line programs with short forward branches,
//      using every supported bytecode including the microcoded ones.
// Program 1..3 start executing while their code is still being loaded, so
// fetch waits for operands. Counts how often each mechanism occurred
// (pairs, refused pairs, operand waits, microcode sequences, taken
// branches, spills, refills, memory forwarding) and fails if one never did.
`timescale 1ns/1ps
module djp_top_tb;
  import jp_pkg::*;

  localparam int NLOC = 8;
  localparam int MAXP = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_wr = 1'b0, start = 1'b0;
  word_t bus_data = '0;
  logic bus_ready, running, halted, illegal;
  pc_t start_pc = '0, jpc;
  saddr_t init_sp = saddr_t'(NLOC - 1), init_vp = '0, dbg_addr = '0;
  word_t tos, nos, third, dbg_rdata;

  djp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- events
  int n_pair = 0, n_refused = 0, n_wait = 0, n_useq = 0, n_branch = 0;
  int n_spill = 0, n_refill = 0, n_fwd = 0, n_issue_cyc = 0, n_instr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_decode.issue) begin
      n_issue_cyc++;
      n_instr += dut.fetch_one ? 1 : 2;
      if (!dut.fetch_one) n_pair++;
      else if (dut.f2.valid) n_refused++;
      if (dut.u_fetch.seq_mode) n_useq++;
    end
    if (dut.running && dut.wait_opd) n_wait++;
    if (dut.branch) n_branch++;
    if (dut.xp.valid && dut.u_exec.d2 > 0) n_spill++;
    if (dut.xp.valid && dut.u_exec.d2 < 0) n_refill++;
    begin
      saddr_t a;
      a = dut.u_stack.raddr1_q;
      if (dut.u_stack.fwd_we[a[0]] && dut.u_stack.fwd_waddr[a[0]] == a[SA_W-1:1]) n_fwd++;
      a = dut.u_stack.raddr2_q;
      if (dut.u_stack.fwd_we[a[0]] && dut.u_stack.fwd_waddr[a[0]] == a[SA_W-1:1]) n_fwd++;
    end
  end

  // --------------------------------------------------------------- program
  logic [7:0] prog [MAXP];
  int plen;

  function automatic void emit(int b);
    prog[plen] = 8'(b);
    plen++;
  endfunction
  function automatic void emit2(int b, int o);
    emit(b); emit(o);
  endfunction
  function automatic void emit3(int b, int o);
    emit(b); emit(o >> 8); emit(o);
  endfunction

  // ------------------------------------------------------------ reference
  word_t r_loc [NLOC];
  word_t init_loc [NLOC];   // locals before the run (left by the previous program)
  word_t r_st [256];
  int r_depth;
  logic r_illegal;

  function automatic void ref_push(word_t v);
    r_st[r_depth] = v;
    r_depth++;
  endfunction
  function automatic word_t ref_pop();
    r_depth--;
    return r_st[r_depth];
  endfunction
  function automatic logic sgt(word_t a, word_t b);
    return $signed(a) > $signed(b);
  endfunction
  function automatic logic ref_cond(int c, word_t a, word_t b);
    case (c)
      0: return a == b;
      1: return a != b;
      2: return $signed(a) < $signed(b);
      3: return $signed(a) >= $signed(b);
      4: return $signed(a) > $signed(b);
      default: return $signed(a) <= $signed(b);
    endcase
  endfunction

  function automatic void ref_run();
    int pc = 0, steps = 0;
    word_t a, b;
    r_depth = 0;
    r_illegal = 1'b0;
    for (int i = 0; i < NLOC; i++) r_loc[i] = init_loc[i];
    while (steps < 100000) begin
      int op = prog[pc];
      int o1 = prog[pc+1];
      int o2 = prog[pc+2];
      int off = int'($signed({prog[pc+1], prog[pc+2]}));
      int npc = pc + 1;
      steps++;
      if (op >= 8'h02 && op <= 8'h08) ref_push(word_t'(op - 3));
      else if (op >= 8'h1a && op <= 8'h1d) ref_push(r_loc[op - 8'h1a]);
      else if (op >= 8'h3b && op <= 8'h3e) r_loc[op - 8'h3b] = ref_pop();
      else if (op >= 8'h99 && op <= 8'h9e) begin
        a = ref_pop();
        npc = ref_cond(op - 8'h99, a, '0) ? pc + off : pc + 3;
      end else if (op >= 8'h9f && op <= 8'ha4) begin
        b = ref_pop(); a = ref_pop();
        npc = ref_cond(op - 8'h9f, a, b) ? pc + off : pc + 3;
      end else case (op)
        8'h00: ;
        8'h10: begin ref_push(word_t'($signed(8'(o1)))); npc = pc + 2; end
        8'h11: begin ref_push(word_t'($signed(16'(off)))); npc = pc + 3; end
        8'h15: begin ref_push(r_loc[o1]); npc = pc + 2; end
        8'h36: begin r_loc[o1] = ref_pop(); npc = pc + 2; end
        8'h57: a = ref_pop();
        8'h58: begin a = ref_pop(); a = ref_pop(); end
        8'h59: begin a = ref_pop(); ref_push(a); ref_push(a); end
        8'h5a: begin b = ref_pop(); a = ref_pop(); ref_push(b); ref_push(a); ref_push(b); end
        8'h5c: begin b = ref_pop(); a = ref_pop(); ref_push(a); ref_push(b); ref_push(a); ref_push(b); end
        8'h5f: begin b = ref_pop(); a = ref_pop(); ref_push(b); ref_push(a); end
        8'h60: begin b = ref_pop(); a = ref_pop(); ref_push(a + b); end
        8'h64: begin b = ref_pop(); a = ref_pop(); ref_push(a - b); end
        8'h68: begin b = ref_pop(); a = ref_pop(); ref_push(a * b); end
        8'h74: begin a = ref_pop(); ref_push(-a); end
        8'h78: begin b = ref_pop(); a = ref_pop(); ref_push(a << b[4:0]); end
        8'h7a: begin b = ref_pop(); a = ref_pop(); ref_push(word_t'($signed(a) >>> b[4:0])); end
        8'h7c: begin b = ref_pop(); a = ref_pop(); ref_push(a >> b[4:0]); end
        8'h7e: begin b = ref_pop(); a = ref_pop(); ref_push(a & b); end
        8'h80: begin b = ref_pop(); a = ref_pop(); ref_push(a | b); end
        8'h82: begin b = ref_pop(); a = ref_pop(); ref_push(a ^ b); end
        8'h84: begin r_loc[o1] = r_loc[o1] + word_t'($signed(8'(o2))); npc = pc + 3; end
        8'ha7: npc = pc + off;
        8'hac, 8'hb1: return;
        default: begin r_illegal = 1'b1; return; end
      endcase
      pc = npc;
    end
  endfunction

  // ------------------------------------------------------------- DUT runs
  function automatic word_t pword(int w);
    return {prog[4*w], prog[4*w+1], prog[4*w+2], prog[4*w+3]};
  endfunction

  task automatic load_and_run(input string name, input bit early_start, output longint cycles);
    int nw;
    longint t0;
    for (int i = plen; i < MAXP; i++) prog[i] = 8'h00;
    nw = (plen + 3) / 4;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NLOC; i++) dbg_read(saddr_t'(i), init_loc[i]);
    t0 = cycle;
    for (int w = 0; w < nw; ) begin
      bus_wr   <= 1'b1;
      bus_data <= pword(w);
      start    <= early_start && (w == 1);
      @(posedge clk);
      if (bus_ready) w++;
    end
    bus_wr <= 1'b0;
    if (!early_start) begin
      repeat (5) @(posedge clk);
      start <= 1'b1;
      t0 = cycle;
      @(posedge clk);
    end
    start <= 1'b0;
    while (!halted) @(posedge clk);
    cycles = cycle - t0;
    @(posedge clk);
  endtask

  task automatic dbg_read(input saddr_t a, output word_t d);
    dbg_addr <= a;
    @(posedge clk);
    @(posedge clk);
    #1 d = dbg_rdata;
  endtask

  task automatic compare(input string name);
    word_t d;
    saddr_t sp;
    ref_run();
    checks++;
    if (illegal !== r_illegal) begin
      failures++;
      $display("FAIL %s: illegal=%0b expected %0b", name, illegal, r_illegal);
    end
    if (r_illegal) return;
    for (int i = 0; i < NLOC; i++) begin
      dbg_read(saddr_t'(i), d);
      checks++;
      if (d !== r_loc[i]) begin
        failures++;
        $display("FAIL %s: local %0d = %0d expected %0d", name, i, $signed(d), $signed(r_loc[i]));
      end
    end
    sp = dut.u_decode.sp_dec;
    checks++;
    if (sp !== saddr_t'(NLOC - 1 + r_depth)) begin
      failures++;
      $display("FAIL %s: sp=%0d expected %0d", name, sp, NLOC - 1 + r_depth);
    end
    for (int k = 0; k < r_depth; k++) begin
      word_t e = r_st[r_depth - 1 - k];
      if (k == 0) d = tos;
      else if (k == 1) d = nos;
      else if (k == 2) d = third;
      else dbg_read(sp - saddr_t'(k - 3), d);
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL %s: stack[%0d] = %0d expected %0d", name, k, $signed(d), $signed(e));
      end
    end
  endtask

  // ------------------------------------------------------ random programs
  int depth;
  function automatic void rnd_op();
    int r = $urandom_range(0, 27);
    case (r)
      0:  begin emit(8'h02 + $urandom_range(0, 6)); depth++; end
      1:  begin emit2(8'h10, $urandom_range(0, 255)); depth++; end
      2:  begin emit3(8'h11, $urandom_range(0, 65535)); depth++; end
      3, 4: begin emit(8'h1a + $urandom_range(0, 3)); depth++; end
      5:  begin emit2(8'h15, $urandom_range(0, NLOC - 1)); depth++; end
      6:  if (depth >= 1) begin emit(8'h3b + $urandom_range(0, 3)); depth--; end
      7:  if (depth >= 1) begin emit2(8'h36, $urandom_range(0, NLOC - 1)); depth--; end
      8:  begin emit(8'h84); emit($urandom_range(0, NLOC - 1)); emit($urandom_range(0, 255)); end
      9, 10, 11: if (depth >= 2) begin
            int ops [9] = '{8'h60, 8'h64, 8'h68, 8'h78, 8'h7a, 8'h7c, 8'h7e, 8'h80, 8'h82};
            emit(ops[$urandom_range(0, 8)]); depth--; end
      12: if (depth >= 1) begin emit(8'h57); depth--; end
      13: if (depth >= 2) begin emit(8'h58); depth -= 2; end
      14: if (depth >= 1) begin emit(8'h59); depth++; end
      15: if (depth >= 2) begin emit(8'h5a); depth++; end
      16: if (depth >= 2) begin emit(8'h5c); depth += 2; end
      17: if (depth >= 2) emit(8'h5f);
      18: if (depth >= 1) emit(8'h74);
      19: emit(8'h00);
      20: begin  // forward branch over a stack-neutral iinc
            emit(8'h1a + $urandom_range(0, 3));
            emit3(8'h99 + $urandom_range(0, 5), 6);
            emit(8'h84); emit($urandom_range(0, NLOC - 1)); emit($urandom_range(0, 255));
          end
      21: begin  // forward compare-branch over iconst/istore
            emit(8'h1a + $urandom_range(0, 3));
            emit2(8'h10, $urandom_range(0, 255));
            emit3(8'h9f + $urandom_range(0, 5), 5);
            emit(8'h04); emit(8'h3b + $urandom_range(0, 3));
          end
      22: begin emit3(8'ha7, 4); emit(8'h57); end  // goto skipping a pop
      default: if (depth < 12) begin emit(8'h1a + $urandom_range(0, 3)); depth++; end
              else begin emit(8'h60); depth--; end
    endcase
  endfunction

  longint cyc;
  initial begin
    // 1. sum 1..20: local0 = i, local1 = sum
    plen = 0;
    emit(8'h04); emit(8'h3b);                 // i = 1
    emit(8'h03); emit(8'h3c);                 // sum = 0
    emit(8'h1b); emit(8'h1a); emit(8'h60); emit(8'h3c);   // 4: sum += i
    emit(8'h84); emit(0); emit(1);            // i++
    emit(8'h1a); emit2(8'h10, 20);            // i <= 20 ?
    emit3(8'ha4, -10);                        // if_icmple 4
    emit(8'h1b); emit(8'hb1);
    load_and_run("sum", 1, cyc);
    compare("sum");
    checks++;
    if (tos !== 210) begin failures++; $display("FAIL sum: %0d", tos); end

    // 2. factorial 10: local0 = n, local1 = f
    plen = 0;
    emit2(8'h10, 10); emit(8'h3b);            // n = 10
    emit(8'h04); emit(8'h3c);                 // f = 1
    emit(8'h1b); emit(8'h1a); emit(8'h68); emit(8'h3c);   // 5: f *= n
    emit(8'h84); emit(0); emit(8'hff);        // n--
    emit(8'h1a); emit3(8'h9d, -8);            // ifgt 5
    emit(8'h1b); emit(8'hb1);
    load_and_run("fact", 1, cyc);
    compare("fact");
    checks++;
    if (tos !== 3628800) begin failures++; $display("FAIL fact: %0d", tos); end

    // 3. issue rate
    plen = 0;
    for (int i = 0; i < 16; i++) begin emit(8'h04); emit(8'h05); emit(8'h60); emit(8'h57); end
    emit(8'hb1);
    begin
      int p0, i0;
      p0 = n_pair;
      i0 = n_issue_cyc;
      load_and_run("rate", 0, cyc);
      compare("rate");
      checks++;
      if (n_pair - p0 != 32 || n_issue_cyc - i0 != 33) begin
        failures++;
        $display("FAIL rate: %0d pairs in %0d issue cycles, expected 32 in 33", n_pair - p0, n_issue_cyc - i0);
      end
      checks++;
      // start, 33 issue cycles, execute of the last pair, halt register
      if (cyc > 33 + 4) begin
        failures++;
        $display("FAIL rate: %0d cycles for 65 instructions", cyc);
      end
      $display("rate test: 65 instructions in %0d issue cycles, %0d cycles start to halt",
               n_issue_cyc - i0, cyc);
    end

    // 4. unsupported bytecode
    plen = 0;
    emit(8'h04); emit3(8'hbb, 1); emit(8'hb1);
    load_and_run("illegal", 0, cyc);
    compare("illegal");

    // 5. random programs
    for (int p = 0; p < 200; p++) begin
      plen = 0;
      depth = 0;
      for (int l = 0; l < NLOC; l++) begin emit3(8'h11, $urandom_range(0, 65535)); emit2(8'h36, l); end
      while (plen < 300) rnd_op();
      emit(8'hb1);
      load_and_run($sformatf("random%0d", p), p[0], cyc);
      compare($sformatf("random%0d", p));
    end

    $display("events: pairs=%0d refused=%0d wait_opd=%0d useq=%0d branches=%0d spills=%0d refills=%0d fwd=%0d instr=%0d issue_cycles=%0d",
             n_pair, n_refused, n_wait, n_useq, n_branch, n_spill, n_refill, n_fwd, n_instr, n_issue_cyc);
    checks++; if (n_pair == 0)    begin failures++; $display("FAIL: no pair issued"); end
    checks++; if (n_refused == 0) begin failures++; $display("FAIL: no pair refused"); end
    checks++; if (n_wait == 0)    begin failures++; $display("FAIL: no operand wait"); end
    checks++; if (n_useq == 0)    begin failures++; $display("FAIL: no microcode sequence"); end
    checks++; if (n_branch == 0)  begin failures++; $display("FAIL: no taken branch"); end
    checks++; if (n_spill == 0)   begin failures++; $display("FAIL: no spill"); end
    checks++; if (n_refill == 0)  begin failures++; $display("FAIL: no refill"); end
    checks++; if (n_fwd == 0)     begin failures++; $display("FAIL: no forwarding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
