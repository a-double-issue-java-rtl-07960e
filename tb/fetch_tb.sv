// Test of the fetch stage.
//
// A random program of one-to-one instructions (0 to 2 operand bytes) and
// one-to-many bytecodes is held, already tagged, in a model buffer that
// answers fetch's six read addresses. The number of translated bytes
// (pfpc) grows slowly at first, so fetch must wait for operands. The
// testbench plays decode: it takes one or two instructions at random
// (fetch_one, opd_cnt) and sometimes redirects with a branch to a random
// instruction. Every cycle the offered slots are compared with the
// program: opcode, operands, operand count, address, and the microcodes of
// a one-to-many sequence in order.
`timescale 1ns/1ps
module fetch_tb;
  import jp_pkg::*;
  localparam int NI = 300;
  logic clk = 0, rst_n = 0, start = 0, issue = 0, fetch_one = 1, branch = 0;
  pc_t start_pc = '0, pfpc = '0, branch_target = '0, jpc;
  pc_t traddr [6];
  tentry_t trdata [6];
  logic [2:0] opd_cnt = '0;
  slot_t f1, f2;
  logic wait_opd;
  int checks = 0, failures = 0;

  fetch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program
  tentry_t mem [2048];
  int i_pc [NI], i_n [NI], i_many [NI], i_seq [NI];
  logic [7:0] i_uc [NI];
  logic [15:0] i_opd [NI];
  int plen;
  // microcode sequences, by start address
  int    seq_start [4] = '{0, 3, 5, 7};
  int    seq_len   [4] = '{3, 2, 2, 2};
  uop_e  seq_op    [9] = '{U_PUSHI, U_SWAP, U_SUB, U_SWAP, U_OVER, U_OVER, U_OVER, U_POP, U_POP};

  always_comb for (int k = 0; k < 6; k++) trdata[k] = mem[traddr[k] % 2048];

  int k = 0, q = 0;        // expected instruction index and sequence position
  int n_wait = 0, n_seq = 0, n_pair = 0, n_br = 0;

  function automatic logic ready(int idx);
    return i_pc[idx] + i_n[idx] < int'(pfpc);
  endfunction

  task automatic check_slot(string nm, slot_t s, int idx, int sq);
    checks++;
    if (i_many[idx]) begin
      int a = seq_start[i_seq[idx]] + sq;
      if (!s.valid || s.uc.op != seq_op[a] || s.pc != pc_t'(i_pc[idx])) begin
        failures++;
        $display("FAIL %s: seq instr %0d pos %0d got %s", nm, idx, sq, s.uc.op.name());
      end
    end else if (!s.valid || s.uc !== ucode_t'(i_uc[idx]) || s.pc != pc_t'(i_pc[idx]) ||
                 s.nopd != 3'(i_n[idx]) ||
                 (i_n[idx] >= 1 && s.opd[15:8] != i_opd[idx][15:8]) ||
                 (i_n[idx] == 2 && s.opd[7:0] != i_opd[idx][7:0])) begin
      failures++;
      $display("FAIL %s: instr %0d at %0d got valid=%0b pc=%0d uc=%h opd=%h n=%0d", nm, idx,
               i_pc[idx], s.valid, s.pc, s.uc, s.opd, s.nopd);
    end
  endtask

  initial begin
    plen = 0;
    for (int i = 0; i < NI; i++) begin
      i_pc[i] = plen;
      i_many[i] = ($urandom_range(0, 5) == 0);
      if (i_many[i]) begin
        i_seq[i] = $urandom_range(0, 3);
        i_n[i] = 0;
        mem[plen] = '{kind: TK_MANY, data: 8'(seq_start[i_seq[i]]), rem: 3'd0};
        plen++;
      end else begin
        i_n[i] = $urandom_range(0, 2);
        i_uc[i] = {5'($urandom_range(0, 22)), 3'($urandom)};
        i_opd[i] = 16'($urandom);
        mem[plen] = '{kind: TK_ONE, data: i_uc[i], rem: 3'(i_n[i])};
        if (i_n[i] >= 1) mem[plen+1] = '{kind: TK_OPD, data: i_opd[i][15:8], rem: 3'(i_n[i] - 1)};
        if (i_n[i] == 2) mem[plen+2] = '{kind: TK_OPD, data: i_opd[i][7:0], rem: 3'd0};
        plen += 1 + i_n[i];
      end
    end
    for (int a = plen; a < 2048; a++) mem[a] = '{kind: TK_ONE, data: 8'h08, rem: 3'd0}; // HALT
    repeat (2) @(posedge clk);
    rst_n <= 1;
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // translated bytes: slowly for the first 100 cycles
      pfpc = (cyc < 100) ? pc_t'(cyc / 2) : pc_t'(plen + 8);
      #1;
      // expected slot 1 / slot 2
      if (i_many[k]) begin
        check_slot("f1", f1, k, q);
        checks++;
        if (f2.valid != (q + 1 < seq_len[i_seq[k]])) begin failures++; $display("FAIL f2 valid in sequence"); end
        else if (f2.valid) check_slot("f2", f2, k, q + 1);
      end else if (ready(k)) begin
        check_slot("f1", f1, k, 0);
        if (!i_many[k+1] && ready(k+1)) check_slot("f2", f2, k + 1, 0);
        else begin
          checks++;
          if (f2.valid) begin failures++; $display("FAIL f2 offered for instr %0d", k + 1); end
        end
      end else begin
        checks++;
        if (f1.valid || wait_opd != (i_pc[k] < int'(pfpc))) begin
          failures++;
          $display("FAIL instr %0d not ready: valid=%0b wait_opd=%0b", k, f1.valid, wait_opd);
        end
      end
      if (wait_opd) n_wait++;
      // play decode
      branch = ($urandom_range(0, 30) == 0) || k >= NI - 4;
      if (branch) begin
        automatic int j = $urandom_range(0, NI - 3);
        branch_target = pc_t'(i_pc[j]);
        issue = 0;
        k = j; q = 0; n_br++;
      end else begin
        issue = f1.valid && $urandom_range(0, 3) != 0;
        fetch_one = !f2.valid || $urandom_range(0, 1);
        opd_cnt = f1.nopd + (fetch_one ? 3'd0 : f2.nopd);
        if (issue) begin
          if (!fetch_one) n_pair++;
          if (i_many[k]) begin
            n_seq++;
            q += fetch_one ? 1 : 2;
            if (q >= seq_len[i_seq[k]]) begin k++; q = 0; end
          end else k += fetch_one ? 1 : 2;
        end
      end
      @(posedge clk);
    end
    checks++;
    if (n_wait == 0 || n_seq == 0 || n_pair == 0 || n_br == 0) begin
      failures++;
      $display("FAIL coverage wait=%0d seq=%0d pair=%0d br=%0d", n_wait, n_seq, n_pair, n_br);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
