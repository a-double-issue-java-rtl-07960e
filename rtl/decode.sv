// Decode stage.
//
// Turns the one or two instructions offered by fetch into a decoded pair
// for execute, decides whether both may issue together, and generates the
// stack-memory read addresses so that the read data arrive with the pair
// in execute.
//
// Per slot it computes the local-variable address (VP + index), the D_tmp
// immediate (pushed constant, iinc constant, or branch target = bytecode
// address + signed 16-bit offset) and the stack behaviour of the
// operation. Decode keeps its own copy of the stack pointer, advanced by
// the net stack change of every issued pair, so the refill addresses SP and
// SP-1 are known without waiting for execute.
//
// Slot 2 is refused (fetch_one) when
//   - slot 1 is a branch, halt or illegal operation (it ends a pair),
//   - both need the single ALU,
//   - the pair would pop more than two words from memory,
//   - two of the reads (locals of either slot, refill words SP and SP-1), or
//     two of the writes (locals, spills to SP+1 and SP+2), fall in the same
//     memory bank (same address LSB),
//   - slot 2 reads the local that slot 1 writes.
// A single instruction never conflicts. Read port 1 serves bank LSB0 and
// port 2 bank LSB1.
//
// start loads VP and SP and begins execution; a flush from execute (taken
// branch, halt) discards the pair being decoded and reloads SP; halt stops.
// The decoded pair is registered: one cycle from decode to execute.
//
// The bank-conflict rule and address generation in decode follow the
// design; the other pairing rules, the SP bookkeeping and the encodings are
// this implementation's own.
module decode
  import jp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  saddr_t     init_sp,
  input  saddr_t     init_vp,
  input  slot_t      f1,
  input  slot_t      f2,
  input  logic       wait_opd,
  input  logic       flush,
  input  logic       halt,
  input  saddr_t     flush_sp,
  output logic       running,
  output logic       issue,
  output logic       fetch_one,
  output logic [2:0] opd_cnt,
  output saddr_t     raddr1,
  output saddr_t     raddr2,
  output xpair_t     xp
);

  saddr_t sp_dec, vp;

  function automatic xslot_t dec_slot(slot_t f, saddr_t vbase);
    xslot_t s;
    logic [7:0] idx;
    s       = '0;
    s.valid = f.valid;
    s.op    = f.uc.op;
    s.cond  = f.uc.sub;
    idx     = (f.uc.sub[2] || f.uc.op == U_IINC) ? f.opd[15:8] : {6'd0, f.uc.sub[1:0]};
    s.laddr = vbase + saddr_t'(idx);
    s.lport = s.laddr[0];
    unique case (f.uc.op)
      U_PUSHI: begin
        if (f.uc.sub != 3'd7)      s.imm = word_t'(f.uc.sub) - word_t'(1);
        else if (f.nopd == 3'd1)   s.imm = word_t'($signed(f.opd[15:8]));
        else                       s.imm = word_t'($signed(f.opd));
      end
      U_IINC:                      s.imm = word_t'($signed(f.opd[7:0]));
      U_GOTO, U_IF, U_IFCMP:       s.imm = word_t'(pc_t'(f.pc + f.opd));
      default: ;
    endcase
    return s;
  endfunction

  xslot_t  x1, x2;
  opinfo_t i1, i2;
  logic signed [3:0] d1, dsum, deep, need1, need2;
  logic [1:0] rd_cnt0, rd_cnt1, wr_cnt0, wr_cnt1;
  logic pair_ok, need_m0;
  logic b_m0;
  logic signed [3:0] d_iss;   // stack change of what issues

  always_comb begin
    x1   = dec_slot(f1, vp);
    x2   = dec_slot(f2, vp);
    i1   = op_info(f1.uc.op);
    i2   = op_info(f2.uc.op);
    b_m0 = sp_dec[0];               // bank of the word at SP; SP-1 is in the other

    // Pair: depth of the stack reached and words needed from memory.
    d1    = 4'(i1.delta);
    dsum  = d1 + 4'(i2.delta);
    deep  = 4'($signed({1'b0, i1.depth}));
    if ($signed({2'b0, i2.depth}) - d1 > deep) deep = $signed({2'b0, i2.depth}) - d1;
    need2 = (deep - 4'sd1 > 4'sd2 - dsum) ? deep - 4'sd1 : 4'sd2 - dsum;

    rd_cnt0 = '0; rd_cnt1 = '0; wr_cnt0 = '0; wr_cnt1 = '0;
    if (i1.rd_local) begin if (x1.laddr[0]) rd_cnt1++; else rd_cnt0++; end
    if (i2.rd_local) begin if (x2.laddr[0]) rd_cnt1++; else rd_cnt0++; end
    if (need2 >= 4'sd3) begin if (b_m0) rd_cnt1++; else rd_cnt0++; end
    if (need2 >= 4'sd4) begin if (b_m0) rd_cnt0++; else rd_cnt1++; end
    if (i1.wr_local) begin if (x1.laddr[0]) wr_cnt1++; else wr_cnt0++; end
    if (i2.wr_local) begin if (x2.laddr[0]) wr_cnt1++; else wr_cnt0++; end
    if (dsum >= 4'sd1) begin if (b_m0) wr_cnt0++; else wr_cnt1++; end   // SP+1
    if (dsum >= 4'sd2) begin if (b_m0) wr_cnt1++; else wr_cnt0++; end   // SP+2

    pair_ok = f2.valid && !i1.is_ctrl && !(i1.is_alu && i2.is_alu) && dsum >= -4'sd2
              && rd_cnt0 <= 2'd1 && rd_cnt1 <= 2'd1 && wr_cnt0 <= 2'd1 && wr_cnt1 <= 2'd1
              && !(i1.wr_local && i2.rd_local && x1.laddr == x2.laddr);

    // Single instruction.
    need1   = (4'($signed({1'b0, i1.depth})) - 4'sd1 > 4'sd2 - d1)
              ? 4'($signed({1'b0, i1.depth})) - 4'sd1 : 4'sd2 - d1;
    need_m0 = pair_ok ? need2 >= 4'sd3 : need1 >= 4'sd3;

    issue     = running && f1.valid && !wait_opd && !flush;
    fetch_one = !pair_ok;
    d_iss     = pair_ok ? dsum : d1;
    opd_cnt   = f1.nopd + (pair_ok ? f2.nopd : 3'd0);

    // Read addresses per bank: a local read if there is one, else the
    // refill word of that bank.
    raddr1 = b_m0 ? sp_dec - saddr_t'(1) : sp_dec;
    raddr2 = b_m0 ? sp_dec : sp_dec - saddr_t'(1);
    if (i1.rd_local) begin
      if (x1.laddr[0]) raddr2 = x1.laddr; else raddr1 = x1.laddr;
    end
    if (pair_ok && i2.rd_local) begin
      if (x2.laddr[0]) raddr2 = x2.laddr; else raddr1 = x2.laddr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      sp_dec  <= '0;
      vp      <= '0;
      xp      <= '0;
    end else begin
      xp <= '0;
      if (start) begin
        running <= 1'b1;
        sp_dec  <= init_sp;
        vp      <= init_vp;
      end else if (flush) begin
        sp_dec <= flush_sp;
        if (halt) running <= 1'b0;
      end else if (issue) begin
        xp.valid  <= 1'b1;
        xp.s1     <= x1;
        xp.s2     <= pair_ok ? x2 : '0;
        xp.sp     <= sp_dec;
        xp.m0port <= b_m0;
        xp.m1port <= !b_m0;
        sp_dec    <= sp_dec + {{(SA_W-4){d_iss[3]}}, d_iss};
      end
    end
  end

  // Debug: a single instruction must never need more than one read per bank.
  always_ff @(posedge clk) begin
    if (issue && !pair_ok && i1.rd_local)
      assert (!(need_m0 && x1.laddr[0] == b_m0))
        else $error("decode: local read collides with refill read");
  end

endmodule
