// Fetch stage.
//
// Presents up to two complete instructions per cycle to decode. The Java
// program counter JPC addresses the translated-code buffer, which returns
// the six tagged bytes at JPC..JPC+5. Because every byte carries its class
// and the count of operand bytes that follow, the instruction boundaries
// are known without decoding: slot 1 starts at JPC, slot 2 right after slot
// 1's operands. A slot is offered only when all of its bytes have been
// pre-translated (address < pfpc); when slot 1's opcode is present but its
// operands are not yet, wait_opd is raised and nothing issues.
//
// A one-to-many bytecode at JPC switches fetch to the microcode ROM: the
// translated entry gives the start address, and the ROM's microcodes issue,
// up to two per cycle, until the one marked last; then JPC moves past the
// bytecode. Slot 2 is offered only for a one-to-one bytecode.
//
// Decode answers in the same cycle with issue, fetch_one (only slot 1 was
// taken) and opd_cnt (operand bytes of the taken slots); JPC advances by
// jpc_offset = taken instructions + opd_cnt. jpc_sel loads the branch
// target instead when execute reports a taken branch. start loads start_pc.
//
// Follows the design: JPC with its adder and jpc_sel multiplexer, the
// fetch_one / opd_cnt / wait_opd signals between fetch and decode, and
// microcode sequences for one-to-many bytecodes. Own choices: the six-entry
// window and the exact meaning of the handshake signals.
module fetch
  import jp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  pc_t     start_pc,
  input  pc_t     pfpc,
  output pc_t     traddr [6],
  input  tentry_t trdata [6],
  input  logic    issue,
  input  logic    fetch_one,
  input  logic [2:0] opd_cnt,
  input  logic    branch,
  input  pc_t     branch_target,
  output slot_t   f1,
  output slot_t   f2,
  output logic    wait_opd,
  output pc_t     jpc
);

  logic       in_seq;
  logic [3:0] upc;
  logic [3:0] ua, ub;
  useq_t      ue_a, ue_b;
  logic [5:0] v;
  logic       seq_mode;
  logic [2:0] n1, j2, n2;
  pc_t        jpc_offset;

  ucode_rom #(.AW(4)) u_urom (.addr_a(ua), .addr_b(ub), .data_a(ue_a), .data_b(ue_b));

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      traddr[i] = jpc + pc_t'(i);
      v[i]      = ({1'b0, jpc} + (PC_W+1)'(i)) < {1'b0, pfpc};
    end
    seq_mode = in_seq || (v[0] && trdata[0].kind == TK_MANY);
    ua       = in_seq ? upc : trdata[0].data[3:0];
    ub       = ua + 4'd1;
  end

  // Operand bytes of the instruction at window position p with n operands.
  function automatic logic [15:0] opd_at(tentry_t e [6], logic [2:0] p, logic [2:0] n);
    logic [15:0] o;
    o = '0;
    if (n >= 3'd1 && p <= 3'd4) o[15:8] = e[p+1].data;
    if (n >= 3'd2 && p <= 3'd3) o[7:0]  = e[p+2].data;
    return o;
  endfunction

  always_comb begin
    f1       = '0;
    f2       = '0;
    wait_opd = 1'b0;
    n1       = trdata[0].rem;
    j2       = 3'd1 + n1;
    n2       = '0;
    if (seq_mode) begin
      f1.valid = 1'b1;
      f1.uc    = ue_a.uc;
      f1.pc    = jpc;
      f2.valid = !ue_a.last;
      f2.uc    = ue_b.uc;
      f2.pc    = jpc;
    end else if (v[0] && trdata[0].kind == TK_ONE) begin
      f1.uc   = ucode_t'(trdata[0].data);
      f1.nopd = n1;
      f1.pc   = jpc;
      f1.opd  = opd_at(trdata, 3'd0, n1);
      if (n1 <= 3'd2 && v[n1]) begin
        f1.valid = 1'b1;
        if (v[j2] && trdata[j2].kind == TK_ONE) begin
          n2 = trdata[j2].rem;
          if (n2 <= 3'd2 && 3'(j2 + n2) <= 3'd5 && v[j2+n2]) begin
            f2.valid = 1'b1;
            f2.uc    = ucode_t'(trdata[j2].data);
            f2.nopd  = n2;
            f2.pc    = jpc + pc_t'(j2);
            f2.opd   = opd_at(trdata, j2, n2);
          end
        end
      end else begin
        wait_opd = n1 <= 3'd2;
        // Longer instructions are not run by this processor: offer them
        // as illegal so that execute stops.
        f1.valid = n1 > 3'd2;
        f1.uc    = '{op: U_ILL, sub: 3'd0};
      end
    end
    jpc_offset = (fetch_one ? pc_t'(1) : pc_t'(2)) + pc_t'(opd_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jpc    <= '0;
      in_seq <= 1'b0;
      upc    <= '0;
    end else if (start) begin
      jpc    <= start_pc;
      in_seq <= 1'b0;
    end else if (branch) begin
      // jpc_sel: branch target from execute
      jpc    <= branch_target;
      in_seq <= 1'b0;
    end else if (issue) begin
      if (seq_mode) begin
        if (fetch_one ? ue_a.last : ue_b.last) begin
          in_seq <= 1'b0;
          jpc    <= jpc + 1'b1 + pc_t'(trdata[0].rem);
        end else begin
          in_seq <= 1'b1;
          upc    <= ua + (fetch_one ? 4'd1 : 4'd2);
        end
      end else begin
        jpc <= jpc + jpc_offset;
      end
    end
  end

endmodule
