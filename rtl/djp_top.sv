// Double-issue Java processor.
//
// A stack-machine processor that executes Java bytecode directly, issuing
// up to two native operations per cycle. Four stages:
//   pre-translation  tags every byte of the method's code (one-to-one
//                    bytecode, one-to-many bytecode, operand) as it arrives
//                    over the bus, so that instruction lengths are known;
//   fetch            reads two complete instructions per cycle from the
//                    tagged code, or a microcode sequence from ROM;
//   decode           pairs them, tracks SP and starts the stack reads;
//   execute          updates the top-of-stack registers and the two-bank
//                    stack memory, resolves branches.
//
// Interface:
//   bus_wr/bus_data/bus_ready  32-bit words of bytecode, big-endian, loaded
//                              from address 0 upward (reset restarts at 0)
//   start/start_pc/init_sp/init_vp
//                              begin execution at start_pc with the local
//                              variables at init_vp.. and the operand stack
//                              growing up from init_sp+1 (init_sp = address
//                              of the current top memory word)
//   running, halted, illegal   status; halted after return/ireturn or an
//                              unsupported bytecode (illegal also set)
//   tos/nos/third, jpc         top three stack entries, program counter
//   dbg_addr/dbg_rdata         read a stack-memory word while not running;
//                              data one cycle after the address
//
// The stage structure and signals between stages follow the design; the
// bus handshake, start/halt and debug read are this implementation's own.
module djp_top
  import jp_pkg::*;
#(
  parameter int TCODE_DEPTH = 1024,
  parameter int STACK_WORDS = 2 ** SA_W
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bus_wr,
  input  word_t  bus_data,
  output logic   bus_ready,
  input  logic   start,
  input  pc_t    start_pc,
  input  saddr_t init_sp,
  input  saddr_t init_vp,
  output logic   running,
  output logic   halted,
  output logic   illegal,
  output word_t  tos,
  output word_t  nos,
  output word_t  third,
  output pc_t    jpc,
  input  saddr_t dbg_addr,
  output word_t  dbg_rdata
);

  // pre-translation -> translated-code buffer
  logic    tw_en;
  pc_t     tw_addr, pfpc;
  tentry_t tw_data;
  pc_t     traddr [6];
  tentry_t trdata [6];
  // fetch <-> decode
  slot_t      f1, f2;
  logic       wait_opd, issue, fetch_one;
  logic [2:0] opd_cnt;
  // decode -> execute, memory
  xpair_t xp;
  saddr_t d_raddr1, d_raddr2, raddr1, raddr2;
  word_t  rdata1, rdata2;
  // execute
  logic   we1, we2, flush, branch, halt, ex_illegal;
  saddr_t waddr1, waddr2, sp_after;
  word_t  wdata1, wdata2;
  pc_t    branch_target;
  logic   dbg_lsb_q;

  pretranslate u_pre (
    .clk, .rst_n, .bus_wr, .bus_data, .bus_ready,
    .tw_en, .tw_addr, .tw_data, .pfpc
  );

  tcode_mem #(.DEPTH(TCODE_DEPTH), .NR(6)) u_tcode (
    .clk, .we(tw_en), .waddr(tw_addr), .wdata(tw_data), .raddr(traddr), .rdata(trdata)
  );

  fetch u_fetch (
    .clk, .rst_n, .start, .start_pc, .pfpc, .traddr, .trdata,
    .issue, .fetch_one, .opd_cnt, .branch, .branch_target,
    .f1, .f2, .wait_opd, .jpc
  );

  decode u_decode (
    .clk, .rst_n, .start, .init_sp, .init_vp, .f1, .f2, .wait_opd,
    .flush, .halt, .flush_sp(sp_after), .running, .issue, .fetch_one, .opd_cnt,
    .raddr1(d_raddr1), .raddr2(d_raddr2), .xp
  );

  // Debug reads use the bank's read port while the processor is stopped.
  always_comb begin
    raddr1 = d_raddr1;
    raddr2 = d_raddr2;
    if (!running) begin
      if (dbg_addr[0]) raddr2 = dbg_addr;
      else             raddr1 = dbg_addr;
    end
  end

  stack_mem #(.WORDS(STACK_WORDS)) u_stack (
    .clk, .raddr1, .raddr2, .rdata1, .rdata2,
    .we1, .waddr1, .wdata1, .we2, .waddr2, .wdata2
  );

  execute u_exec (
    .clk, .rst_n, .xp, .rdata1, .rdata2,
    .we1, .waddr1, .wdata1, .we2, .waddr2, .wdata2,
    .flush, .branch, .branch_target, .halt, .illegal(ex_illegal), .sp_after,
    .tos, .nos, .third
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted    <= 1'b0;
      illegal   <= 1'b0;
      dbg_lsb_q <= 1'b0;
    end else begin
      dbg_lsb_q <= dbg_addr[0];
      if (start) begin
        halted  <= 1'b0;
        illegal <= 1'b0;
      end else if (halt) begin
        halted  <= 1'b1;
        illegal <= ex_illegal;
      end
    end
  end

  assign dbg_rdata = dbg_lsb_q ? rdata2 : rdata1;

endmodule
