// Two-bank stack memory.
//
// The Java stack (local variables and the part of the operand stack that
// does not fit in the top-of-stack registers) lives in two RAM banks: bank
// LSB0 holds the words with address bit 0 = 0, bank LSB1 those with bit 0 =
// 1. Each bank has its own read port and write port, so two reads and two
// writes can be served per cycle as long as the two reads, and the two
// writes, fall in different banks. The requester guarantees that (an
// assertion checks it); in the processor the decode stage refuses to pair
// instructions that would break the rule.
//
// Read and write requests come in on two ports each (1 and 2). Address
// multiplexers route each request to the bank selected by its address LSB,
// and an output crossbar returns each bank's data on the port that asked
// (rdata1/rdata2, the load values of the execute stage). Reads are
// registered: the address is given in one cycle (by decode) and the data is
// valid in the next (in execute). A write in the cycle of the read to the
// same word is forwarded, so a read always sees the latest value.
//
// The bank split by address LSB, the two read/write ports and the
// crossbars follow the design; the forwarding is this implementation's own.
module stack_mem
  import jp_pkg::*;
#(
  parameter int WORDS = 2 ** SA_W
) (
  input  logic   clk,
  input  saddr_t raddr1,
  input  saddr_t raddr2,
  output word_t  rdata1,
  output word_t  rdata2,
  input  logic   we1,
  input  saddr_t waddr1,
  input  word_t  wdata1,
  input  logic   we2,
  input  saddr_t waddr2,
  input  word_t  wdata2
);

  localparam int BD = WORDS / 2;
  localparam int BW = $clog2(BD);

  logic [BW-1:0] b_raddr [2];
  logic [BW-1:0] b_waddr [2];
  logic          b_we    [2];
  word_t         b_wdata [2];
  word_t         b_rdata [2];

  // Request-to-bank address multiplexers.
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      b_raddr[b] = (raddr1[0] == 1'(b)) ? raddr1[BW:1] : raddr2[BW:1];
      b_we[b]    = (we1 && waddr1[0] == 1'(b)) || (we2 && waddr2[0] == 1'(b));
      b_waddr[b] = (we1 && waddr1[0] == 1'(b)) ? waddr1[BW:1] : waddr2[BW:1];
      b_wdata[b] = (we1 && waddr1[0] == 1'(b)) ? wdata1 : wdata2;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    stack_bank #(.DEPTH(BD)) u_bank (
      .clk  (clk),
      .raddr(b_raddr[b]),
      .rdata(b_rdata[b]),
      .we   (b_we[b]),
      .waddr(b_waddr[b]),
      .wdata(b_wdata[b])
    );
  end

  // Registered read addresses and last writes, for the output crossbar and
  // write-to-read forwarding.
  saddr_t        raddr1_q, raddr2_q;
  logic          fwd_we    [2];
  logic [BW-1:0] fwd_waddr [2];
  word_t         fwd_wdata [2];

  always_ff @(posedge clk) begin
    raddr1_q <= raddr1;
    raddr2_q <= raddr2;
    for (int b = 0; b < 2; b++) begin
      fwd_we[b]    <= b_we[b];
      fwd_waddr[b] <= b_waddr[b];
      fwd_wdata[b] <= b_wdata[b];
    end
  end

  function automatic word_t bank_out(saddr_t a, word_t d0, word_t d1,
                                     logic [1:0] fe, logic [2*BW-1:0] fa,
                                     logic [2*WORD_W-1:0] fd);
    if (a[0] == 1'b0) return (fe[0] && fa[BW-1:0] == a[BW:1]) ? fd[WORD_W-1:0] : d0;
    else              return (fe[1] && fa[2*BW-1:BW] == a[BW:1]) ? fd[2*WORD_W-1:WORD_W] : d1;
  endfunction

  assign rdata1 = bank_out(raddr1_q, b_rdata[0], b_rdata[1], {fwd_we[1], fwd_we[0]},
                           {fwd_waddr[1], fwd_waddr[0]}, {fwd_wdata[1], fwd_wdata[0]});
  assign rdata2 = bank_out(raddr2_q, b_rdata[0], b_rdata[1], {fwd_we[1], fwd_we[0]},
                           {fwd_waddr[1], fwd_waddr[0]}, {fwd_wdata[1], fwd_wdata[0]});

  // The two writes of a cycle must go to different banks.
  always_ff @(posedge clk) begin
    assert (!(we1 && we2 && waddr1[0] == waddr2[0]))
      else $error("stack_mem: two writes to bank %0d in one cycle", waddr1[0]);
  end

endmodule
