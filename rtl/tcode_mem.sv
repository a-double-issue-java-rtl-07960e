// Translated-code buffer.
//
// Stores the tagged bytes produced by the pre-translation stage, one entry
// per bytecode address, and gives the fetch stage NR entries per cycle
// starting at any address, enough for two complete instructions with their
// operands (two three-byte instructions need six entries). One write port,
// written in the cycle tw_en is high; combinational read ports. Addresses
// wrap at DEPTH. The buffer is named in the design as the path between
// pre-translation and fetch; its organisation is this implementation's own.
module tcode_mem
  import jp_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int NR    = 6
) (
  input  logic             clk,
  input  logic             we,
  input  pc_t              waddr,
  input  tentry_t          wdata,
  input  pc_t              raddr [NR],
  output tentry_t          rdata [NR]
);

  localparam int AW = $clog2(DEPTH);

  tentry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NR; i++) rdata[i] = mem[raddr[i][AW-1:0]];
  end

endmodule
