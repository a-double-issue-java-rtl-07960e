// One bank of the stack memory: a simple dual-port RAM with one write port
// and one registered read port, the shape of an FPGA block RAM. A read in
// the same cycle as a write to the same word returns the old contents; the
// stack_mem wrapper forwards the new value.
module stack_bank
  import jp_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output word_t                    rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
