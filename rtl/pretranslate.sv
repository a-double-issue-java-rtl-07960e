// Pre-translation stage.
//
// Bytecode arrives from the method area as 32-bit words (bus_wr/bus_data,
// big-endian byte order as in a class file). A word write starts the
// Pre-Fetch Program Counter (PFPC) stepping through its four bytes, one per
// cycle. Each byte is looked up in the Translation ROM and the Operand Count
// ROM and written, tagged, into the translated-code buffer at address PFPC:
//   - an opcode byte is tagged one-to-one (data = microcode) or one-to-many
//     (data = microcode ROM address), with rem = instruction length - 1, the
//     number of operand bytes that follow;
//   - an operand byte is tagged TK_OPD with its value and the number of
//     operand bytes still to come.
// A small counter carries the remaining operand count across bytes and
// across bus words. pfpc tells the fetch stage how many bytes are ready.
//
// Timing: a word is accepted when bus_ready is high; its bytes are written
// in the four following cycles, so a new word can be written every fourth
// cycle without a gap. Reset clears PFPC (start of a new method image).
// The word buffer, the PFPC and the two ROMs follow the design; the ready
// handshake and the byte order are this implementation's choice.
module pretranslate
  import jp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    bus_wr,
  input  word_t   bus_data,
  output logic    bus_ready,
  output logic    tw_en,
  output pc_t     tw_addr,
  output tentry_t tw_data,
  output pc_t     pfpc
);

  word_t      wbuf;
  logic       full;
  logic [2:0] opd_left;
  logic [7:0] cur;
  tkind_e     tr_kind;
  logic [7:0] tr_data;
  logic [2:0] len;

  // PFPC selects the byte of the buffered word.
  always_comb begin
    unique case (pfpc[1:0])
      2'd0: cur = wbuf[31:24];
      2'd1: cur = wbuf[23:16];
      2'd2: cur = wbuf[15:8];
      default: cur = wbuf[7:0];
    endcase
  end

  trans_rom u_trans (.bytecode(cur), .kind(tr_kind), .data(tr_data));
  opcnt_rom u_opcnt (.bytecode(cur), .len(len));

  assign bus_ready = !full || (pfpc[1:0] == 2'd3);
  assign tw_en     = full;
  assign tw_addr   = pfpc;

  always_comb begin
    if (opd_left != 3'd0) begin
      tw_data.kind = TK_OPD;
      tw_data.data = cur;
      tw_data.rem  = opd_left - 3'd1;
    end else begin
      tw_data.kind = tr_kind;
      tw_data.data = tr_data;
      tw_data.rem  = len - 3'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf     <= '0;
      full     <= 1'b0;
      opd_left <= 3'd0;
      pfpc     <= '0;
    end else begin
      if (full) begin
        pfpc     <= pfpc + 1'b1;
        opd_left <= tw_data.rem;
        if (pfpc[1:0] == 2'd3) full <= 1'b0;
      end
      if (bus_wr && bus_ready) begin
        wbuf <= bus_data;
        full <= 1'b1;
      end
    end
  end

endmodule
