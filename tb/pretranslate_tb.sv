// Test of the pre-translation stage.
//
// Streams a random instruction sequence (random opcodes, each followed by
// the number of operand bytes its JVM length implies) as 32-bit words and
// checks every translated-buffer write: address = PFPC, opcode bytes tagged
// with their class and operand count, operand bytes tagged TK_OPD with
// their value and the number still to come. Also checks the rate: one byte
// per cycle, so 4*N writes in 4*N cycles for N back-to-back words.
`timescale 1ns/1ps
module pretranslate_tb;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0, bus_wr = 0, bus_ready, tw_en;
  word_t bus_data = '0;
  pc_t tw_addr, pfpc;
  tentry_t tw_data;
  int checks = 0, failures = 0;

  pretranslate dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 1200;
  logic [7:0] bytes [N];
  tentry_t exp_e [N];

  // Length from the JVM specification (independent of the ROM's table).
  function automatic int jlen(int c);
    if (c inside {16, 18, [21:25], [54:58], 169, 188}) return 2;
    if (c inside {17, 19, 20, 132, [153:168], [178:184], 187, 189, 192, 193, 198, 199}) return 3;
    if (c == 197) return 4;
    if (c inside {185, 186, 200, 201}) return 5;
    return 1;
  endfunction

  logic [7:0] tr_data;
  tkind_e tr_kind;
  logic [7:0] probe;
  trans_rom u_ref_rom (.bytecode(probe), .kind(tr_kind), .data(tr_data));

  int nwr = 0, first_wr = -1, last_wr = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tw_en) begin
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
      checks++;
      if (int'(tw_addr) != nwr || tw_data !== exp_e[nwr]) begin
        failures++;
        if (failures < 10)
          $display("FAIL write %0d at %0d: %p expected %p", nwr, tw_addr, tw_data, exp_e[nwr]);
      end
      nwr++;
    end
  end

  initial begin
    int i = 0;
    while (i < N) begin
      automatic int c = $urandom_range(0, 255);
      automatic int l = jlen(c);
      if (c inside {170, 171, 196}) continue;     // variable-length bytecodes
      if (i + l > N) c = 0;
      l = jlen(c);
      probe = 8'(c);
      #1;
      bytes[i] = 8'(c);
      exp_e[i] = '{kind: tr_kind, data: tr_data, rem: 3'(l - 1)};
      for (int k = 1; k < l; k++) begin
        bytes[i+k] = 8'($urandom);
        exp_e[i+k] = '{kind: TK_OPD, data: bytes[i+k], rem: 3'(l - 1 - k)};
      end
      i += l;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < N / 4; ) begin
      bus_wr   <= 1;
      bus_data <= {bytes[4*w], bytes[4*w+1], bytes[4*w+2], bytes[4*w+3]};
      @(posedge clk);
      if (bus_ready) w++;
    end
    bus_wr <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (nwr != N) begin failures++; $display("FAIL: %0d writes, expected %0d", nwr, N); end
    checks++;
    if (last_wr - first_wr + 1 != N) begin
      failures++;
      $display("FAIL rate: %0d bytes over %0d cycles", N, last_wr - first_wr + 1);
    end
    checks++;
    if (int'(pfpc) != N) begin failures++; $display("FAIL: pfpc %0d", pfpc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
