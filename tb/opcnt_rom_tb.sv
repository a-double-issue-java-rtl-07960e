// Test of the Operand Count ROM: every one of the 256 byte values against
// the instruction lengths of the JVM specification, listed here by length.
`timescale 1ns/1ps
module opcnt_rom_tb;
  logic [7:0] bc;
  logic [2:0] len;
  int checks = 0, failures = 0;

  opcnt_rom dut (.bytecode(bc), .len(len));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int c);
    if (c inside {16, 18, [21:25], [54:58], 169, 188}) return 2;
    if (c inside {17, 19, 20, 132, [153:168], [178:184], 187, 189, 192, 193, 198, 199}) return 3;
    if (c == 197) return 4;
    if (c inside {185, 186, 200, 201}) return 5;
    return 1;
  endfunction

  initial begin
    for (int c = 0; c < 256; c++) begin
      bc = 8'(c);
      #1;
      checks++;
      if (int'(len) != expected(c)) begin
        failures++;
        $display("FAIL opcode %02h: len %0d expected %0d", c, len, expected(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
