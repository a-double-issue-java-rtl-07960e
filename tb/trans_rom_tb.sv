// Test of the Translation ROM: every byte value is checked for its class
// (one-to-one or one-to-many) and its microcode or sequence address,
// against a table of the supported bytecodes written out here.
`timescale 1ns/1ps
module trans_rom_tb;
  import jp_pkg::*;
  logic [7:0] bc;
  tkind_e kind;
  logic [7:0] data;
  int checks = 0, failures = 0;

  trans_rom dut (.bytecode(bc), .kind(kind), .data(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] expected(int c);   // {kind, data}
    ucode_t u;
    u = '{op: U_ILL, sub: 3'd0};
    if (c == 'h00) u.op = U_NOP;
    else if (c >= 'h02 && c <= 'h08) begin u.op = U_PUSHI; u.sub = 3'(c - 2); end
    else if (c == 'h10 || c == 'h11) begin u.op = U_PUSHI; u.sub = 3'd7; end
    else if (c == 'h15) begin u.op = U_LDL; u.sub = 3'd4; end
    else if (c >= 'h1a && c <= 'h1d) begin u.op = U_LDL; u.sub = 3'(c - 'h1a); end
    else if (c == 'h36) begin u.op = U_STL; u.sub = 3'd4; end
    else if (c >= 'h3b && c <= 'h3e) begin u.op = U_STL; u.sub = 3'(c - 'h3b); end
    else if (c == 'h57) u.op = U_POP;
    else if (c == 'h58) return {TK_MANY, 8'd7};
    else if (c == 'h59) u.op = U_DUP;
    else if (c == 'h5a) return {TK_MANY, 8'd3};
    else if (c == 'h5c) return {TK_MANY, 8'd5};
    else if (c == 'h5f) u.op = U_SWAP;
    else if (c == 'h60) u.op = U_ADD;
    else if (c == 'h64) u.op = U_SUB;
    else if (c == 'h68) u.op = U_MUL;
    else if (c == 'h74) return {TK_MANY, 8'd0};
    else if (c == 'h78) u.op = U_SHL;
    else if (c == 'h7a) u.op = U_SHR;
    else if (c == 'h7c) u.op = U_USHR;
    else if (c == 'h7e) u.op = U_AND;
    else if (c == 'h80) u.op = U_OR;
    else if (c == 'h82) u.op = U_XOR;
    else if (c == 'h84) u.op = U_IINC;
    else if (c >= 'h99 && c <= 'h9e) begin u.op = U_IF; u.sub = 3'(c - 'h99); end
    else if (c >= 'h9f && c <= 'ha4) begin u.op = U_IFCMP; u.sub = 3'(c - 'h9f); end
    else if (c == 'ha7) u.op = U_GOTO;
    else if (c == 'hac || c == 'hb1) u.op = U_HALT;
    return {TK_ONE, u};
  endfunction

  initial begin
    for (int c = 0; c < 256; c++) begin
      bc = 8'(c);
      #1;
      checks++;
      if ({kind, data} !== expected(c)) begin
        failures++;
        $display("FAIL opcode %02h: %b %02h expected %b", c, kind, data, expected(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
