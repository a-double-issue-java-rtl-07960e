// Test of the integer ALU: random operands for every operation, compared
// with JVM int semantics computed here, plus shift-count masking corners.
`timescale 1ns/1ps
module jp_alu_tb;
  import jp_pkg::*;
  uop_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  jp_alu dut (.op(op), .opd1(a), .opd2(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(uop_e o, word_t x, word_t z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    int s = int'(z % 32);
    case (o)
      U_ADD:  return word_t'(sx + sz);
      U_SUB:  return word_t'(sx - sz);
      U_MUL:  return word_t'(sx * sz);
      U_AND:  return x & z;
      U_OR:   return x | z;
      U_XOR:  return x ^ z;
      U_SHL:  return word_t'(longint'(x) * (64'd1 << s));
      U_SHR:  return word_t'(sx / (64'sd1 << s) - ((sx < 0 && (sx % (64'sd1 << s)) != 0) ? 1 : 0));
      U_USHR: return word_t'(longint'(x) / (64'd1 << s));
      default: return x;
    endcase
  endfunction

  initial begin
    uop_e ops [9] = '{U_ADD, U_SUB, U_MUL, U_AND, U_OR, U_XOR, U_SHL, U_SHR, U_USHR};
    for (int i = 0; i < 4000; i++) begin
      op = ops[i % 9];
      a  = $urandom;
      b  = (i % 5 == 0) ? word_t'($urandom_range(0, 40)) : $urandom;
      if (i % 97 == 0) a = 32'h8000_0000;
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s %h %h -> %h expected %h", op.name(), a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
