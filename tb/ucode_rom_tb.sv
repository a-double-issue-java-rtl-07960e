// Test of the microcode sequence ROM: each sequence is walked from its
// start address through both read ports and checked, including the
// position of the last marker; unused addresses must read as illegal.
`timescale 1ns/1ps
module ucode_rom_tb;
  import jp_pkg::*;
  logic [3:0] aa, ab;
  useq_t da, db;
  int checks = 0, failures = 0;

  ucode_rom dut (.addr_a(aa), .addr_b(ab), .data_a(da), .data_b(db));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uop_e  exp_op [16];
  logic  exp_last [16];
  logic [2:0] exp_sub [16];

  initial begin
    for (int i = 0; i < 16; i++) begin exp_op[i] = U_ILL; exp_last[i] = 1; exp_sub[i] = 0; end
    // ineg
    exp_op[0] = U_PUSHI; exp_sub[0] = 1; exp_last[0] = 0;
    exp_op[1] = U_SWAP;  exp_last[1] = 0;
    exp_op[2] = U_SUB;
    // dup_x1
    exp_op[3] = U_SWAP;  exp_last[3] = 0;
    exp_op[4] = U_OVER;
    // dup2
    exp_op[5] = U_OVER;  exp_last[5] = 0;
    exp_op[6] = U_OVER;
    // pop2
    exp_op[7] = U_POP;   exp_last[7] = 0;
    exp_op[8] = U_POP;
    for (int i = 0; i < 16; i++) begin
      aa = 4'(i);
      ab = 4'(15 - i);
      #1;
      checks += 2;
      if (da.uc.op != exp_op[i] || da.uc.sub != exp_sub[i] || da.last != exp_last[i]) begin
        failures++;
        $display("FAIL port a addr %0d", i);
      end
      if (db.uc.op != exp_op[15-i] || db.uc.sub != exp_sub[15-i] || db.last != exp_last[15-i]) begin
        failures++;
        $display("FAIL port b addr %0d", 15 - i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
