// Test of the translated-code buffer: random writes, then reads of six
// consecutive entries from random start addresses (with wrap-around),
// compared with a model array.
`timescale 1ns/1ps
module tcode_mem_tb;
  import jp_pkg::*;
  localparam int D = 1024;
  logic clk = 0, we = 0;
  pc_t waddr = '0, raddr [6];
  tentry_t wdata = '0, rdata [6];
  tentry_t model [D];
  int checks = 0, failures = 0;

  tcode_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      we <= 1; waddr <= pc_t'(i); wdata <= tentry_t'($urandom);
      @(posedge clk);
      model[i] = wdata;
    end
    for (int n = 0; n < 600; n++) begin
      // one random write per read
      we <= 1; waddr <= pc_t'($urandom_range(0, D - 1)); wdata <= tentry_t'($urandom);
      @(posedge clk);
      model[waddr % D] = wdata;
      we <= 0;
      begin
        automatic int s = $urandom_range(0, 3 * D);
        for (int k = 0; k < 6; k++) raddr[k] = pc_t'(s + k);
        #1;
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (rdata[k] !== model[(s + k) % D]) begin
            failures++;
            $display("FAIL read %0d: %h expected %h", s + k, rdata[k], model[(s + k) % D]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
