// Test of the two-bank stack memory.
//
// Each cycle issues two reads and up to two writes at random addresses
// chosen so that the two writes, and the two reads, fall in different
// banks (address LSB). Read data (one cycle later) is compared with a
// model that includes the writes of the read cycle (forwarding). Reads of
// just-written words are made frequent on purpose.
`timescale 1ns/1ps
module stack_mem_tb;
  import jp_pkg::*;
  localparam int W = 1024;
  logic clk = 0;
  saddr_t raddr1 = '0, raddr2 = '0, waddr1 = '0, waddr2 = '0;
  logic we1 = 0, we2 = 0;
  word_t wdata1 = '0, wdata2 = '0, rdata1, rdata2;
  word_t model [W];
  int checks = 0, failures = 0, nfwd = 0;

  stack_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e1, e2;
    // fill
    for (int i = 0; i < W; i += 2) begin
      we1 <= 1; waddr1 <= saddr_t'(i);     wdata1 <= $urandom;
      we2 <= 1; waddr2 <= saddr_t'(i + 1); wdata2 <= $urandom;
      @(posedge clk);
      model[i] = wdata1; model[i+1] = wdata2;
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom_range(0, W - 1);
      automatic int b = $urandom_range(0, W - 1);
      saddr_t r1, r2;
      b = (b & ~1) | (~a & 1);
      we1 <= $urandom_range(0, 1); waddr1 <= saddr_t'(a); wdata1 <= $urandom;
      we2 <= $urandom_range(0, 1); waddr2 <= saddr_t'(b); wdata2 <= $urandom;
      r1 = ($urandom_range(0, 1)) ? saddr_t'(a) : saddr_t'($urandom_range(0, W - 1));
      r2 = saddr_t'((($urandom_range(0, 1)) ? b : $urandom_range(0, W - 1)) & ~1 | (~r1[0] & 1));
      raddr1 <= r1; raddr2 <= r2;
      @(posedge clk);
      if (we1) model[waddr1] = wdata1;
      if (we2) model[waddr2] = wdata2;
      if ((we1 && waddr1 == r1) || (we2 && waddr2 == r2) || (we2 && waddr2 == r1) || (we1 && waddr1 == r2)) nfwd++;
      e1 = model[r1]; e2 = model[r2];
      we1 <= 0; we2 <= 0;
      #1;
      checks += 2;
      if (rdata1 !== e1) begin failures++; $display("FAIL port1 %0d: %h expected %h", r1, rdata1, e1); end
      if (rdata2 !== e2) begin failures++; $display("FAIL port2 %0d: %h expected %h", r2, rdata2, e2); end
    end
    checks++;
    if (nfwd == 0) begin failures++; $display("FAIL: no forwarding case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
