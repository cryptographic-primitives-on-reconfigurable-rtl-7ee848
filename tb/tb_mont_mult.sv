// tb_mont_mult: checks the systolic Montgomery multiplier against wide
// integer arithmetic. For random odd moduli N (top bit set), random A < N and
// B < 2N it collects the serial result digits and checks
//   S * 2^(K*M) mod N == A * B mod N     and     S < N + 2^K * B,
// plus the number of cycles from start to done (2M + D + 2) and that every
// digit arrives in consecutive cycles. Every radix 2^1 .. 2^16 is run (K = 1,
// 2, 4, 8, 16 at sizes they divide, the others at 100 bits), and radix 2^16
// also at 1024 bits.
module tb_mont_mult;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each instance runs its own test and reports through these counters
  tb_mont_mult_run #(.NBITS(64),  .K(1))  r1  (.clk, .rst, .checks, .failures, .done_cnt);
  tb_mont_mult_run #(.NBITS(64),  .K(2))  r2  (.clk, .rst, .checks, .failures, .done_cnt);
  tb_mont_mult_run #(.NBITS(100), .K(4))  r4  (.clk, .rst, .checks, .failures, .done_cnt);
  tb_mont_mult_run #(.NBITS(128), .K(8))  r8  (.clk, .rst, .checks, .failures, .done_cnt);
  tb_mont_mult_run #(.NBITS(256), .K(16)) r16 (.clk, .rst, .checks, .failures, .done_cnt);
  tb_mont_mult_run #(.NBITS(1024), .K(16)) rfull (.clk, .rst, .checks, .failures, .done_cnt);
  // the remaining radixes 2^3 .. 2^15, at a size that none of them divides
  for (genvar k = 3; k <= 15; k++) begin : g_radix
    if (k != 4 && k != 8)
      tb_mont_mult_run #(.NBITS(100), .K(k)) rk (.clk, .rst, .checks, .failures, .done_cnt);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (done_cnt == 6 + 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
