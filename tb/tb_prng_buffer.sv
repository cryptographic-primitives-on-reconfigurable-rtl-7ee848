// tb_prng_buffer: checks the random-bit output buffer at 128 bits.
// Random bits are written with random gaps; the test checks that full[h]
// rises on exactly the write that completes half h (64 writes per half),
// that every byte read back holds the bits in write order (bit 0 first),
// that clear[h] drops the flag, that the pointer wraps and overwrites the
// first half, and that a clear arriving on the same cycle as the write that
// fills that half loses to the write.
module tb_prng_buffer;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned NB = 128;

  logic clk = 1'b0, rst = 1'b1, out_we = 1'b0, wbit = 1'b0;
  logic [$clog2(NB/8)-1:0] rd_addr = '0;
  logic [7:0] rd_data;
  logic [1:0] full, clear = '0;
  always #5 clk = ~clk;

  prng_buffer #(.NBITS(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_bits [NB];
  int nwritten = 0;

  // write one bit (with a random idle gap before it); returns on the negedge after
  task automatic put(input bit b, input bit clr_same_cycle = 0, input int h = 0);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    out_we = 1; wbit = b;
    if (clr_same_cycle) clear[h] = 1'b1;
    ref_bits[nwritten % NB] = b;
    nwritten++;
    @(negedge clk);
    out_we = 0; clear = '0;
  endtask

  task automatic read_half(input int h);
    for (int a = 0; a < NB / 16; a++) begin
      rd_addr = $clog2(NB/8)'(h * NB / 16 + a);
      @(negedge clk);
      for (int k = 0; k < 8; k++)
        check(rd_data[k] == ref_bits[h * NB / 2 + 8 * a + k], $sformatf("half %0d byte %0d bit %0d", h, a, k));
    end
  endtask

  task automatic clear_half(input int h);
    clear[h] = 1'b1;
    @(negedge clk) clear[h] = 1'b0;
    check(!full[h], $sformatf("full[%0d] cleared", h));
  endtask

  initial begin
    int early;
    repeat (3) @(negedge clk);
    rst = 0;
    check(full == 2'b00, "empty after reset");
    for (int r = 0; r < 2; r++) begin
      early = 0;
      for (int n = 0; n < NB / 2; n++) begin
        if (full[r]) early++;
        put($urandom_range(0, 1));
      end
      check(early == 0, $sformatf("full[%0d] not set before 64 writes", r));
      check(full[r], $sformatf("full[%0d] set after 64 writes", r));
    end
    check(full == 2'b11, "both halves full");
    read_half(0);
    read_half(1);
    clear_half(0);
    check(full[1], "clearing half 0 leaves half 1 full");
    // wrap: refill half 0 (overwrites), the last write racing a clear of half 0
    for (int n = 0; n < NB / 2 - 1; n++) put($urandom_range(0, 1));
    check(!full[0], "half 0 not yet full again");
    put($urandom_range(0, 1), 1'b1, 0);
    check(full[0], "fill wins over a simultaneous clear");
    read_half(0);
    clear_half(0);
    clear_half(1);
    check(full == 2'b00, "all clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
