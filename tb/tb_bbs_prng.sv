// tb_bbs_prng: checks the bit-serial BBS generator at 32 bits (modulus
// 0xc975ba71 = 0xcd63 * 0xfb1b, both primes 3 mod 4) with a seed buffer
// modelled in the testbench.
//
// First seed: a multiple of 0xcd63, which the gcd test must reject. Second
// seed: a random value (MSB cleared by the generator), which is accepted.
// For several iterations the OUT_BITS bits leaving the generator must equal
// the low bits of X(i+1) = X(i)^2 mod M computed here, and the cycles per
// iteration must lie between 4*N^2 and 5*N^2 + 4*N (4.5*N^2 on average).
module tb_bbs_prng;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NB = 32;
  localparam int unsigned OB = 5;
  localparam logic [NB-1:0] MOD = 32'hc975ba71;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                    seed_full = 1'b0, seed_bit;
  logic [$clog2(NB)-1:0]   seed_addr;
  logic                    seed_req_toggle, out_we, out_bit, seeded, iter_done, seed_rejected;
  logic [NB-1:0]           seed_mem;

  int checks = 0, failures = 0;

  bbs_prng #(.NBITS(NB), .OUT_BITS(OB), .MODULUS(MOD)) dut (.*);

  always_ff @(posedge clk) seed_bit <= seed_mem[seed_addr];

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collect output bits
  logic [OB-1:0] word;
  int nbits = 0;
  always @(posedge clk) if (out_we) begin word[nbits] = out_bit; nbits++; end

  int rejects = 0;
  always @(posedge clk) if (seed_rejected && !rst) rejects++;

  initial begin
    longint unsigned x, m;
    int t_last, t, cyc;
    m = 64'(MOD);
    seed_mem = 32'(64'hcd63 * 64'd3);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    seed_full = 1'b1;
    // the first seed must be consumed and rejected
    @(posedge seed_req_toggle);
    @(negedge clk);
    seed_full = 1'b0;
    wait (rejects == 1);
    check(!seeded, "multiple of a factor is rejected");
    // second buffer: random seed
    seed_mem = $urandom;
    @(negedge clk) seed_full = 1'b1;
    @(negedge seed_req_toggle);
    @(negedge clk) seed_full = 1'b0;
    x = 64'(seed_mem) & ((64'd1 << (NB - 1)) - 1);
    wait (seeded);
    $display("seed accepted after %0t", $time);
    cyc = 0; t_last = -1;
    for (int it = 0; it < 6; it++) begin
      nbits = 0;
      while (!iter_done) begin @(posedge clk); cyc++; end
      @(posedge clk); cyc++;
      x = (x * x) % m;
      check(nbits == OB, $sformatf("iteration %0d: %0d output bits", it, nbits));
      check(word == OB'(x), $sformatf("iteration %0d: bits %b, want %b", it, word, OB'(x)));
      if (t_last >= 0) begin
        t = cyc - t_last;
        check(t >= 4*NB*NB && t <= 5*NB*NB + 4*NB, $sformatf("iteration took %0d cycles", t));
      end
      t_last = cyc;
    end
    check(rejects == 1, "exactly one rejection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
