// tb_crypto_top_full: one complete operation of each primitive in crypto_top
// with every parameter at its default size.
//
//  IDEA : the standard test vector (key 0001 0002 ... 0008, plaintext
//         0000 0001 0002 0003) must give 11FB ED2B 0198 6DE5, 183 cycles
//         after the block is taken.
//  MONT : one 1024-bit multiplication in radix 2^16; S * 2^(16*M) = A*B mod N
//         and the start-to-done cycle count are checked.
//  RC4  : a 40-bit key search with 96 cells finds a key 50 above the start
//         key in the first batch, which lasts 795 cycles after the
//         256-cycle initialisation of the first S-block half.
//  RNG  : the oscillator model delivers the seed (M-1)/2 for the 1024-bit
//         modulus; after one squaring iteration the first 10 output bits in
//         the buffer must match (X0^2 mod M), and the iteration time must lie
//         in the expected range for n = 1024.
module tb_crypto_top_full;
  timeunit 1ns; timeprecision 1ps;
  import idea_ref_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned MMB = 1024, MMK = 16;
  localparam int unsigned RB = 1024, ROB = 10;

  logic clk = 1'b0, rst = 1'b1, slow_clk;
  always #5 clk = ~clk;

  logic        idea_key_we = 0, idea_in_valid = 0, idea_in_ready, idea_out_valid;
  logic [5:0]  idea_key_addr = 0;
  logic [15:0] idea_key_data = 0;
  logic [63:0] idea_in_data = 0, idea_out_data;
  logic              mm_start = 0, mm_busy, mm_sout_valid, mm_done;
  logic [MMB-1:0]    mm_a = 0;
  logic [MMB+1:0]    mm_b = 0, mm_n = 0;
  logic [MMK-1:0]    mm_nprime = 0, mm_sout;
  logic        rc4_we = 0, rc4_searching, rc4_halted;
  logic [1:0]  rc4_waddr = 0, rc4_raddr = 0;
  logic [63:0] rc4_wdata = 0, rc4_rdata;
  logic [8:0]  rng_rd_addr = 0;
  logic [7:0]  rng_rd_data;
  logic [1:0]  rng_full, rng_clear = 0;
  logic        rng_seeded, rng_iter_done, rng_seed_rejected;

  crypto_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 64'd8_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- oscillator model ----------------
  logic          osc_en, osc_pend;
  logic [RB-1:0] osc_pattern;
  int unsigned   osc_fcnt, osc_wcnt;
  logic [RB-1:0] MODV;
  assign MODV = dut.RNG_MODULUS;
  assign osc_en      = 1'b1;             // the oscillator also runs during reset
  assign osc_pattern = (MODV - 1) >> 1;
  assign osc_fcnt    = 32'(dut.u_rng.u_rrng.fcnt);
  assign osc_wcnt    = 32'(dut.u_rng.u_rrng.wcnt);
  assign osc_pend    = dut.u_rng.u_rrng.req_sync[1] != dut.u_rng.u_rrng.ack_s;
  tb_slow_clk_driver #(.NBITS(RB), .FILTER(4)) u_osc (
    .clk, .enable(osc_en), .zero(1'b0), .pattern(osc_pattern),
    .fcnt(osc_fcnt), .wcnt(osc_wcnt), .req_pending(osc_pend), .slow_clk
  );

  // ---------------- IDEA ----------------
  task automatic test_idea();
    sk_t ez = enc_keys(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    longint unsigned t0;
    for (int n = 0; n < 52; n++) begin
      @(negedge clk); idea_key_we = 1; idea_key_addr = 6'(n); idea_key_data = hw_word(ez, n);
    end
    @(negedge clk) idea_key_we = 0;
    while (!idea_in_ready) @(negedge clk);
    idea_in_valid = 1; idea_in_data = 64'h0000_0001_0002_0003;
    @(posedge clk) t0 = cyc;
    #1 idea_in_valid = 0;
    @(posedge clk iff idea_out_valid);
    check(idea_out_data == 64'h11FB_ED2B_0198_6DE5, $sformatf("IDEA test vector %h", idea_out_data));
    check(cyc - t0 == 183, $sformatf("IDEA latency %0d", cyc - t0));
  endtask

  // ---------------- Montgomery ----------------
  localparam int unsigned MM_M = (MMB + MMK - 1) / MMK;
  localparam int unsigned MM_D = (MMB + 3 + MMK - 1) / MMK + 1;
  localparam int unsigned WW = 2 * MMB + 200;
  task automatic test_mont();
    logic [WW-1:0] A, B, N, S;
    logic [63:0] x;
    int d, c;
    for (int w = 0; w < MMB / 32; w++) begin
      N[32*w +: 32] = $urandom; A[32*w +: 32] = $urandom; B[32*w +: 32] = $urandom;
    end
    N = N & ((WW'(1) << MMB) - 1);
    N[MMB-1] = 1; N[0] = 1;
    A = A % N; B = (B & ((WW'(1) << MMB) - 1)) % N;
    x = 1;
    for (int it = 0; it < 7; it++) x = x * (64'd2 - 64'(N[MMK-1:0]) * x);
    @(negedge clk);
    mm_a = MMB'(A); mm_b = (MMB+2)'(B); mm_n = (MMB+2)'(N); mm_nprime = MMK'(-x);
    mm_start = 1;
    @(negedge clk) mm_start = 0;
    S = 0; d = 0; c = 1;
    while (1) begin
      if (mm_sout_valid) begin S |= WW'(mm_sout) << (MMK * d); d++; end
      if (mm_done) break;
      @(negedge clk);
      c++;
    end
    check(((S << (MMK * MM_M)) % N) == ((A * B) % N), "1024-bit Montgomery product");
    check(c == 2 * MM_M + MM_D + 2, $sformatf("Montgomery cycles %0d", c));
  endtask

  // ---------------- RC4 ----------------
  task automatic test_rc4();
    logic [39:0] secret = 40'h3A_5C_96_0F_E1;
    logic [63:0] r0, r1, r2;
    longint unsigned t0;
    int hits = 0;
    @(negedge clk); rc4_we = 1; rc4_waddr = 2'd1; rc4_wdata = rc4_ref(secret);
    @(negedge clk); rc4_waddr = 2'd0; rc4_wdata = 64'(secret - 40'd50);
    @(negedge clk); rc4_we = 0; t0 = cyc;
    wait (rc4_halted);
    // 256 cycles to initialise the first S half, one 795-cycle batch, one to halt
    check(cyc - t0 == 256 + 795 + 1, $sformatf("RC4 halted after %0d cycles", cyc - t0));
    @(negedge clk);
    rc4_raddr = 2'd0; #1 r0 = rc4_rdata;
    rc4_raddr = 2'd1; #1 r1 = rc4_rdata;
    rc4_raddr = 2'd2; #1 r2 = rc4_rdata;
    for (int c = 0; c < 96; c++) if (c < 64 ? r1[c] : r2[c-64]) begin
      hits++;
      check(r0[39:0] + 40'(c) == secret, $sformatf("RC4 key from cell %0d", c));
    end
    check(hits == 1, $sformatf("RC4 matches %0d", hits));
  endtask

  // ---------------- RNG ----------------
  task automatic test_rng();
    logic [2*RB-1:0] x;
    longint unsigned t0;
    logic [15:0] got;
    x = (MODV - 1) >> 1;
    x = (x * x) % (2*RB)'(MODV);
    wait (rng_seeded);
    t0 = cyc;
    @(posedge clk iff rng_iter_done);
    check(cyc - t0 >= 4 * RB * RB && cyc - t0 <= 5 * RB * RB + 4 * RB,
          $sformatf("RNG iteration took %0d cycles", cyc - t0));
    repeat (3) @(negedge clk);
    rng_rd_addr = 9'd0; @(negedge clk); got[7:0]  = rng_rd_data;
    rng_rd_addr = 9'd1; @(negedge clk); got[15:8] = rng_rd_data;
    check(got[ROB-1:0] == x[ROB-1:0], $sformatf("RNG first output bits %h, expected %h", got[ROB-1:0], x[ROB-1:0]));
    check(!rng_seed_rejected, "seed accepted");
  endtask

  initial begin
    repeat (30) @(negedge clk);   // several slow edges while in reset
    rst = 0;
    fork
      test_idea();
      test_mont();
      test_rc4();
      test_rng();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
