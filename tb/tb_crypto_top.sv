// tb_crypto_top: end-to-end test of all four primitives in crypto_top, at
// reduced sizes (256-bit radix-2^16 multiplier, 8 RC4 cells, 32-bit BBS with
// a 64-bit output buffer) so that every mechanism is reached quickly.
//
//  IDEA : 30 blocks, more than one 22-block batch, so the input is refused
//         (in_ready low) while the batch circulates; ciphertexts checked; key
//         memory reloaded with decryption subkeys (mode switch) and the
//         ciphertexts decrypted back.
//  MONT : three multiplications checked for S * 2^(16*M) = A*B (mod N).
//  RC4  : search from 13 keys below the secret key; halts in batch 2 with the
//         right key; batches counted.
//  RNG  : the oscillator model first delivers an all-zero seed (rejected),
//         then the seed (M-1)/2, whose gcd test takes the negative-result
//         restore path; output bits are checked against X^2 mod M until both
//         halves of the output buffer have been full, read and cleared.
// Every mechanism is counted and a mechanism that never happened is a failure.
module tb_crypto_top;
  timeunit 1ns; timeprecision 1ps;
  import idea_ref_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned MMB = 256, MMK = 16;
  localparam int unsigned NC = 8;
  localparam int unsigned RB = 32, ROB = 5, RBUF = 64;
  localparam logic [RB-1:0] RMOD = 32'hc975ba71;

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
  logic [$clog2(RBUF/8)-1:0] rng_rd_addr = 0;
  logic [7:0]  rng_rd_data;
  logic [1:0]  rng_full, rng_clear = 0;
  logic        rng_seeded, rng_iter_done, rng_seed_rejected;

  crypto_top #(.MM_NBITS(MMB), .MM_K(MMK), .RC4_NCELLS(NC), .RC4_NBYTES(8),
               .RNG_NBITS(RB), .RNG_OUTBITS(ROB), .RNG_BUFBITS(RBUF), .RNG_MODULUS(RMOD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired: idea_out=%0d rng_reject=%0d seeded=%0d full=%b", idea_got.size(), n_rng_reject, rng_seeded, rng_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_idea_refused = 0, n_idea_modes = 0, n_mm_done = 0, n_rc4_batches = 0, n_rc4_found = 0;
  int n_rng_reject = 0, n_gcd_restore = 0, n_mod_restore = 0, n_buf_full0 = 0, n_buf_full1 = 0;
  logic [1:0] full_q = 0;
  // restore states of the BBS sequencer (its state encoding, in declaration order)
  localparam logic [3:0] ST_GCD_ADD = 4'd4, ST_MOD_ADD = 4'd12;
  logic [3:0] prng_state, prng_state_q = 0;
  assign prng_state = dut.u_rng.u_prng.state;
  always @(posedge clk) if (!rst) begin
    if (idea_in_valid && !idea_in_ready) n_idea_refused++;
    if (mm_done) n_mm_done++;
    if (dut.u_rc4.new_key) n_rc4_batches++;
    if (rng_seed_rejected) n_rng_reject++;
    if (prng_state == ST_GCD_ADD && prng_state_q != ST_GCD_ADD) n_gcd_restore++;
    if (prng_state == ST_MOD_ADD && prng_state_q != ST_MOD_ADD) n_mod_restore++;
    prng_state_q <= prng_state;
    if (rng_full[0] && !full_q[0]) n_buf_full0++;
    if (rng_full[1] && !full_q[1]) n_buf_full1++;
    full_q <= rng_full;
  end

  // ---------------- oscillator model ----------------
  logic drv_zero = 1'b1, osc_en, osc_pend;
  logic [RB-1:0] osc_pattern;
  int unsigned osc_fcnt, osc_wcnt;
  assign osc_en      = 1'b1;             // the oscillator also runs during reset
  assign osc_pattern = (RMOD - 1) >> 1;
  assign osc_fcnt    = 32'(dut.u_rng.u_rrng.fcnt);
  assign osc_wcnt    = 32'(dut.u_rng.u_rrng.wcnt);
  assign osc_pend    = dut.u_rng.u_rrng.req_sync[1] != dut.u_rng.u_rrng.ack_s;
  tb_slow_clk_driver #(.NBITS(RB), .FILTER(4)) u_osc (
    .clk, .enable(osc_en), .zero(drv_zero), .pattern(osc_pattern),
    .fcnt(osc_fcnt), .wcnt(osc_wcnt), .req_pending(osc_pend), .slow_clk
  );

  // ---------------- IDEA ----------------
  logic [63:0] idea_got [$];
  always @(posedge clk) if (idea_out_valid && !rst) idea_got.push_back(idea_out_data);

  task automatic idea_load(input sk_t z);
    for (int n = 0; n < 52; n++) begin
      @(negedge clk); idea_key_we = 1; idea_key_addr = 6'(n); idea_key_data = hw_word(z, n);
    end
    @(negedge clk) idea_key_we = 0;
    n_idea_modes++;
  endtask

  task automatic idea_send(input logic [63:0] q [$]);
    int n = 0;
    while (n < q.size()) begin
      @(negedge clk);
      idea_in_valid = 1; idea_in_data = q[n];
      @(posedge clk);
      if (idea_in_ready) n++;
      #1 idea_in_valid = 0;
    end
  endtask

  task automatic test_idea();
    sk_t ez = enc_keys(128'h2BD6459F82C5B300952C49104881FF48);
    logic [63:0] pt [$], ct [$];
    for (int n = 0; n < 30; n++) pt.push_back({$urandom, $urandom});
    idea_load(ez);
    idea_send(pt);
    wait (idea_got.size() == 30);
    foreach (pt[n]) check(idea_got[n] == cipher(pt[n], ez), $sformatf("IDEA block %0d", n));
    ct = idea_got;
    idea_got.delete();
    idea_load(dec_keys(ez));
    idea_send(ct);
    wait (idea_got.size() == 30);
    foreach (pt[n]) check(idea_got[n] == pt[n], $sformatf("IDEA decrypt %0d", n));
  endtask

  // ---------------- Montgomery ----------------
  localparam int unsigned MM_M = (MMB + MMK - 1) / MMK;
  localparam int unsigned MM_D = (MMB + 3 + MMK - 1) / MMK + 1;
  localparam int unsigned WW = 2 * MMB + 200;
  task automatic test_mont();
    logic [WW-1:0] A, B, N, S;
    logic [63:0] x;
    int d, cyc;
    for (int t = 0; t < 3; t++) begin
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
      S = 0; d = 0; cyc = 1;
      while (1) begin
        if (mm_sout_valid) begin S |= WW'(mm_sout) << (MMK * d); d++; end
        if (mm_done) break;
        @(negedge clk);
        cyc++;
      end
      check(cyc == 2 * MM_M + MM_D + 2, $sformatf("Montgomery cycles %0d", cyc));
      check(((S << (MMK * MM_M)) % N) == ((A * B) % N), $sformatf("Montgomery product %0d", t));
    end
  endtask

  // ---------------- RC4 ----------------
  task automatic test_rc4();
    logic [39:0] secret = 40'hC0_FF_EE_12_34;
    logic [63:0] r0, r1;
    @(negedge clk); rc4_we = 1; rc4_waddr = 2'd1; rc4_wdata = rc4_ref(secret);
    @(negedge clk); rc4_waddr = 2'd0; rc4_wdata = 64'(secret - 40'd13);
    @(negedge clk); rc4_we = 0;
    wait (rc4_halted);
    @(negedge clk);
    rc4_raddr = 2'd0; #1 r0 = rc4_rdata;
    rc4_raddr = 2'd1; #1 r1 = rc4_rdata;
    for (int c = 0; c < NC; c++) if (r1[c]) begin
      n_rc4_found++;
      check(r0[39:0] + 40'(c) == secret, "RC4 key recovered");
    end
  endtask

  // ---------------- RNG ----------------
  task automatic test_rng();
    logic [RB-1:0] x = (RMOD - 1) >> 1;
    bit bits [$];
    logic [RBUF-1:0] stream;
    int nstream = 0, half_read = 0;
    // first fill is all zeros and must be rejected
    wait (n_rng_reject == 1);
    drv_zero = 1'b0;
    wait (rng_seeded);
    // expected stream
    for (int it = 0; it < 40; it++) begin
      x = RB'((64'(x) * 64'(x)) % 64'(RMOD));
      for (int b = 0; b < ROB; b++) bits.push_back(x[b]);
    end
    // read each half when it is full, then clear its flag
    while (half_read < 2) begin
      @(negedge clk);
      for (int h = 0; h < 2; h++) if (rng_full[h] && half_read == h) begin
        for (int a = 0; a < RBUF / 16; a++) begin
          rng_rd_addr = $clog2(RBUF/8)'(h * RBUF / 16 + a);
          @(negedge clk);
          for (int k = 0; k < 8; k++)
            check(rng_rd_data[k] == bits[h * RBUF / 2 + 8 * a + k],
                  $sformatf("RNG output bit %0d", h * RBUF / 2 + 8 * a + k));
        end
        rng_clear[h] = 1'b1;
        @(negedge clk) rng_clear[h] = 1'b0;
        check(!rng_full[h], "full flag cleared");
        half_read++;
      end
    end
  endtask

  initial begin
    repeat (30) @(negedge clk);   // several slow edges while in reset
    rst = 0;
    fork
      begin test_idea(); $display("%t IDEA done", $time); end
      begin test_mont(); $display("%t Montgomery done", $time); end
      begin test_rc4();  $display("%t RC4 done", $time); end
      begin test_rng();  $display("%t RNG done", $time); end
    join
    check(n_idea_refused > 0, "IDEA input refused while a batch circulates");
    check(n_idea_modes >= 2, "IDEA switched from encryption to decryption subkeys");
    check(n_mm_done == 3, "three Montgomery multiplications done");
    check(n_rc4_batches >= 2, "RC4 ran more than one batch");
    check(n_rc4_found == 1, "RC4 exactly one match");
    check(n_rng_reject >= 1, "RNG rejected a seed");
    check(n_gcd_restore >= 1, "RNG gcd restore path taken");
    check(n_mod_restore >= 1, "RNG mod restore path taken");
    check(n_buf_full0 >= 1 && n_buf_full1 >= 1, "both output buffer halves filled");
    $display("mechanisms: idea_refused=%0d idea_modes=%0d mm_done=%0d rc4_batches=%0d rc4_found=%0d",
             n_idea_refused, n_idea_modes, n_mm_done, n_rc4_batches, n_rc4_found);
    $display("            rng_reject=%0d gcd_restore=%0d mod_restore=%0d buf_full=%0d/%0d",
             n_rng_reject, n_gcd_restore, n_mod_restore, n_buf_full0, n_buf_full1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
