// tb_mont_mult_run: one test run of mont_mult at a given size and radix,
// used by tb_mont_mult. Results are added to the counters passed by reference.
module tb_mont_mult_run #(
  parameter int unsigned NBITS = 64,
  parameter int unsigned K     = 4
) (
  input  logic clk,
  input  logic rst,
  ref    int   checks,
  ref    int   failures,
  ref    int   done_cnt
);
  localparam int unsigned M  = (NBITS + K - 1) / K;
  localparam int unsigned D  = (NBITS + 3 + K - 1) / K + 1;
  localparam int unsigned WW = 2 * (K * D) + 64;
  localparam int unsigned NTESTS = 6;

  logic             start = 1'b0, busy, sout_valid, done;
  logic [NBITS-1:0] a = '0;
  logic [NBITS+1:0] b = '0, n = '0;
  logic [K-1:0]     nprime = '0, sout;

  mont_mult #(.NBITS(NBITS), .K(K)) dut (.*);

  function automatic logic [NBITS+1:0] rnd();
    logic [NBITS+1:0] v;
    for (int w = 0; w < (NBITS + 33) / 32; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  // -N^-1 mod 2^K by Newton iteration
  function automatic logic [K-1:0] neginv(input logic [K-1:0] n0);
    logic [63:0] x = 64'd1;
    for (int it = 0; it < 7; it++) x = x * (64'd2 - 64'(n0) * x);
    return K'(-x);
  endfunction

  initial begin
    logic [WW-1:0] S, A, B, N, lhs, rhs;
    int t0, digits;
    @(negedge rst);
    for (int t = 0; t < NTESTS; t++) begin
      n = rnd();
      n[NBITS+1:NBITS] = 2'b00;
      n[NBITS-1] = 1'b1;
      n[0] = 1'b1;
      N = WW'(n);
      A = WW'(rnd()) % N;
      B = WW'(rnd()) % (2 * N);
      if (t == 0) begin A = N - 1; B = 2 * N - 1; end    // largest operands
      a = NBITS'(A);
      b = (NBITS+2)'(B);
      nprime = neginv(n[K-1:0]);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t0 = 1;
      S = '0;
      digits = 0;
      while (!done) begin
        if (sout_valid) begin S = S | (WW'(sout) << (K * digits)); digits++; end
        @(negedge clk);
        t0++;
      end
      S = S | (WW'(sout) << (K * digits)); digits++;
      lhs = (S << (K * M)) % N;
      rhs = (A * B) % N;
      checks += 3;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL K=%0d NBITS=%0d: congruence (test %0d)", K, NBITS, t);
      end
      if (!(S < N + (B << K))) begin
        failures++;
        $display("FAIL K=%0d NBITS=%0d: bound", K, NBITS);
      end
      if (t0 != 2 * M + D + 2 || digits != D) begin
        failures++;
        $display("FAIL K=%0d NBITS=%0d: %0d cycles, %0d digits (want %0d, %0d)",
                 K, NBITS, t0, digits, 2 * M + D + 2, D);
      end
    end
    done_cnt++;
  end
endmodule
