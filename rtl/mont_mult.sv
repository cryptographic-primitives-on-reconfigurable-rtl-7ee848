// mont_mult: variable-radix linear systolic Montgomery multiplier.
//
// Computes S = A * B * 2^(-K*M) mod N for an odd modulus N, M = ceil(NBITS/K),
// using Kornerup's form of Montgomery's method in radix 2^K:
//   S = 0; for i = 0 .. M: q = S*N' mod 2^K; S = (S + q*N) / 2^K + a_i*B
// (a_M = 0). The sum is never fully reduced: for B < 2^(NBITS+2) the result
// stays below N + 2^K * B, and it is congruent to A*B*2^(-K*M) modulo N.
//
// Structure: one f-cell (quotient digit and the exact low-digit term f)
// followed by D = ceil((NBITS+3)/K) + 1 r-cells, cell j holding digit j of S.
// Cell j works on iteration i in cycle 2i + 1 + j: it then sees digit j+1 of
// the previous S (computed by cell j+1 one cycle earlier) and the carry, q and
// a of the current iteration from cell j-1 (also one cycle earlier). So each
// cell is busy every second cycle; in the other cycles the array carries an
// all-zero second stream through the same registers. The radix is set by K
// and the size by NBITS, both parameters; nothing else is hard-coded.
//
// Interface and timing: pulse `start` for one cycle with A, B, N and
// nprime = -N^-1 mod 2^K applied; they are captured. The A digits enter the
// f-cell every second cycle, least significant first. The result leaves as
// D digits of K bits, least significant first, on sout with sout_valid high,
// in cycles 2M+3 .. 2M+D+2 after start; `done` pulses with the last digit,
// and busy is high from start until then (start is ignored while busy).
// Following the published design: the f-cell/r-cell split, the K-bit digit
// interfaces for A, N' and Sout, and the parameterised radix. The two-cycle
// cell schedule, the widths of S, the extra top digit and the output order
// are this design's own choices.
module mont_mult #(
  parameter int unsigned NBITS = 1024,   // size of the modulus
  parameter int unsigned K     = 16      // log2 of the radix
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [NBITS-1:0]   a,
  input  logic [NBITS+1:0]   b,
  input  logic [NBITS+1:0]   n,
  input  logic [K-1:0]       nprime,
  output logic               busy,
  output logic [K-1:0]       sout,
  output logic               sout_valid,
  output logic               done
);

  localparam int unsigned M  = (NBITS + K - 1) / K;        // digits of A
  localparam int unsigned D  = (NBITS + 3 + K - 1) / K + 1; // digits of S, B, N
  localparam int unsigned CW = $clog2(2*M + D + 4);

  logic [K*D-1:0]  b_r, n_r;
  logic [K*(M+1)-1:0] a_sr;
  logic [K-1:0]    np_r;
  logic [CW-1:0]   cnt;
  logic            clr;

  logic [K-1:0] s [D+1];      // s[D] is a constant 0 digit
  logic [K:0]   c [D+1];
  logic [K-1:0] q [D+1];
  logic [K-1:0] av [D+1];
  logic [K-1:0] f0;

  assign clr = start && !busy;

  // control: capture operands, feed the A digits every second cycle
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
      a_sr <= '0;
      b_r  <= '0;
      n_r  <= '0;
      np_r <= '0;
    end else if (clr) begin
      busy <= 1'b1;
      cnt  <= '0;
      a_sr <= (K*(M+1))'(a);
      b_r  <= (K*D)'(b);
      n_r  <= (K*D)'(n);
      np_r <= nprime;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt[0]) a_sr <= a_sr >> K;       // next digit for the next even cycle
      if (done) busy <= 1'b0;
    end
  end

  // f-cell: works in even cycles (iteration i in cycle 2i), zeros otherwise
  mont_fcell #(.K(K)) u_f (
    .clk, .clr,
    .s0(s[0]), .n0(n_r[K-1:0]), .nprime(np_r),
    .a_in((busy && !cnt[0] && cnt <= CW'(2*M)) ? a_sr[K-1:0] : '0),
    .q_out(q[0]), .f_out(f0), .a_out(av[0])
  );
  assign c[0] = {1'b0, f0};
  assign s[D] = '0;

  for (genvar j = 0; j < D; j++) begin : g_cell
    logic [K-1:0] n_next;
    if (j + 1 < D) begin : g_n
      assign n_next = n_r[K*(j+1) +: K];
    end else begin : g_top
      assign n_next = '0;
    end
    mont_rcell #(.K(K)) u_r (
      .clk, .clr,
      .s_next(s[j+1]), .n_next, .b(b_r[K*j +: K]),
      .c_in(c[j]), .q_in(q[j]), .a_in(av[j]),
      .s_out(s[j]), .c_out(c[j+1]), .q_out(q[j+1]), .a_out(av[j+1])
    );
  end

  // result digit j sits in s[j] during cycle 2M + 2 + j (cnt counts from 0
  // in the cycle after start)
  logic [CW-1:0] oidx;
  assign oidx       = cnt - CW'(2*M + 2);
  assign sout_valid = busy && cnt >= CW'(2*M + 2) && cnt < CW'(2*M + 2 + D);
  assign done       = busy && cnt == CW'(2*M + 1 + D);
  always_comb begin
    sout = '0;
    for (int j = 0; j < D; j++)
      if (oidx == CW'(j)) sout = s[j];
  end

  // the top cell never produces a carry when B < 2^(NBITS+2)
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) busy |-> c[D] == '0);

endmodule
