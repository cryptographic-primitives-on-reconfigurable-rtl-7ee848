// mont_fcell: the first cell of the systolic Montgomery multiplier. It
// computes, for one iteration, the quotient digit and the "f" term that
// replaces the division of the low digit:
//   q = (s0 * N') mod 2^K
//   f = (s0 + q * n0) / 2^K          (exact: s0 + q*n0 = 0 mod 2^K)
// where s0 is the lowest digit of the running sum S, n0 the lowest digit of
// the modulus and N' = -N^-1 mod 2^K. q, f and the multiplier digit a are
// registered and handed to cell 0 on the next cycle. K is log2 of the radix.
// Only the low half of s0 * N' and the high half of s0 + q*n0 are needed;
// lint tools report the other bits as unused, which is intended.
module mont_fcell #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [K-1:0] s0,
  input  logic [K-1:0] n0,
  input  logic [K-1:0] nprime,
  input  logic [K-1:0] a_in,
  output logic [K-1:0] q_out,
  output logic [K-1:0] f_out,
  output logic [K-1:0] a_out
);

  logic [2*K-1:0] qfull;
  logic [K-1:0]   q;
  logic [2*K:0]   low;

  assign qfull = s0 * nprime;
  assign q     = qfull[K-1:0];
  assign low   = (2*K+1)'(s0) + (2*K+1)'(q * n0);

  always_ff @(posedge clk) begin
    if (clr) begin
      q_out <= '0;
      f_out <= '0;
      a_out <= '0;
    end else begin
      q_out <= q;
      f_out <= low[2*K-1:K];
      a_out <= a_in;
    end
  end

endmodule
