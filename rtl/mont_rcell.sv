// mont_rcell: one radix-2^K cell of the linear systolic Montgomery
// multiplier, responsible for digit j of the running sum S.
//
// In the iteration S := (S + qN) / 2^K + aB the cell forms
//   v = s_next + q * n_next + a * b + c_in
// where s_next and n_next are digit j+1 of S and N (the division by 2^K is a
// one-digit shift), b is digit j of B and c_in the carry from cell j-1 (from
// the f-cell for cell 0). It keeps digit j of the new S (v mod 2^K) and
// passes the carry (v / 2^K, at most 2^(K+1) - 1, so K+1 bits), q and a to
// cell j+1, all registered. Bit widths: s, n, b, q, a are K bits, v needs
// 2K+2 bits, so no signal can overflow. One iteration per cell every two
// cycles, skewed by one cycle per cell (see mont_mult). The top bit of v is
// never set (the bound above); lint tools report it as unused.
module mont_rcell #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [K-1:0] s_next,
  input  logic [K-1:0] n_next,
  input  logic [K-1:0] b,
  input  logic [K:0]   c_in,
  input  logic [K-1:0] q_in,
  input  logic [K-1:0] a_in,
  output logic [K-1:0] s_out,
  output logic [K:0]   c_out,
  output logic [K-1:0] q_out,
  output logic [K-1:0] a_out
);

  logic [2*K+1:0] v;

  assign v = (2*K+2)'(s_next) + (2*K+2)'(q_in * n_next)
           + (2*K+2)'(a_in * b) + (2*K+2)'(c_in);

  always_ff @(posedge clk) begin
    if (clr) begin
      s_out <= '0;
      c_out <= '0;
      q_out <= '0;
      a_out <= '0;
    end else begin
      s_out <= v[K-1:0];
      c_out <= v[2*K:K];
      q_out <= q_in;
      a_out <= a_in;
    end
  end

endmodule
