// bbs_alu: the bit-serial ALU of the Blum Blum Shub generator.
//
// Operands arrive one bit per cycle, least significant bit first. With the
// carry register c:
//   op = 0, sub = 0 : s = A + B + c        (addition)
//   op = 0, sub = 1 : s = B - A            (B + ~A + c, c starting at 1)
//   op = 1          : s = B + c            (copy, or add a single carry)
// `first` marks the first bit of an n-bit pass: the carry then starts at
// `sub` instead of its stored value, and the result flags restart. After the
// last bit `carry` is the carry out (for subtraction: 1 = no borrow, so
// B >= A), zero_flag is set if every result bit was 0 and one_flag if the
// result was exactly 1. `en` advances the carry and flags; without it the ALU
// holds its state. `clr` clears carry and flags. The three operations follow
// the published ALU; the flag and `first` mechanics are this design's.
module bbs_alu (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic first,
  input  logic clr,
  input  logic op,
  input  logic sub,
  input  logic a,
  input  logic b,
  output logic s,
  output logic carry,
  output logic zero_flag,
  output logic one_flag
);

  logic cin, ai, cn;

  assign cin = first ? sub : carry;
  assign ai  = sub ? ~a : a;

  always_comb begin
    if (!op) begin
      s  = ai ^ b ^ cin;
      cn = (ai & b) | (ai & cin) | (b & cin);
    end else begin
      s  = b ^ cin;
      cn = b & cin;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      carry     <= 1'b0;
      zero_flag <= 1'b0;
      one_flag  <= 1'b0;
    end else if (en) begin
      carry     <= cn;
      zero_flag <= first ? ~s : (zero_flag & ~s);
      one_flag  <= first ?  s : (one_flag & ~s);
    end
  end

endmodule
