// idea_round: one full IDEA round as a 22-stage pipeline.
//
// With inputs X1..X4 and subkeys Z1..Z6 (the multiplicative ones Z1, Z4, Z5,
// Z6 supplied minus one):
//   cycle 0  : A = X1 (*) Z1, D = X4 (*) Z4 start; B = X2 + Z2, C = X3 + Z3
//   cycle 7  : E = A ^ C, F = B ^ D; E' = E (*) Z5 starts     (uses z5d)
//   cycle 14 : F' = (F + E') (*) Z6 starts                    (uses z6d)
//   cycle 21 : E'' = E' + F'; Y = (A ^ F', C ^ F', B ^ E'', D ^ E'')
//   cycle 22 : Y registered at the outputs
// where (*) is multiplication modulo 2^16+1 (7 cycles) and + is modulo 2^16.
// The two middle words leave the round already swapped. Z1..Z4 must be valid
// when a block enters, Z5 seven cycles and Z6 fourteen cycles later; the
// caller shifts the subkeys along with the data. A valid bit travels with
// each block (reset to 0), so a block in at cycle c is out at c + 22.
// Latency, the delay balancing and the staged subkeys follow the published
// design.
module idea_round
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [15:0] x [4],
  input  logic [15:0] z1d, z2, z3, z4d,    // used at cycle 0
  input  logic [15:0] z5d,                 // used at cycle 7
  input  logic [15:0] z6d,                 // used at cycle 14
  output logic        out_valid,
  output logic [15:0] y [4]
);

  logic [15:0] a7, d7, b_r, c_r, b7, c7;
  logic [15:0] e1_14, f14, a14, b14, c14, d14;
  logic [15:0] f2_21, e1_21, a21, b21, c21, d21;
  logic [ROUND_LAT-1:0] vpipe;

  // level 1
  idea_mulmod u_mul_a (.clk, .x(x[0]), .yd(z1d), .r(a7));
  idea_mulmod u_mul_d (.clk, .x(x[3]), .yd(z4d), .r(d7));
  always_ff @(posedge clk) begin
    b_r <= x[1] + z2;
    c_r <= x[2] + z3;
  end
  idea_delay #(.W(32), .N(MUL_LAT-1)) u_dl_bc (.clk, .d({b_r, c_r}), .q({b7, c7}));

  // level 2: multiply-addition structure, first multiplier
  idea_mulmod u_mul_e (.clk, .x(a7 ^ c7), .yd(z5d), .r(e1_14));
  idea_delay #(.W(80), .N(MUL_LAT)) u_dl_2 (.clk,
    .d({b7 ^ d7, a7, b7, c7, d7}), .q({f14, a14, b14, c14, d14}));

  // level 3: second multiplier
  idea_mulmod u_mul_f (.clk, .x(f14 + e1_14), .yd(z6d), .r(f2_21));
  idea_delay #(.W(80), .N(MUL_LAT)) u_dl_3 (.clk,
    .d({e1_14, a14, b14, c14, d14}), .q({e1_21, a21, b21, c21, d21}));

  // output: final addition, xors and the middle swap
  always_ff @(posedge clk) begin
    y[0] <= a21 ^ f2_21;
    y[1] <= c21 ^ f2_21;
    y[2] <= b21 ^ (e1_21 + f2_21);
    y[3] <= d21 ^ (e1_21 + f2_21);
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[ROUND_LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[ROUND_LAT-1];

endmodule
