// idea_half_round: the IDEA output transformation, a 7-stage pipeline.
//
// Y1 = X1 (*) Z1, Y2 = X3 + Z2, Y3 = X2 + Z3, Y4 = X4 (*) Z4, where (*) is
// multiplication modulo 2^16+1 with Z1 and Z4 given minus one. Taking X3 for
// Y2 and X2 for Y3 undoes the swap the last full round made. The additions
// are delayed to line up with the 7-cycle multipliers. A valid bit travels
// with the data (reset to 0).
module idea_half_round
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [15:0] x [4],
  input  logic [15:0] z1d, z2, z3, z4d,
  output logic        out_valid,
  output logic [15:0] y [4]
);

  logic [15:0] s2, s3;
  logic [HALF_LAT-1:0] vpipe;

  idea_mulmod u_mul_1 (.clk, .x(x[0]), .yd(z1d), .r(y[0]));
  idea_mulmod u_mul_4 (.clk, .x(x[3]), .yd(z4d), .r(y[3]));
  always_ff @(posedge clk) begin
    s2 <= x[2] + z2;
    s3 <= x[1] + z3;
  end
  idea_delay #(.W(32), .N(HALF_LAT-1)) u_dl (.clk, .d({s2, s3}), .q({y[1], y[2]}));

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[HALF_LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[HALF_LAT-1];

endmodule
