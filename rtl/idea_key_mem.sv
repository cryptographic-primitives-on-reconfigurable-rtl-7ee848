// idea_key_mem: the subkey store of the IDEA cipher.
//
// The 52 subkeys (six per full round, four for the output transformation)
// are computed once in software and written here, so no key-schedule logic
// is needed. The multiplicative subkeys (Z1, Z4, Z5, Z6 of a round and Z1,
// Z4 of the output transformation) must be written minus one, which removes
// a subtracter from every multiplier; decryption just uses the decryption
// subkeys in the same layout. Word k holds subkey k in the order
// Z1(1)..Z6(1), Z1(2).., Z1(9)..Z4(9).
//
// Reads are combinational (shift-register LUT memory in an FPGA). Because a
// round is 22 stages deep, data of two different rounds can be inside it at
// once, so three read ports are offered: Z1..Z4 for the round whose data
// enters now (round_a), Z5 for the round whose data is 7 stages in (round_b)
// and Z6 for the round 14 stages in (round_c). The output transformation's
// four subkeys are always available. Writing is one 16-bit word per cycle.
// Holding precomputed subkeys and changing Z5 and Z6 seven and fourteen
// cycles after Z1..Z4 follows the published design; indexed read ports
// instead of a rotating memory are this design's choice.
module idea_key_mem
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        we,
  input  logic [5:0]  waddr,
  input  logic [15:0] wdata,
  input  logic [2:0]  round_a,
  input  logic [2:0]  round_b,
  input  logic [2:0]  round_c,
  output logic [15:0] z1d, z2, z3, z4d,
  output logic [15:0] z5d,
  output logic [15:0] z6d,
  output logic [15:0] h1d, h2, h3, h4d
);

  logic [15:0] mem [NSUBKEYS];

  always_ff @(posedge clk)
    if (we && waddr < 6'(NSUBKEYS)) mem[waddr] <= wdata;

  assign z1d = mem[6*round_a + 0];
  assign z2  = mem[6*round_a + 1];
  assign z3  = mem[6*round_a + 2];
  assign z4d = mem[6*round_a + 3];
  assign z5d = mem[6*round_b + 4];
  assign z6d = mem[6*round_c + 5];
  assign h1d = mem[48];
  assign h2  = mem[49];
  assign h3  = mem[50];
  assign h4d = mem[51];

endmodule
