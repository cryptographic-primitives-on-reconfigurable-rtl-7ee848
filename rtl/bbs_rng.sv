// bbs_rng: complete random number generator: a true random source seeds a
// Blum Blum Shub generator whose output fills a double buffer.
//
// rrng samples the system clock with the slow external clock, filters the
// samples and fills an NBITS-bit seed buffer. bbs_prng takes the buffer as a
// seed once it is full, checks gcd(seed, M) = 1 (asking for a new buffer if
// not), and then produces OUT_BITS bits per squaring X = X^2 mod M into
// prng_buffer, where a host reads bytes (rd_addr -> rd_data one cycle later)
// and clears each half's full flag after reading it. The two random sources
// work independently and only meet at the seed buffer.
// Defaults: a 1024-bit modulus (fixed by the MODULUS parameter), 10 output
// bits per iteration, a 4096-bit output buffer, as in the published design.
module bbs_rng #(
  parameter int unsigned NBITS    = 1024,
  parameter int unsigned OUT_BITS = 10,
  parameter int unsigned BUF_BITS = 4096,
  parameter logic [NBITS-1:0] MODULUS = NBITS'(1024'hafd2e0977cffacb301da3b791813085b741caeb8059df09c54e5cc7947ec5e116b9e768a3f5f5d3de7e0cf4f17882f074d8ccfaf0754a9f6d13f8c8dc4bfff50099335042d0794ebd8f1d8d4d654a70d586ad593b2a07e338e508c6c728bf2616b3d6c858ed4b34fb474e8f1fa8b3defcde1ea9684ca3fcb03bd93c83a5bd819)
) (
  input  logic                          clk,
  input  logic                          slow_clk,
  input  logic                          rst,
  input  logic [$clog2(BUF_BITS/8)-1:0] rd_addr,
  output logic [7:0]                    rd_data,
  output logic [1:0]                    full,
  input  logic [1:0]                    clear,
  output logic                          seeded,
  output logic                          iter_done,
  output logic                          seed_rejected
);

  logic                     seed_full, seed_bit, seed_req_toggle, out_we, out_bit;
  logic [$clog2(NBITS)-1:0] seed_addr;

  rrng #(.NBITS(NBITS), .FILTER(4)) u_rrng (
    .clk, .slow_clk, .rst,
    .req_toggle(seed_req_toggle), .rd_addr(seed_addr), .rd_bit(seed_bit), .full(seed_full)
  );

  bbs_prng #(.NBITS(NBITS), .OUT_BITS(OUT_BITS), .MODULUS(MODULUS)) u_prng (
    .clk, .rst,
    .seed_full, .seed_addr, .seed_bit, .seed_req_toggle,
    .out_we, .out_bit, .seeded, .iter_done, .seed_rejected
  );

  prng_buffer #(.NBITS(BUF_BITS)) u_buf (
    .clk, .rst, .out_we, .wbit(out_bit), .rd_addr, .rd_data, .full, .clear
  );

endmodule
