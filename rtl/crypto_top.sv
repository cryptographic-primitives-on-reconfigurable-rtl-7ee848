// crypto_top: four cryptographic primitives for one FPGA, side by side:
//   - idea_cipher    deeply pipelined IDEA block cipher (IDEA_RINST rounds,
//                    reused 8/IDEA_RINST times, plus the output transformation)
//   - mont_mult      variable-radix systolic Montgomery multiplier for RSA
//   - rc4_keysearch  parallel brute-force RC4 key search engine
//   - bbs_rng        true random source seeding a Blum Blum Shub generator
// They share only the clock and reset (bbs_rng also takes the slow external
// oscillator). Each keeps its own host-side ports, prefixed idea_, mm_, rc4_
// and rng_; see the individual modules for their protocols and timing. In a
// complete system the Montgomery multiplier would serve the RSA key exchange
// and the random number generator would supply session keys for the IDEA or
// RC4 ciphers; that software layer is outside this design.
module crypto_top #(
  parameter int unsigned IDEA_RINST  = 1,
  parameter int unsigned MM_NBITS    = 1024,
  parameter int unsigned MM_K        = 16,
  parameter int unsigned RC4_NCELLS  = 96,
  parameter int unsigned RC4_NBYTES  = 8,
  parameter int unsigned RNG_NBITS   = 1024,
  parameter int unsigned RNG_OUTBITS = 10,
  parameter int unsigned RNG_BUFBITS = 4096,
  parameter logic [RNG_NBITS-1:0] RNG_MODULUS = RNG_NBITS'(1024'hafd2e0977cffacb301da3b791813085b741caeb8059df09c54e5cc7947ec5e116b9e768a3f5f5d3de7e0cf4f17882f074d8ccfaf0754a9f6d13f8c8dc4bfff50099335042d0794ebd8f1d8d4d654a70d586ad593b2a07e338e508c6c728bf2616b3d6c858ed4b34fb474e8f1fa8b3defcde1ea9684ca3fcb03bd93c83a5bd819)
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic                             slow_clk,
  // IDEA
  input  logic                             idea_key_we,
  input  logic [5:0]                       idea_key_addr,
  input  logic [15:0]                      idea_key_data,
  input  logic                             idea_in_valid,
  output logic                             idea_in_ready,
  input  logic [63:0]                      idea_in_data,
  output logic                             idea_out_valid,
  output logic [63:0]                      idea_out_data,
  // Montgomery multiplier
  input  logic                             mm_start,
  input  logic [MM_NBITS-1:0]              mm_a,
  input  logic [MM_NBITS+1:0]              mm_b,
  input  logic [MM_NBITS+1:0]              mm_n,
  input  logic [MM_K-1:0]                  mm_nprime,
  output logic                             mm_busy,
  output logic [MM_K-1:0]                  mm_sout,
  output logic                             mm_sout_valid,
  output logic                             mm_done,
  // RC4 key search
  input  logic                             rc4_we,
  input  logic [1:0]                       rc4_waddr,
  input  logic [63:0]                      rc4_wdata,
  input  logic [1:0]                       rc4_raddr,
  output logic [63:0]                      rc4_rdata,
  output logic                             rc4_searching,
  output logic                             rc4_halted,
  // random number generator
  input  logic [$clog2(RNG_BUFBITS/8)-1:0] rng_rd_addr,
  output logic [7:0]                       rng_rd_data,
  output logic [1:0]                       rng_full,
  input  logic [1:0]                       rng_clear,
  output logic                             rng_seeded,
  output logic                             rng_iter_done,
  output logic                             rng_seed_rejected
);

  idea_cipher #(.RINST(IDEA_RINST)) u_idea (
    .clk, .rst,
    .key_we(idea_key_we), .key_addr(idea_key_addr), .key_data(idea_key_data),
    .in_valid(idea_in_valid), .in_ready(idea_in_ready), .in_data(idea_in_data),
    .out_valid(idea_out_valid), .out_data(idea_out_data)
  );

  mont_mult #(.NBITS(MM_NBITS), .K(MM_K)) u_mont (
    .clk, .rst, .start(mm_start), .a(mm_a), .b(mm_b), .n(mm_n), .nprime(mm_nprime),
    .busy(mm_busy), .sout(mm_sout), .sout_valid(mm_sout_valid), .done(mm_done)
  );

  rc4_keysearch #(.NCELLS(RC4_NCELLS), .NBYTES(RC4_NBYTES)) u_rc4 (
    .clk, .rst,
    .host_we(rc4_we), .host_waddr(rc4_waddr), .host_wdata(rc4_wdata),
    .host_raddr(rc4_raddr), .host_rdata(rc4_rdata),
    .searching(rc4_searching), .halted(rc4_halted)
  );

  bbs_rng #(.NBITS(RNG_NBITS), .OUT_BITS(RNG_OUTBITS), .BUF_BITS(RNG_BUFBITS),
            .MODULUS(RNG_MODULUS)) u_rng (
    .clk, .slow_clk, .rst,
    .rd_addr(rng_rd_addr), .rd_data(rng_rd_data), .full(rng_full), .clear(rng_clear),
    .seeded(rng_seeded), .iter_done(rng_iter_done), .seed_rejected(rng_seed_rejected)
  );

endmodule
