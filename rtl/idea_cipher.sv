// idea_cipher: area-optimised, deeply pipelined IDEA block cipher (ECB).
//
// RINST 22-stage full rounds are chained and followed by one 7-stage output
// transformation; every block passes through the chain 8/RINST times, so
// RINST = 1 is the smallest design and RINST = 8 the fully unrolled one. A
// free-running schedule divides time into passes of 22*RINST cycles. During
// pass 0 the chain's input is the host (in_ready = 1) and up to 22*RINST new
// blocks enter, one per cycle; during the other passes the chain's own
// output is fed back, so each block meets every instantiated round once per
// pass. In the next pass 0 the blocks leave the chain after their eighth
// round and go through the output transformation while the next batch
// enters. A block accepted at cycle c appears at out_data at cycle c + 183
// with out_valid set, whatever RINST is; at most 22*RINST blocks are
// processed per 176 cycles (8*RINST bits per cycle), and bubbles are allowed
// anywhere. With RINST = 8 there is only pass 0 and in_ready stays high.
//
// Subkeys come from idea_key_mem, one copy per instantiated round, all
// written together (load all 52 before use; encryption or decryption is
// chosen only by which subkeys are loaded). Round r of the chain in pass p
// computes IDEA round p*RINST + r; its Z1..Z4 follow the pass of the data
// entering it, Z5 and Z6 the pass of the data 7 and 14 cycles further on.
//
// Interface: in_valid/in_ready handshake on the input (a block is taken when
// both are high); the output has no back-pressure: out_valid marks the cycle
// a ciphertext is present. Words: X1 = in_data[63:48] .. X4 = in_data[15:0].
// The feedback scheme, the choice of how many rounds to instantiate, the
// 22/7/183-cycle latencies and the valid flag that travels with the data
// follow the published design; the free-running pass schedule, the subkey
// copy per round and the handshake names are this design's choices.
module idea_cipher
  import idea_pkg::*;
#(
  parameter int unsigned RINST = 1     // rounds instantiated: 1, 2, 4 or 8
) (
  input  logic        clk,
  input  logic        rst,
  // subkey loading
  input  logic        key_we,
  input  logic [5:0]  key_addr,
  input  logic [15:0] key_data,
  // data
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  output logic        out_valid,
  output logic [63:0] out_data
);

  localparam int unsigned PASS_LEN = ROUND_LAT * RINST;   // cycles per pass
  localparam int unsigned NPASS    = NROUNDS / RINST;     // passes per block
  localparam int unsigned SW       = $clog2(PASS_LEN);

  logic [SW-1:0] slot;      // 0 .. PASS_LEN-1
  logic [2:0]    pass;      // 0 .. NPASS-1
  logic [2:0]    prev_pass;

  logic        c_valid [1:RINST];      // output of chain round r-1
  logic [15:0] c_data  [1:RINST][4];
  logic        fb_valid;
  logic [15:0] fb_data [4];
  logic [15:0] h_out [4];
  logic [15:0] h1d, h2, h3, h4d;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      pass <= '0;
    end else if (slot == SW'(PASS_LEN - 1)) begin
      slot <= '0;
      pass <= (pass == 3'(NPASS - 1)) ? 3'd0 : pass + 3'd1;
    end else begin
      slot <= slot + 1'b1;
    end
  end

  assign in_ready  = (pass == 3'd0) && !rst;
  assign prev_pass = (pass == 3'd0) ? 3'(NPASS - 1) : pass - 3'd1;

  // feedback control: host in pass 0, the chain's own output otherwise
  always_comb begin
    if (pass == 3'd0) begin
      fb_valid = in_valid && in_ready;
      for (int w = 0; w < 4; w++) fb_data[w] = in_data[63-16*w -: 16];
    end else begin
      fb_valid = c_valid[RINST];
      fb_data  = c_data[RINST];
    end
  end

  for (genvar r = 0; r < RINST; r++) begin : g_round
    localparam int unsigned OA = ROUND_LAT * r;      // entry offset in a pass
    localparam int unsigned OB = OA + MUL_LAT;       // Z5 point
    localparam int unsigned OC = OA + 2 * MUL_LAT;   // Z6 point
    logic [2:0]  pass_a, pass_b, pass_c;
    logic [2:0]  round_a, round_b, round_c;
    logic [15:0] z1d, z2, z3, z4d, z5d, z6d, k1d, k2, k3, k4d;
    logic [15:0] x [4];
    logic [15:0] y [4];
    logic        yv;

    if (r == 0) begin : g_first
      assign pass_a = pass;
    end else begin : g_later
      assign pass_a = (slot >= SW'(OA)) ? pass : prev_pass;
    end
    assign pass_b  = (slot >= SW'(OB)) ? pass : prev_pass;
    assign pass_c  = (slot >= SW'(OC)) ? pass : prev_pass;
    assign round_a = 3'(pass_a * RINST + r);
    assign round_b = 3'(pass_b * RINST + r);
    assign round_c = 3'(pass_c * RINST + r);

    idea_key_mem u_keys (
      .clk, .we(key_we), .waddr(key_addr), .wdata(key_data),
      .round_a, .round_b, .round_c,
      .z1d, .z2, .z3, .z4d, .z5d, .z6d,
      .h1d(k1d), .h2(k2), .h3(k3), .h4d(k4d)
    );

    if (r == 0) begin : g_hkeys
      assign h1d = k1d;
      assign h2  = k2;
      assign h3  = k3;
      assign h4d = k4d;
    end

    logic xv;
    if (r == 0) begin : g_in_fb
      assign xv = fb_valid;
      assign x  = fb_data;
    end else begin : g_in_chain
      assign xv = c_valid[r];
      assign x  = c_data[r];
    end

    idea_round u_round (
      .clk, .rst, .in_valid(xv), .x,
      .z1d, .z2, .z3, .z4d, .z5d, .z6d,
      .out_valid(yv), .y
    );

    assign c_valid[r+1] = yv;
    assign c_data[r+1]  = y;
  end

  idea_half_round u_half (
    .clk, .rst, .in_valid(c_valid[RINST] && (pass == 3'd0)), .x(c_data[RINST]),
    .z1d(h1d), .z2(h2), .z3(h3), .z4d(h4d),
    .out_valid, .y(h_out)
  );

  assign out_data = {h_out[0], h_out[1], h_out[2], h_out[3]};

endmodule
