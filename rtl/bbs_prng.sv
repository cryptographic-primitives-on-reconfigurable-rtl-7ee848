// bbs_prng: bit-serial Blum Blum Shub pseudo random number generator,
// X(i+1) = X(i)^2 mod M, emitting the OUT_BITS least significant bits of
// every X(i+1).
//
// All arithmetic goes through one bit-serial ALU (bbs_alu) and four NBITS-bit
// shift registers that only shift right (LSB out, new bit in at the MSB):
// M (the modulus, fixed by a parameter), X, and Y/Z, which together form the
// 2*NBITS-bit register YZ. The controller runs these steps, each pass taking
// NBITS cycles unless noted:
//
//  seed   wait for a full seed buffer; load it into Y and Z (MSB forced to 0
//         so the seed is below M) and copy M into X; NBITS+1 cycles; then
//         ask the true random source for a fresh buffer.
//  gcd    Euclid by subtraction, X = X - Y; stop with "valid" if the result
//         is 1, "reject" if it is 0; restore X = X + Y if it went negative;
//         swap X and Y; repeat. A rejected (or all-zero) seed is dropped and
//         the next buffer is used.
//  init   X = Z (the seed), Y = 0.
//  square NBITS times: Y = Y + X if Z[0] is 1 (else Y = Y + 0), then one cycle
//         shifting YZ right with the carry entering Y. YZ ends up as X*X.
//         NBITS*(NBITS+1) cycles.
//  mod    NBITS times: shift YZ left by one bit, done as a right rotation of
//         2*NBITS-1 cycles in which the bit leaving Y is kept as an overflow
//         bit and a 0 enters Z; Y = Y - M; one decision cycle; Y = Y + M if
//         the result (with the overflow bit) was negative. Y ends up as
//         X*X mod M, in about 3.5*NBITS^2 cycles.
//  copy   X = Y, Z = Y, Y = 0; the first OUT_BITS bits leaving Y go to the
//         output buffer (out_we, out_bit, LSB first). Back to square.
//
// One output word costs about 4.5*NBITS^2 cycles. The seed buffer is read
// through a synchronous port (seed_addr, seed_bit one cycle later). M must be
// odd and have its top bit set. Following the published design: the
// registers M, X, Y, Z, the serial ALU with zero/one flags, Euclid by
// subtraction, shift-and-add squaring, the restoring remainder with the left
// shift done as a long right rotation, and the OUT_BITS = log2(log2 M)
// output bits. This design's choices: the order "shift, then subtract" in the
// remainder loop with an overflow bit, the forced-zero seed MSB, the
// rejection of an all-zero seed, the decision cycles and the handshake with
// the seed buffer (toggle request, full flag).
module bbs_prng #(
  parameter int unsigned NBITS    = 1024,
  parameter int unsigned OUT_BITS = 10,
  parameter logic [NBITS-1:0] MODULUS = NBITS'(1024'hafd2e0977cffacb301da3b791813085b741caeb8059df09c54e5cc7947ec5e116b9e768a3f5f5d3de7e0cf4f17882f074d8ccfaf0754a9f6d13f8c8dc4bfff50099335042d0794ebd8f1d8d4d654a70d586ad593b2a07e338e508c6c728bf2616b3d6c858ed4b34fb474e8f1fa8b3defcde1ea9684ca3fcb03bd93c83a5bd819)
) (
  input  logic                     clk,
  input  logic                     rst,
  // seed buffer (true random source)
  input  logic                     seed_full,
  output logic [$clog2(NBITS)-1:0] seed_addr,
  input  logic                     seed_bit,
  output logic                     seed_req_toggle,   // toggles to ask for new data
  // output bit stream
  output logic                     out_we,
  output logic                     out_bit,
  // status
  output logic                     seeded,      // a valid seed is in use
  output logic                     iter_done,   // pulses once per X(i+1)
  output logic                     seed_rejected // pulses when a seed is all zero or fails the gcd test
);

  localparam int unsigned BW = $clog2(2 * NBITS + 1);
  localparam int unsigned IW = $clog2(NBITS + 1);

  typedef enum logic [3:0] {
    S_WAIT, S_LOAD, S_GCD_SUB, S_GCD_CHK, S_GCD_ADD, S_GCD_SWAP, S_INITX,
    S_MUL_ADD, S_MUL_SH, S_MOD_ROT, S_MOD_SUB, S_MOD_CHK, S_MOD_ADD, S_COPY
  } state_e;

  state_e           state;
  logic [BW-1:0]    bc;     // bit counter within a pass
  logic [IW-1:0]    ic;     // iteration counter (square / mod)
  logic [NBITS-1:0] mreg, xreg, yreg, zreg;
  logic             m_sh, x_sh, y_sh, z_sh;
  logic             x_in, y_in, z_in;
  logic             ov, seed_nz;

  // ALU
  logic alu_en, alu_first, alu_clr, alu_op, alu_sub, alu_a, alu_b;
  logic alu_s, alu_carry, zero_flag, one_flag;

  bbs_alu u_alu (
    .clk, .rst, .en(alu_en), .first(alu_first), .clr(alu_clr),
    .op(alu_op), .sub(alu_sub), .a(alu_a), .b(alu_b),
    .s(alu_s), .carry(alu_carry), .zero_flag, .one_flag
  );

  logic last_bit;   // last cycle of an NBITS-cycle pass
  assign last_bit = (bc == BW'(NBITS - 1));

  initial begin
    assert (MODULUS[0] && MODULUS[NBITS-1]) else $error("MODULUS must be odd with its top bit set");
  end

  // datapath control
  always_comb begin
    m_sh = 1'b0; x_sh = 1'b0; y_sh = 1'b0; z_sh = 1'b0;
    x_in = xreg[0]; y_in = yreg[0]; z_in = zreg[0];
    alu_en = 1'b0; alu_first = (bc == '0); alu_clr = 1'b0;
    alu_op = 1'b0; alu_sub = 1'b0; alu_a = 1'b0; alu_b = 1'b0;
    out_we = 1'b0; out_bit = yreg[0];
    seed_addr = bc[$clog2(NBITS)-1:0];
    unique case (state)
      S_LOAD: if (bc != '0) begin
        y_sh = 1'b1; z_sh = 1'b1; m_sh = 1'b1; x_sh = 1'b1;
        y_in = (bc == BW'(NBITS)) ? 1'b0 : seed_bit;
        z_in = y_in;
        x_in = mreg[0];
      end
      S_GCD_SUB, S_GCD_ADD: begin
        alu_en = 1'b1; alu_sub = (state == S_GCD_SUB);
        alu_a = yreg[0]; alu_b = xreg[0];
        x_sh = 1'b1; x_in = alu_s;
        y_sh = 1'b1; y_in = yreg[0];
      end
      S_GCD_SWAP: begin
        x_sh = 1'b1; x_in = yreg[0];
        y_sh = 1'b1; y_in = xreg[0];
      end
      S_INITX: begin
        x_sh = 1'b1; x_in = zreg[0];
        z_sh = 1'b1; z_in = zreg[0];
        y_sh = 1'b1; y_in = 1'b0;
      end
      S_MUL_ADD: begin
        alu_en = 1'b1; alu_op = ~zreg[0];
        alu_a = xreg[0]; alu_b = yreg[0];
        y_sh = 1'b1; y_in = alu_s;
        x_sh = 1'b1; x_in = xreg[0];
      end
      S_MUL_SH: begin
        y_sh = 1'b1; y_in = alu_carry;
        z_sh = 1'b1; z_in = yreg[0];
        alu_clr = 1'b1;
      end
      S_MOD_ROT: begin
        y_sh = 1'b1; y_in = zreg[0];
        z_sh = 1'b1; z_in = (bc == BW'(NBITS - 1)) ? 1'b0 : yreg[0];
      end
      S_MOD_SUB, S_MOD_ADD: begin
        alu_en = 1'b1; alu_sub = (state == S_MOD_SUB);
        alu_a = mreg[0]; alu_b = yreg[0];
        y_sh = 1'b1; y_in = alu_s;
        m_sh = 1'b1;
      end
      S_COPY: begin
        x_sh = 1'b1; x_in = yreg[0];
        z_sh = 1'b1; z_in = yreg[0];
        y_sh = 1'b1; y_in = 1'b0;
        out_we = (bc < BW'(OUT_BITS));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (m_sh) mreg <= {mreg[0], mreg[NBITS-1:1]};
    if (x_sh) xreg <= {x_in, xreg[NBITS-1:1]};
    if (y_sh) yreg <= {y_in, yreg[NBITS-1:1]};
    if (z_sh) zreg <= {z_in, zreg[NBITS-1:1]};
    if (rst) mreg <= MODULUS;
  end

  // sequencing
  always_ff @(posedge clk) begin
    iter_done     <= 1'b0;
    seed_rejected <= 1'b0;
    if (rst) begin
      state           <= S_WAIT;
      bc              <= '0;
      ic              <= '0;
      ov              <= 1'b0;
      seed_nz         <= 1'b0;
      seeded          <= 1'b0;
      seed_req_toggle <= 1'b0;
    end else begin
      bc <= bc + 1'b1;
      unique case (state)
        S_WAIT: begin
          bc <= '0;
          seed_nz <= 1'b0;
          if (seed_full) state <= S_LOAD;
        end
        S_LOAD: begin
          if (bc != '0 && bc != BW'(NBITS) && seed_bit) seed_nz <= 1'b1;
          if (bc == BW'(NBITS)) begin
            bc <= '0;
            seed_req_toggle <= ~seed_req_toggle;     // consume the buffer
            state <= seed_nz ? S_GCD_SUB : S_WAIT;
            seed_rejected <= !seed_nz;               // all-zero seed
          end
        end
        S_GCD_SUB: if (last_bit) begin bc <= '0; state <= S_GCD_CHK; end
        S_GCD_CHK: begin
          bc <= '0;
          if (alu_carry && one_flag)       state <= S_INITX;
          else if (alu_carry && zero_flag) begin
            state <= S_WAIT;
            seed_rejected <= 1'b1;
          end
          else if (!alu_carry)             state <= S_GCD_ADD;
          else                             state <= S_GCD_SWAP;
        end
        S_GCD_ADD:  if (last_bit) begin bc <= '0; state <= S_GCD_SWAP; end
        S_GCD_SWAP: if (last_bit) begin bc <= '0; state <= S_GCD_SUB; end
        S_INITX: if (last_bit) begin
          bc <= '0; ic <= '0; seeded <= 1'b1; state <= S_MUL_ADD;
        end
        S_MUL_ADD: if (last_bit) begin bc <= '0; state <= S_MUL_SH; end
        S_MUL_SH: begin
          bc <= '0;
          if (ic == IW'(NBITS - 1)) begin ic <= '0; state <= S_MOD_ROT; end
          else begin ic <= ic + 1'b1; state <= S_MUL_ADD; end
        end
        S_MOD_ROT: if (bc == BW'(2 * NBITS - 2)) begin bc <= '0; state <= S_MOD_SUB; end
                   else if (bc == BW'(NBITS - 1)) ov <= yreg[0];
        S_MOD_SUB: if (last_bit) begin bc <= '0; state <= S_MOD_CHK; end
        S_MOD_CHK, S_MOD_ADD: begin
          if (state == S_MOD_CHK && !ov && !alu_carry) begin
            bc <= '0; state <= S_MOD_ADD;        // negative: restore
          end else if (state == S_MOD_CHK || last_bit) begin
            bc <= '0;
            if (ic == IW'(NBITS - 1)) begin ic <= '0; state <= S_COPY; end
            else begin ic <= ic + 1'b1; state <= S_MOD_ROT; end
          end
        end
        S_COPY: if (last_bit) begin
          bc <= '0; ic <= '0; iter_done <= 1'b1; state <= S_MUL_ADD;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
