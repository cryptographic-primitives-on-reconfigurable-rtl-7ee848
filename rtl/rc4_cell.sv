// rc4_cell: one RC4 key-test unit of the parallel key search engine.
//
// The cell tests one 40-bit key against the expected keystream cxp
// (plaintext xor ciphertext). Its S array lives in a 512 x 8 dual-port RAM
// whose two halves alternate: the key schedule scrambles the active half
// while port B writes the identity permutation into the spare half for the
// next key, so initialisation costs no extra cycles. Every RC4 iteration
// takes three cycles, in lock step with the shared controller:
//
//   key schedule (256 iterations)        keystream (one per byte, plus a tail)
//   step 0: A reads S[i]; B writes       step 0: A reads S[i]; B reads S[t] of
//           spare S[i] = i                       the previous byte
//   step 1: j += S[i] + K[i mod 5];      step 1: j += S[i]; A reads S[j];
//           A reads S[j]                         compare S[t] with cxp byte
//   step 2: write S[i] <- S[j] (A),      step 2: swap as in the key schedule;
//           S[j] <- S[i] (B)                     t = S[i] + S[j]
//
// When i == j the port B write is suppressed (both ports would write the same
// value to the same word). The found latch is set when a new key is loaded
// and cleared by the first keystream byte that differs from cxp; it is valid
// once the controller leaves the keystream phase.
//
// Interface: the controller broadcasts phase, step, i, i mod 5, the active
// half, a compare strobe and the cxp byte to compare; `key` comes from the
// cell's local key register. Key byte K[0] is key[39:32] and K[4] is
// key[7:0]. The three-cycle iteration, the split RAM and the i == j write
// suppression follow the published design; the byte order of the key and
// sharing i and i mod 5 from the controller are choices of this design.
module rc4_cell
  import rc4_pkg::*;
#(
  parameter int unsigned KEY_BITS = 40
) (
  input  logic                clk,
  input  logic                rst,
  input  rc4_phase_e          phase,
  input  logic [1:0]          step,
  input  logic [7:0]          i,
  input  logic [2:0]          kidx,      // i mod (KEY_BITS/8)
  input  logic                half,      // active half of the S-block
  input  logic                new_key,   // clear j, t and set found
  input  logic                swap_en,   // step 2 writes (low in the tail)
  input  logic                cmp_en,    // step 1 compares S[t] with cxp_byte
  input  logic [7:0]          cxp_byte,
  input  logic [KEY_BITS-1:0] key,
  output logic                found
);

  localparam int unsigned NKB = KEY_BITS / 8;

  logic [8:0] addr_a, addr_b;
  logic       we_a, we_b;
  logic [7:0] wdata_a, wdata_b, rdata_a, rdata_b;

  logic [7:0] j, t, si;
  logic [7:0] kbyte, j_next;

  rc4_sblock_ram #(.ADDR_W(9), .DATA_W(8)) u_sblock (
    .clk,
    .addr_a, .we_a, .wdata_a, .rdata_a,
    .addr_b, .we_b, .wdata_b, .rdata_b
  );

  // K unit: select the key byte for this iteration.
  always_comb begin
    kbyte = '0;
    for (int b = 0; b < NKB; b++)
      if (kidx == 3'(b)) kbyte = key[KEY_BITS-1-8*b -: 8];
  end

  // J unit: j + S[i] (+ K[i] during the key schedule).
  assign j_next = j + rdata_a + ((phase == PH_KS) ? kbyte : 8'd0);

  // A, D and I units: address and data multiplexers of both ports.
  always_comb begin
    addr_a  = {half, i};
    we_a    = 1'b0;
    wdata_a = rdata_a;
    addr_b  = {~half, i};
    we_b    = 1'b0;
    wdata_b = i;
    unique case (phase)
      PH_INIT: begin
        addr_b = {~half, i};
        wdata_b = i;
        we_b   = (step == 2'd0);
      end
      PH_KS, PH_PRNG: begin
        unique case (step)
          2'd0: begin
            addr_a = {half, i};
            if (phase == PH_KS) begin
              addr_b = {~half, i};
              wdata_b = i;
              we_b   = 1'b1;
            end else begin
              addr_b = {half, t};
            end
          end
          2'd1: begin
            addr_a = {half, j_next};
          end
          default: begin
            addr_a  = {half, i};
            wdata_a = rdata_a;           // S[j] to S[i]
            we_a    = swap_en;
            addr_b  = {half, j};
            wdata_b = si;                // S[i] to S[j]
            we_b    = swap_en && (i != j);   // W unit
          end
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || new_key) begin
      j  <= '0;
      t  <= '0;
      si <= '0;
    end else if (phase == PH_KS || phase == PH_PRNG) begin
      if (step == 2'd1) begin
        si <= rdata_a;
        if (swap_en) j <= j_next;
      end
      if (step == 2'd2 && phase == PH_PRNG && swap_en)
        t <= si + rdata_a;               // T unit
      if (step == 2'd2 && phase == PH_KS && i == 8'hFF)
        j <= '0;                         // the keystream restarts with j = 0
    end
  end

  // F unit: found latch.
  always_ff @(posedge clk) begin
    if (rst)          found <= 1'b0;
    else if (new_key) found <= 1'b1;
    else if (phase == PH_PRNG && step == 2'd1 && cmp_en && rdata_b != cxp_byte)
      found <= 1'b0;
  end

endmodule
