// rc4_ctrl: the control unit shared by all RC4 cells of the key search
// engine, and its host interface.
//
// A small state machine drives every cell in lock step. After the host has
// written the expected keystream cxp (register w1) and then the start key
// (w0), the engine initialises the spare half of every S-block (256 cycles)
// and then repeats, per batch of NCELLS keys:
//   LOAD  (1 cycle)   every local key register takes global key + offset,
//                     the global key advances by NCELLS
//   KS    (768)       key schedule, 256 iterations of 3 cycles, with the
//                     spare halves initialised for the next batch
//   PRNG  (3*NBYTES+2) NBYTES keystream iterations and a 2-cycle tail that
//                     reads and compares the last byte
// so a batch takes 771 + 3*NBYTES cycles (795 for 8 bytes). At the next LOAD
// the found flags of the batch are examined; if any is set the engine halts
// and keeps the batch's global key in r0 and the found flags in r1 (cells
// 0..63) and r2 (cells 64..127). A write to w0 restarts the search; r3 holds
// {halted, searching} in its two low bits.
//
// Host port: one write per cycle (host_we, host_waddr, host_wdata) and a
// combinational read (host_raddr -> host_rdata). The two write and three read
// registers and the host's sequence (cxp first, then the start key; poll the
// flags; read the key and offsets) follow the published protocol. r3, the
// LOAD cycle, the tail of two cycles and the byte order of cxp (the first
// keystream byte is cxp[63:56]) are choices of this design. The key space
// wraps around after 2^40 keys.
module rc4_ctrl
  import rc4_pkg::*;
#(
  parameter int unsigned NCELLS   = 96,
  parameter int unsigned NBYTES   = 8,
  parameter int unsigned KEY_BITS = 40
) (
  input  logic                clk,
  input  logic                rst,
  // host interface
  input  logic                host_we,
  input  logic [1:0]          host_waddr,
  input  logic [63:0]         host_wdata,
  input  logic [1:0]          host_raddr,
  output logic [63:0]         host_rdata,
  // broadcast to the cells
  output rc4_phase_e          phase,
  output logic [1:0]          step,
  output logic [7:0]          i,
  output logic [2:0]          kidx,
  output logic                half,
  output logic                new_key,
  output logic                swap_en,
  output logic                cmp_en,
  output logic [7:0]          cxp_byte,
  output logic [KEY_BITS-1:0] global_key,
  input  logic [NCELLS-1:0]   found,
  // status
  output logic                searching,
  output logic                halted
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_LOAD, S_KS, S_PRNG, S_HALT} state_e;

  localparam int unsigned NKB = KEY_BITS / 8;

  state_e              state;
  logic [63:0]         cxp;
  logic [KEY_BITS-1:0] batch_key;
  logic [3:0]          nbyte;      // keystream iteration, NBYTES = tail
  logic                have_result;
  logic [127:0]        found_w;

  initial begin
    assert (NCELLS >= 1 && NCELLS <= 128) else $error("NCELLS must be 1..128");
    assert (NBYTES >= 1 && NBYTES <= 8)   else $error("NBYTES must be 1..8");
  end

  always_comb begin
    unique case (state)
      S_INIT:  phase = PH_INIT;
      S_KS:    phase = PH_KS;
      S_PRNG:  phase = PH_PRNG;
      default: phase = PH_IDLE;
    endcase
  end

  assign new_key   = (state == S_LOAD) && !(have_result && |found);
  assign swap_en   = (state == S_KS) || (state == S_PRNG && nbyte != 4'(NBYTES));
  assign cmp_en    = (state == S_PRNG) && (nbyte != 0);
  logic [3:0] cmp_idx;   // bit 3 only matters when no compare happens
  assign cmp_idx   = nbyte - 4'd1;
  assign cxp_byte  = cxp[63 - 8*cmp_idx[2:0] -: 8];
  assign searching = (state != S_IDLE) && (state != S_HALT);
  assign halted    = (state == S_HALT);
  assign found_w   = 128'(found);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cxp         <= '0;
      global_key  <= '0;
      batch_key   <= '0;
      step        <= '0;
      i           <= '0;
      kidx        <= '0;
      half        <= 1'b0;
      nbyte       <= '0;
      have_result <= 1'b0;
    end else begin
      if (host_we && host_waddr == REG_W1_CXP) cxp <= host_wdata;
      if (host_we && host_waddr == REG_W0_START_KEY) begin
        global_key  <= host_wdata[KEY_BITS-1:0];
        state       <= S_INIT;
        step        <= '0;
        i           <= '0;
        have_result <= 1'b0;
      end else begin
        unique case (state)
          S_INIT: begin
            i <= i + 8'd1;
            if (i == 8'd255) begin
              half  <= ~half;
              state <= S_LOAD;
            end
          end
          S_LOAD: begin
            if (have_result && |found) begin
              state <= S_HALT;
            end else begin
              batch_key  <= global_key;
              global_key <= global_key + KEY_BITS'(NCELLS);
              state      <= S_KS;
              step       <= '0;
              i          <= '0;
              kidx       <= '0;
            end
          end
          S_KS: begin
            if (step == 2'd2) begin
              step <= '0;
              i    <= i + 8'd1;
              kidx <= (kidx == 3'(NKB - 1)) ? 3'd0 : kidx + 3'd1;
              if (i == 8'd255) begin
                state <= S_PRNG;
                i     <= 8'd1;
                nbyte <= '0;
              end
            end else begin
              step <= step + 2'd1;
            end
          end
          S_PRNG: begin
            if (nbyte == 4'(NBYTES)) begin
              // tail: step 0 reads S[t], step 1 compares the last byte
              if (step == 2'd1) begin
                state       <= S_LOAD;
                half        <= ~half;
                have_result <= 1'b1;
                step        <= '0;
              end else begin
                step <= step + 2'd1;
              end
            end else if (step == 2'd2) begin
              step  <= '0;
              i     <= i + 8'd1;
              nbyte <= nbyte + 4'd1;
            end else begin
              step <= step + 2'd1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (host_raddr)
      REG_R0_GLOBAL_KEY: host_rdata = 64'(batch_key);
      REG_R1_FOUND_LO:   host_rdata = halted ? found_w[63:0]   : 64'd0;
      REG_R2_FOUND_HI:   host_rdata = halted ? found_w[127:64] : 64'd0;
      default:           host_rdata = {62'd0, halted, searching};
    endcase
  end

endmodule
