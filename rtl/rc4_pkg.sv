// rc4_pkg: types and constants shared by the parallel RC4 key search engine.
//
// Every RC4 cell runs in lock step with the shared control unit. The
// controller broadcasts the phase it is in and the step (0, 1, 2) within the
// current three-cycle iteration; the cells only hold per-key state (j, t, the
// found latch and their own S-block).
package rc4_pkg;

  localparam int unsigned RC4_KEY_BITS = 40;   // 40-bit export-grade key

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // nothing happens, memories untouched
    PH_INIT = 2'd1,   // only port B works: S[i] = i in the spare half
    PH_KS   = 2'd2,   // key schedule in the active half, init of the spare half
    PH_PRNG = 2'd3    // keystream generation and comparison with cxp
  } rc4_phase_e;

  // Host register map: two write registers and three read registers, 64 bits each.
  typedef enum logic [1:0] {
    REG_W0_START_KEY = 2'd0,
    REG_W1_CXP       = 2'd1
  } rc4_wreg_e;

  typedef enum logic [1:0] {
    REG_R0_GLOBAL_KEY = 2'd0,
    REG_R1_FOUND_LO   = 2'd1,
    REG_R2_FOUND_HI   = 2'd2,
    REG_R3_STATUS     = 2'd3
  } rc4_rreg_e;

endpackage
