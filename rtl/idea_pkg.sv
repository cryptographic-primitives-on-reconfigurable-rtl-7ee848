// idea_pkg: constants shared by the IDEA cipher blocks.
//
// Latencies of the pipelined datapath: the multiplier modulo 2^16+1 takes 7
// cycles, a full round 22 cycles (three multipliers in series plus one output
// register) and the output transformation ("half round") 7 cycles, so one
// block needs 8 * 22 + 7 = 183 cycles from input to output.
package idea_pkg;
  localparam int unsigned MUL_LAT   = 7;
  localparam int unsigned ROUND_LAT = 3 * MUL_LAT + 1;    // 22
  localparam int unsigned HALF_LAT  = MUL_LAT;            // 7
  localparam int unsigned NROUNDS   = 8;
  localparam int unsigned NSUBKEYS  = 6 * NROUNDS + 4;    // 52
  localparam int unsigned TOTAL_LAT = NROUNDS * ROUND_LAT + HALF_LAT;  // 183
endpackage
