// idea_mulmod: pipelined multiplication modulo 2^16 + 1, the mixing
// operation of IDEA, in which the 16-bit word 0 stands for 2^16.
//
// The low-high method is used: with xd = x - 1 and yd = y - 1,
//   t  = xd * yd + xd + yd + 1   (= x * y, kept to 32 bits)
//   r  = tl - th + (tl <= th)    (tl, th: low and high halves of t)
// which gives x * y mod 2^16+1 without a division; t overflowing to 0 for
// x = y = 2^16 is caught by the "<=" term. The second operand is always a
// subkey, which is stored already decremented, so the block takes yd
// directly and needs no subtracter for it.
//
// Timing: fully pipelined, one product per cycle, 7 cycles from x/yd to r.
// Stage 1 registers xd and yd, stages 2-5 form the 16 x 16 product (written
// as one product followed by three register stages, which a synthesis tool
// can retime into a pipelined multiplier), stage 6 adds xd + yd + 1, stage 7
// does the final subtraction. The algorithm and the 7-cycle latency follow
// the published design; the split of the work between the stages is this
// design's own.
module idea_mulmod (
  input  logic        clk,
  input  logic [15:0] x,      // data operand (0 means 2^16)
  input  logic [15:0] yd,     // subkey minus 1
  output logic [15:0] r
);

  logic [15:0] xd1, yd1;
  logic [31:0] p2, p3, p4, p5;
  logic [15:0] xd_d [2:5];
  logic [15:0] yd_d [2:5];
  logic [31:0] t6;
  logic [15:0] r7;

  always_ff @(posedge clk) begin
    // stage 1: decrement the data operand
    xd1 <= x - 16'd1;
    yd1 <= yd;
    // stages 2..5: product
    p2 <= xd1 * yd1;
    p3 <= p2;
    p4 <= p3;
    p5 <= p4;
    xd_d[2] <= xd1;  yd_d[2] <= yd1;
    for (int s = 3; s <= 5; s++) begin
      xd_d[s] <= xd_d[s-1];
      yd_d[s] <= yd_d[s-1];
    end
    // stage 6: t = xd*yd + xd + yd + 1, modulo 2^32
    t6 <= p5 + 32'(xd_d[5]) + 32'(yd_d[5]) + 32'd1;
    // stage 7: low minus high, plus one if low <= high
    r7 <= t6[15:0] - t6[31:16] + 16'((t6[15:0] <= t6[31:16]) ? 1 : 0);
  end

  assign r = r7;

endmodule
