// prng_buffer: output buffer of the random number generator, a dual-port
// memory of NBITS bits written one bit at a time and read a byte at a time.
//
// Write side: every out_we stores wbit at the write pointer, which runs
// through the memory and wraps around (overwriting random data does no harm,
// so no flow control is needed). The memory is used as a double buffer:
// when the writer finishes a half, full[h] is set for that half, and it
// stays set until the reader clears it with clear[h]; the reader can read
// one half while the other is being filled. Read side: synchronous, rd_data
// is byte rd_addr one cycle after the address (bit 0 of byte b is the
// (8b)-th bit written). Both ports use clk. The bit-in/byte-out dual-port
// memory, the full flag, its clearing signal and the double buffering follow
// the published design; a full flag per half is this design's reading of it.
module prng_buffer #(
  parameter int unsigned NBITS = 4096
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       out_we,
  input  logic                       wbit,
  input  logic [$clog2(NBITS/8)-1:0] rd_addr,
  output logic [7:0]                 rd_data,
  output logic [1:0]                 full,
  input  logic [1:0]                 clear
);

  localparam int unsigned AW = $clog2(NBITS);

  logic [7:0]    mem [NBITS/8];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (out_we) mem[wptr[AW-1:3]][wptr[2:0]] <= wbit;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      full <= '0;
    end else begin
      if (out_we) begin
        wptr <= wptr + 1'b1;
        if (wptr[AW-2:0] == '1) full[wptr[AW-1]] <= 1'b1;
      end
      for (int h = 0; h < 2; h++)
        if (clear[h] && !(out_we && wptr[AW-2:0] == '1 && wptr[AW-1] == 1'(h)))
          full[h] <= 1'b0;
    end
  end

endmodule
