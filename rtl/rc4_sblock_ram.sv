// rc4_sblock_ram: the S-block of one RC4 cell, a true dual-port synchronous
// RAM of 512 x 8 bits (one 4096-bit block RAM of the target FPGA).
//
// The most significant address bit selects one of two halves: while one half
// holds the permutation S for the key under test, the other half is being
// initialised to the identity for the next key. Both ports share one clock,
// may read and write, and return the old contents of the addressed word one
// cycle after the address is presented (read-before-write). When both ports
// write the same word in one cycle the result is undefined in a real block
// RAM; the RC4 cell never does this (its W unit suppresses the port B write),
// and an assertion here flags it.
module rc4_sblock_ram #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic              we_a,
  input  logic [DATA_W-1:0] wdata_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic              we_b,
  input  logic [DATA_W-1:0] wdata_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

  // Two writes to one word in the same cycle are a design error.
  a_no_write_collision: assert property (@(posedge clk) !(we_a && we_b && addr_a == addr_b));

endmodule
