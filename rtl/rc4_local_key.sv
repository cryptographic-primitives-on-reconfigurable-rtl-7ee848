// rc4_local_key: the local key of one RC4 cell, the 40-bit sum of the shared
// global key and the cell's fixed offset, held in a register.
//
// When `load` is high the register takes global_key + OFFSET on the next
// clock edge (one cycle latency); otherwise it holds. With N cells carrying
// offsets 0 .. N-1, one load gives N consecutive keys to test in parallel.
module rc4_local_key #(
  parameter int unsigned KEY_BITS = 40,
  parameter int unsigned OFFSET   = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic [KEY_BITS-1:0] global_key,
  output logic [KEY_BITS-1:0] local_key
);

  always_ff @(posedge clk) begin
    if (rst)       local_key <= '0;
    else if (load) local_key <= global_key + KEY_BITS'(OFFSET);
  end

endmodule
