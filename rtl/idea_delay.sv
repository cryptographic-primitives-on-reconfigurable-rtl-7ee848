// idea_delay: a W-bit wide, N-stage delay line used to balance the paths of
// the pipelined IDEA datapath (shift-register LUTs in an FPGA). Output equals
// the input N clock cycles earlier; N = 0 is a plain wire. No reset: what it
// carries is qualified by a separately reset valid bit.
module idea_delay #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int s = 1; s < N; s++) sr[s] <= sr[s-1];
    end
    assign q = sr[N-1];
  end
endmodule
