// tb_slow_clk_driver: stands in for the external RC oscillator of the random
// number generator. It produces slow_clk edges a few fast cycles apart and,
// by placing each edge while clk is high or low, decides the value that the
// sampling flip-flop sees. Watching the source's filter counter, it makes
// every filtered bit of a buffer fill equal to the matching bit of `pattern`
// (all other samples 0), so tests can supply a chosen seed. With `zero` set
// it samples only zeros, which gives an all-zero seed.
module tb_slow_clk_driver #(
  parameter int unsigned NBITS  = 32,
  parameter int unsigned FILTER = 4
) (
  input  logic                  clk,
  input  logic                  enable,
  input  logic                  zero,
  input  logic [NBITS-1:0]      pattern,
  input  int unsigned           fcnt,
  input  int unsigned           wcnt,
  input  logic                  req_pending,
  output logic                  slow_clk
);
  initial begin
    int unsigned f1, wa;
    logic v;
    slow_clk = 1'b0;
    forever begin
      @(posedge clk);
      if (!enable) continue;
      f1 = (fcnt == FILTER - 1) ? 0 : fcnt + 1;
      wa = wcnt + ((fcnt == FILTER - 1) ? 1 : 0);
      v  = (!zero && !req_pending && f1 == FILTER - 1 && wa < NBITS) ? pattern[wa] : 1'b0;
      if (!v) @(negedge clk);
      #2 slow_clk = 1'b1;
      @(posedge clk);
      @(posedge clk);
      #1 slow_clk = 1'b0;
    end
  end
endmodule
