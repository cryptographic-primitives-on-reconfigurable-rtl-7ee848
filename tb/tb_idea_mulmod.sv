// tb_idea_mulmod: checks the pipelined multiplier modulo 2^16+1 against
// direct arithmetic, for corner cases (0 meaning 2^16, 1, 2^16-1) and random
// operands, one new pair per cycle, and checks the 7-cycle latency.
module tb_idea_mulmod;
  timeunit 1ns; timeprecision 1ps;
  import idea_ref_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] x = '0, yd = '0, r;
  int checks = 0, failures = 0;

  idea_mulmod dut (.clk, .x, .yd, .r);
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ax [$], ay [$];
  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h0002};
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++) begin ax.push_back(corner[a]); ay.push_back(corner[b]); end
    for (int n = 0; n < 5000; n++) begin ax.push_back(16'($urandom)); ay.push_back(16'($urandom)); end
    for (int n = 0; n < ax.size() + 7; n++) begin
      @(negedge clk);
      if (n >= 7) begin
        checks++;
        if (r !== mul(ax[n-7], ay[n-7])) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h: got %h want %h", ax[n-7], ay[n-7], r, mul(ax[n-7], ay[n-7]));
        end
      end
      if (n < ax.size()) begin x = ax[n]; yd = ay[n] - 16'd1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
