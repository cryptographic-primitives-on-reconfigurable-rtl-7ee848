// tb_rrng: checks the true random bit source at 32 bits.
//
// Phase 1 drives slow_clk with random periods and phases, records the value
// of clk that each slow edge sees, and checks that every stored bit is the
// XOR of four consecutive samples (the parity filter), that the groups are
// back to back, that the fill uses 4 * 32 sampled edges after the request
// handshake, that `full` appears only after the whole buffer is written and
// drops as soon as a new fill is requested.
// Phase 2 uses the steering oscillator model to load a chosen 32-bit word
// and reads it back, which also checks the buffer addressing.
module tb_rrng;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned NB = 32, FI = 4;

  logic clk = 1'b0, rst = 1'b1, req_toggle = 1'b0, full, rd_bit;
  logic [$clog2(NB)-1:0] rd_addr = '0;
  logic slow_clk, slow_rand = 1'b0, slow_drv, use_drv = 1'b0;
  always #5 clk = ~clk;
  assign slow_clk = use_drv ? slow_drv : slow_rand;

  rrng #(.NBITS(NB), .FILTER(FI)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- random oscillator and sample log ----
  bit samples [$];
  bit rand_run = 1'b1;           // running during reset clears the slow side
  int edge_at_req = 0;
  initial forever begin
    #($urandom_range(13, 41) * 1ns + $urandom_range(0, 999) * 1ps);
    if (rand_run) begin
      slow_rand = 1'b1;
      samples.push_back(clk);
      #($urandom_range(5, 20) * 1ns);
      slow_rand = 1'b0;
    end
  end

  // ---- steering model ----
  logic [NB-1:0] word;
  logic drv_en, pend;
  int unsigned fc, wc;
  assign drv_en = use_drv && !rst;
  assign fc = 32'(dut.fcnt);
  assign wc = 32'(dut.wcnt);
  assign pend = dut.req_sync[1] != dut.ack_s;
  tb_slow_clk_driver #(.NBITS(NB), .FILTER(FI)) u_osc (
    .clk, .enable(drv_en), .zero(1'b0), .pattern(word), .fcnt(fc), .wcnt(wc),
    .req_pending(pend), .slow_clk(slow_drv)
  );

  task automatic read_all(output logic [NB-1:0] v);
    for (int a = 0; a < NB; a++) begin
      @(negedge clk) rd_addr = $clog2(NB)'(a);
      @(negedge clk) v[a] = rd_bit;
    end
  endtask

  initial begin
    logic [NB-1:0] got;
    int best, e0, nsamp;
    repeat (30) @(negedge clk);   // several slow edges while in reset
    rst = 0;
    word = {$urandom};
    for (int round = 0; round < 2; round++) begin
      // request a fill and record the samples from here
      samples.delete();
      @(negedge clk) req_toggle = ~req_toggle;
      rand_run = 1'b1;
      @(negedge clk);
      check(!full, "full drops on a new request");
      wait (full);
      nsamp = samples.size();
      rand_run = 1'b0;
      read_all(got);
      // find the group start: bits are XORs of 4 consecutive raw samples
      best = -1;
      for (int o = 0; o < 8 && best < 0; o++) begin
        bit ok;
        ok = 1;
        for (int w = 0; w < NB; w++)
          if ((samples[o+4*w] ^ samples[o+4*w+1] ^ samples[o+4*w+2] ^ samples[o+4*w+3]) != got[w]) ok = 0;
        if (ok) best = o;
      end
      check(best >= 1 && best <= 4, $sformatf("round %0d: stored bits are parities of 4 samples (offset %0d)", round, best));
      e0 = best;

      check(nsamp >= e0 + FI * NB && nsamp <= e0 + FI * NB + 8,
            $sformatf("round %0d: %0d slow edges for %0d sampled", round, nsamp, FI * NB));
      check(got != '0 && got != '1, "random fill is not constant");
    end
    // phase 2: steered word
    use_drv = 1'b1;
    @(negedge clk) req_toggle = ~req_toggle;
    repeat (2) @(negedge clk);
    check(!full, "full low while refilling");
    wait (full);
    read_all(got);
    check(got == word, $sformatf("steered word %h read back as %h", word, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
