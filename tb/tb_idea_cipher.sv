// tb_idea_cipher: end-to-end test of the one-round, feedback IDEA cipher.
//
// Loads encryption subkeys (multiplicative ones minus one) and encrypts
// batches of blocks offered every cycle with random gaps; checks the
// published test vector, every ciphertext against a procedural model, the
// 183-cycle latency of every block, that in_ready is high only 22 cycles out
// of every 176, and the throughput of a full batch. Then it loads the
// decryption subkeys and turns the ciphertexts back into the plaintexts.
// Copies with 2, 4 and 8 instantiated rounds are given every block the
// one-round design accepts and must produce the same outputs in the same
// cycles; their in_ready must be high 2, 4 and 8 times as often.
module tb_idea_cipher;
  timeunit 1ns; timeprecision 1ps;
  import idea_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        key_we = 1'b0;
  logic [5:0]  key_addr = '0;
  logic [15:0] key_data = '0;
  logic        in_valid = 1'b0, in_ready, out_valid;
  logic [63:0] in_data = '0, out_data;

  int checks = 0, failures = 0;

  idea_cipher dut (.*);

  // variants with more rounds instantiated, fed what dut accepts
  localparam int NV = 3;
  logic        v_ready [NV];
  logic        v_valid [NV];
  logic [63:0] v_data  [NV];
  int          v_ready_cycles [NV];
  int          v_mismatch [NV];
  int          v_outs [NV];
  for (genvar v = 0; v < NV; v++) begin : g_var
    idea_cipher #(.RINST(2 << v)) u_var (
      .clk, .rst, .key_we, .key_addr, .key_data,
      .in_valid(in_valid && in_ready), .in_ready(v_ready[v]), .in_data,
      .out_valid(v_valid[v]), .out_data(v_data[v])
    );
    initial begin
      v_ready_cycles[v] = 0;
      v_mismatch[v]     = 0;
      v_outs[v]         = 0;
    end
    always @(posedge clk) if (!rst) begin
      if (v_ready[v]) v_ready_cycles[v]++;
      if (in_ready && !v_ready[v]) v_mismatch[v]++;
      if (v_valid[v] !== out_valid || (out_valid && v_data[v] !== out_data)) v_mismatch[v]++;
      if (v_valid[v]) v_outs[v]++;
    end
  end
  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, run_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) run_cyc++;
  end

  // scoreboard
  logic [63:0] exp_q [$];
  int          t_in_q [$];
  logic [63:0] got_q [$];
  int          lat_bad = 0, outs = 0, ready_cycles = 0;
  sk_t         cur_keys;

  always @(posedge clk) begin
    if (!rst && in_ready) ready_cycles++;
    if (in_valid && in_ready) begin
      exp_q.push_back(cipher(in_data, cur_keys));
      t_in_q.push_back(cyc);
    end
    if (out_valid && !rst) begin
      logic [63:0] e;
      int t0;
      e = exp_q.pop_front();
      t0 = t_in_q.pop_front();
      outs++;
      got_q.push_back(out_data);
      checks++;
      if (out_data !== e) begin
        failures++;
        $display("FAIL: block out %h expected %h", out_data, e);
      end
      if (cyc - t0 != 183) lat_bad++;
    end
  end

  task automatic load_keys(input sk_t z);
    cur_keys = z;
    for (int n = 0; n < 52; n++) begin
      @(negedge clk);
      key_we = 1'b1; key_addr = 6'(n); key_data = hw_word(z, n);
    end
    @(negedge clk) key_we = 1'b0;
  endtask

  // Offer the blocks in q; gap_pct percent of cycles are left idle.
  task automatic send(input logic [63:0] q [$], input int gap_pct);
    int n = 0;
    while (n < q.size()) begin
      @(negedge clk);
      if ($urandom_range(99) >= gap_pct) begin
        in_valid = 1'b1; in_data = q[n];
        @(posedge clk);
        if (in_ready) n++;
        #1 in_valid = 1'b0;
      end
    end
  endtask

  initial begin
    logic [127:0] key = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    logic [63:0]  pts [$];
    logic [63:0]  cts [$];
    int first_in, last_out;
    sk_t ez = enc_keys(key);
    check(cipher(64'h0000_0001_0002_0003, ez) == 64'h11FB_ED2B_0198_6DE5, "reference test vector");
    load_keys(ez);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // full batch back-to-back: measures throughput (22 blocks per 176 cycles)
    pts.push_back(64'h0000_0001_0002_0003);
    for (int n = 1; n < 22; n++) pts.push_back({$urandom, $urandom});
    send(pts, 0);
    // more blocks with gaps, spread over several batches
    begin
      logic [63:0] more [$];
      for (int n = 0; n < 60; n++) more.push_back({$urandom, $urandom});
      send(more, 30);
      pts = {pts, more};
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(outs == pts.size(), $sformatf("all %0d blocks came out (%0d)", pts.size(), outs));
    check(lat_bad == 0, $sformatf("%0d blocks missed the 183-cycle latency", lat_bad));
    check(got_q[0] == 64'h11FB_ED2B_0198_6DE5, "test vector ciphertext from hardware");
    begin
      int frac_ok = 1;
      // in_ready duty: 22 of every 176 cycles
      frac_ok = (ready_cycles * 8 <= cyc + 176) && (ready_cycles * 8 >= cyc - 400);
      check(frac_ok, $sformatf("in_ready %0d of %0d cycles", ready_cycles, cyc));
    end
    for (int v = 0; v < NV; v++) begin
      check(v_mismatch[v] == 0 && v_outs[v] == outs,
            $sformatf("%0d-round variant: %0d mismatches, %0d outputs", 2 << v, v_mismatch[v], v_outs[v]));
      check(v_ready_cycles[v] >= ready_cycles * (2 << v) - 200 && v_ready_cycles[v] <= ready_cycles * (2 << v) + 200,
            $sformatf("%0d-round variant: in_ready %0d cycles vs %0d", 2 << v, v_ready_cycles[v], ready_cycles));
    end
    check(v_ready_cycles[NV-1] == run_cyc,
          $sformatf("8-round variant ready every cycle (%0d of %0d)", v_ready_cycles[NV-1], run_cyc));
    // decrypt everything back
    cts = got_q;
    got_q.delete();
    load_keys(dec_keys(ez));
    send(cts, 10);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    foreach (cts[n]) check(got_q[n] == pts[n], $sformatf("decryption of block %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
