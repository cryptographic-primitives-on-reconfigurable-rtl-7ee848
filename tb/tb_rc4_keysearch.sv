// tb_rc4_keysearch: end-to-end test of the RC4 key search engine.
//
// A reference RC4 written as plain procedural code produces the first eight
// keystream bytes of a secret 40-bit key. The host sequence writes cxp, then
// a start key some keys below the secret one, polls the status register,
// and reads back the batch key and the found flags. Checks: the engine halts,
// the batch key and the found cell give the secret key, exactly one cell
// reports a match, and each batch of keys takes 771 + 3*8 cycles. A second
// search whose key range does not hold the key must still be running after
// several batches.
module tb_rc4_keysearch;
  timeunit 1ns; timeprecision 1ps;
  import rc4_pkg::*;

  localparam int unsigned NCELLS = 8;
  localparam int unsigned NBYTES = 8;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        host_we = 1'b0;
  logic [1:0]  host_waddr = '0;
  logic [63:0] host_wdata = '0;
  logic [1:0]  host_raddr = '0;
  logic [63:0] host_rdata;
  logic        searching, halted;

  int checks = 0, failures = 0;

  rc4_keysearch #(.NCELLS(NCELLS), .NBYTES(NBYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: first 8 keystream bytes of RC4 with a 5-byte key, key[39:32] first.
  function automatic logic [63:0] rc4_ref(input logic [39:0] key);
    byte unsigned s[256];
    byte unsigned k[5];
    byte unsigned jj, tmp, ii;
    logic [63:0] out;
    for (int b = 0; b < 5; b++) k[b] = key[39-8*b -: 8];
    for (int n = 0; n < 256; n++) s[n] = byte'(n);
    jj = 0;
    for (int n = 0; n < 256; n++) begin
      jj = jj + s[n] + k[n % 5];
      tmp = s[n]; s[n] = s[jj]; s[jj] = tmp;
    end
    ii = 0; jj = 0;
    for (int b = 0; b < 8; b++) begin
      ii = ii + 1;
      jj = jj + s[ii];
      tmp = s[ii]; s[ii] = s[jj]; s[jj] = tmp;
      out[63-8*b -: 8] = s[byte'(s[ii] + s[jj])];
    end
    return out;
  endfunction

  task automatic host_write(input logic [1:0] a, input logic [63:0] d);
    @(negedge clk);
    host_we = 1'b1; host_waddr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input logic [1:0] a, output logic [63:0] d);
    host_raddr = a;
    #1 d = host_rdata;
  endtask

  // Count cycles between successive local-key loads (one per batch).
  int batch_cycles[$];
  int last_load = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.new_key) begin
      if (last_load >= 0) batch_cycles.push_back(cyc - last_load);
      last_load = cyc;
    end
  end

  initial begin
    logic [39:0] secret, start;
    logic [63:0] cxp, r0, r1, r2, st;
    int n, wait_cycles;
    secret = 40'h3A_5C_71_09_E4;
    start  = secret - 40'd13;           // found in the 2nd batch, cell 5
    cxp    = rc4_ref(secret);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    host_write(REG_W1_CXP, cxp);
    host_write(REG_W0_START_KEY, 64'(start));
    wait_cycles = 0;
    host_read(REG_R3_STATUS, st);
    while (!st[1] && wait_cycles < 20000) begin
      @(negedge clk); wait_cycles++;
      host_read(REG_R3_STATUS, st);
    end
    check(halted, "engine halts after finding the key");
    host_read(REG_R0_GLOBAL_KEY, r0);
    host_read(REG_R1_FOUND_LO, r1);
    host_read(REG_R2_FOUND_HI, r2);
    n = 0;
    for (int c = 0; c < 64; c++) if (r1[c]) n++;
    check(n == 1, $sformatf("exactly one cell matches (r1=%h)", r1));
    check(r0[39:0] == start + 40'(NCELLS), $sformatf("batch key %h", r0));
    for (int c = 0; c < NCELLS; c++)
      if (r1[c]) check(r0[39:0] + 40'(c) == secret, $sformatf("cell %0d gives secret key", c));
    check(r2 == 0, "no flags in r2");
    check(batch_cycles.size() >= 1, "at least one batch boundary seen");
    foreach (batch_cycles[b])
      check(batch_cycles[b] == 771 + 3*NBYTES, $sformatf("batch took %0d cycles", batch_cycles[b]));
    // The reference itself: published keystream of key 0x0102030405.
    check(rc4_ref(40'h0102030405) == 64'hb2396305f03dc027, "reference RC4 test vector");

    // Second search: a range that does not contain the key keeps searching.
    host_write(REG_W0_START_KEY, 64'(secret + 40'd1));
    repeat (4000) @(negedge clk);
    check(!halted && searching, "no false match in a range without the key");
    $display("batches timed: %0d", batch_cycles.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
