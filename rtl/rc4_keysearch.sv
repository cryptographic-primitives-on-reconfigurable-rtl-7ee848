// rc4_keysearch: brute-force known-plaintext key search for 40-bit RC4.
//
// NCELLS identical RC4 cells each test one key per batch; cell c tests
// global_key + c, where the sum is formed in the cell's own local key
// register. One shared controller sequences all cells and talks to the host
// through two 64-bit write registers (w0 start key, w1 expected keystream
// cxp = plaintext xor ciphertext) and read registers r0 (global key of the
// batch holding the match), r1/r2 (found flag of every cell) and r3
// (status). With the default 96 cells and 8 cxp bytes a batch of 96 keys
// takes 795 cycles. See rc4_ctrl and rc4_cell for the cycle-level behaviour.
// The number of cells and the structure (cells, local key adders, one control
// unit) follow the published engine.
module rc4_keysearch
  import rc4_pkg::*;
#(
  parameter int unsigned NCELLS = 96,
  parameter int unsigned NBYTES = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        host_we,
  input  logic [1:0]  host_waddr,
  input  logic [63:0] host_wdata,
  input  logic [1:0]  host_raddr,
  output logic [63:0] host_rdata,
  output logic        searching,
  output logic        halted
);

  rc4_phase_e          phase;
  logic [1:0]          step;
  logic [7:0]          i, cxp_byte;
  logic [2:0]          kidx;
  logic                half, new_key, swap_en, cmp_en;
  logic [RC4_KEY_BITS-1:0] global_key;
  logic [NCELLS-1:0]   found;

  rc4_ctrl #(.NCELLS(NCELLS), .NBYTES(NBYTES), .KEY_BITS(RC4_KEY_BITS)) u_ctrl (
    .clk, .rst,
    .host_we, .host_waddr, .host_wdata, .host_raddr, .host_rdata,
    .phase, .step, .i, .kidx, .half, .new_key, .swap_en, .cmp_en, .cxp_byte,
    .global_key, .found, .searching, .halted
  );

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    logic [RC4_KEY_BITS-1:0] local_key;

    rc4_local_key #(.KEY_BITS(RC4_KEY_BITS), .OFFSET(c)) u_lkey (
      .clk, .rst, .load(new_key), .global_key, .local_key
    );

    rc4_cell #(.KEY_BITS(RC4_KEY_BITS)) u_cell (
      .clk, .rst, .phase, .step, .i, .kidx, .half, .new_key, .swap_en, .cmp_en,
      .cxp_byte, .key(local_key), .found(found[c])
    );
  end

endmodule
