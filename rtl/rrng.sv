// rrng: true random bit source and seed buffer.
//
// The fast system clock clk (F_h) is sampled by a flip-flop clocked by the
// slow, jittery external clock slow_clk (F_l); the phase noise of F_l makes
// each sample random. Because F_l's duty cycle is not exactly 50 %, FILTER
// consecutive samples are combined by XOR (parity filter) into one bit, which
// pulls the probability of a 1 towards 0.5. The filtered bits are written,
// one per FILTER slow-clock cycles, into a 1-bit wide dual-clock buffer of
// NBITS entries (address = write counter). When the buffer is full, writing
// stops and `full` is raised towards the fast side.
//
// The consumer (the BBS generator) reads the buffer through a synchronous
// port in the clk domain (rd_addr, rd_bit one cycle later). To ask for a new
// buffer it toggles req_toggle; the slow side sees the toggle through a
// two-flop synchroniser, clears its counter and starts filling again, and
// echoes the toggle back. `full` is only reported when the echo matches the
// request, so a stale full flag is never seen. rst clears the slow side
// asynchronously; it must be removed while slow_clk is idle or held for a
// few slow cycles. The fast-side flops use rst synchronously, so a lint tool
// notes rst as both a synchronous and an asynchronous reset; that is intended.
//
// The sampling flip-flop, the 4-stage parity filter, the dual-port buffer
// written under F_l and read under F_h, its address counter and the full
// flag follow the published design; the toggle handshake and the
// synchronisers are this design's. Using clk as data is intentional.
module rrng #(
  parameter int unsigned NBITS  = 1024,
  parameter int unsigned FILTER = 4
) (
  input  logic                     clk,        // F_h, system clock
  input  logic                     slow_clk,   // F_l, noisy external clock
  input  logic                     rst,
  input  logic                     req_toggle, // clk domain
  input  logic [$clog2(NBITS)-1:0] rd_addr,    // clk domain
  output logic                     rd_bit,
  output logic                     full        // clk domain
);

  localparam int unsigned AW = $clog2(NBITS);
  localparam int unsigned FW = $clog2(FILTER + 1);

  logic          mem [NBITS];

  // ---------------- slow (F_l) domain ----------------
  logic          raw;                // oscillator sample
  logic          par;                // running parity of the current group
  logic [FW-1:0] fcnt;
  logic [AW:0]   wcnt;
  logic          full_s;
  logic [1:0]    req_sync;
  logic          ack_s;

  always_ff @(posedge slow_clk or posedge rst) begin
    if (rst) begin
      raw      <= 1'b0;
      par      <= 1'b0;
      fcnt     <= '0;
      wcnt     <= '0;
      full_s   <= 1'b0;
      req_sync <= '0;
      ack_s    <= 1'b0;
    end else begin
      raw      <= clk;                           // sample F_h with F_l
      req_sync <= {req_sync[0], req_toggle};
      if (req_sync[1] != ack_s) begin            // new request: refill
        ack_s  <= req_sync[1];
        wcnt   <= '0;
        fcnt   <= '0;
        par    <= 1'b0;
        full_s <= 1'b0;
      end else if (!full_s) begin
        if (fcnt == FW'(FILTER - 1)) begin
          fcnt <= '0;
          par  <= 1'b0;
          wcnt <= wcnt + 1'b1;
          if (wcnt == (AW+1)'(NBITS - 1)) full_s <= 1'b1;
        end else begin
          fcnt <= fcnt + 1'b1;
          par  <= par ^ raw;
        end
      end
    end
  end

  // buffer write port (F_l)
  always_ff @(posedge slow_clk)
    if (!full_s && req_sync[1] == ack_s && fcnt == FW'(FILTER - 1))
      mem[wcnt[AW-1:0]] <= par ^ raw;

  // ---------------- fast (F_h) domain ----------------
  logic [1:0] full_sync, ack_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      full_sync <= '0;
      ack_sync  <= '0;
    end else begin
      full_sync <= {full_sync[0], full_s};
      ack_sync  <= {ack_sync[0], ack_s};
    end
  end

  assign full = full_sync[1] && (ack_sync[1] == req_toggle);

  // buffer read port (F_h)
  always_ff @(posedge clk) rd_bit <= mem[rd_addr];

endmodule
