# Cryptographic primitives for FPGAs: IDEA, Montgomery multiplication, RC4 key search, BBS random numbers

This is synthesizable SystemVerilog for four cryptographic engines. Each one is shaped around a
different way of spending FPGA area:

| engine | idea | top-level ports |
|---|---|---|
| IDEA block cipher (`idea_cipher`) | one deeply pipelined round, reused eight times by feeding its output back | `idea_*` |
| Montgomery multiplier (`mont_mult`) | linear systolic array whose radix 2^K is a parameter | `mm_*` |
| RC4 key search (`rc4_keysearch`) | 96 identical cells, each with its own S-block memory, test 96 keys at once | `rc4_*` |
| BBS random number generator (`bbs_rng`) | a true random seed from clock jitter, fed to a Blum Blum Shub generator built from four shift registers and a 1-bit ALU | `rng_*`, `slow_clk` |

`crypto_top` puts the four side by side on a shared `clk` and `rst`. They do not interact; each
keeps its own ports. All resets are synchronous and active high. The one exception is the
slow-clock side of the random source, which has no clock of its own during reset.

## IDEA: one round, eight passes

IDEA encrypts a 64-bit block in eight identical rounds followed by an output transformation (the
"half round"). Each round uses six 16-bit subkeys. A round mixes three operations: XOR, addition
mod 2^16, and multiplication mod 2^16+1, where the word 0 stands for 2^16.

**The multiplier** (`idea_mulmod`) uses the low-high method. With t = x·y in 32 bits:

    x·y mod (2^16+1) = t_low − t_high + (t_low ≤ t_high ? 1 : 0)

The second operand is always a subkey. Software therefore stores subkeys already decremented by 1,
so that x·y = (x−1)(y−1) + (x−1) + (y−1) + 1 needs no decrementer on the key side. The multiplier is
7 pipeline stages deep.

**The round** (`idea_round`) is 22 stages deep. The output transformation (`idea_half_round`) is 7
stages deep. Every path is balanced with delay registers. A round's first multiplications use Z1
and Z4 at cycle 0, the multiplication with Z5 comes 7 cycles later, and the one with Z6 14 cycles
later. The key memory (`idea_key_mem`) therefore has three read ports, addressed by three
different round numbers.

**Feedback schedule** (`idea_cipher`):
- Time is cut into passes of 22 cycles, numbered 0–7, driven by a free-running counter.
- In pass 0 the round takes new blocks: `in_ready` is high for those 22 cycles.
- In passes 1–7 the round takes its own output. Each block in the pipeline therefore meets the
  round once per pass.
- When pass 0 comes round again, the finished blocks leave through the output transformation and
  new blocks take their slots.

A block accepted at cycle c appears on `out_data` at cycle c + 8·22 + 7 = c + 183 with `out_valid`
set. Throughput is 22 blocks per 176 cycles, which is 8 bits per clock. Gaps in the input are
allowed. Decryption uses the same hardware with the decryption subkeys loaded.

**More rounds:** the parameter `RINST` (1, 2, 4 or 8; default 1) sets how many rounds are built.
They are chained, a pass lasts 22·`RINST` cycles, and a block makes 8/`RINST` passes. The latency
stays 183 cycles, and throughput grows to 22·`RINST` blocks per 176 cycles. With `RINST = 8` the
core is fully unrolled and `in_ready` never drops. Each built round has its own copy of the
subkey memory, and all copies are written together.

**Loading keys:** write all 52 subkeys through `key_we/key_addr/key_data` before sending data.
Subkeys are numbered round by round (Z1..Z6 of round 1 are 0–5, the output transformation is
48–51). Z1, Z4 and the output-transformation Z1, Z4 are written minus 1. The subkey expansion
(and the inversion for decryption) is done in software. `tb/idea_ref_pkg.sv` shows how:
`enc_keys`, `dec_keys` and `hw_word`.

## Montgomery multiplier: a systolic array of radix-2^K cells

`mont_mult` computes S ≡ A·B·2^(−K·M) (mod N), with M = ⌈NBITS/K⌉, using this recurrence:

    S = 0
    for i = 0 .. M:  q = S·N' mod 2^K ;  S = (S + q·N) / 2^K + a_i·B     (a_M = 0)

N must be odd, and N' = −N⁻¹ mod 2^K must be supplied. The sum is never fully reduced: the result
is below N + 2^K·B. Using it as the B input of the next multiplication keeps every value bounded,
so chained multiplications (as in RSA exponentiation) need no subtraction in between. For a final
result in [0, N), subtract N at the end.

**Cells:**
- The **f-cell** (`mont_fcell`) forms the quotient digit q from the lowest digit of S, plus the
  carry that digit produces.
- Each of the D = ⌈(NBITS+3)/K⌉ + 1 **r-cells** (`mont_rcell`) holds one K-bit digit of S. It adds
  its digit of q·N and a_i·B to the digit arriving from its upper neighbour, and passes the carry
  up.

The hard part is the timing. Cell j works on iteration i in cycle 2i + 1 + j. This is what makes
the array systolic:
- Digit j+1 of the previous S was made by cell j+1 one cycle earlier.
- The carry, q and a_i of the current iteration come from cell j−1, also one cycle earlier.
- So every signal travels only between neighbours, through one register.
- Each cell is busy every second cycle.

**Interface:** pulse `start` with A, B, N and N' applied.
- The result leaves as D digits of K bits on `sout`, least significant first, with `sout_valid`
  high, in cycles 2M+3 … 2M+D+2 after `start`.
- `done` marks the last digit.
- A 1024-bit product at K = 16 (the defaults) takes 196 cycles.
- Every K from 1 to 16 has been simulated, including sizes that K does not divide.

## RC4 key search

The search takes a known-plaintext pair, with cxp = plaintext XOR ciphertext as the expected
keystream. It finds the 40-bit key whose first eight RC4 keystream bytes equal cxp.

**RC4 cell** (`rc4_cell`): one key test per cell.
- The key schedule and the keystream phase both run at three cycles per iteration:
  1. read S[i];
  2. compute j and read S[j];
  3. write the swapped values back.
- In the keystream phase, the output byte S[S[i]+S[j]] is read and compared with the matching
  cxp byte one iteration later.
- A found latch is set at the start of a key and cleared by any mismatch.
- When i = j the swap write is suppressed, so the two memory ports never write the same address
  in one cycle.

**S-block** (`rc4_sblock_ram`): each cell has a 512 × 8 dual-port memory made of two halves. While
one half is scrambled for the current key through port A, port B writes the identity permutation
into the other half for the next key. No cycles are spent on initialisation after the first batch.

**Engine** (`rc4_keysearch`, `rc4_ctrl`): 96 cells run in lock step from one controller.
- Each cell's key is the global key plus its cell number (`rc4_local_key`).
- A batch takes 1 (load) + 768 (key schedule) + 3·8 (keystream) + 2 (last compare) = 795 cycles,
  after a one-time initialisation of 256 cycles.
- After each batch the global key advances by 96.

**Host protocol:**
1. Write cxp to register 1. The first keystream byte is bits 63:56.
2. Write the start key to register 0. This starts the search.
3. Poll register 3 (bit 1 = halted, bit 0 = searching).
4. After the engine halts, read register 0 (the batch's global key) and registers 1 and 2 (found
   flags of cells 0–63 and 64–95).

The key is the global key plus the number of the cell whose flag is set. The key order within a
key is most significant byte first: the first RC4 key byte is key[39:32].

## BBS random number generator

`bbs_rng` produces random bits X_{i+1} = X_i² mod M for a fixed Blum modulus M (the `MODULUS`
parameter). It keeps the 10 low bits of each X_i. It has three parts.

**True random source** (`rrng`):
- An external slow, jittery oscillator (`slow_clk`) samples the fast system clock. The phase
  noise makes each sample random.
- A parity filter XORs 4 samples into one bit, pulling a biased bit stream towards equal numbers
  of 0s and 1s.
- Filtered bits fill a 1024-bit dual-clock buffer.
- The generator asks for a fresh buffer with a toggle. The toggle crosses into the slow domain
  through a two-flop synchroniser and is echoed back. `full` is only believed when the echo
  matches, so a stale buffer is never used.
- Sampling `clk` with `slow_clk` is deliberate. So is using `rst` asynchronously on the slow side
  and synchronously on the fast side; lint tools flag both.

**Generator** (`bbs_prng`, `bbs_alu`): everything is bit-serial.
- Four 1024-bit registers M, X, Y, Z shift right only. A one-bit ALU with a carry register adds,
  subtracts (B − A) or copies, and keeps zero/one flags over a pass.
- **Seed check:** the seed must be coprime to M. Euclid's algorithm by subtraction does this: it
  subtracts, restores on a negative result, swaps, and repeats until the difference is 1 (accept)
  or 0 (reject). An all-zero seed is also rejected. A rejected seed makes the generator ask for
  a new buffer. The seed's top bit is forced to 0 so that X₀ < M.
- **Squaring:** shift-and-add over the bits of X gives the 2n-bit product in Y:Z, in n(n+1) cycles.
- **Reduction** (n rounds), which removes the left shift the registers cannot do:
  1. Y:Z is shifted left one bit. This is done as a right rotation of 2n−1 bits, keeping the bit
     shifted out in an overflow flag.
  2. M is subtracted from Y.
  3. Y is restored if the result is negative and there was no overflow.
- **Output:** Y is copied to X and Z, and the 10 low bits of the new X go to the output buffer.

One iteration takes between 4n² and 5n² + 4n cycles, depending on the data: about 4.7 M cycles
for n = 1024, or 47 ms at 100 MHz. The time the seed check takes depends on the seed and can be
long.

**Output buffer** (`prng_buffer`): a 4096-bit memory written a bit at a time and read a byte at a
time (`rng_rd_addr`, data one cycle later). Bit k of byte b is the (8b+k)-th output bit. It is
used as a double buffer: `full[h]` rises when half h has been written, and the reader clears it
with `clear[h]`. The writer never waits; old random bits are simply overwritten.

## Where this design differs from the published architecture

- **RC4:** a batch takes 795 cycles instead of 792. One load cycle and a two-cycle tail (the last
  byte's comparison) are added to 768 + 3n. The key-byte multiplexer is an ordinary multiplexer,
  not tristate buffers. A status register (r3) is added to the host interface.
- **IDEA:** the number of rounds built is a parameter (1, 2, 4 or 8). No CBC logic is built: the
  interleaving of several CBC streams is left to host software. Each built round gets its own
  copy of the subkey memory. Subkeys are written once into a 52-entry memory
  rather than rotated through shift registers. The published performance table gives a latency of
  175·8 + 7 cycles for the same core; this design follows the 22-cycle round and 183-cycle total
  derived from the pipeline.
- **Montgomery:** the array is one digit wider than ⌈(n+2)/K⌉ cells. Results are bounded by
  N + 2^K·B instead of 2N. `start/busy/done/sout_valid` are added.
- **BBS:** the reduction shifts before it subtracts, with an overflow bit. In the published
  version the subtraction comes first. The modulus is a 1024-bit Blum integer chosen for this
  design; the published design does not give its modulus. The full flag per buffer half is this
  design's reading of the double buffer.
- **Top level:** the host bus of the original board (a memory-bus FPGA card) is not modelled. Each
  engine offers plain register-style ports instead. The external RC oscillator is not part of the
  RTL: it drives `slow_clk`.

## Simulating

Any recent Verilator (5.x) runs the testbenches. Packages must come first on the command line:

    verilator --binary --timing -Irtl -Itb rtl/idea_pkg.sv rtl/rc4_pkg.sv \
        tb/idea_ref_pkg.sv tb/rc4_ref_pkg.sv tb/tb_crypto_top.sv --top-module tb_crypto_top
    ./obj_dir/Vtb_crypto_top

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_idea_mulmod` | all corner operands (0 = 2^16, 1, 2^16−1) and random ones against a direct modular product, 7-cycle latency |
| `tb_idea_cipher` | the published IDEA test vector, random blocks against a reference model, 183-cycle latency, the input stall pattern, decryption; 2-, 4- and 8-round variants produce the same outputs in the same cycles |
| `tb_mont_mult` | every radix 2^1 … 2^16 at small sizes and 1024 bits at K = 16, congruence and bound of the result and its cycle count |
| `tb_rc4_keysearch` | an 8-cell engine finding a planted key, the found flags, halting, batch length, and a search without the key that keeps running |
| `tb_bbs_prng` | a 32-bit Blum modulus: rejection of a seed sharing a factor with M, output bits against X² mod M, iteration time |
| `tb_rrng` | parity of four samples per bit under a random slow clock, fill length, request/full handshake |
| `tb_prng_buffer` | bit order, full flags per half, clearing, wrap-around |
| `tb_crypto_top` | all four engines together at reduced sizes; counts that each mechanism happened (input stall, key reload, batches, key found, seed rejection, both restore paths, both buffer halves full) |
| `tb_crypto_top_full` | every parameter at its default: IDEA test vector and latency, one 1024-bit radix-2^16 product, a 96-cell RC4 search, one 1024-bit BBS iteration (about 30 s of simulation) |

The random source cannot be simulated with a real oscillator. `tb/tb_slow_clk_driver.sv` stands
in for it: it places each `slow_clk` edge while `clk` is high or low, so the seed it delivers is
known. Some testbenches use it to supply (M−1)/2 as the seed. That makes the seed check finish in
a few passes, and exercises both the swap and the restore.

## How far to trust it

- All engines are checked against independent reference models, and their cycle counts are
  checked against the numbers above.
- They have only been simulated, not run on hardware; clock rates are not verified.
- The BBS modulus is a fixed parameter. Anyone using the generator for real must supply their own
  Blum integer, and should keep its factors secret.
- The RC4 engine only matches keystream bytes. It does not decide whether a key is the intended
  one when several keys match.
