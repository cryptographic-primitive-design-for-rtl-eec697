# CASH: a keyed sponge MAC built on a composite Mersenne product register

CASH is a lightweight message authentication code for FPGAs. Its secret key
is not data held in a register: it is *wired into the structure* of a
nonlinear feedback register, as the coefficients of the update polynomials of
two of its sub-registers. With the key a synthesis-time constant, the whole
keyed permutation collapses into a small XOR/AND network around a 192-bit
register, and a sponge construction turns that permutation into a MAC with a
256-bit tag. The price is that changing the key means re-synthesising, which
suits uses where the key is fixed for the life of a device (secure boot,
trusted platform modules, device identification). Since the key lives in the
configuration, the bitstream must be protected (encryption, no readback).

This repository is synthesizable SystemVerilog for the complete MAC, its
permutation and its building blocks, with self-checking testbenches and a
reference model.

## Product registers, and the bit convention

A product register (PR) of n bits holds a polynomial A(x) of degree < n over
GF(2) and steps as

    A[t+1] = U(x) * A[t]  mod  P(x)

where P(x) (degree n) is the feedback polynomial and U(x) (degree < n, not 0
or 1) the update polynomial. A Galois LFSR is the special case U(x) = x.
When n is a Mersenne exponent (2^n - 1 prime) and P(x) is primitive, *every*
valid U(x) gives the full period 2^n - 1: such a register is a Mersenne
product register (MPR). U(x) only reorders the walk through the 2^n - 1
non-zero states, and there are 2^n - 2 choices of it, which is what makes
U(x) usable as a key. In hardware, multiplying by a constant U(x) is a fixed
XOR matrix; `mpr_next` builds it as the XOR of x^i * A mod P for every set
coefficient u_i, each x^i * A being one more Galois shift, and synthesis
folds the constants.

**Bit convention.** Bit i of a register is the coefficient of x^i, and state
strings are written most significant bit first. The worked example usually
shown for MPRs (P = x^3 + x + 1, seed 001, U = x giving 001, 010, 100, 101,
111, 011, 110, and the other five U(x)) comes out exactly only if the
product is reduced by the *reciprocal* polynomial x^n P(1/x), here
x^3 + x^2 + 1. This design follows that example: `mpr_next` has a parameter
`RECIPROCAL`, default 1, and reduces by the reciprocal of the P(x) it is
given; with `RECIPROCAL = 0` it reduces by P(x) as written. The reciprocal of
a primitive polynomial is primitive, so periods are the same either way, but
the state sequences and therefore the digests differ. Anyone matching digests
produced elsewhere must check this first.

## The 192-bit CMPR

One MPR is linear and useless as a cipher on its own. A composite MPR (CMPR)
chains several MPRs: Boolean *chaining functions* of one MPR's current state
are XORed into the next state of the following MPR, and AND terms in them make
the whole register nonlinear. Because information only flows forward along
the chain, the update remains invertible: the CMPR is a permutation of its
2^192 states.

| MPR | U(x) | P(x) | position in S |
|---|---|---|---|
| 107 bits | 105-bit key fragment `KEY[127:23]` | x^107 + x^59 + x^54 + x^39 + 1 | S[191:85] |
| 61 bits | 23-bit key fragment `KEY[22:0]` | x^61 + x^44 + x^19 + x^15 + 1 | S[84:24] |
| 19 bits | x^17 + 1 | x^19 + x^5 + x^2 + x + 1 | S[23:5] |
| 3 bits | x^2 + x | x^3 + x + 1 | S[4:2] |
| 2 bits | x + 1 | x^2 + x + 1 | S[1:0] |

The sizes, polynomials, the 105 + 23 = 128 key bits and the chain order
107 -> 61 -> 19 -> 3 -> 2 are those of the published CASH design. A key
fragment is read as a polynomial with bit i the coefficient of x^i (bits
above it are zero); the placement of the MPRs in S is this design's choice.
Each fragment must be neither 0 nor 1, which elaboration checks.

**Chaining functions** (`cmpr_chain`). Published are only their properties:
they connect one MPR to the next, are balanced (as many ones as zeros in the
truth table) and use at most a 4-input XOR and a 4-input AND. The taps here
are this design's own. Every bit j of the target MPR gets

    c[j] = s[b] ^ s[b+1] ^ s[b+2] ^ (s[b+3] & s[b+4] & s[b+5] & s[b+6])

from a source of 7 or more bits, and `c[j] = s[b] ^ (s[b+1] & s[b+2])` from
the 3-bit MPR, with b = floor(j * NS / NT) and indices modulo the source
width NS. The spread of b over the source means the whole of each source
register feeds its successor. A linear tap that the AND term does not use
makes every function balanced. Since the taps are not published, digests will
not match another CASH implementation even with the same key.

## The permutation: 4 x 8 steps and a half swap

A permutation call (`cash_perm`) runs four rounds of eight CMPR steps. After
each of the first three rounds the two 96-bit halves of S are exchanged. The
lower half holds the 2-, 3-, 19- and 61-bit MPRs and the low 11 bits of the
107-bit MPR. The head of the chain, the 107-bit MPR, receives no chaining
input, so without the swap it would stay a linear register. The swap carries
the nonlinearly mixed tail of the chain into the head's position, from where
it spreads forward again.

The published call takes 32 clock cycles, with 32 steps and three swaps.
This design therefore folds each swap into the eighth step of its round: the
register loads `swap(nextstate(S))`. It also takes the first step in the
start cycle itself, from `start_val` through a multiplexer in front of the
CMPR logic. The sponge can thus XOR a block into the state and start the call
in the same cycle. Calls then run back to back at exactly one per 32 cycles.

    cycle      0        1 .. 31        32
    start      1
    busy       0        1              0
    done                               1   (result on state; next start allowed)

## The sponge (`cash`, the top)

    initialise  S = 1^192; permute
    absorb      split M || 1 || 0* into blocks; for each: S ^= block; permute
    squeeze     4 times: permute; output H_i = S[63:0]
    tag         H = H0 || H1 || H2 || H3   (256 bits, four 64-bit words)

The security claim rests on the 128-bit key in the permutation. Rate and
capacity are 64 and 128 bits.

**Block size.** The published algorithm absorbs full 192-bit blocks into the
whole state, as a full-state keyed sponge. The published throughput
(578 Mbps at 289 MHz with a 32-cycle call) instead corresponds to 64 bits per
call. Parameter `BLOCK_W` selects either: 192 (default) XORs blocks into all
of S, and 64 XORs them into S[63:0], the rate part.

**Interface.** Valid/ready block streaming:

| port | dir | meaning |
|---|---|---|
| `start` | in | begin a message; taken while `busy` is low |
| `blk_valid`, `blk_ready` | in, out | a block transfers on a clock edge where both are high |
| `blk_data[BLOCK_W-1:0]` | in | block, the first message bit in the MSB |
| `blk_last` | in | final block of the message |
| `blk_nbits` | in | valid bits of the final block, 0..BLOCK_W (others are full) |
| `busy` | out | a message is in progress (until H3 has been output) |
| `h_valid`, `h_idx[1:0]`, `h_word[63:0]` | out | digest word H_i, i = `h_idx`, valid in the one cycle `h_valid` is high |

The tag is not stored. Each word H_i comes straight from the low 64 bits of
the state register, in the cycle in which its squeezing call ends, and the
next call overwrites it. The receiver must take it in that cycle, because
there is no backpressure. This keeps the flip-flop count at the 192-bit
state plus about a dozen control bits, in line with the published figure of
214 registers. A 256-bit tag register would more than double that count.

The padding unit (`cash_pad`) places the single 1 right after the last
message bit. A final block with all `BLOCK_W` bits valid is followed by an
internal padding-only block. An empty message is one final block with
`blk_nbits = 0`. Once offered, a block must stay offered until it is taken;
an assertion checks this.

**Timing.** Count the cycle in which `start` is taken as cycle 0, and offer
every block as soon as it is asked for. A message of j padded blocks
(j = floor(bits / BLOCK_W) + 1) then presents H_i in cycle 32 * (j + 2 + i).
The last word, H3, comes in cycle 32 * (j + 5). That is one initial call,
j absorbing calls and four squeezing calls, with no idle cycles between them.
A new message can start in the next cycle.

Reset is asynchronous and active low. It clears the state and the
sequencer.

## Modules

    cash                 sponge controller and top
    ├── cash_pad  (x2)   padding of the incoming block / padding-only block
    └── cash_perm        state register and 32-cycle schedule
        └── cmpr_next    192-bit CMPR next state, key in U107/U61
            ├── mpr_next   (x5)  U(x)*A mod P per MPR
            └── cmpr_chain (x4)  107->61, 61->19, 19->3, 3->2
    cash_pkg             sizes, polynomials, default key, swap function

## Departures and open points

These points fill gaps in the published description, or choose between two
readings of it. Each is a place where this RTL may differ from another CASH
implementation:

- Tap positions of the chaining functions (see above). These are the largest
  unknown.
- Which coefficients of U107 and U61 hold the key bits, and the bit layout of
  S.
- Reduction by the reciprocal of P(x), chosen to match the worked example.
- The block size: 192 by default, 64 as an option.
- Bit order of messages, the streamed digest words, and the whole handshake.
- The default key `128'h3c6ef372a54ff53a510e527f9b05688c` is arbitrary. Set
  your own with `cash #(.KEY(...))`.

No published test vectors exist, so the digests are checked only against the
independent reference model in `tb/cash_ref_pkg.sv`, written from the
algorithm with the conventions above. The published area and Fmax
(222 ALMs, 289 MHz on a Cyclone V) depend on FPGA tools and were not
reproduced.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/cash_pkg.sv tb/cash_ref_pkg.sv tb/tb_cash.sv --top-module tb_cash
    ./obj_dir/Vtb_cash

For another testbench, swap in its file and module name:

| testbench | covers |
|---|---|
| `tb_mpr_next` | worked 3-bit example (all six U), full period 2^19 - 1 of the 19-bit MPR, 107-bit MPR against long division |
| `tb_cmpr_chain` | balance (exhaustive for 3->2 and 19->3), nonlinearity, taps of every chain |
| `tb_cmpr_next` | 192-bit next state against the model under two keys |
| `tb_cash_perm` | 32-cycle latency, state after each swapped round, back-to-back calls |
| `tb_cash_pad` | every valid-bit count, 192- and 64-bit blocks |
| `tb_cash` | end-to-end MAC at the default parameters |
| `tb_cash_rate64` | end-to-end MAC with 64-bit blocks |

The MAC testbenches each hash 16 messages of 0 to 1000 bits. They compare
every tag and the cycle of every digest word. They also count, and require, each
situation at least once:

- a padded and a full last block, and an empty message;
- multi-block messages;
- source stalls;
- back-to-back messages;
- a start pulse during a message, which must be ignored;
- a reset during a message.

All testbenches finish in seconds.
