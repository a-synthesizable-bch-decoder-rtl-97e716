# DVB-S2 BCH decoder

The outer code of DVB-S2 is a shortened binary BCH code. After the LDPC
decoder has removed most channel errors, the BCH decoder cleans up what is
left: up to t = 12, 10 or 8 wrong bits per frame, depending on the code rate
and frame size. This RTL implements such a decoder as a small, bit-serial
machine. It takes the BCH codeword (a FECFRAME with its LDPC parity already
removed) one bit per clock and emits the corrected BBFRAME one bit per clock.
It handles all 21 DVB-S2 configurations: 11 code rates for normal frames
(GF(2^16)) and 10 for short frames (GF(2^14)). The field is selected per
frame at run time.

The decoder follows the classic three-step BCH flow, with a buffer beside it:

```
            +--------------------------------------------+
 in_data -->| SC: 12 LFSRs + XOR matrices -> S1..S24     |--+
   |        +--------------------------------------------+  |  syndromes
   |        +------------------+                            v
   +------->| MB: K-bit buffer |     KES: SiBM, t cycles -> sigma(x)
            +------------------+                            |
                     |                                      v
                     +--> XOR <--- root flag --- PRF: shortened Chien search
                           |
                       out_data
                CU: state machine + counters drives all of the above
```

* **Syndrome calculator (SC)** computes the syndromes S_1..S_2t while the
  frame arrives.
* **Key equation solver (KES)** turns the syndromes into the error locator
  polynomial sigma(x). It uses the simplified inverse-free Berlekamp-Massey
  (SiBM) algorithm and takes t cycles.
* **Polynomial roots finder (PRF)** runs a Chien search in step with the
  output. For each bit it says whether that bit is in error.
* **Memory buffer (MB)** holds the K information bits until the error
  locations are known.
* **Control unit (CU)** sequences the frame.

A frame with all-zero syndromes skips the KES and is sent unchanged.

## Frame schedule

The control unit (`bch_control`) is a five-state machine:

| state | what happens | cycles (no input pauses) |
|-------|--------------|--------------------------|
| IDLE  | waits for the first bit, then latches its `frame_type` and `code_rate` | - |
| RX1   | each bit goes into the SC and into the MB | K (the first bit counts here) |
| RX2   | each parity bit goes into the SC only | N - K |
| KES   | 1st cycle: syndrome check. If all S_1..S_2t are zero, go to TX. Otherwise start the KES, wait t cycles, then load the PRF | 1 (clean) or t + 2 |
| TX    | read K bits from the MB; each is XORed with the PRF flag | K |

Latency from the last input bit to the first output bit:
* t + 4 cycles for a frame with errors;
* 3 cycles for a clean frame.

The K output bits come out on K consecutive cycles. One frame is processed
at a time. `in_ready` is low from the end of reception until the last bit has
been read from the buffer. The decoder therefore needs about N + K + t clocks
per frame, and accepts input during N of them.

## Syndromes from minimal-polynomial remainders

The obvious way to get S_j = r(alpha^j) needs one GF multiplier per syndrome.
`bch_syndrome` uses a cheaper structure. The generator polynomial of a
DVB-S2 BCH code is g(x) = G_1(x)...G_t(x). Each G_i is the minimal polynomial
of alpha^(2i-1), and the package lists them for both frame types. Twelve
LFSRs divide the incoming word by G_1..G_12 at the same time, so after the
last bit LFSR i holds

    b_i(x) = r(x) mod G_i(x)      (degree < m).

Because G_i(alpha^j) = 0 for every j whose odd part is 2i-1, it follows that
S_j = b_i(alpha^j). Here j = 2, 4, 8, ... share LFSR 1; j = 6, 12, ... share
LFSR 2; and so on. Evaluating a polynomial of degree < m at a fixed point is
linear over GF(2):

    S_j = XOR over l of  b_i[l] * alpha^(j*l mod (2^m - 1))

So every syndrome is a fixed XOR network of the m remainder bits. Each
column of that network is the constant alpha^(j*l). The columns are computed
at elaboration time, once per field, by a function in the module. No table is
stored in the source. The two fields get separate networks, and a
multiplexer picks one by frame type.

The LFSRs run one bit per clock in step with reception, so the syndromes are
ready one cycle after the last bit. `syn_zero` tests only S_1..S_2t of the
current t. This matters: for t = 8, LFSRs 9..12 hold non-zero remainders
even for a valid codeword.

## Key equation: SiBM in t cycles

`bch_kes` runs the Berlekamp-Massey recursion with two simplifications.

* **Binary code.** Every even-step discrepancy of a binary BCH code is zero.
  So only the t odd steps are executed, and the correction polynomial moves
  by x^2 per step.
* **No inversion.** Instead of dividing by the previous discrepancy b, the
  current polynomial is multiplied by b. That only scales sigma, which does
  not move its roots.

Iteration r (r = 0..t-1), starting from C = 1, lam = x, L = 0, b = 1:

```
d   = sum_{i=0..12} C_i * S_(2r+1-i)
C  <- b*C + d*lam
if d != 0 and L <= r:  lam <- x^2 * C(old),  L <- 2r+1-L,  b <- d
else:                  lam <- x^2 * lam
```

One iteration is one clock cycle. The cycle holds 13 multipliers for d and
26 for the update. The syndromes do not go through a 24-way multiplexer.
They sit in a window register that shifts by two per iteration, so that
`win[i]` always holds S_(2r+1-i). The polynomials are kept to degree 12. A
word with at most t errors never needs more.

Outputs:
* `sigma` holds the 13 coefficients, with sigma_0 scaled (not 1).
* `deg` holds the final L, the number of errors the solver believes in.

## Shortened Chien search

The first bit sent is the coefficient of x^(N-1), so output position p is
the coefficient of x^j with j = N-1-p. That bit is wrong exactly when
sigma(alpha^-j) = 0. DVB-S2 codes are shortened (N < 2^m - 1). A plain Chien
search starting at alpha^0 would therefore waste 2^m - 1 - N steps before
reaching the first transmitted bit. Let beta = 2^m - N - 1. `bch_chien`
starts directly at alpha^(beta+1) = alpha^-(N-1). When it loads sigma, it
multiplies each coefficient once:

    reg_i <- sigma_i * alpha^(i*(beta+1))

After that, each step multiplies reg_i by the constant alpha^i. `root` is
high when the XOR of all registers is zero.

The pre-multiplying constants depend on N, so there is one row of 12
constants per configuration. Like the syndrome columns, these rows are
computed at elaboration time from the code table. Only the K information
positions are searched, because only those are sent.

## Buffer and output

`bch_membuf` is a 1-bit-wide, 58192-deep memory with a registered read,
written as an array so that synthesis maps it to SRAM. 58192 is the largest
K_bch, normal rate 9/10. It is used as a circular FIFO. Every frame writes K
bits and then reads K bits, so the pointers need no reset between frames.
The top-level output is

    out_data = buffered bit XOR (root AND frame_has_errors)

The `frame_has_errors` term is there because the roots finder is not loaded
for a clean frame. It still holds the previous frame's polynomial.

## Configuration and code table

`bch_pkg` holds:
* the shared types and the field arithmetic (`gf_mul`, `gf_pow`);
* the 2 x 12 minimal polynomials;
* the code table of the standard.

| frame | rates | K_bch | N_bch - K_bch | t |
|-------|-------|-------|---------------|---|
| normal, GF(2^16), x^16+x^5+x^3+x^2+1 | 1/4 1/3 2/5 1/2 3/5 3/4 4/5 | 16008 .. 51648 | 192 | 12 |
| normal | 2/3, 5/6 | 43040, 53840 | 160 | 10 |
| normal | 8/9, 9/10 | 57472, 58192 | 128 | 8 |
| short, GF(2^14), x^14+x^5+x^3+x+1 | 1/4 .. 8/9 | 3072 .. 14232 | 168 | 12 |

`code_rate` is encoded 0..10 in the order 1/4, 1/3, 2/5, 1/2, 3/5, 2/3, 3/4,
4/5, 5/6, 8/9, 9/10. Short frames have no rate 9/10; that setting is decoded
as short 8/9. `frame_type` and `code_rate` are sampled with the first bit of
a frame and ignored after that.

## Top-level interface (`bch_decoder`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_data` | in | one codeword bit, highest coefficient first; taken when `in_ready` is high. Pauses inside a frame are allowed |
| `frame_type`, `code_rate` | in | configuration, valid with the first bit |
| `in_ready` | out | high in IDLE, RX1 and RX2 |
| `out_valid`, `out_data` | out | corrected BBFRAME bits, in order; no back-pressure |

Parameter: `MB_DEPTH` (default 58192), the buffer depth. Lowering it below
the largest K used would break those frames.

Register count, from the design:
* SC: 12 x 16 remainder bits;
* PRF: 13 x 16 bits plus the field flag;
* KES: coefficient, correction and syndrome-window registers, about 1 k flip-flops.

The MB holds 58192 memory bits.

## Where this design makes its own choices

These points are not fixed by the architecture it implements and were chosen
here:

* **Input handshake.** `in_valid`/`in_ready` are this design's. So is the
  rule that bits offered while busy are not taken.
* **Extra KES cycle.** The first KES cycle is a decision cycle (syndrome
  check). There is a one-cycle PRF load after the t iterations.
* **SiBM form.** The SiBM is written in the standard binary inverse-free
  form given above. So are the syndrome window and the 13-coefficient
  truncation.
* **Chien constants.** The shortened Chien search uses general multipliers
  for the one-time load, with constants from an elaboration-time table.
* **Buffer.** The buffer is a circular FIFO with a one-cycle read.
* **Failure flag.** There is no decoding-failure output. A word with more
  than t errors is passed on with whatever the Chien search flags.
* **Minimal polynomial G6.** The normal-frame G6 is the minimal polynomial
  of alpha^11 in GF(2^16):
  x^16+x^15+x^14+x^13+x^12+x^10+x^9+x^8+x^7+x^5+x^4+x^2+1.
  All 24 polynomials were checked to be the minimal polynomials of
  alpha^(2i-1).

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. The testbenches use their own
reference arithmetic (`tb_gf_pkg`), not the RTL package.

* `tb_bch_decoder`: end to end, at full size.
  * All 21 configurations.
  * Each frame is a random BBFRAME, systematically encoded with
    g(x) = G_1...G_t built in the testbench, then hit with bit errors.
  * Frame cases:
    * clean frames;
    * exactly t errors;
    * errors only in the parity;
    * random counts below t;
    * input pauses;
    * back-to-back frames.
  * Checks:
    * every output bit;
    * output contiguity;
    * the t+4 / 3 cycle latency;
    * that the KES runs exactly t cycles.
  * It counts each mechanism and fails if one never occurs. About 1.1 M
    cycles, roughly 10 s.
* `tb_bch_syndrome`:
  * checks S_1..S_24 against Horner evaluation of random words, both fields;
  * checks `syn_zero` on g(x) itself for t = 8/10/12, and its absence after
    one bit flip.
* `tb_bch_kes`:
  * for 0..t random error locations, both fields, t = 8/10/12;
  * checks the degree, that sigma vanishes at every alpha^-e, and exactly t
    busy cycles.
* `tb_bch_chien`: polynomials with known roots at chosen output positions.
  It checks that flags are raised exactly there.
* `tb_bch_membuf`: FIFO order, wrap-around and fill count, on a 37-deep
  instance.
* `tb_bch_control`:
  * counts of shifts, writes, KES start, PRF load and reads;
  * the TX timing, `in_ready`;
  * that the configuration is held while the inputs change.

Not covered: words with more than t errors (their behaviour is undefined, as
in any bounded-distance decoder), timing closure, and gate-level behaviour.

## Simulating

Plain Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bch_pkg.sv tb/tb_gf_pkg.sv tb/tb_bch_decoder.sv \
  -y rtl --top-module tb_bch_decoder -o sim
./obj_dir/sim
```

Replace `tb_bch_decoder` with any other testbench name to run it. Lint a
module with `verilator --lint-only -Wall -Irtl rtl/bch_pkg.sv rtl/<module>.sv`.
