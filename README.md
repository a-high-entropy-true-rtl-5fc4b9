# Ring-oscillator TRNG with Keccak conditioning

This is a true random number generator for FPGA (and, with a hand-placed
oscillator macro, ASIC). Thirty-two free-running ring oscillators are
sampled by the system clock. Their timing jitter makes each sample
unpredictable, and the XOR of all samples gives one raw random bit per
clock. Two health tests watch the raw stream all the time. A small
controller warms the source up, fills an N_BITS_KEY-bit key register,
hands the key to the host and backs off when the tests complain. An
optional Keccak-f[1600] unit can then turn each raw key into a 1600-bit
conditioned key in 24 cycles. The same unit can also serve as a
deterministic generator seeded by the raw key, or as a stand-alone
permutation core for the host.

```
            enable                                   conditioning
              |                                           |
   +----------v-----------+      rnd_bit     +------------v-------+
   | noise source         |---+------------->| key shift register |--- out_key (N_BITS_KEY)
   | 32 rings x 13 inv,   |   |              +--------------------+        |
   | DFF per ring, XOR,   |   |  +-------------+                    +------v------+
   | output DFF           |   +->| health test |--error------+      |   Keccak    |
   +----------^-----------+      | RCT + APT + |--total_fail-+      | f[1600], 24 |
              | dff_enable       | fail count  |             |      | rounds      |
              |                  +------^------+             |      +------+------+
              |     enable_health_test  |                    |             | 1600
              +-------------------------+-------- control unit (6 states)  |
                                                 key_ready / trng_intr     |
                                     ack_read -->                          |
                          key_out = conditioning ? Keccak state : {0, out_key}
```

## The entropy source

`noise_source` holds `N_RO` = 32 rings of `N_INV` = 13 inverters. Each ring
output goes to its own flip-flop. The 32 samples are XORed and one last
flip-flop registers the result as `rnd_bit`. Both flip-flop stages advance
only while the controller's `dff_enable` is high. Each `rnd_bit` value is
therefore one fresh sample, taken two enabled edges earlier, and it holds
while the enable is low.

A ring oscillator is a combinational loop whose period depends on analog
delays, so it cannot be simulated as RTL. `ring_oscillator` is a
**behavioural model** with the real part's ports (`enable`, `ro_out`).
It works as follows:

- every inverter has a fixed mean delay, drawn uniformly in 275 to 282 ps
  for each instance;
- every pass through an inverter adds Gaussian jitter with sigma = 30 ps;
- the output toggles once per half period, which is the sum of the 13
  jittered inverter delays. The mean period is therefore about
  2 x 13 x 278 ps = 7.2 ns, a little slower than the 6.67 ns clock at
  150 MHz.

The Gaussian is built from 12 uniform variates. Each instance has its own
xorshift generator, seeded by the instance index, so the 32 rings drift
apart independently and every run is reproducible. When the model is
disabled its output rests at 0. Edges fall half a picosecond off the
whole-picosecond grid, so they never coincide with a clock edge that lies
on that grid. For synthesis, replace `ring_oscillator` with a
technology-specific ring: a LUT chain with `KEEP`/`DONT_TOUCH` on FPGA,
or a hand-placed cell on ASIC. The flip-flops and the XOR tree in
`noise_source` synthesize as written.

The statistics the testbench measures come from this model. They say
nothing about real silicon. Over 35,000 samples the model gives 49.7 %
ones, and no run of equal bits is longer than 13.

`tb_noise_source_configs` runs four configurations: 4 or 32 rings of 3 or
13 inverters. It samples each one at 500 MHz and at 50 MHz, the two
simulation rates of the design study, and takes 20,000 bits per case.
Under the model, the 4-ring, 13-inverter source has runs of 29 to 30 equal
bits, past the repetition-count cutoff of 22. The 32 x 13 source never
exceeds 19, with 49 to 50 % ones and a lag-1 agreement of 0.50. This
matches the direction of the study: 4 rings are not enough. It is not
a substitute for the NIST and AIS-31 suites on silicon.

## Health monitoring

`health_test` feeds every raw bit taken while `enable_health_test` is high
to two tests of NIST SP 800-90B.

**Repetition count test** (`repetition_count_test`). This test counts the
length of the current run of equal bits. When the run reaches the cutoff
`C` it sends a one-cycle error pulse and restarts the count. The cutoff
comes from C = 1 + ceil(-log2(alpha) / H). With alpha = 2^-20 and
H = 0.9982, the measured min-entropy of the source, this gives
**C = 22**. Because the count restarts, a stuck source does not give one
long error level. It gives an error every 21 samples.

**Adaptive proportion test** (`adaptive_proportion_test`). The stream is
cut into windows of **W = 1024** samples. The first bit of a window is the
reference. The test counts how many bits of the window equal the
reference, and it pulses an error once, when the count reaches
**C = 590**. That cutoff is 1 + CRITBINOM(1024, 2^-H, 1 - 2^-20) for
H = 0.9982. The test also pulses `window_end` after the last sample of
each window.

**Consecutive errors and total failure.** `error` is the OR of the two
tests. It goes to the controller, which restarts the warm-up. A counter
also tracks consecutive errors. Errors count as consecutive unless a
whole 1024-sample window passes with no error from either test. When the
counter reaches `FAIL_THRESH` (default 3), `total_failure` rises. It stays
high until reset, and it sends the controller to its dead state. In
practice:

- an isolated statistical false alarm costs one warm-up;
- a stuck source reaches total failure after 3 x 21 samples;
- a strongly biased source fails the adaptive proportion test in three
  windows in a row and also reaches total failure.

All four thresholds are parameters: `RCT_C`, `APT_W`, `APT_C` and
`FAIL_THRESH`.

## Control unit

`control_unit` is a Moore machine with six states:

| state | outputs | leaves when |
|---|---|---|
| IDLE | none | `enable` goes high, to BIST |
| BIST | `dff_enable`, `enable_health_test` | `cnt_BIST = N_BIST*LATENCY`, to WAIT |
| WAIT | `dff_enable`, `enable_health_test` | `cnt_WAIT = WAIT_CONST`, to ES32 |
| ES32 | `key_ready`, `trng_intr` (one cycle) | always, to WAIT_FOR_ACK |
| WAIT_FOR_ACK | none (the key is frozen) | `ack_read`, to WAIT |
| DEAD | none | reset only |

Two rules apply in BIST, WAIT, ES32 and WAIT_FOR_ACK:

- `error` sends the machine to BIST;
- `total_failure` sends it to DEAD, and it wins over `error`.

An error during BIST restarts the warm-up count. Each counter clears when
its state is entered. By default:

- `N_BIST` = 1 and `LATENCY` = 1024, so the warm-up lasts 1025 cycles and
  covers one full adaptive-proportion window;
- `WAIT_CONST` = `N_BITS_KEY` - 1, so WAIT lasts exactly `N_BITS_KEY`
  cycles and every bit of a new key is fresh.

The noise source, the key register and the tests stop outside BIST and
WAIT. The key therefore cannot change between `key_ready` and
`ack_read`; an assertion in `trng` checks this. An `ack_read` that
arrives in the ES32 cycle itself is not seen. Acknowledge from the next
cycle on.

## Keccak unit and the conditioning switch

`keccak` runs Keccak-f[1600] one round per clock, through one
combinational `keccak_round` (theta, rho, pi, chi, iota). The round
constants and rho offsets are not typed in. `trng_pkg` computes them at
elaboration time from their definitions: the LFSR
x^8 + x^6 + x^5 + x^4 + 1 for the constants, and the (x, y) <- (y, 2x+3y)
walk for the offsets. Lane (x, y) occupies bits `64*(x+5y) +: 64`, which
is the usual little-endian SHA-3 byte order.

A start pulse loads the state. The same edge already applies round 0, and
`key_ready`/`intr` pulse **24 cycles after the start cycle**. The result
then holds until the next start. A start that arrives while the unit is
busy is ignored.

In `trng_top`, the `conditioning` input selects the mode:

- **conditioning = 1.** The TRNG's `key_ready` starts the Keccak unit on
  the raw key, padded with the pad10*1 rule to one 1600-bit block: the
  key sits in bits [N-1:0], then a 1 at bit N, zeros, and a 1 at bit 1599.
  No SHA-3 domain bits are added. `key_out` is the permuted state, and the
  top-level `key_ready`/`trng_intr` come from the Keccak unit. This mode
  covers both uses: a full-entropy conditioner with a long key, and a
  DRBG seeded with a short one.
- **conditioning = 0.** `key_out` is the raw key, zero-extended to 1600
  bits, with the TRNG's own flags. The Keccak unit belongs to the host:
  `kec_start` permutes `kec_state_in`, and the result appears on
  `kec_state_out` with a `kec_done` pulse. The host does its own
  absorbing and padding, so any SHA-3 or SHAKE function can be built on
  it.

`N_BITS_KEY` must be at most 1598, because of the padding. It must be
above 24, so that the Keccak unit is idle when the next raw key arrives.

## Timing and throughput

All figures are in clock cycles and were measured in simulation. The
acknowledge is given as soon as the host sees the flag.

| quantity | cycles |
|---|---|
| `enable` to the first raw key | 1 + (N_BIST*LATENCY + 1) + N_BITS_KEY = 2526 at the defaults |
| raw key period | N_BITS_KEY + 2 (about 1 bit per cycle) |
| Keccak latency | 24 |
| conditioned key period | N_BITS_KEY + 25, that is 1600/(N+25) bits per cycle |

For conditioned keys this gives:

| N_BITS_KEY | bits per cycle |
|---|---|
| 1500 | 1.049 |
| 1206 | 1.300 |
| 320 | 4.638 |

The 1600/(N+24) bits per cycle that is often quoted for this scheme leaves
out the one-cycle ES32 state. With a 320-bit seed it would give 4.65.

At a 150 MHz sampling clock the raw output rate is about 150 Mbit/s. The
rings and the clock are asynchronous, so entropy per bit depends on the
ratio of their periods and on the real jitter.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_RO` | 32 | rings in the noise source |
| `N_INV` | 13 | inverters per ring |
| `N_BITS_KEY` | 1500 | raw key length (320 for a 256-bit-security DRBG seed; 1206 for a conditioned min-entropy of 0.75) |
| `N_BIST`, `LATENCY` | 1, 1024 | warm-up length N_BIST*LATENCY + 1 |
| `RCT_C` | 22 | repetition count cutoff |
| `APT_W`, `APT_C` | 1024, 590 | adaptive proportion window and cutoff |
| `FAIL_THRESH` | 3 | consecutive errors that make a total failure |

Of these, the values fixed by the design itself are 32 x 13, W = 1024,
the 24-round one-round-per-cycle Keccak and the 1500-bit key used for
conditioning. The threshold of three errors is the strict policy the
design uses as its example. The RCT and APT cutoffs, the warm-up length,
the padding rule and the external Keccak port set are choices of this
implementation.

A published FPGA build of this architecture reports 194 flip-flops for
the TRNG without Keccak. A 1500-bit key register alone is far more than
that, so that build must have used a much shorter key. Its length is not
known, and the default here stays at 1500. The same build reports
2555 flip-flops with Keccak included. Synthesis of this RTL gives 1607
flip-flop bits for `keccak` (1600 state, 5 round, 2 control) and about
1600 for the rest of the TRNG, so about 3200 in all at the defaults.

## Top-level ports (`trng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sampling clock; asynchronous active-low reset (the only way out of DEAD) |
| `enable` | in | 1 | starts the rings and the controller |
| `conditioning` | in | 1 | output select, see above |
| `ack_read` | in | 1 | host has read the key |
| `key_out` | out | 1600 | key |
| `key_ready`, `trng_intr` | out | 1 | one-cycle pulses when `key_out` is new |
| `kec_start`, `kec_state_in` | in | 1, 1600 | host use of the Keccak unit (conditioning = 0) |
| `kec_state_out`, `kec_done`, `kec_busy` | out | 1600, 1, 1 | Keccak state, end pulse, busy |

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_keccak_round` | every round index against an independent reference (`keccak_ref_pkg`, published constants); Keccak-f(0) lane 0 = F1258F7940E1DDE7 |
| `tb_keccak` | SHA3-256("") = a7ffc6f8...8434a via the host interface; random states; padded keys; 24-cycle latency; start-while-busy |
| `tb_repetition_count_test`, `tb_adaptive_proportion_test` | cycle-by-cycle against software models, with fair and biased streams and enable gaps |
| `tb_health_test` | fair, stuck and biased phases against a model of both tests plus the failure counter |
| `tb_control_unit` | random stimulus against a model of the state diagram; state durations; every transition taken |
| `tb_key_shift_reg`, `tb_ring_oscillator`, `tb_noise_source` | shifting and holding; ring period and jitter; raw bit against the XOR of the ring levels, bit statistics |
| `tb_trng` | 64-bit key: latency, 40 keys, acknowledge delays, recovery from a stuck burst, DEAD |
| `tb_trng_top` | all defaults: raw and conditioned keys against predictions, exact latencies and periods, host Keccak use, a health error with recovery, total failure, reboot |
| `tb_noise_source_configs` | 4 or 32 rings x 3 or 13 inverters at 500 and 50 MHz: raw bit against the ring levels; bias, correlation and longest run of 32 x 13 (others reported) |
| `tb_trng_top_workloads` | 320-bit and 1206-bit keys in conditioned mode: keys and measured rates |

The end-to-end tests predict every raw bit themselves, from the ring
levels at each enabled clock edge. They force the raw-bit net to inject
stuck-at faults.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --no-sched-zero-delay \
  -y rtl -y tb +libext+.sv rtl/trng_pkg.sv tb/keccak_ref_pkg.sv \
  tb/tb_trng_top.sv --top-module tb_trng_top
./obj_dir/Vtb_trng_top
```

Substitute any other testbench name. `tb_trng_top` runs the full default
design, about 17,000 cycles, in a few seconds of wall time.
`--no-sched-zero-delay` is safe because every delay in the ring model is
non-zero.

## Limits

- The ring oscillator is a model. Timing closure, placement, frequency
  injection and the real entropy of the rings are outside what this RTL
  can show.
- The design has no separate DRBG "generate" function: no re-permutation
  without new seed bits, no reseed counter. The DRBG use is the
  conditioned mode with a short key.
- The ring model makes `noise_source`, `trng` and `trng_top`
  non-synthesizable as written. Every other module is plain synthesizable
  logic. `keccak` is about 1.6k flip-flops; its round constants are kept
  as a 24-entry table.
