# Serial SHA-1 core

A small-area SHA-1 hash engine that computes one of the 80 SHA-1 steps per
clock with a single step-function datapath, instead of unrolling rounds in
parallel. Everything that changes from step to step — the message word Wt, the
logic function f(t,B,C,D) and the constant Kt — is produced serially next to
that datapath by small units driven by step counters. The core hashes messages
of up to 447 bits, which fit a single padded 512-bit block, and takes its
initial hash value as an input.

For the standard "abc" test vector the core returns
`a9993e364706816aba3e25717850c26c9cd0d89d`, 81 clock cycles after `start`.

## Block structure

```
 msg, msg_len ──► padding_unit ──block──► wi_serial_generator ──Wt──┐
                                                                    ▼
 init_hash ────────────────────────────────────────────► serial_compression ──state (A..E)──► final_addition ──► digest, done
                      ft_generation ◄──B,C,D── state        ▲   ▲                   ▲
                           └──────────── f(t) ──────────────┘   │                   │
                      kt_selection ───────── Kt ────────────────┘          init_hash (stored at load)
                      hash_control_unit: load / step / add to all of the above
```

| Module | Role |
|---|---|
| `padding_unit` | message → one 512-bit block: message bits, a 1 bit, zeros, 64-bit length |
| `wi_serial_generator` | W0..W79, one word per step, from a 16-word shift register |
| `ft_generation` | four logic-function units and a 32-bit 4:1 multiplexer, selected by step number |
| `kt_selection` | the four round constants and a 32-bit 4:1 multiplexer, selected by step number |
| `mod80_counter` | step counter 0..79 (one inside each of the two selection units and one in the control unit) |
| `round_select` | step number → 2-bit round index (0–19, 20–39, 40–59, 60–79) |
| `step_function` | one combinational SHA-1 step |
| `serial_compression` | the five 32-bit A..E registers, the load multiplexer and the step function |
| `hash_control_unit` | the load → 80 steps → add sequence |
| `final_addition` | adds the stored initial hash to the result of step 79, word by word mod 2^32 |
| `sha1_serial_top` | wires the above together |
| `sha1_pkg` | shared types (`hash_t`, `word_t`, `step_t`, `round_e`), constants and functions |

## The step datapath

The five registers A..E hold the working state. Each step computes

```
A' = E + f(t,B,C,D) + ROTL5(A) + Wt + Kt      (all mod 2^32)
B' = A      C' = ROTL30(B)      D' = C      E' = D
```

with the additions chained in the order E+f, +ROTL5(A), +Wt, +Kt. The critical
path per clock is therefore the function multiplexer and four 32-bit adders in
series. A multiplexer in front of the registers selects the initial hash input
on the load cycle and the step output otherwise.

The logic functions, one per 20 steps, are

| steps | f(t,B,C,D) | Kt |
|---|---|---|
| 0–19 | (B & C) \| (~B & D) | 5A827999 |
| 20–39 | B ^ C ^ D | 6ED9EBA1 |
| 40–59 | (B & C) \| (B & D) \| (C & D) | 8F1BBCDC |
| 60–79 | B ^ C ^ D | CA62C1D6 |

## The serial message schedule

SHA-1 needs 80 words, W0..W15 from the block and
`Wt = ROTL1(Wt-3 ^ Wt-8 ^ Wt-14 ^ Wt-16)` beyond. Instead of an 80-word array
the generator keeps only the next 16 words in a shift register: the head of the
register is Wt, and every step shifts by one word and appends W(t+16), computed
from register positions 13, 8, 2 and 0. 512 flip-flops thus cover the whole
schedule.

## Step counters

The function selection and the constant selection each contain their own
module-80 counter and selection-signal generator, and the control unit a third
one. All three are cleared together on the load cycle and advanced together by
the `step` signal, so they never differ; the top asserts that the two selection
counters agree (`a_counters_agree`). Sharing one counter would save 14
flip-flops; the separate counters keep each selection unit self-contained.

## Timing and handshake

```
edge E0        start sampled (busy low, len_error low): block, init_hash loaded, counters cleared
edges E1..E80  steps 0..79
edge E81       final addition registered; done = 1 for one cycle, digest valid
edge E82       earliest next start (busy low again)
```

* Latency 81 cycles from the start edge to `done`; one hash per 82 cycles
  when `start` is held high.
* `msg`, `msg_len` and `init_hash` need to be valid only on the start edge.
* `start` is ignored while `busy` is high.
* `msg_len` must be 0..447. Longer lengths raise `len_error` and a start is
  ignored: a 448-bit or longer message needs a second block, which this core
  does not produce.
* `digest` holds until the next operation completes.
* Reset `rst_n` is asynchronous and active low; it clears the control state,
  counters and digest. The A..E and W registers have no reset, since they are
  always loaded before they are used.

Port conventions: the message is left-aligned, its first bit at `msg[447]`, so
"abc" is `{24'h616263, 424'h0}` with `msg_len = 24`. `init_hash` and `digest`
are `{A, B, C, D, E}`. For standard SHA-1 drive `init_hash` with
`sha1_pkg::SHA1_IV` (67452301 EFCDAB89 98BADCFE 10325476 C3D2E1F0). Other
initial values give the compression function of any chaining value, but the
block is always padded as a whole message, so longer messages cannot be
chained through this port.

## Where this design makes its own choices

The block structure, the one-step-per-clock serial datapath, the module-80
counters with 4:1 multiplexers, the function table, the constants, the initial
hash as an input and the one-block message limit are those of the serial
architecture this core implements. The following are this implementation's:

* the 16-word shift-register form of the message schedule;
* computing all four logic functions in parallel and multiplexing the
  results, rather than selecting a function first and evaluating it after;
* the separate load cycle before step 0 and the registered final addition,
  which set the 81-cycle latency;
* the start/busy/done handshake, the `len_error` check and the refusal of
  starts while busy;
* storing the initial hash at load, so the input port is free during the
  operation;
* the port formats (left-aligned message, 9-bit length in bits);
* reset: asynchronous, on control and counters only.

The first logic function is the SHA-1 choice function (B & C) | (~B & D), and
the third the majority function; both are checked against the SHA-1 test
vectors.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. They compare against `tb/sha1_ref_pkg.sv`, a
plain SHA-1 model written independently of the RTL: bit-by-bit padding, an
80-word schedule array, and a table-driven step.

`tb_sha1_serial_top` runs the whole core at its default size:

* the FIPS 180 vectors "abc" and the empty message;
* every message length 0..447 with random contents;
* 40 messages with random initial hash values;
* back-to-back operations with `start` held high (82-cycle period);
* over-long lengths (448 and 511), which must be refused;
* the 81-cycle latency of every operation.

It also counts how often each mechanism occurs (load, each of the four round
functions, final addition, refused start, start while busy) and fails if one
never does. The whole test takes well under a second.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_serial_top.sv \
  --top-module tb_sha1_serial_top
./obj_dir/Vtb_sha1_serial_top
```

The two packages are named explicitly; `-y` lets Verilator find every module
by its file name. The other testbenches are built the same way with their own
file and `--top-module`.

## Limits

* One 512-bit block per message: messages of at most 447 bits. Multi-block
  messages would need a padding unit that emits several blocks and a feedback
  of the digest into `init_hash` with padding suppressed on all but the last
  block.
* No physical implementation is included: the RTL is technology-independent
  and has no pads, macros or clock generation.
