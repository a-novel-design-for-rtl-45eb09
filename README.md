# Boundary shift code bus link: crosstalk-free and single-error-correcting

On a long on-chip bus the coupling capacitance between neighbouring wires
can be larger than each wire's capacitance to the substrate. The worst case
for delay and noise is two neighbours switching in **opposite** directions in
the same cycle (one rises while the other falls): each wire then has to
charge twice the coupling capacitance. Such a pair of consecutive words is
called an *invalid transition*. Putting a grounded shield wire between every
pair of signal wires removes it, but doubles the wire count.

This RTL implements a cheaper alternative, the **boundary shift code**. An
n-bit word is sent on 2n+1 wires in a way that

* never produces an invalid transition between two consecutive bus cycles
  (the code is *self-shielding*), and
* has a minimum Hamming distance of 3, so the receiver can correct any single
  wire error per word, or detect any one or two.

The default configuration is the 4-bit example of the code: 4 data bits on
9 wires, a [9,4,3] code. The code scales to any width, and a wide bus can be
split into sub-buses separated by shield wires.

## The code

Number the wires y0 (bit 0) up to y2n. In an **even** cycle the encoder sends
the *pre-shifted* word

    y[2i+1] = y[2i+2] = x[i]        every data bit twice, on neighbouring wires
    y[0]    = x[0] ^ x[1] ^ ... ^ x[n-1]   even parity

In an **odd** cycle it sends the same word rotated right by one wire: every
wire takes the value of the wire above it, and the top wire y2n takes the
parity from y0.

Example, n = 4 (bits written y8 ... y0, cycle 0 is the first after reset):

| cycle | x3..x0 | pre-shifted word | on the bus  |
|-------|--------|------------------|-------------|
| 0 (even) | 1010 | 110011000 | 110011000 |
| 1 (odd)  | 0111 | 001111111 | 100111111 |
| 2 (even) | 1000 | 110000001 | 110000001 |
| 3 (odd)  | 0100 | 001100001 | 100110000 |

### Why no invalid transition can occur

Call a *boundary* a place between wire k and wire k+1 where the two wires
differ, and name it by k. An invalid transition at k needs a boundary at k in
**both** words: the two wires must differ afterwards, and since both switched,
they also differed before.

In the pre-shifted word, wires 2i+1 and 2i+2 are copies of each other, so a
boundary can only sit at an even k (between y0 and y1, or between two
different data bits). Rotating the word right by one wire moves every
boundary down by one, to an odd k. Since even and odd cycles alternate, two
consecutive words never share a boundary, whatever the data. The encoder
needs no memory of the previous word: its codebook depends only on whether
the cycle is even or odd. This is also why a wrong word never corrupts later
ones: nothing propagates, as long as sender and receiver agree on the cycle
phase.

### The code is systematic

The odd wires y1, y3, ..., y2n-1 carry x0 ... x(n-1) unchanged in both
phases (in an odd cycle y[2i+1] takes y[2i+2] = x[i]). A receiver that does
not need error correction can read the data straight off those wires.

## Encoder (`bsc_encoder`)

Because the odd wires never change role, only the n+1 even wires depend on
the phase. Each is a 2:1 multiplexer:

| wire   | even cycle | odd cycle |
|--------|------------|-----------|
| y0     | parity     | x0        |
| y[2i+2], i < n-1 | x[i] | x[i+1] |
| y2n    | x[n-1]     | parity    |

plus an XOR tree for the parity and a flip-flop that toggles every clock
(`bsc_phase_toggle`) to drive the selects. That is n+1 multiplexers, n-1 XOR
gates, one flip-flop and one inverter: 2n+2 gates, with a depth of
ceil(log2 n) XOR levels plus one multiplexer.

## Decoder (`bsc_decoder`)

The decoder first undoes the rotation, but only where it matters: the odd
wires are already in place, and each even wire is taken from its own
position in an even cycle or from the wire below in an odd cycle (y0 then
comes from the top wire). The result `c` is a pre-shifted word, except that
in odd cycles the two copies of a data bit come out swapped, which does not
matter for what follows.

Each data bit then gets three votes: its two copies `c[2i+1]`, `c[2i+2]`,
and a third copy computed as the XOR of the parity bit and one copy of every
*other* data bit. A single wire error can spoil at most one of the three, so
the majority is correct.

The implementation shares the work between the bits. With the syndrome

    s = c[0] ^ c[2] ^ c[4] ^ ... ^ c[2n]

the third copy of bit i is `s ^ c[2i+2]`, and the majority of
(`c[2i+2]`, `c[2i+1]`, `s ^ c[2i+2]`) is simply

    data_out[i] = s ? c[2i+1] : c[2i+2]

If s = 0 the even-position copy is trusted; if s = 1 something among the
parity and the even-position copies is wrong, and the odd-position copy is
used. The decoder is n+1 un-rotation multiplexers, an n-gate XOR tree, n
output multiplexers and the phase flip-flop with its inverter: 3n+3 gates.

Worked example, words given after un-rotation, error bits marked by the
difference from the sent word:

| sent  | received   | error on | decoded |
|-------|------------|----------|---------|
| 1010  | 100011000  | y7       | 1010    |
| 0111  | 001111110  | y0       | 0111    |
| 1000  | 010000001  | y8       | 1000    |
| 0100  | 011100000  | y7 and y0 | 1100 (wrong: two errors exceed the code) |

The `syndrome` output is s. It is 1 after an odd number of errors on the
wires that enter s, and stays 0 for an error on the other copy; it is a hint,
not an error flag. Use the detect-only receiver for a reliable flag.

## Detect-only receiver (`bsc_detector`)

A destination near the source may prefer to skip correction. `bsc_detector`
outputs the odd wires as `data_raw` (no logic on the data path) and raises
`err_detected` when, after the same partial un-rotation, the two copies of
any bit disagree or the parity does not match. With distance 3 this flags
every pattern of one or two wire errors. Three or more errors can go
unnoticed.

## Sub-buses and shield wires (`bsc_link_top`)

For wide buses the XOR trees grow deep. `bsc_link_top` splits a `DATA_W`-bit
word into `NUM_SUB = DATA_W / SUB_W` independent sub-buses. Each has its own
encoder, decoder and detector, and one shield wire at 0 sits between
neighbouring sub-buses, so their edge wires cannot form an invalid transition
with each other. Each sub-bus corrects one error of its own per word.

Bus layout, wire 0 first: sub-bus 0 on wires 0 .. CW-1 (CW = 2*SUB_W+1), a
shield wire, sub-bus 1 on the next CW wires, and so on. Total width
`BUS_W = NUM_SUB*CW + NUM_SUB - 1`. `DATA_W` must be a multiple of `SUB_W`.

| bus size n | wires (one sub-bus) 2n+1 | encoder gates 2n+2 | decoder gates 3n+3 |
|-----------:|------:|------:|------:|
| 4  | 9   | 10  | 15  |
| 8  | 17  | 18  | 27  |
| 16 | 33  | 34  | 51  |
| 32 | 65  | 66  | 99  |
| 64 | 129 | 130 | 195 |

A 16-bit word as four 4-bit sub-buses uses 4*9 + 3 = 39 wires instead of 33,
but its deepest XOR tree covers 4 bits instead of 16.

## Interfaces and timing

All blocks share `bsc_pkg`, which defines the phase type
`phase_e` (`PH_EVEN`, `PH_ODD`) and `code_width(n) = 2n+1`.

`bsc_link_top #(DATA_W = 4, SUB_W = 4)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset of every phase flip-flop |
| `data_in` | in | DATA_W | word sent this cycle |
| `bus_flip` | in | BUS_W | channel error model: a 1 inverts that wire between encoders and receivers; tie to 0 for a real link |
| `bus` | out | BUS_W | wires as driven by the encoders |
| `data_out` | out | DATA_W | corrected word |
| `syndrome` | out | NUM_SUB | per sub-bus parity-check result (see above) |
| `data_raw` | out | DATA_W | uncorrected data taken off the odd wires |
| `err_detected` | out | NUM_SUB | per sub-bus detect-only flag |

`bsc_encoder #(N)`: `data[N]` in, `code[2N+1]` out, `phase` out.
`bsc_decoder #(N)`: `code_in[2N+1]` in, `data_out[N]`, `syndrome`, `phase` out.
`bsc_detector #(N)`: `code_in[2N+1]` in, `data_raw[N]`, `err_detected`, `phase` out.
All three take `clk` and `rst_n` for their phase flip-flop.

Timing:

* Everything from `data_in` to `bus` to `data_out` is combinational. The
  link carries one word per clock with no pipeline latency; register the
  ends yourself if the wire delay requires it.
* The only state is one phase flip-flop per encoder and per receiver. In
  reset, and in the first cycle after it, the phase is even; it then flips on
  every rising clock edge. There is no valid/enable: the phase advances every
  cycle whether or not the word carries data. Sender and receivers must be
  reset together and see the same clock edges. A phase slip makes every
  following word decode wrongly.
* The bit positions of the code are fixed by the construction; only the
  choice of which multiplexer input is "even" is internal.

## Checks built into the RTL

`bsc_link_top` holds two concurrent assertions (active with
`verilator --assert`):

* `a_no_invalid_transition`, for each pair of neighbouring bus wires: from
  the second cycle after reset on, the two wires never both switch and end
  up different.
* `a_phase_sync`, per sub-bus: encoder, decoder and detector phases agree.

Both are ignored by synthesis.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Build
and run one with plain Verilator, from the folder holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/bsc_pkg.sv tb/tb_bsc_ref_pkg.sv tb/tb_bsc_link_top.sv \
        --top-module tb_bsc_link_top
    ./obj_dir/Vtb_bsc_link_top

| testbench | what it covers |
|-----------|----------------|
| `tb_bsc_phase_toggle` | reset value, alternation, asynchronous reset mid-run |
| `tb_bsc_encoder` | the four-word example above; all 16 words in each phase; random 8-bit words; no invalid transition; systematic wires; minimum distance 3 per phase |
| `tb_bsc_decoder` | the four noisy words above, including the wrong decode of the double error; every 4-bit word with no error and with each single error in both phases; syndrome value; a 16-bit decoder with random single errors |
| `tb_bsc_detector` | every 4-bit word with no, each single and each double error, in both phases |
| `tb_bsc_link_top` | the default link and a 16-bit link of four sub-buses, 600 random cycles: clean, one error per sub-bus, two errors in one sub-bus, shield-wire errors; counts each case and fails if one never occurs |
| `tb_bsc_link_full` | the default link only (no parameter overrides): the four-word example over a clean channel and with the example's errors, then every word under every single error in both phases |
| `tb_bsc_bus_sizes` | links of 4, 8, 16, 32 and 64 bits: wire count, reference codewords, no invalid transition, correction of every single error |

`tb/tb_bsc_ref_pkg.sv` is the reference model they compare against: it
builds the pre-shifted word by duplication and parity and rotates it, and it
counts invalid transitions and Hamming distances.

## Design choices and limits

What follows the code's construction: the bit layout (parity on y0, data
bit i on y2i+1 and y2i+2), even parity, the right rotation in odd cycles,
even phase at the first cycle, n+1 multiplexers and an XOR tree in the
encoder, partial un-rotation followed by a majority vote in the decoder,
the systematic odd wires, the gate counts, and the idea of sub-buses
separated by shields.

Choices made here:

* An asynchronous active-low reset forces the phase to even. The code
  itself only requires both ends to agree.
* The majority vote is built as a syndrome-steered multiplexer. It is
  logically identical to a three-input majority gate per bit, and it is
  the form with 3n+3 gates.
* The detect-only receiver's check (pairwise compare plus parity) is one
  simple way to realise detection; any equivalent check would do.
* One shield wire at logic 0 between sub-buses; the sub-bus width is a free
  parameter, default equal to the data width (no shields).
* `bus_flip` exists only to model channel errors in simulation and
  evaluation.

Not modelled: the analog coupling itself (wire capacitances, delay or
glitches caused by crosstalk). The design guarantees the switching pattern
that avoids the worst-case coupling; the assertion checks that pattern, not
the electrical result.

Synthesis notes: the odd bus wires are wired straight from `data_in`, and
`data_raw` straight from the received odd wires. That is the systematic
property of the code, not a missing connection.
