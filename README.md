# Delay-based PUF with input/output mixing networks, plus a delay characterization circuit

A physically unclonable function (PUF) turns manufacturing variation into a
device fingerprint. Here a single edge races down two nominally identical
paths of N two-input/two-output switches. Each challenge bit sets one switch
to *straight* or *cross*. An arbiter at the end records which edge arrived
first, and that one bit is the response. The path delays differ from chip to
chip by a few picoseconds, so the same challenge gives different answers on
different chips.

A plain switch chain has a weakness. Its delay difference is a **linear** sum
of per-switch terms. An attacker who collects enough challenge/response
pairs can fit that sum and predict the chip. This design makes fitting harder
in three ways:

1. It runs **Q rows in parallel**. Each row sees a different circular
   rotation of the challenge.
2. It passes each row's bits through an **XOR input network**. This network
   spreads the effect of a single bit flip over many switches.
3. It folds the Q raw row answers into Q' output bits with an **XOR output
   network**. An attacker therefore never sees a single row.

The same design also covers a way to give each response a time stamp, so a
verifier can reject answers that came back too slowly to come from real
hardware.

A second, separate circuit is included: a **delay characterization
circuit**. It measures the two path delays of a small switch chain on the
chip by sweeping the clock frequency and counting timing errors.

Both designs are brought out side by side in the top module `puf_system`.

## Block map

```
puf_system
 ├─ puf_eval_ctrl          challenge handshake, launch, capture, time stamp
 ├─ secure_puf             N=64, Q=9, Q'=8, x=8, s=1
 │   ├─ interconnect_network   row m gets the challenge rotated by m
 │   ├─ input_network  (x Q)   XOR network G (or the wire-only variant)
 │   ├─ arbiter_puf    (x Q)   puf_delay_chain + arbiter
 │   │    └─ puf_delay_chain   N x puf_switch (+ optional delay_element)
 │   └─ output_network         o_j = XOR of x neighbouring row answers
 └─ char_circuit           delay characterization circuit
     ├─ pll_model              x7 clock multiplier (behavioural)
     ├─ launch T flip flop
     ├─ puf_delay_chain        8 switches, 6 inverters after each
     ├─ arbiter (x2)           sample flip flops, one per path
     ├─ error_capture (x2)     capture FF, T FF, 8-bit error counter
     ├─ window_counter         9-bit: READ and clear every 512 cycles
     └─ challenge_gen          0, 1, 3, 7, ..., 127 on each SYNCH
```

`puf_pkg` holds the shared types and the functions that produce the modelled
delays.

## How the race works, and why the model is timed

A switch has four links: top-in to top-out and bottom-in to bottom-out when
straight, and the two crossed links when crossed. Each link has its own
delay. `puf_switch` models these four delays as transport delays.

When the launch signal rises, both paths carry the edge. After the last
switch:

- The **top** path drives the arbiter's data input.
- The **bottom** path drives the arbiter's clock input.

The response is 1 when the top edge arrives first.

Because of this structure, the rows are **event-driven behavioural models**
built with SystemVerilog delays. They are not synthesizable logic. Real
silicon gets its delays from the process. The models get theirs from a fixed
pseudo-random Gaussian sample for each link and each inverter:

- The sample is computed by `puf_pkg::switch_delay` and
  `puf_pkg::inverter_delay` from a `SEED`, the stage index and the link
  index.
- A different `SEED` stands for a different chip.
- Each row of the secure PUF uses `SEED + m`.

The secure-PUF links default to a mean of 500 ps and a sigma of 4 ps, which
are typical 65 nm figures. The mean cancels in the race; only the
differences of a few picoseconds matter.

### Arbiter / sample flip flop

`arbiter` is a D flip flop with a soft decision window. Let dt be the time
from the last data edge to the clock edge.

- The flip flop takes the new data value with probability Φ(dt/σ), where Φ
  is the standard normal CDF.
- Φ is approximated by the logistic curve 1/(1+e^(-1.702x)).
- The random draw uses `$urandom`.
- The output settles 5σ after the clock edge.

Two values of σ are used:

| Where | σ | Effect |
|---|---|---|
| Secure-PUF arbiters | 1 ps | Rows whose delay difference is larger than a few ps answer deterministically. |
| Characterization sample flip flops | 15 ps | Inside the 8–22 ps range typical of FPGA flip flops. |

Near dt = 0 the answer is random. This is the arbiter's metastable region,
which the characterization circuit is built to observe.

### Additive delay view

The testbenches predict responses without looking inside the RTL, using
`tb_puf_ref_pkg::chain_arrival`:

1. Walk the edge switch by switch.
2. Add the delay of whichever link each challenge bit selects.
3. Add the inverter delays.

A fully predicted response is one where |top − bottom| > 6 ps. Closer races
are only checked for being one of the two possible answers. They are counted
as metastable-zone decisions.

## The mixing networks

Bit and row indices below are 0-based.

**Interconnect network.** Row m receives the challenge rotated by m bit
positions: `c[m][i] = x[(i − m) mod N]`. Row 0 sees the challenge unchanged.

**Input network G (XOR).** This network maps N row-input bits d to N switch
selectors c. It is a bijection, so no challenge information is lost:

| Selector | Driven by |
|---|---|
| `c[N/2]` | `d[0]` |
| `c[(i+1)/2 − 1]` for i = 1, 3, …, N−1 | `d[i−1] ⊕ d[i]` |
| `c[(N+i+2)/2 − 1]` for i = 2, 4, …, N−2 | `d[i−1] ⊕ d[i]` |

Flipping one challenge bit therefore changes two selectors, one in each
half of the chain. On average this gives about 50 % output flips for a flip
of any single bit. A plain chain gives very few flips for bits near its
output end.

**Input network, wire-only variant** (`KIND = NET_WIRE`). This variant is
cheaper: `c[i] = c[i+N/2] = d[i]` for i < N/2. Each bit drives two switches
and the upper half of d is unused.

**Output network.** This network maps Q row answers r to Q' bits:
`o[j−1] = ⊕_{i=1..x} r[((j+s+i) mod Q + Q − 1) mod Q]` for j = 1..Q'. Each
output is the parity of x circularly neighbouring rows, with the window
shifted by s. With (9, 8, 8, 1) every output bit depends on 8 of the 9 rows.
An attacker therefore needs to model all rows together.

## Timed evaluation (`puf_eval_ctrl`)

An arbiter PUF answers within one clock cycle. `puf_eval_ctrl` exploits this
to time-stamp every response:

1. It accepts a challenge with a valid/ready handshake.
2. **SETUP** (one cycle): it applies the challenge with launch low.
3. **EVAL**: it raises launch.
4. After `EVAL_CYCLES` (default 1) clock periods it captures the output.
5. It returns the output with:
   - `rsp_stamp`, the value of a free-running cycle counter;
   - `rsp_latency`, the number of cycles from launch to capture.

A verifier that knows the real latency can reject slow, emulated answers.

The clock period must exceed the path delay plus the arbiter settling time.
For 64 switches of 500 ps that is about 32 ns. The end-to-end test uses
25 MHz.

Assertions check two rules:

- A request must hold while it waits for ready.
- Launch is high only in EVAL or DONE.

## Delay characterization circuit (`char_circuit`)

A T flip flop toggles every system clock. It sends alternating rising and
falling edges into both paths of an 8-switch chain. Six inverters follow
each switch, giving 56 elements with a mean of about 10.4 ns. Each path end
is sampled by its own flip flop on the next clock edge.

`error_capture` handles each path:

1. It XORs the sample with the value launched one cycle earlier.
2. It registers the result in a capture flip flop.
3. A T flip flop lets the 8-bit counter advance on every second error, so a
   full 512-cycle window of errors still fits.

The PLL model multiplies a 13–15 MHz swept reference by 7, giving
91–105 MHz. Its clock period (9.5–11 ns) therefore crosses the path delay
during the sweep. The counts behave as follows:

| Clock period vs. path delay | Count |
|---|---|
| Longer | 0 |
| Shorter | Saturates near 255 |
| In between | Follows the sample flip flop's Gaussian characteristic |

Sampling the rising and the falling edge separately gives per-edge delays.
Repeating the sweep for the challenges 0, 1, 3, …, 127 gives a linear system
for the per-switch delay differences. The generator advances once per SYNCH
pulse from the clock source.

Timing of the window:

- `window_counter` raises `read` in cycle 511 of every window.
- The same signal clears the error counters, so `c1`/`c2` must be sampled
  while `read` is high.
- Resets are asynchronous and active low. Hold the characterization reset
  until `pll_locked`.

## Where this design makes its own choices

- **Delay elements.** The inverter delay elements follow every switch,
  including the last. Each inverter has independent rise and fall delays:
  mean 186 ps, σ 9.1 ps. These values are the measured total of
  10.41 ns ± 0.068 ns spread over 56 elements.
- **Switch encoding.** Selector 0 means straight.
- **Arbiter wiring.** The top path goes to the arbiter's data input.
- **Interconnect rotation.** Taken as "row m rotated by m bits", with the
  rotation done on the N bit positions.
- **Output network indices.** The index after the modulo wraps to the last
  row.
- **Middle selector of G.** Taken from the first input bit.
- **Error counting.** The T flip flop halving the count is an
  interpretation. The counters saturate.
- **Reset.** Reset behaviour and the controller handshake are this design's
  own.

## Not included

- **Verification server.** The server stores each chip's delays, predicts
  responses and erases the characterization access. It is software; the
  testbenches do the same prediction from the modelled delays.
- **Bench equipment.** The external swept clock generator and the logic
  analyzer are driven or replaced by the testbenches.
- **Frequency stepping strategy.** Stepping the clock frequency adaptively
  or by binary search is a choice for whoever drives the external clock. The
  circuit only counts errors at whatever frequency it is given.
- **Feed-forward arbiter PUF.** This is a comparison point, not part of the
  design, and is not built.

## Simulating

You need Verilator 5 with `--timing`. All files use
`timeunit 1ps; timeprecision 1fs`. For any testbench `tb_X`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/puf_pkg.sv tb/tb_puf_ref_pkg.sv tb/tb_X.sv --top tb_X
./obj_dir/Vtb_X
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| Testbench | Parameters | Run time |
|---|---|---|
| `tb_puf_system` | All defaults | About 4 minutes (1–2 minutes to build) |
| `tb_char_circuit` | All defaults | About 45 s |
| `tb_secure_puf` | Reduced (N=16, Q=5) | Seconds |
| Other block testbenches | Various | Seconds |

`tb_puf_system` counts each mechanism and fails if one never occurred:

- metastable-zone decisions;
- fully predicted responses;
- output flips after a one-bit challenge change;
- error-free, all-error and partial windows;
- READ pulses;
- challenge advances.

To model a different chip, change `SEED` on `secure_puf` or `char_circuit`.
To model a larger characterization chain, change `N` on `char_circuit`; the
64- and 128-switch variants work this way. Large N makes the event-driven
simulation slower roughly in proportion to the number of delay elements.
