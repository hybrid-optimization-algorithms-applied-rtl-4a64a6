# Pausable-clock GALS system model

A GALS (globally asynchronous, locally synchronous) chip is split into
synchronous islands. Each island has its own clock, and the islands exchange
data through asynchronous handshakes. Such a chip radiates less
electromagnetic interference (EMI) than a synchronous one of the same size,
for three reasons:

- the island clocks run at different frequencies,
- they drift in phase against each other,
- a handshake *pauses* the clock of the island that is taking part in it.

A pause stretches individual clock periods, which spreads the supply-current
spikes further. A clock jitter generator in each island can spread them
further still.

This SystemVerilog describes such systems at the level needed to predict
their clock waveforms. The goal is to take the exact sequence of clock
edges of every island (every edge is a burst of supply current) and feed it
to a spectrum or EMI analysis. The design contains:

- a pausable ring-oscillator clock generator per module, built from
  mutual-exclusion elements, a Muller C element and a programmable delay
  line;
- four-phase bundled-data links. Each link runs from a *demand-type* output
  port, which pauses its clock as soon as the island asks for a transfer, to
  a *poll-type* input port, which lets its clock run until a request
  actually arrives;
- an island model that generates traffic from fixed 6-cycle transfer
  patterns and checks what it receives;
- two clock modulators:
  - a pseudo-random jitter generator (LFSR-selected tapped delay line);
  - a triangular period modulator (single-hot-selected tapped delay line);
- a top level, `gals_system`, holding four topologies (4-module line,
  4-module star, 4-module mesh, 10-module star), the published sets of
  module frequencies and three traffic scenarios.

The asynchronous parts are behavioural models with real delays (`#`). The
island, LFSR and counters are ordinary synthesizable logic. The whole thing
is meant to be simulated, not taped out.

## How a clock gets paused

This is the part that decides every waveform, so here it is in detail.

### The ring

`local_clock_gen` is a ring oscillator. The clock `lclk` goes through
`delay_line` and comes back as `d`.

- **Arbitration.** For each port *k*, a `mutex` arbitrates between the
  port's pause request `ri[k]` and `d`. The mutex grants either `ai[k]` to
  the port or `g_clk[k]` to the clock, never both.
- **Closing the ring.** The clock-side grants are ANDed. The AND output and
  `d` go into a `c_element`, and `lclk` is the inverted C output.
- **Free-running.** While no port requests, each half period is
  `delay + MUTEX_PS + C_PS`. `gals_module` chooses the delay setting that
  gives the wanted frequency.
- **Pausing.** To pause, a port raises `ri[k]`. If the mutex grants the port
  before `d` rises, the rising `d` cannot pass the arbiter. The AND stays
  low, the C element keeps its state, and `lclk` is held **high**.
- **Mid-cycle requests.** If the request comes while `d` is already high,
  the clock wins the mutex. The port is granted `ai[k]` only after `d`
  falls again. A request therefore never cuts a clock pulse short; it can
  only stretch the next one.
- **Resuming.** When the port drops `ri[k]`, the mutex releases `ai[k]` and
  passes the waiting `d`, and the ring continues from where it stopped.

In reset the ring is held, with `lclk` high. Module *m* of a system starts
its ring `m × 5 ns` after reset is released, so that the modules do not
start in phase.

### Demand-type output port (`dport_out`)

The island starts a transfer by *toggling* `pen`. The port then goes
through this sequence:

1. raise `ri` and wait for `ai` (the clock is now stopped);
2. raise `req` to the receiver and wait for `ack`;
3. lower `req` and wait for `ack` to fall;
4. lower `ri` and wait for `ai` to fall;
5. toggle `ta`.

When `ta == pen` the port is idle again. The island's clock stays stopped
for the whole four-phase handshake. How long that takes depends on the
receiver, so a slow receiver stretches the sender's clock period by exactly
the time it is slow.

### Poll-type input port (`pport_in`)

The island arms the port by toggling `pen`. The clock keeps running until
the sender's `req` arrives. Then the port:

1. raises `ri` and waits for `ai`;
2. latches `data_in` into `data_q` and raises `ack`;
3. waits for `req` to fall, then lowers `ack` and `ri`;
4. waits for `ai` to fall and toggles `ta`.

While the port is not armed, a request waits. That wait stretches the
*sender's* clock, not the receiver's. The island re-arms its input in the
cycle after each word arrives.

Every step of both controllers takes `GD_PS` (50 ps). Both controllers
reset asynchronously in any state. Assertions check the four-phase rules:

- `req` never drops before `ack`;
- `ack` never rises without `req`;
- a mutex never grants both sides.

### What this does to the waveform

The default system shows all of the following in its testbench:

- periods at the nominal value;
- periods stretched by a handshake;
- clock pauses in every module;
- handshakes that wait for the other side.

A D-type output holds its island's clock until `ta` returns. As a result,
the island never sees its output port still busy at the next clock edge.
The island's request-merging logic (below) therefore never comes into play
in a complete system. Its own testbench exercises it by delaying `ta`
artificially.

## Clock modulation

The island clock `ls_clk` is the ring clock `lclk` passed through an
optional modulator. `gals_system` parameter `JITTER` selects it:

| JITTER | modulator | effect on each rising edge |
|---|---|---|
| 0 | none | `ls_clk = lclk` |
| 1 | `jitter_gen` | delayed by `sel × 62 ps`, sel pseudo-random in 0..31 |
| 2 | `tri_jitter_gen` | periods walk T+1…+4…−4…0 Δ, Δ = 150 ps, 16-cycle triangle |

Both modulators move only the rising edges, keep the high time and keep
the mean frequency. Neither one can glitch.

### `jitter_gen`: pseudo-random jitter

- **Delay chain.** The clock runs through a chain of 31 equal delay
  elements (`DE_PS` = 62 ps), giving 32 taps. A multiplexer picks tap
  `sel`, which is the low 5 bits of a 15-bit maximal-length `lfsr`
  (x¹⁵ + x¹⁴ + 1).
- **No glitches.** One further element gives `clk_dly`, the latest copy of
  the clock. The LFSR steps on the falling edge of `clk_dly`. At that moment
  every tap is low, so the multiplexer switches between two low inputs.
  This needs a high time longer than 32 × 62 ps (about 2 ns). That holds
  for all frequencies used here (at most 100 MHz).
- **Jitter size.** The largest shift is 31 × 62 ps = 1.92 ns, about 10 % of
  a 50 MHz period. Change it with `JIT_DE_PS` on the top.

`lfsr` knows the maximal-length feedback terms for 4 to 19 bits
(`gals_pkg::lfsr_taps`). It can be built in Fibonacci or Galois form.

### `tri_jitter_gen`: triangular modulation

- **Taps.** Seven delay segments of 1, 2, 3, 4, 3, 2, 1 Δ give taps at
  0, 1, 3, 6, 10, 13, 15 and 16 Δ.
- **Selection.** A 16-input multiplexer feeds each tap to two inputs, *i*
  and 15−*i*. A 16-bit single-hot counter walks the inputs 0…15.
- **Resulting periods.** The delays are 0, 1, 3, 6, 10, 13, 15, 16, 16,
  15, …, 1 Δ. The differences between them make the triangle of periods.
- **No glitches.** The counter is clocked by the output delayed by 4 Δ and
  inverted. It therefore steps 4 Δ after each falling output edge.
  Neighbouring inputs differ by at most 4 Δ, so both are low when the
  select changes. This needs a low time above 20 Δ (3 ns).

## Traffic: the island model

`ls_island` stands in for the island's real logic. It does only what
matters for the clock: it asks for transfers.

### Output ports

- **Patterns.** Each output port has a 6-bit pattern. A shared counter walks
  the patterns from the left bit to the right, one bit per island clock,
  and then starts again. A `1` asks for a transfer in that cycle.
- **Sending.** If the port is idle (`ta == pen`), the island writes the next
  sequence number to `out_data`, toggles `pen` and counts the word in
  `out_cnt`.
- **Busy port.** If the port is busy, the request is kept *pending* and
  served in the first idle cycle. Further requests that arrive while one is
  pending are *merged* and counted in `out_merged`.

### Input ports

An input checks each received word against the expected sequence number
(`in_err`), counts it (`in_cnt`) and re-arms the port at once.

### Scenarios

The scenarios give every link its own pattern (`gals_pkg::link_pattern`):

| scenario | meaning | e.g. 4-module line |
|---|---|---|
| A | low traffic, 1 transfer in 6 cycles | 100000, 000100, 000001 |
| B | half of the cycles | 110100, 101010, 001110 |
| C | burst, most cycles | (see `gals_pkg`) |

## Systems

`gals_system` builds the modules and the links from tables in `gals_pkg`:

| TOPOLOGY | modules | links (sender → receiver, modules numbered from 1) |
|---|---|---|
| `TOPO_P2P4` (default) | 4 | 1→2, 2→3, 3→4 |
| `TOPO_STAR4` | 4 | 1→4, 2→4, 4→3 (module 4 is the centre) |
| `TOPO_MESH4` | 4 | every pair, lower → higher number (6 links) |
| `TOPO_STAR10` | 10 | centre 10 → 1…4; 5…9 → centre 10 |

`FREQ_SET` selects the module clock frequencies (MHz):

| set | 4 modules (1, 2, 3, 4) | 10 modules |
|---|---|---|
| 1 plesiochronous | 49.5, 51.02, 50, 49.01 | 46.3 … 53.19, centre 50 |
| 2 medium spread | 45.45, 62.5, 50, 41.66 | 33.33 … 83.33, centre 50 |
| 3 high spread | 100, 50, 33.33, 50 | 31.25 … 100, centre 50 |
| 4 fast centre | – | centre 83.33 |
| 5 slow centre | – | centre 33.33 |

The top's outputs are:

- per module: the ring clock, the island clock and a *paused* flag;
- per link: words sent, merged, received and received out of sequence.

Links are numbered as in `gals_pkg` (`link_src`, `link_dst`).

### Hierarchy

```
gals_system
└─ gals_module  (one per module)
   ├─ local_clock_gen ── delay_line, mutex (one per port), c_element
   ├─ jitter_gen ── lfsr        or   tri_jitter_gen     (JITTER = 1 / 2)
   ├─ ls_island
   ├─ dport_out  (one per output link)
   └─ pport_in   (one per input link)
gals_pkg: topologies, patterns, frequency sets, LFSR polynomials
```

## Simulating

Everything uses `timeunit 1ps` and needs Verilator's timing support.
Compile the package first. The other files are found by module name:

```
verilator --binary --timing --assert --top-module tb_gals_system \
    -y rtl -y tb +libext+.sv rtl/gals_pkg.sv tb/tb_gals_system.sv -o sim
./obj_dir/sim
```

Every testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops
itself. A watchdog ends a hung run with a failure. Drive resets with a real
falling edge, because the simulator has no unknown state to reset from.
The testbenches start `rst_n` at 1 and drop it at 1 ps.

| testbench | what it checks |
|---|---|
| `tb_lfsr` | full period 2^W−1 in both forms for several widths, reference sequence, enable, seed |
| `tb_mutex`, `tb_c_element`, `tb_delay_line` | the primitive rules and delays |
| `tb_local_clock_gen` | period = 2 × (delay + 30 ps), pause holds the clock high, no short pulses, all ports |
| `tb_dport_out`, `tb_pport_in` | handshake order against a model of the clock and the neighbour, random delays, data held after `req` falls |
| `tb_jitter_gen` | every edge delayed by exactly `sel × 62 ps` against a reference LFSR, all 32 delays used, no glitches |
| `tb_tri_jitter_gen` | every edge delay and period of the triangle, single-hot select, no glitches |
| `tb_ls_island` | transfer starts, data, pending and merge counts against a cycle-level reference; input errors |
| `tb_gals_module` | one module between two testbench neighbours: words in order, clock frozen while a neighbour stalls, nominal period, jitter bound |
| `tb_gals_system` | the default system, no parameters overridden, until every link has carried 200 words (8 µs, about a second); counts each mechanism |
| `tb_gals_workloads` | nine systems side by side covering every topology, several frequency sets, all scenarios and all three modulation settings (about a minute) |

## Parameters worth knowing

| where | parameter | default | meaning |
|---|---|---|---|
| `gals_system` | `TOPOLOGY`, `FREQ_SET`, `SCENARIO` | line, 1, B | system choice |
| `gals_system` | `JITTER` | 1 | 0 none, 1 pseudo-random, 2 triangular |
| `gals_system` | `JIT_DE_PS` | 62 | pseudo-random jitter step |
| `gals_system` | `OFFSET_STEP_PS` | 5000 | start offset between modules |
| `gals_module` | `N_TAPS`, `LFSR_W` | 32, 15 | jitter resolution and LFSR length |
| `gals_module` | `GD_PS` | 50 | delay of each port controller step |
| `local_clock_gen` | `MUTEX_PS`, `C_PS`, `STEP_PS` | 20, 10, 10 | element delays, delay-line step |

## Limits and departures

These choices are this design's own. The source material leaves them open:

- **Star and mesh link directions, and the 4-module star centre.** Which
  pattern drives which link is also chosen. The line topology, the 10-module
  star's four centre outputs and all pattern and frequency values follow
  the published system models.
- **Poll-type input behaviour.** The published description of a poll-type
  port is written for the sending side: no pause until the neighbour
  answers. Here it is applied to a receiving port: no pause until a request
  arrives.
- **Handshake details.** `ta` is a toggle, the same as `pen`. The payload
  is a sequence number.
- **Input data latch.** The input port latches the word. In the reference
  wrapper the input bus goes straight into the island. The latch keeps the
  island independent of when the sender drops its data.
- **All element delays are invented round numbers:** the port steps, mutex,
  C element and delay-line step. Real circuits would differ, and so would
  the exact stretch of each period.
- **Jitter delay line.** Its elements are equal. A measured implementation
  shows unequal, non-linear tap delays. The 62 ps step is chosen so that
  the largest shift is about 10 % of a 50 MHz period.
- **Tap selection.** The jitter tap is the LFSR's low 5 bits. The 16-state
  counter of the triangular modulator starts at input 0 after reset.
- **Not built:**
  - the current-profile and spectrum analysis that would consume these
    clocks;
  - the optimisation of module frequencies;
  - the FFT datapath and the phase-shift generator of the case-study chip
    that the triangular modulator comes from;
  - a purely synchronous reference system (one global clock with
    per-module phase shifts);
  - systems of other sizes (2 to 20 modules) and arbitrary frequency sets.

  Add a topology or a frequency set to `gals_pkg` to model more.
- **The D-type port and merging.** The output port pauses its clock until
  the handshake is complete. Requests are therefore never merged in a whole
  system, as described above.
- **Simulation only.** The delay-based models are not synthesizable. The
  delay line passes only pulses at least as long as its delay, which the
  ring always satisfies.
