# Digital neural array for replicating spiking networks

This design is an array of identical digital neuron tiles. It learns the wiring of a biological
network from nothing but the network's spike trains. The recorded spikes of each biological neuron
are forced into one tile, timestep by timestep. Each tile runs a leaky integrate-and-fire neuron
and adjusts its synaptic weights with spike-timing-dependent plasticity (STDP). After enough
timesteps the weights of the array settle close to the connection strengths of the source network.
Those weights, membrane potentials and spikes are then streamed out on a monitor port.

The full-size array has 225 tiles with 15 synapses each, so 3375 synapses in total. Membrane
potentials and weights are signed 10-bit values, and the STDP timer is 8 bits wide. Two clocks set
the time base:

- **CLK_SP (8 kHz).** Each period is one biological timestep of 0.125 ms.
- **CLK_OP (50 MHz).** Does all the work of a timestep. That gives 6250 CLK_OP cycles per
  timestep, and a tile needs about 250.

Because of this budget, a tile can time-share its hardware. It examines one input line per cycle,
and one Δw generator serves all of its synapses.

## A timestep inside a tile

A tile (`neuron_module`) sleeps until the timestep strobe `tick` arrives. It then steps through a
fixed sequence and goes back to idle; idle stands in for gating CLK_OP off.

1. **Leak.** The membrane potential (MP) moves `leak` counts toward `v_rest` without overshooting.
   The refractory counters and the STDP timer advance by one timestep.
2. **Weight update for pre-before-post pairs.** This happens only if the tile fired in the last
   timestep. The in-spike queue holds the timer value stamped on each input spike since the fire
   before. It is drained one entry at a time. The interval is `t_fire - stamp`, and each entry
   updates its synapse through the Δw generator.
3. **Integrate.** The tile walks all 225 lines of the spike bus, one per CLK_OP cycle. A line
   that spiked and is mapped to a synapse slot does three things:
   - its weight is added to the MP, unless a refractory rule blocks it;
   - its timer stamp is pushed into the queue;
   - if the tile fired recently (the timer is counting since a fire), the post-before-pre
     interval is the current timer value, and the weight is updated at once.

   A line that spiked but is not mapped can take the lowest free slot. This happens only when new
   connections are enabled, and a tile never maps its own line. The new synapse starts at weight
   `new_w`.
4. **Lateral inhibition.** If any input that spiked sits on a synapse flagged as a lateral
   inhibition dendrite, the MP drops by `li_amt`.
5. **Fire.** The tile fires if it is forced to, or if MP ≥ `v_th` outside the absolute refractory
   period. On a fire:
   - the MP goes to `v_reset`;
   - the refractory counters are loaded;
   - the STDP timer restarts from 0.

   The spike enters a delay line and appears on the bus `1 + axon_dly` timesteps later.

Refractory handling has two phases:

- **Absolute (ARP, `arp_len` timesteps).** No input reaches the MP.
- **Relative (RRP, the `rrp_len` timesteps after ARP).** Only inputs whose weight magnitude
  exceeds `rrp_wth` are integrated.

An excitatory synapse keeps a weight between 1 and 511, and an inhibitory one keeps a weight
between -512 and -1. Learning never moves a weight across zero.

## One timer per tile for all STDP intervals

A tile has one 8-bit timer (`stdp_timer`), not one per synapse:

- It resets when the tile fires and counts timesteps from there.
- **Post-before-pre.** When an input arrives, the timer value *is* the interval since the last
  fire.
- **Pre-before-post.** The timer value at each input arrival is stored in the in-spike queue
  (`in_spike_queue`, 16 entries). At the next fire the interval is `t_fire - stamp`.
- **Window.** When the count reaches `stdp_win`, the timer stops and the queue is flushed, since
  older pairs are outside the learning window. The next input spike restarts the timer from 0.
  A pair is then only ever formed against a real fire.

If more than 16 inputs arrive between fires, the oldest stamp is dropped.

## The Δw generator: a piecewise-linear STDP curve without multipliers

This is the least obvious part of the design. The change of a weight, Δw, must depend on two
things: the timing interval X = Δt, and the current weight |w|. A stored curve for every interval
and every weight would be a large table per tile. The generator (`dw_calculator` around
`pwl_curve_gen`) needs only shifters and one subtractor. It uses three shift settings from the
curve register:

    Max    = |w| >> max_sh           peak of the curve, proportional to the weight
    2d0    = Max >> slope_sh         twice the slope of the first segment
    offset = Max >> off_sh           subtracted at the end (if off_en)

The curve falls from Max at X = 0. It is built from segments whose length doubles; let s be
`slope_sh`:

| segment | X range                 | value at its start | slope (per timestep) |
|---------|-------------------------|--------------------|----------------------|
| 0       | 0 … 2^s − 1             | Max                | 2d0 >> 1             |
| i ≥ 1   | 2^(s+i−1) … 2^(s+i) − 1 | Max >> i           | 2d0 >> 2i            |

Each new segment starts at half the height of the previous one and falls at a quarter of its
slope. This gives a roughly exponential decay. Every operation is a shift, so the whole curve comes
from Max, 2d0, s and the bits of X.

`pwl_curve_gen` evaluates the curve bit-serially over X, starting at the top bit, with one bit per
CLK_OP cycle:

- The first 1 bit at or above position s tells which segment X is in. It loads the start value
  and the slope of that segment.
- Each lower 1 bit at position k subtracts `slope << k`.
- If no bit at or above position s is set, X lies in segment 0.

The result floors at zero. For an 8-bit X it is ready 8 cycles after `start`.

`dw_calculator` then forms `Δw = ±(Y − offset + noise)`:

- The sign bit `neg` chooses potentiation or depression.
- The offset can turn the far tail of a potentiating curve into depression.
- The noise is 0 to 3 low bits of a 16-bit LFSR, read as a signed value. It models synaptic
  fluctuation.

A result is ready 9 cycles after `start`. Writing the weight back uses `upd_w` in `dna_pkg`. It
saturates the weight and keeps its sign class.

There are four curve registers, one for each pairing:

- excitatory, pre→post
- excitatory, post→pre
- inhibitory, pre→post
- inhibitory, post→pre

Each register is 13 bits: `{max_sh[2:0], slope_sh[2:0], off_sh[2:0], off_en, neg, noise[1:0]}`.
The three shift fields, the sign and the offset enable give 2^11 ≈ 2k shapes per register.

## The array and the chip interfaces

`dna_top` ties the parts together:

| block              | job |
|--------------------|-----|
| `timestep_sync`    | synchronizes CLK_SP into CLK_OP; gives one `tick` per rising edge (2 CLK_OP cycles of latency) |
| `spi_init`         | mode-0 SPI slave, oversampled in CLK_OP; one 32-bit frame per chip-select low |
| `param_regs`       | the common parameters shared by all tiles |
| `spike_forcing_if` | two-pin serial port for forced spikes: 8-bit addresses, MSB first, decoded to a one-hot vector that is handed to the tiles at the next `tick` |
| `neural_array`     | 225 `neuron_module` tiles on a shared spike bus |
| `net_monitor`      | after every timestep, streams one word per tile (or per synapse) |

**Configuration frame (SPI, MSB first):**

| bits    | field |
|---------|-------|
| [31:30] | target: 0 = common parameter, 1 = synapse map slot, 2 = weight |
| [29:22] | tile index |
| [21:18] | synapse slot (targets 1, 2) |
| [21:16] | parameter address (target 0) |
| [15:0]  | data |

The data field depends on the target:

- **Synapse map.** `data[15]` is the valid bit, `data[14]` the lateral-inhibition flag and
  `data[7:0]` the source tile.
- **Weight.** `data[9:0]` is the signed weight.

**Parameter map (target 0):**

| addr | parameter | reset value |
|------|-----------|-------------|
| 0 | switches `{mon_w_en, newconn_en, li_en, refr_en, integ_en, leak_en, stdp_en}` in `data[6:0]` | 0011111 |
| 1 | `v_th` | 200 |
| 2 | `v_rest` | 0 |
| 3 | `v_reset` | −64 |
| 4 | `leak` | 2 |
| 5 | `rrp_wth` | 256 |
| 6 | `arp_len` | 2 |
| 7 | `rrp_len` | 4 |
| 8 | `axon_dly` | 0 |
| 9 | `stdp_win` | 255 |
| 10 | `li_amt` | 128 |
| 11 | `new_w` | 256 |
| 12–15 | curve registers (exc pre→post, exc post→pre, inh pre→post, inh post→pre) | see `param_regs.sv` |

**Monitor word:** `{neuron[7:0], syn[3:0], fire, mp[9:0], w[9:0]}`, with `mon_valid` and
`mon_last`:

- **Membrane-only mode.** The stream starts once all tiles are idle and carries 225 words.
- **Weight mode (`mon_w_en`).** It carries 3375 words.

A tick that arrives while a frame is still streaming raises `mon_overrun`.

**Timing budget.** At full size one timestep needs about 250 cycles of tile work. The monitor
needs another 225 cycles, or 3375 in weight mode. Both fit well inside the 6250 CLK_OP cycles of
an 8 kHz timestep.

## Where this RTL departs from, or adds to, the published design

The published design gives the block structure, the operation order, the widths, the single-timer
scheme and the shifter structure of the curve generator. The following are choices made here:

- **Connectivity.** Published: each tile connects to neighbouring tiles. Here every tile sees all
  225 spike lines on a shared bus, and its 15-entry synapse map picks its sources. This gives a
  superset of local wiring, at the cost of a 225-bit bus into every tile.
- **New connections.** The rule for making one is not specified. Here any unmapped input that
  spikes takes the lowest free slot with weight `new_w`, while free slots remain.
- **Clock gating.** CLK_OP gating is modelled as an idle state of the tile FSM. CLK_SP is sampled
  as a slow data input, not used as a clock.
- **Interfaces.** The SPI frame format, the register map, the reset values, the forcing-port
  protocol and the monitor word format are all this design's own.
- **Sizes not published:**
  - queue depth: 16
  - LFSR: 16 bits
  - axonal delay range: 0–15 timesteps
  - curve field widths: 3-bit shifts and a 2-bit noise amplitude
  - leak form: a fixed step toward rest
  - lateral inhibition: a fixed subtraction
- **Curve boundaries.** The segment boundaries of the curve follow the published drawing of the
  generator; the text gives no formula.
- **Network size.** The published 2-layer experiment (1210 inputs, 250 outputs, 3750 synapses)
  needs more spike sources than one 225-tile array offers. It would take several passes or
  several arrays. A 168-neuron network with 658 synapses fits if no neuron has more than 15
  inputs.

## Files

`rtl/`:

- `dna_pkg.sv`: widths, structs and saturating helpers
- one file per module, each opening with a description of its interface and timing

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The two end-to-end benches are:

- **`tb_dna_top`.** A 13-tile array driven only through its pins. A 10-input, 2-output reference
  network with known strong and weak synapses is simulated inside the bench. Its spikes are forced
  into the array for 3000 timesteps. The learned weights read from the monitor must split into
  strong (about 511) and weak (about 30). A second phase switches on every mechanism and counts
  each of these at least once:
  - fire, forced fire and threshold fire
  - integration
  - ARP and RRP blocking
  - lateral inhibition
  - new connection
  - both STDP pairings
  - queue overflow and timer stop
  - axonal delay
- **`tb_dna_top_trimodal`.** The same 13-tile set-up, but the reference weights take three levels
  (1, 256, 511). The learned group means must keep their order with margins; a typical run gives
  about 511, 440 and 30. The middle group drifts upward: with these curves it does not hold the
  middle level exactly. The mechanism and delay checks are repeated.
- **`tb_dna_top_full`.** The full 225 × 15 array at default parameters. Two causal inputs must
  potentiate to 511, and two anti-causal inputs must depress. Full weight and membrane frames are
  streamed. After learning, an input volley must make the target tile fire by itself.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/dna_pkg.sv tb/tb_dna_top.sv \
        --top-module tb_dna_top -Mdir obj_tb_dna_top
    obj_tb_dna_top/Vtb_dna_top

Substitute any testbench name. The unit benches run in seconds. `tb_dna_top` takes about
10 s. `tb_dna_top_full` takes about 2 minutes to build and 30 s to run. The full array runs at a
few thousand CLK_OP cycles per second, so long learning runs are better done at reduced size
(`N_NEURONS`, `NUM_SYN` on `dna_top`).

Every state element is reset by the asynchronous active-low `rst_n`. The only exceptions are the
queue storage and the delay lines, which are never read before being written.
