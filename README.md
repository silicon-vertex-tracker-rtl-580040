# Silicon Vertex Tracker: a trigger-speed track finder for a silicon detector

A collider trigger has to decide within microseconds whether to keep an event,
and some of the most useful signals (b quarks) are only visible as tracks that
miss the beam line by a few tens of microns. The Silicon Vertex Tracker (SVT)
reconstructs such tracks in about ten microseconds from five silicon layers
plus a coarse track from the drift chamber trigger (XFT). Its main idea
is to split tracking into two steps that each suit hardware:

1. **Pattern recognition at coarse resolution.** Every hit is reduced to a
   *super-strip* (a bin about four strips wide). A bank of precomputed track
   candidates, each a list of six super-strips (five silicon layers plus one
   XFT bin), is stored in an associative memory. Every hit is compared with
   every pattern at once as it streams in, so when the last hit of the event has
   arrived the list of matching patterns (*roads*) is already known.
2. **Track fitting at full resolution.** For each road, the full-precision hits
   inside it are fetched and a linearised fit gives the track parameters and a
   chi-square. Inside a road the track parameters are almost linear in the hit
   positions, so a fit is a few scalar products with precomputed constants.

This repository holds synthesizable SystemVerilog for the whole data path of
one sector (one 30 degree wedge of the detector), the twelve-sector system,
and the monitoring (spy buffers, error handling). It also has a self-checking
testbench for every board and for the complete system.

## System organisation

```
            3 x hit_finder --+
raw strips  (10 streams each) |
            XFT tracks -------+--> merger --+--> am_sequencer <==> 2 x am_board (16 plugs x 8 chips)
                                            |        | road IDs
                                            +--> hit_buffer --> track_fitter --> tracks to Level 2
```

* `svt_top`: `NSECTORS` = 12 `svt_sector`s working in parallel, each with its
  own `spy_control`. One configuration bus (`cfg`) is steered to one sector by
  `cfg_sector`.
* `svt_sector`: the boards of one wedge, eleven `spy_buffer`s on its links and
  one `err_monitor` per board.
* Shared types, constants and word formats are in `svt_pkg`. `svt_fifo` is the
  first-word-fall-through FIFO used on the board inputs.

The system is data driven. Every board starts work on an event as soon as its
first words arrive, and every link can stall its sender. Event boundaries are
marked by an End Event word, which also collects the error bits of every
board it passes.

## Link and word formats

All boards use one point-to-point link: a 22-bit `word_t`, made of a 21-bit
`data` field and an `ee` (End Event) flag, with `valid`/`ready`. A word moves
on a clock edge where both are high. A sender holds its word until it is
taken. Assertions in the boards check this rule.

| word | `ee` | `data[20:18]` | `data[17:0]` |
|---|---|---|---|
| silicon hit | 0 | layer 0-4 | coordinate in 1/16 strip units (`{HF id[1:0], zone, strip[10:0], frac[3:0]}`) |
| XFT track | 0 | 5 | `{curvature[6:0], phi[10:0]}` |
| road header | 0 | 7 | road ID (15 bits) |
| End Event | 1 | `{spare[8:0], err[3:0], tag[7:0]}` ||

The error bits are 0 FIFO full, 1 parity (reserved, never set), 2 invalid
data, and 3 overflow (a table ran out of room).

A super-strip, the AM word, is the coordinate shifted right by 6: 64 units of
1/16 strip make 4 strips, roughly 250 um at a 60 um pitch. That gives 12
bits per layer.

Hit Finder inputs are `raw_t` words: `{ee, stream[3:0], strip[10:0], ph[7:0]}`.
They stand for the output of the optical receiver, which is not part of this
RTL.

## Hit Finder (`hit_finder`, `hf_cluster`)

The incoming words are split by stream into ten FIFOs. An End Event word goes
into all ten. Each stream has its own `hf_cluster`:

* It subtracts a per-strip pedestal and drops strips marked hot. Both come
  from a 2048-entry table written over `cfg`.
* It keeps strips whose charge is above `THRESH`.
* It groups adjacent strips into clusters of at most `MAXLEN` strips.
* It outputs the charge-weighted centroid
  `first*16 + round(16 * sum(q*i) / sum(q))`, which gives 1/16 strip
  granularity (about 4 um).

A round-robin merger combines the ten hit streams into one. The End Event
leaves only when every stream has reached it. Stream `s` is silicon layer
`s % 5` in z-zone `s / 5`. The zone and the Hit Finder number become the top
coordinate bits, so hits from different Hit Finders never share a super-strip.

Throughput: one hit per cycle out of the merge. The End Event leaves at most
15 cycles after the last input word.

## Merger (`merger`)

The Merger takes three Hit Finder streams and the XFT stream through input
FIFOs, merges them round-robin, and sends each word to both the AM Sequencer
and the Hit Buffer. A word moves only when both are ready. It outputs one End
Event per event, once all four inputs have reached theirs. That word carries
the tag of input 0 and the OR of all input error bits. A word on the wrong
layer (a Hit Finder word on layer 5 or above, or an XFT word on any other
layer) is flagged as invalid data.

## Associative Memory (`am_sequencer`, `am_board`, `am_plug`, `am_chip`)

**AM chip.** The chip holds `NPATT` = 128 patterns of six 12-bit words. For
each pattern and layer there is a match flag. The opcodes are:

* `INIT` clears the flags.
* `DATA` presents one super-strip on one layer. Every pattern holding that
  word on that layer sets its flag.
* `READ` removes the road currently shown from the road list.

A pattern is a road when at least `thresh` of its six flags are set. `thresh`
is 6 for an exact match or 5 for a majority match. Roads are shown
combinationally, lowest pattern number first. A pattern slot that has never
been written never matches.

**Readout tree.** An `am_plug` holds 8 chips and an `am_board` holds 16
plugs, so a board has 128 chips and 16384 patterns. At every node of the tree
the lowest-numbered child with a road wins. The road ID is built up as
`{plug, chip, pattern}`. The `rd_sel` from the sequencer flows back down the
same path to the selected chip.

**AM Sequencer.** It has three states:

1. **S_INIT**: clears all flags.
2. **S_DATA**: sends one `DATA` opcode per hit, with the super-strip
   `coord[17:6]` and the layer, to both boards.
3. **S_READ**: starts on the End Event word. It reads one road per cycle, board
   0 first, and sends a road header `{board, road}` (15 bits) for each road.
   Then it passes the End Event on.

Pattern words are written over `cfg` (target `CFG_AM`, `addr = {road ID,
layer}`). The match threshold is set with target `CFG_AMCTL` and resets to 6.

## Hit Buffer (`hit_buffer`)

While the AM system works, the Hit Buffer stores the same hits, grouped by
super-strip:

* Each hit goes into the Hit List Memory (`HIT_DEPTH` entries) with a pointer
  to the previous hit of the same layer and super-strip.
* A head table per layer (6 x 4096 entries) points at the newest hit of each
  super-strip.
* A head pointer or link is trusted only if it points below this event's fill
  level and at an entry with the same layer and super-strip. So no table has to
  be cleared between events.

For each incoming road the Hit Buffer:

1. Looks the road ID up in the road map (32768 x 6 super-strips, written over
   `cfg` target `CFG_HB`).
2. Sends the road header.
3. Walks the six lists and sends each hit, layer 0 first and newest hit first
   within a super-strip.

This output is the Road-Info Package. When the hit memory fills up, further
hits are dropped and the overflow bit is set.

## Track Fitter (`track_fitter` = `tf_front_end` -> `tf_fitter` -> `tf_output`)

**Front end.** For each road it keeps up to `MAXH` = 4 hits of each of the
fit layers (0-3) and of the XFT layer. It then lists every combination of
one hit per fit layer and one XFT track, one per cycle, into a FIFO. The
combination order is mixed-radix with layer 0 fastest. A combination is the
six measurements `x`: the four silicon coordinates, then the XFT curvature and
phi. A road with an empty fit layer yields nothing. An End Event becomes a
marker entry that carries `{err, tag}`.

**Fitter.** It computes six scalar products in parallel, each a sum of six
products of 16-bit signed coefficients (10 fraction bits):

```
p_i   = sat16( (sum_j W[i][j] * (x_j - x0_j)) >>> 10 + p0_i )   i = curvature, phi, impact parameter
chi_k = sat16( (sum_j V[k][j] * (x_j - x0_j)) >>> 10 + b_k  )   k = 0..2
```

The result is registered, so the latency is one cycle.

**Output.** It computes `chi2 = chi_0^2 + chi_1^2 + chi_2^2`. A track is sent
only if `chi2 <= cut`, and a rejected track gives a `rejected` pulse. End Event
markers always pass.

Constants are written over `cfg` target `CFG_TF`:

| addr | constant |
|---|---|
| 0-17 | W, row-major |
| 18-35 | V |
| 36-41 | x0 |
| 42-44 | p0 |
| 45-47 | b |
| 48 | chi-square cut (resets to the maximum) |

One set of constants serves the whole sector. The output `track_t` is `{ee,
road, crv, phi, d, chi2}`.

Throughput: one combination per cycle.

## Spy buffers, Spy Control and error handling

* **`spy_buffer`** is a circular memory of `SPY_D` = 1024 words. It copies
  every transfer on a link while not frozen. Its `wr_ptr` and `wrapped`
  outputs say where the newest word is. A sector has eleven of them:

  | index | link |
  |---|---|
  | 0-2 | Hit Finder inputs |
  | 3-5 | Hit Finder outputs |
  | 6 | XFT input |
  | 7 | Merger output |
  | 8 | AM Sequencer output |
  | 9 | Hit Buffer output |
  | 10 | Track Fitter output |

  To read one, write `CFG_SPY` with `addr = {buffer[3:0], entry[9:0]}`. The
  word appears on `spy_rdata` two cycles later.
* **`spy_control`** is one per crate (here, per sector). It freezes its crate
  on a command or on the global freeze line. With auto-freeze on, it also
  freezes on the crate's SVT_ERROR. Release wins over freeze. The master
  (sector 0) drives the global freeze line. It also forwards the crate's
  SVT_ERROR to CDF_ERROR.
* **`err_monitor`** is one per board (board ids 0-6 in a sector). It latches
  the board's error pulses. Four enable masks choose what each error does:
  * set a bit in the status register,
  * set the bit in the next End Event word,
  * raise SVT_ERROR,
  * raise CDF_ERROR.

  The masks are written over `CFG_ERR` with `addr[7:4]` = board id and
  `addr[2:0]` = 0..3. Writing `addr[2:0]` = 4 clears the latched errors. At
  reset the first three actions are on and CDF_ERROR is off.

## Configuration map

`cfg_t` is `{we, target[3:0], addr[19:0], data[31:0]}`. In `svt_top` the write
goes to the sector given by `cfg_sector`.

| target | block | addr | data |
|---|---|---|---|
| `CFG_HF0..2` | Hit Finder n | `{stream[3:0], strip[10:0]}` | `{hot mask, pedestal[7:0]}` |
| `CFG_AM` | AM patterns | `{road ID[14:0], layer[2:0]}` | super-strip |
| `CFG_AMCTL` | AM threshold | - | layers needed (5 or 6) |
| `CFG_HB` | Hit Buffer road map | `{road ID, layer}` | super-strip |
| `CFG_TF` | fit constants | see the Track Fitter section | value |
| `CFG_SPY` | spy readback | `{buffer, entry}` | - |
| `CFG_ERR` | error actions | `{board id, -, action}` | mask |

The road map in the Hit Buffer must match the AM patterns. Both are loaded
with the same table.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `NSECTORS` | 12 | sectors |
| `NHF` | 3 | Hit Finders per sector |
| `NSTREAMS` | 10 | layer streams per Hit Finder |
| `NBOARDS` | 2 | AM boards per sector |
| `NPLUGS` | 16 | plugs per AM board |
| `NCHIPS` | 8 | chips per plug |
| `NPATT` | 128 | patterns per chip |
| `HIT_DEPTH` | 1024 | hits per event in the Hit Buffer (this design's choice) |
| `SPY_D` | 1024 | spy buffer depth (this design's choice) |

With these defaults a sector has 2 x 16 x 8 x 128 = 32768 patterns. That is
the 32k patterns per 30 degree sector of the original system.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/svt_pkg.sv tb/tb_svt_top.sv --top-module tb_svt_top
./obj_dir/Vtb_svt_top
```

The system-level testbenches are:

* **`tb_svt_top`** runs two sectors with small AM boards. It loads patterns,
  road maps and fit constants, then sends random events. It checks every track
  against a model in the testbench, and it counts these mechanisms: multi-strip
  clusters, roads with several hit combinations, chi-square rejections, 5-of-6
  majority roads, back-pressure stalls, the global spy freeze, and error
  propagation to the End Event word and the error lines.
* **`tb_svt_top_full`** runs the default 12-sector system with the full
  32k-pattern AM. It takes one event through a sector, end to end. Building it
  takes a few minutes.

## Departures from the original system and open points

* **Handshake.** The original boards use an asynchronous handshake over cables.
  Here every link is a synchronous valid/ready interface on one clock, and the
  P3 backplane between the AM Sequencer and the AM boards is plain wires.
* **Formats.** Word widths, field layouts and the End Event format are this
  design's choice. So are the raw Hit Finder input format and the 5-layer x
  2-zone meaning of the ten streams.
* **Parity.** No parity is generated or checked, so error bit 1 is never set.
* **AM chip.** The AM chip is logic, not the full-custom circuit. Its road
  priority (lowest first) and its opcode set are assumed.
* **Fit layers.** The Track Fitter always uses silicon layers 0-3 plus XFT.
  How the original picks four of the five layers is not described, so this is
  a parameter (`FIT_LAYERS`).
* **Fit arithmetic.** The chi-square is the sum of three squared linear
  components. The number formats (16-bit coefficients, 10 fraction bits,
  saturation) are assumed.
* **Error recovery.** Error handling stops at freezing and reporting. Automatic
  re-initialisation is not built.
* **Not built:**
  * the optical link receivers,
  * the VME interface (replaced by `cfg` and the readback ports),
  * the XFT,
  * the silicon front-end electronics,
  * the Level 2 processor.

  Their signals are ports of `svt_top`.
* **Timing.** The original processing times come from boards clocked near
  30 MHz. Here the Hit Finder, Merger and Track Fitter each move one word per
  cycle, so an event's time is roughly the number of its words plus short
  pipeline delays.
