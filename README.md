# IS-95A CDMA traffic-channel transceiver in SystemVerilog

This is a chip-rate, synthesizable model of an IS-95A (cdmaOne) traffic channel.
It has one base station and one mobile station. Each carries 9600 bit/s frames
in both directions, and the two are joined by a closed power-control loop. It is
based on the published paper "An Efficient Implementation of IS-95A CDMA
Transceivers through FPGA", which proposes two changes to the usual transceiver:

* **An N mod M block interleaver.** Output position `x` of a 384-symbol page
  reads input position `F(x) = 18·x mod 385`. This replaces the row/column
  interleaver and spreads neighbouring code symbols further apart.
* **A frame Viterbi decoder with register-per-state survivor storage.** It
  keeps one survivor register per trellis state, plus a "present state"
  table. An optional threshold can drop unlikely states.

The other parts of the two stations are the standard IS-95A ones: CRC, K = 9
convolutional codes, long and short PN codes, Walsh cover, 64-ary orthogonal
modulation, data burst randomizer, power control puncturing and frame error
counting. The paper names these blocks but does not describe them, so they are
written from the standard and kept as simple as that allows.

## Chain and timing

One clock cycle is one PN chip (1.2288 MHz). A 20 ms frame is 24576 chips. It is
split into 16 power control groups (PCGs) of 1536 chips. Each station has a
15-bit frame timer (`chip_cnt`), and all chip-level blocks read it. The two
stations leave reset in the same cycle, so their timers, long codes and short
codes agree. This stands in for CDMA system time. There is no acquisition, no
tracking and no channel delay.

```
forward link (base station -> mobile)
 172 info bits -> crc_generator (+12 CRC, +8 tail = 192 bits)
   -> conv_encoder  rate 1/2, K=9, g = 753, 561 (octal)      384 symbols
   -> nmodm_interleaver  384 symbols, F(x) = 18x mod 385, 2 pages
   -> XOR decimated long code (1 chip of every 64)
   -> pc_puncture  power control bit replaces 2 of every 24 symbols
   -> XOR 64-chip Walsh function -> XOR short PN I / Q  -> chip_i, chip_q

 receiver (forward_rx): strip PN + Walsh, majority over the 128 chips of a
   symbol, pick off the power control bit, mark its 2 symbols as erased,
   strip long code -> nmodm_deinterleaver -> viterbi_decoder (N=2)
   -> crc_checker -> fer_detector

reverse link (mobile -> base station)
 172 info bits -> crc_generator -> conv_encoder rate 1/3, g = 557, 663, 711
   -> nmodm_interleaver  576 symbols, F(x) = 18x mod 577
   -> orthogonal_modulator: 6 symbols pick 1 of 64 Walsh functions,
      one Walsh chip = 4 PN chips
   -> XOR long code -> XOR short PN I / Q
   data_burst_randomizer sets tx_on per PCG for the frame's data rate

 receiver (reverse_rx): strip PN + long code, majority over 4 chips per
   Walsh chip, 64 correlators -> best index -> 6 symbols
   -> nmodm_deinterleaver -> viterbi_decoder (N=3) -> crc_checker -> fer_detector
```

The transmitters take information bits through a valid/ready handshake. A frame
is sent only if a whole interleaver page is ready when the frame starts.
Otherwise the frame carries zero symbols and `frame_active` stays low. After
reset, the first air frame is therefore idle, and air frame `a` carries data
frame `a-1`. The idle frame fails its CRC, so each receiver's error counter
starts at one.

## The N mod M interleaver (`nmodm_interleaver`, `nmodm_deinterleaver`)

The interleaver has two pages of `SIZE` entries. One page is written in arrival
order while the other is read.

* **Reading.** To produce output position `x` (1-based), the interleaver reads
  the stored symbol at `F(x) - 1`, with `F(x) = N·x mod M` and `M = SIZE + 1`.
  N is coprime to M for both sizes used (gcd(18, 385) = gcd(18, 577) = 1). So
  `F` takes every value 1..SIZE exactly once, and no address is lost.
* **Address generation.** There is no multiplier. The read address is kept as
  a running value `f`. Each output step sets `f ← f + N`, minus M if that
  reaches M (`is95_pkg::nmodm_next`).
* **Deinterleaving.** The deinterleaver runs the same address sequence on the
  write side. Received position `x` is stored at `F(x) - 1`, and the page is
  then read in order.
* **Width conversion.** `IN_SYMS`/`OUT_SYMS` change the number of symbols per
  beat. In the transmitters the encoder writes 2 or 3 symbols per bit and the
  interleaver reads 1 or 6. The receivers do the reverse. `W` is the symbol
  width. The receivers use `W = 2` to carry an erasure flag with each hard
  symbol.

With N = 18 and M = 385:

* Input symbols that were adjacent come out 106 positions apart.
* Symbols two apart come out 170 positions apart.
* Symbols three apart come out 63 positions apart.

These are the distances the paper reports, and `tb_nmodm_interleaver` measures
them on the RTL.

Rate 1/3 gives 576 symbols per frame. The reverse link uses SIZE = 576 and
M = 577 with the same N. The paper gives only the 384-symbol page, so this
size is this design's choice.

## The Viterbi decoder (`viterbi_decoder`)

The decoder handles one frame at a time. Every frame is `L` = 192 trellis steps
long and ends in the K-1 = 8 zero tail bits. The decoder therefore starts in
state 0 and outputs the survivor of state 0. It is built from the units the
paper lists. All 256 states work in parallel on each clock with `in_valid`.

* **Encoder engine** (`vit_encoder_engine`). For every state and input bit it
  gives the expected code symbols. These are constants, so the engine has no
  clock.
* **Branch metric units** (`vit_bmu`). There are 2·2^(K-1) of them. Each takes
  the Hamming distance between the received and expected symbols with N XORs
  and a popcount. Erased symbols (the punctured power control positions) are
  masked out.
* **ACS units** (`vit_acs`). There is one per state. Each adds the branch
  metrics to its two predecessors' path metrics and keeps the smaller. A
  predecessor that is not active is never chosen. A tie goes to the
  predecessor whose MSB is 0.
* **Path metric memory.** One unsigned metric per state, `clog2(L·N+1)` bits
  wide. It is reset every frame, so it cannot overflow and needs no
  normalisation.
* **Present state memory.** One flag per state. At the start of a frame only
  state 0 is active. A state becomes active when an active predecessor reaches
  it. If `PRUNE_TH` is non-zero, a state whose metric goes above the threshold
  is switched off. This is the paper's suggested path elimination, and it is
  off by default.
* **Survivor memory.** One L-bit register per state, using register exchange.
  On each step a state takes its chosen predecessor's register and appends its
  own input bit. After step L the register of state 0 holds the decoded frame,
  so no traceback is needed.

**Timing.** The decoder always accepts input (`in_ready = 1`). The cycle after
the L-th step it begins shifting the frame out, oldest bit first, one bit per
cycle. `out_last` marks the last bit. When steps arrive on every cycle, the first output bit appears
L+1 cycles after the first input step. The next frame can start arriving while this one is
shifted out.

**Cost.** Survivor storage is 2^(K-1)·L bits: 256 × 192 = 49152 flip-flops at
K = 9. The exchange moves every register on every step. In exchange, the decoder
is simple and has a fixed latency. `K`, `N`, `L` and the generator polynomials
are parameters. The testbench also runs K = 9 at rate 1/3, and a pruned
instance.

## Power control

* **Base station** (`power_control`). It sums `SAMPLES` = 16 received-strength
  samples per power control group. A sample is any 8-bit measure supplied on
  `rev_power`; the design does not compute it. The sum is compared with
  `pc_threshold`. Bit 1 means "too strong, lower your power" and bit 0 means
  "raise". The sum, the difference and the `over` flag are outputs.
* **Puncturing** (`pc_puncture`). In the next PCG, the bit replaces two
  consecutive modulation symbols. The first of the two is at a position 0..15
  given by four decimated long code bits from the end of the previous PCG. The
  power control bit is not scrambled.
* **Mobile.** `forward_rx` reads the bit at that position, and
  `mobile_power_adjust` steps an 8-bit gain by ±1 and saturates it. The gain is
  brought out as `ms_tx_gain` for an RF stage; the digital chips themselves do
  not change.

## Data burst randomizer (reverse link)

The randomizer reads long code bits b0..b13 during the last 14 chips of PCG 14
of the previous frame. It then chooses which PCGs of the next frame are sent:

| Rate | PCGs sent |
|---|---|
| full | 16 |
| half | 8 |
| quarter | 4 |
| eighth | 2 |

The rate is a 2-bit input: 0 = full, 1 = half, 2 = quarter, 3 = eighth. The rate
in force switches at the frame boundary.

In this design the gating is reported on `tx_on` and the chips keep flowing.
Only full-rate frame contents are built, so a reverse frame always carries 172
information bits, whatever its gating.

## Where this design departs from, or goes beyond, the paper

* **Taken from the IS-95A standard.** The paper does not give these: the CRC
  polynomial (12-bit, preset to ones), the code generators, the long and short
  code polynomials, the Walsh ordering, the modulation index order, the
  puncturing positions and the randomizer rule.
* **Receivers are hard-decision, chip-synchronous and noise-free in design.**
  There is no RAKE, no pilot, no coherent combining and no soft metrics. The
  decoder's metrics are Hamming distances on hard bits.
* **Not built:**
  * The lower-rate frame formats and symbol repetition. Only the reverse
    link's gating follows the rate.
  * Sync, paging, pilot and access channels.
  * Multiple traffic channels.
  * Any RF or analog part.
  * The half-chip delay of the reverse Q branch.
* **Own choices of this design:**
  * The 576-symbol reverse interleaver.
  * The idle first frame.
  * The valid/ready handshakes.
  * Erasure marking of punctured symbols.
  * The long code decimation phase: the long code chip at chip 63 of a symbol
    scrambles the next symbol.
* **Memory figures are not comparable.** The paper reports FPGA results (slice
  counts for a Virtex XCV100) and a decoder memory saving. They belong to its
  VHDL, and this RTL is not matched to them. In particular, the register
  exchange above stores the whole 192-bit survivor per state.

## Modules

| Module | Role |
|---|---|
| `is95_pkg` | Constants (frame sizes, polynomials), rate enum, helper functions |
| `crc_generator`, `crc_checker` | 12-bit frame quality indicator plus tail, and its check |
| `conv_encoder` | K = 9, rate 1/2 or 1/3 encoder |
| `nmodm_interleaver`, `nmodm_deinterleaver` | Two-page N mod M (de)interleaver |
| `long_code_gen`, `short_code_gen`, `walsh_gen` | Code generators |
| `orthogonal_modulator`, `orthogonal_demodulator` | 64-ary Walsh modulation and hard correlation |
| `data_burst_randomizer` | Reverse link PCG gating |
| `power_control`, `pc_puncture`, `mobile_power_adjust` | Closed-loop power control |
| `vit_encoder_engine`, `vit_bmu`, `vit_acs`, `viterbi_decoder` | Viterbi decoder |
| `fer_detector` | Frame and frame-error counters |
| `forward_tx`, `forward_rx`, `reverse_tx`, `reverse_rx` | The four link halves |
| `base_station`, `mobile_station` | Stations, each with its own frame timer and code generators |
| `is95_transceiver_top` | Both stations, with air links as ports (`bs_`/`ms_` prefixes) |

Every file starts with a comment giving its function, interface and timing.

## Testbenches and simulation

Each module except `orthogonal_demodulator` has a self-checking testbench in
`tb/`. `orthogonal_demodulator` is covered by the reverse-link tests. Each
testbench ends by printing `TB_RESULT checks=<n> failures=<n>`, and each has a
cycle watchdog. The link testbenches are:

* `tb_forward_link` and `tb_reverse_link`: one transmitter and receiver pair
  each.
* `tb_station_link`: the two stations connected directly.
* `tb_is95_top`: the whole top at its default parameters. It runs 8 random
  frames each way through a channel that inverts chips. It checks every
  decoded frame, the CRC flags and the error counters. It also checks that
  each of these happened at least once:
  * a frame with symbol errors that the decoder corrected;
  * a frame whose CRC failed;
  * power control puncturing;
  * "up" and "down" power control bits;
  * every reverse data rate.

A run takes a few seconds.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/is95_pkg.sv tb/tb_is95_top.sv \
          --top-module tb_is95_top -o sim
./obj_dir/sim
```

Use any other `tb_*` name in place of `tb_is95_top` to run that testbench. The
package must come first on the command line. Verilator finds the other modules
through `-Irtl`.

Verilator lint (`-Wall`) reports only unused-signal and open-pin warnings.
None of them affects the circuit:

* Package constants that a given file does not use.
* Bit 8 of the encoder shift register. It is the oldest bit of the window,
  and it is kept so that the register matches the 9-bit encoder state.
* `next_state` of the encoder engine. The decoder derives predecessors from
  the state number; only the engine's own testbench reads `next_state`.
* The upper timer bits in `reverse_rx`, which needs only the chip position
  within a Walsh symbol.
* Status outputs left open on purpose where a block is instantiated, such as
  `forward_tx`'s interleaver `f_last` and the modulator's chip counter.
