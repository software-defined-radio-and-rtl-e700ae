# Multi-standard baseband on heterogeneous reconfigurable hardware

Different radio standards need the same kinds of kernels in different
amounts. A W-CDMA receiver is mostly multiply-accumulate work on chip
streams. An OFDM receiver is mostly FFTs and complex multiplies on 64-sample
symbols. Both also have a few bit-level tasks and some irregular control. This
design places each kind of work on the hardware that suits it:

* Regular 16-bit multiply-accumulate kernels go on a coarse-grained
  reconfigurable tile, the **Montium**. It has five ALUs, ten small local
  memories and a tiny sequencer. You change what it does by rewriting a few
  hundred bytes of configuration, which takes a few hundred clock cycles.
* Bit-level sequence generation (the W-CDMA scrambling code) uses plain shift
  registers and XOR gates, the kind of logic an FPGA fabric holds.
* Irregular, low-rate work stays in software on a host processor. That means
  path search, channel estimation, frequency offset estimation and equalizer
  coefficients. Its results enter the hardware as configuration writes.

`sdr_top` holds three parts side by side, each with its own ports:

```
          +------------------------------------------------------------+
 mt_*  -->| montium_tile   (5 ALUs, 10 x 512x16 memories, 10 buses,     |
          |                 sequencer + 4 decoders, CCU)               |
          +------------------------------------------------------------+
 wc_*  -->| pulse_shape_filter -> finger_buffer -> rake_receiver -> bits|
          |                     scrambling_code_gen ----^               |
          +------------------------------------------------------------+
 hl_*  -->| freq_offset_corr -> fft64 -> eq_phase_demap -> bits         |
          +------------------------------------------------------------+
```

The Montium tile is a complete, programmable model. The two receivers are
dedicated datapaths. They keep the cycle schedules of the Montium mappings
(for example 4·SF+5 cycles per RAKE symbol, and 67 / 204 / 110 cycles for the
three OFDM stages), but they are not Montium configuration programs. See
*Where this departs from the reference design* below.

## The Montium tile

### Structure

All data words are 16-bit signed values, read either as integers or as Q1.15
fractions.

* **Processing part (PP) i**, for i = 0..4, contains:
  * ALU i;
  * four input register files, one per ALU input A..D, each holding 4 words;
  * local memories 2i and 2i+1.
* **ALU** (`montium_alu`) is purely combinational:
  * Level 1 has four function units:
    * FU1 works on (A, B) and FU2 on (C, D);
    * FU3 works on (FU1, FU2) and FU4 on (FU2, FU1);
    * each does pass, add, sub, and, or, xor or negate.
  * Level 2 has a multiplier fed by FU3 and FU4. Its modes are off, integer
    (low 16 bits) or Q1.15 (rounded and saturated).
  * An adder then combines the product with either zero or the **East input**.
    It can subtract and saturate.
  * The adder result leaves on out1 and on the **West output**. out2 can carry
    the adder result, FU1, FU3 or FU4.
  * ALU i+1's West output drives ALU i's East input with no register in
    between, so a chain of ALUs can form a sum within one cycle. ALU 4's East
    input is zero.
* **Register files** (`montium_regfile`) cannot be bypassed. A value written
  from a bus in cycle t reaches the ALU in cycle t+1.
* **Local memories** (`montium_mem`) are 512×16 each. Each has an address
  generation unit with three registers: base, stride and length.
  * The address is base + offset. Each step advances the offset by stride,
    modulo length.
  * This makes a memory a circular delay line or a table walker.
  * In lookup mode, the address is base plus the low 9 bits of an ALU
    output. The index comes from an ALU rather than a bus because a bus may
    carry the memory's own read data, which would form a combinational loop. A memory then serves as a table for functions the ALU
    cannot compute, such as sine or division by a constant, indexed by data
    in the same cycle.
  * Reads are asynchronous, at the current address.
* **Ten global buses** (`montium_crossbar`). Each bus has a 5-bit source code:

  | Code | Source |
  |---|---|
  | 0 | zero |
  | 1..10 | memory 0..9 read data |
  | 11..20 | ALU outputs, in the order ALU0.out1, ALU0.out2, ALU1.out1, … |
  | 21 | the CCU input lane belonging to that bus |

  Register-file and memory write ports each pick one bus with a 4-bit code.
  Codes 10..15 read zero.

### Two-level control

The sequencer (`montium_sequencer`) issues one 44-bit instruction per cycle
from a 64-entry program. Each instruction holds the following fields:

* **four decoder indices**, each 5 bits. Each index selects one entry of one
  32-entry decoder (`montium_decoder`). The four decoders are:
  * memory decoder: per memory, write enable, source bus, AGU step, AGU
    reset, and lookup mode with the ALU output that supplies the index;
  * crossbar decoder: the 10 source codes;
  * register decoder: per register file, write enable, write slot, read slot
    and source bus;
  * ALU decoder: the 19-bit configuration of each ALU.
* **out_en / out_bus**: hand one bus value to the CCU output in this cycle.
* **op**: `NEXT`, `JUMP target`, `SETLC count` (load the loop counter),
  `LOOP target` (if counter ≠ 0, decrement and jump) or `HALT` (stop and raise
  `done`).

Because the decoders hold whole PPA configurations, the program itself stays
short. A program typically uses only a few decoder entries. Changing an
algorithm's constants means rewriting one or two of those entries, not
reloading everything.

Everything within a cycle is combinational:

register file → ALU → (East/West chain) → crossbar → register file or memory
write port.

The state (register files, memories, AGUs and the sequencer) updates at the
clock edge.

### Communication and Configuration Unit (CCU)

**Configuration** takes one 16-bit word per cycle on
`cfg_we / cfg_addr / cfg_wdata`. `cfg_addr[15:13]` selects the region:

| region | contents | remaining address bits |
|---|---|---|
| 0 | memory decoder | `[9:4]` entry, `[3:0]` 16-bit word (word 0 = LSBs) |
| 1 | crossbar decoder | same |
| 2 | register decoder | same |
| 3 | ALU decoder | same |
| 4 | sequencer program | same |
| 5 | AGU registers | `[7:4]` memory, `[1:0]` 0 base / 1 stride / 2 length |
| 6 | local memory data | `[12:9]` memory, `[8:0]` address |
| 7 | control | data bit 0 = 1 starts the sequencer at pc 0 |

`montium_pkg::make_cfg_addr(region, entry, word)` builds the address for
regions 0–4.

**Streaming.** Each bus b has an input lane (`in_data[b]`, `in_valid[b]`,
`in_ready[b]`). There is one output (`out_data`, `out_valid`, `out_ready`).
The CCU **stalls the whole tile** for a cycle if either:

* the current crossbar entry routes a lane onto its bus and that lane is not
  valid; or
* the instruction hands a value to the output and `out_ready` is low.

During a stall nothing is written, the AGUs do not step and the sequencer
holds. A lane is consumed (`in_ready`) only in a cycle that is not stalled.
The tile is therefore driven by its data: starving a stream stops exactly
the work that depends on it.

`tb_montium_tile` shows the whole flow. It loads decoders, program, AGU
registers and memory through the configuration port. It then runs a
multiply-accumulate in which ALU0 multiplies a memory word by a streamed word
and adds ALU1's accumulator over the East link. Random input gaps and output
back-pressure exercise the stall rule. The run checks the result and the
stall-free cycle count (N+3). A second program streams indices into a
lookup table held in one local memory. `tb_montium_fir` maps a 5-tap filter
onto the five ALUs.

## W-CDMA receive chain

The chain runs in this order:

pulse-shape FIR → per-finger delay buffer → RAKE, with the scrambling code
generator alongside.

* **`pulse_shape_filter`** is a complex FIR with 16 real Q1.15 taps, written by
  the host. It produces one output per input, rounded and saturated, with a
  valid/ready output register.
* **`finger_buffer`** is a 512-entry circular memory of received chips.
  * Finger f reads the chip that is `delay[f]` chips older than the newest
    one.
  * This time-aligns every path, so all fingers use the same scrambling chip.
  * Changing a path delay is one register write per finger.
* **`scrambling_code_gen`** produces the complex downlink Gold code from two
  18-stage LFSRs:
  * x: x¹⁸+x⁷+1
  * y: y¹⁸+y¹⁰+y⁷+y⁵+1
  * The Q chip uses the standard tap masks.
  * A `start` with code number n spends n cycles advancing x. After that it
    streams chips, one per `ready`, and wraps after 38400 chips.
* **`rake_receiver`** handles up to 4 fingers. For every chip it spends one
  cycle per active finger. In that cycle it:
  * multiplies the finger's chip by the conjugate scrambling chip
    (c ∈ {±1±j});
  * multiplies by the spreading-code bit (±1), stored in a 512-bit memory;
  * adds the result into the finger's accumulator.

  After SF chips it runs nf combining cycles, adding conj(w_f)·acc_f with the
  host's complex weights w_f. One de-mapping cycle then outputs the QPSK bits
  (sign of I and Q) and the 32-bit combined value (sum >>> 15).

**Timing.** One symbol takes nf·SF + nf + 1 cycles:

* 4 fingers: **4·SF + 5** cycles, which is why the clock must be at least
  about 4× the chip rate;
* 2 fingers: **2·SF + 3** cycles, about 2× the chip rate.

Switching between them is one constant write (`const_we` with `sf_val`,
`nf_val`). Fingers 3 and 4 are then neither streamed nor combined. Loading a
new spreading code costs SF bit writes plus that constant write, i.e.
**SF + 1 cycles**. Configuration writes are accepted only between symbols.

**Flow in `sdr_top`.** A chip enters the chain only when the RAKE takes one:

* `chip_ready` pulses once every nf cycles;
* the scrambling generator advances on the same handshake;
* when the RAKE waits for a stream (chips, scrambling code, or weights) it
  raises `wc_stall`.

## HiperLAN/2 receive chain

Samples enter already aligned to OFDM symbols, 64 per symbol; prefix removal
is not part of the design. Each stage keeps the cycle count of the
corresponding Montium mapping.

| stage | cycles / symbol | how |
|---|---|---|
| `freq_offset_corr` | 67 | x_n·exp(−j·n·Δ). Δ is in 1/65536 turn per sample, set by the host once per frame; `sof` resets n. The factor comes from a 1024-entry sine table. A 3-stage pipeline gives 64 + 3 cycles. |
| `fft64` | 204 | Radix-2 decimation in time, in place, one butterfly per cycle. There are 6 stages of 32 butterflies plus 2 drain cycles (6·34). Each stage halves its results, so the output is DFT/64. Results stream out in bin order. |
| `eq_phase_demap` | 110 | See the three steps below. |

`eq_phase_demap` works in three steps:

1. **EQ, 52 cycles.** Each of the 52 used carriers (k = −26..26, k ≠ 0) is
   multiplied by its Q3.13 equalizer coefficient. The pilot products at
   k = ±7 and ±21, times their ±1 reference, are summed.
2. **Phase, 10 cycles.** A vectoring CORDIC finds θ, the angle of that sum.
3. **De-map, 48 cycles.** Each data carrier is rotated by exp(−jθ) and each
   axis is de-mapped through a 64-entry lookup table. The table index is
   clamp(v >> 8, −32, 31) + 32. Loading a different table switches between
   QPSK, 16-QAM and 64-QAM (1, 2 or 3 bits per axis).

**Flow in `sdr_top`.** The input takes 64 samples while the FFT loads. It
then holds `hl_in_ready` low until the FFT has computed and emptied. The
pilot polarities `hl_pilot_neg` are sampled with the first sample of each
symbol and stay with that symbol. `hl_overrun` counts FFT outputs that found
the equalizer busy; it stays 0 with this schedule.

Fixed-point conventions (`sdr_pkg`):

* complex values are `cplx16_t {re, im}`;
* Q1.15 products are rounded half up and saturated to 16 bits (`cmul`,
  `cmul_conj`).

`sine_rom.hex` holds round(32767·sin(2πk/1024)) for k = 0..1023. Cosine is
read a quarter turn later.

## Where this departs from the reference design

* **The receivers are dedicated datapaths, not Montium programs.** In the
  reference design, each receiver stage is a configuration of a Montium tile:
  * W-CDMA: the filter on one tile and the RAKE on another;
  * HiperLAN/2: one tile per stage, three tiles in all.

  Here the tile is fully built and programmable, but no configuration images
  for those algorithms exist. The stages are therefore written as
  special-purpose RTL that reproduces the published cycle counts.
* **Configuration sizes therefore differ.** The reference quotes 858 bytes
  (429 cycles) for the RAKE, and 274 / 946 / 576 bytes for the three OFDM
  tiles. It also quotes 24 bytes (12 cycles) to change the number of fingers
  or the path delays.
  * This design keeps the 2-bytes-per-cycle configuration port.
  * Here a finger-count change is one write and a path-delay change is one
    write per finger.
* **The pulse-shape filter length (16 taps) is a guess.** The reference
  design says the filter is an FIR on a Montium tile, but one of its figures
  shows the filter as not implemented. It is included here.
* **RAKE de-mapping is QPSK only.** UMTS also uses 16-QAM. The combined soft
  values are output, but only sign decisions are made.
* **Values taken from the standards.** These come from the UMTS and
  HiperLAN/2 standards rather than from the reference design:
  * the scrambling-code polynomials and Q taps;
  * the HiperLAN/2 carrier and pilot positions;
  * the decision thresholds.
* **Design choices.** These are all choices of this design:
  * the tile's instruction encoding, decoder depths (32) and program length
    (64);
  * bus codes, the AGU model and the valid/ready stream handshake;
  * all word formats beyond "16-bit".
* **The FFT is not double-buffered.** It loads 64 samples, computes for 204
  cycles, then unloads 64 results before it accepts the next symbol: 332
  cycles per symbol. At one symbol per 4 µs the HiperLAN/2 chain therefore
  needs a clock of about 83 MHz. Separate tiles with overlapped transfers
  would need only 51 MHz, the clock the 204-cycle transform alone implies.
* **Sizes.** The chain is sized for HiperLAN/2 only: 64-point FFT, 52
  carriers. Other OFDM systems with 192–1536 carriers (DAB, DRM) would need a
  larger FFT and more coefficient memory.
* **Not modelled:**
  * the network-on-chip between tiles;
  * the host processor;
  * the analog front end;
  * synchronization and prefix removal.

  Their inputs and outputs are ports.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M`, then ends, and has a watchdog. Run them from
the repository root, because `sine_rom` loads `rtl/sine_rom.hex` by that
relative path. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sdr_top rtl/montium_pkg.sv rtl/sdr_pkg.sv tb/tb_sdr_top.sv -o sim
./obj_dir/sim
```

Replace `tb_sdr_top` with any other testbench name.

| testbench | what it checks |
|---|---|
| `tb_sdr_top` | Whole platform at default sizes. A Montium MAC program runs with stalls. The RAKE handles 4 fingers, then switches to 2 (cycles per symbol checked against 4·SF+5 and 2·SF+3). Three OFDM symbols (16-QAM, then a table switch to 64-QAM) go through all three HiperLAN/2 stages with frequency and phase offsets. It fails if any mechanism (tile stall, RAKE stall, each finger mode, each modulation) never occurs. |
| `tb_montium_tile` | Configuration through the CCU, a MAC over the East–West link, input gaps and output back-pressure, cycle count. Also a lookup table in a local memory, indexed by streamed data |
| `tb_montium_fir` | The tile programmed as a streaming 5-tap Q1.15 FIR. Each ALU multiplies one tap, and the East–West chain sums the products in one cycle. ALU out2 and the buses form the delay line. Produces one output per unstalled cycle; every output is checked |
| `tb_montium_alu`, `_regfile`, `_mem`, `_crossbar`, `_decoder`, `_sequencer`, `_ccu` | Each tile part against a reference model, with random stimulus |
| `tb_rake_receiver` | QPSK data spread, scrambled and weighted per finger. Checks soft values exactly against an integer model, and checks bits. Checks 4·SF+5 and 2·SF+3 cycles per symbol, reconfiguration in SF+1 writes, and stalls on chip gaps |
| `tb_scrambling_code_gen` | Code against a reference built from the LFSR recurrences (Q as the I sequence shifted by 131072 chips). Covers codes 0 and 5, back-pressure, seek time and wrap-around |
| `tb_pulse_shape_filter`, `tb_finger_buffer` | Exact FIR results under back-pressure; per-finger delays and delay changes |
| `tb_freq_offset_corr`, `tb_fft64`, `tb_eq_phase_demap` | Accuracy against floating-point references, and 67 / 204 / 110 cycles per symbol. The equalizer test de-maps QPSK, 16-QAM and 64-QAM |
| `tb_sine_rom` | Every table entry |

Testbenches for the smaller blocks sometimes shrink a block's parameters to
keep runs short. `tb_sdr_top` uses the defaults.
