# Two-clock sensing TDC for drift chamber wires

A time-to-digital converter (TDC) that gets 2 ns resolution without fast
counting. Nothing is started or stopped. Two clocks run all the time, and a
time marker, such as a drift chamber wire signal, simply photographs them:

* a **binary clock**, a 5-bit synchronous counter on a 62.5 MHz crystal. It
  steps every 16 ns and repeats every 512 ns;
* a **Johnson clock**, four copies of one 8 ns pulse delayed by 0, 2, 4 and 6 ns.
  Together they form a 4-bit Johnson code with eight positions of 2 ns in
  every 16 ns period.

Each channel has nine latches that follow the two clocks. A marker's leading
edge freezes them, and the frozen value is written into a small memory. A
start and a stop are therefore the same operation, a "time stamp". An
interval is the difference of two stamps, worked out by whoever reads the
memory. This has three consequences:

- successive intervals on one wire can be measured;
- mismatched start/stop paths cannot bias the result;
- a fixed phase error between the two clocks cancels in every difference.

This repository holds synthesizable SystemVerilog for one **unit of four
channels**: the shared clocks, the channel latches, the scratch-pad memory and
its write controller. The analog one-shot and its delay lines are a
behavioural model.

```
 xtal 62.5 MHz ──► binary_clock (5 bit) ──────────────────┐ binary[4:0]
        │                                                 │
        └────────► johnson_clock_gen ── J1..J4 per channel│
                   (one-shot + 3 delay lines / channel)   │
                                   │                      │
 marker[c] ──► tdc_channel c ◄─────┴──────────────────────┘   (x4)
               WIF ─► JL1..JL4 ─JL1─► BL0..BL4 ─BL4─► MOF
                │         word = {MOF, BL, JL}
                ▼            │
 scan 200 MHz ► memory_controller ── addr {WAF, WOF}, MEEP ─► scratchpad_memory
               (WAF scanner, MUP)                            16 x 12 (3 x 16x4)
```

## Reading one time stamp

### The Johnson latches

`JL1..JL4` are plain level-sensitive latches. While their channel is idle
they are transparent. The wire information flip-flop `WIF` is set by the
marker's leading edge, and it closes them. The data come from delay lines,
not from the latch's own output, so no toggle feedback limits the
resolution. What limits it is the latch's set-up-plus-hold window.

| slot after crystal edge | 0–2 | 2–4 | 4–6 | 6–8 | 8–10 | 10–12 | 12–14 | 14–16 ns |
|---|---|---|---|---|---|---|---|---|
| J1 J2 J3 J4 | 1000 | 1100 | 1110 | 1111 | 0111 | 0011 | 0001 | 0000 |
| position f | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |

### The binary latches and the liaison

The marker never samples the binary counter directly, because it might catch
the counter while its bits are changing. Instead the binary latches
`BL0..BL4` are updated by the falling edge of the Johnson latch output
`JL1`. That edge comes 8 ns after the crystal edge, in the middle of the
counter's stable 16 ns. When the marker closes the Johnson latches, `JL1`
stops moving. The binary latches then keep the last value taken at a
mid-period point, and that value always agrees with the frozen Johnson
position. The two clocks may be out of phase by up to ±8 ns, and the stamp
is still consistent.

As a result, a stamp with position f < 4 lies in the 16 ns period after the
one `bl` names. The stamp's time within the 512 ns cycle, in 2 ns units, is

```
T(word) = 8*bl + 4 + ((f + 4) mod 8)          // 0 .. 255
```

### The modulus counter

`MOF` is a 2-bit counter of the falling edges of `BL4`, that is, of wraps of
the binary value from 31 to 0. It stops at 3. It is cleared after the
channel's word has been stored. It stops when the channel is locked, because
the binary latches stop too. So a stored word carries the number of 512 ns
wraps since the channel's previous word, and the interval from word `a` to
the next word `b` of the same wire is

```
interval = T(b) - T(a) + 256 * b.mof    (2 ns units, valid for b.mof < 3)
```

A value of 3 means the interval is beyond about 1 µs and is not meaningful.
The test bench checks this formula against the true marker spacing.

### The stored word

The word has 12 bits, `tdc_pkg::tdc_word_t`. From the most significant bit down:

- `spare` (always 0);
- `mof[1:0]`;
- `bl[4:0]`;
- `jl[3:0]`, where bit 0 is J1.

## Storing words: the scanner

`memory_controller` runs on a 200 MHz scan clock. Its wire address counter
`WAF` steps through the four channels' request gates, one per 5 ns. When it
finds a channel whose `WIF` is set, it locks on that channel and writes the
channel's word at the address {`WAF`, `WOF`}:

| scan cycles | signal | action |
|---|---|---|
| 2 (10 ns) | `MEEP` | memory write |
| 1 | `mof_clr` (first half of `MUP`) | clears the channel's modulus counter |
| 1 | `wif_clr` (second half of `MUP`) | clears `WIF`, which reopens the latches; the channel's word address counter `WOF` advances |

`WOF` counts through zero, so each channel's four memory words are
overwritten in turn. The memory always holds the **last four stamps per
wire**.

`WIF` is set asynchronously, so it passes a two-flop synchronizer before the
request gate. Marker to channel release then takes:

- 25–30 ns when the scanner is already on the channel;
- up to 45 ns otherwise;
- longer when other channels are being written.

A marker that arrives while its channel is locked is not measured.

**Re-arming.** While locked, the binary latches miss their updates. When
the channel reopens, they are refreshed at once if J1 is low, or else at the
next mid-period point, at most 8 ns later. Until then the channel ignores
markers (the `stale` flag in `tdc_channel`). This adds at most 8 ns of dead
time. Without it, a stamp could be stored with an old binary value.

## An event: zero reference and read-out

The zero-time reference reaches every channel as one more marker, often
late, after the trigger decision. To capture an event:

1. Raise `meep_disable` before the reference arrives. The request gates
   close, and each channel keeps the reference stamp in its latches
   (`held_word[c]`, `wif[c]` = 1). The `MOF` part of this stamp still refers
   to the channel's last stored word.
2. While `meep_disable` is high and no write is in progress, the memory
   address comes from `rd_addr`. Read `rd_data` at {c, k} for k = 0..3. The
   oldest surviving word of channel c is at {c, `wof[c]`} if the channel has
   stored four or more words.
3. Pulse `rst` to clear the channels, clocks and controller for the next
   event.

## Interface of `tdc_unit`

| port | dir | width | |
|---|---|---|---|
| `xtal_clk` | in | 1 | 62.5 MHz crystal clock |
| `scan_clk` | in | 1 | 200 MHz scanner clock, any phase |
| `rst` | in | 1 | asynchronous clear, active high |
| `marker` | in | 4 | time markers; leading edges count |
| `meep_disable` | in | 1 | block writes; synchronous to `scan_clk` |
| `rd_addr` / `rd_data` | in / out | 4 / 12 | memory read port |
| `held_word` | out | 4 x 12 | word in each channel's latches |
| `wif` | out | 4 | channel locked |
| `wof` | out | 4 x 2 | next word address of each channel |

Parameters: `N_TDC` = 4 channels, `WORDS_PER_TDC` = 4, `TAP_PS` = 2000.
The memory has N_TDC x WORDS_PER_TDC words; the read address is {channel, word}.

## Modules

| file | what it is |
|---|---|
| `tdc_pkg.sv` | widths and the word struct |
| `binary_clock.sv` | 5-bit synchronous counter |
| `johnson_clock_gen.sv` | **behavioural** regulated one-shot with 3 delay lines per channel |
| `johnson_latches.sv` | JL1..JL4, level-sensitive latches (intended) |
| `binary_latches.sv` | BL0..BL4, updated on the falling edge of JL1 |
| `modulus_counter.sv` | MOF, saturating wrap counter |
| `tdc_channel.sv` | WIF, re-arm flag, and the three blocks above |
| `memory_controller.sv` | WAF scanner, request gates, WOF counters, MEEP and MUP |
| `ram16x4.sv`, `scratchpad_memory.sv` | three 16 x 4 chips forming 16 x 12 |
| `tdc_unit.sv` | the four-channel unit (top) |

In the one-shot model, the input pulse has 1 ns edges and is narrower at the
top than at its foot. The output is the part above a threshold, and a loop
moves that threshold until the output is exactly half the crystal period.
This keeps the 8 ns width against drift of the input pulse. The model
settles within about 20 periods. The real circuit is a differential pair
whose threshold is set by an integrating comparator.

## Simulating

Every test bench is self-checking and prints `TB_RESULT checks=N failures=M`.
The test benches run with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/tdc_pkg.sv \
          tb/tdc_unit_tb.sv --top-module tdc_unit_tb
./obj_dir/Vtdc_unit_tb
```

Replace the test bench name to run another one. `tdc_unit_tb` runs the unit
at its default size through six events. In each event it sends:

- random marker trains on all four channels, including markers during the
  locked time, markers just after release, two channels requesting at once,
  and gaps beyond 1 µs;
- a zero reference with writes disabled.

It predicts every word from the marker times alone and checks:

- the held reference words;
- the word address counters;
- every surviving memory word;
- the decoded intervals;
- the occupation time.

It fails if any of these mechanisms never occurred. Each block also has its
own test bench (`tb/<module>_tb.sv`). `tdc_channel_tb` also runs the binary
clock at five phases against the Johnson clock, from 7 ns early to 7 ns
late, and gets the same words at every phase.

Time is in picoseconds (`timescale 1ps/1ps` in every file). The timing of
the channels depends on real delays: the latch and flip-flop clocks are the
marker, the Johnson taps and JL1. In a gate-level or FPGA implementation,
these paths need the delay matching that an asynchronous design needs.

## Departures from the original description

- **Occupation time.** The original gives 10–50 ns per write. The
  synchronizer added here makes the shortest about 25 ns. The worst
  uncontended case is 45 ns, plus up to 8 ns of re-arming.
- **Choices where the original gives no detail:**
  - the modulus counter counts in plain binary;
  - the binary latches take their update from JL1;
  - `meep_disable` is implemented by closing the request gates;
  - reset, the read-out port and the spare bit are this design's own.
- **Binary latches.** They are edge-updated registers rather than level
  latches.
- **Not included:**
  - the alternative memory organization with TTL shift registers (a 2-bit
    Johnson clock, a 3-bit binary clock and 9-stage shift registers);
  - the wire amplifiers and the crystal oscillator. The test benches
    generate the clocks and markers.
