# ETI serial link: embedded transition inversion coding in SystemVerilog

Multiplexing an m-wire parallel bus onto a single wire saves wires, area and
coupling capacitance, but the serial stream interleaves bits that were
unrelated on the parallel bus, so it toggles far more often and burns more
dynamic power. Transition inversion coding fights this: when a word of the
serial stream would toggle too often, part of it is inverted so that it
toggles less. The catch is that the receiver must learn which words were
inverted, and the obvious way, an extra indication bit per word, costs
bandwidth and adds transitions of its own.

Embedded transition inversion (ETI) removes that bit. The inversion flag of
a word travels in the *phase* of the data against the clock that is sent
with it: a word that was not inverted changes only on bit boundaries, an
inverted word is sent half a bit period late, so its edges fall in the
middle of bit periods. The receiver sees where the edges fall and undoes the
inversion.

This repository holds synthesizable RTL of a complete ETI link (serializer,
ETI encoder, line, ETI decoder, deserializer), a parallel bus-invert
encoder (the count-and-invert decision on a parallel bus, with its extra
decision line), and self-checking testbenches for every block. Defaults:
m = 2 wires, words of WL = 4 serial bits, threshold N_th = 2, an 8-bit
bus-invert bus. The top module `eti_top` holds the link and the bus-invert
encoder side by side; they share only clock and reset.

## The coding rule

The serial stream is cut into words of WL bits (b11 b21 b12 b22 for two
wires: wire 1 first, then wire 2, then the next sample of each). For each
word the encoder counts N_t, the transitions between successive bits
*inside* the word (WL-1 possible; the step from the previous word is not
counted).

* N_t < N_th: the word is sent unchanged.
* N_t >= N_th: **bit-two inversion (B2INV)**. The word is split into bases of
  two bits b1 b2; b1 is kept and b2 is inverted. So 01 -> 00, 10 -> 11,
  00 -> 01, 11 -> 10.

Inverting every second bit flips the relation of every adjacent pair, so a
word with N_t transitions leaves with WL-1-N_t. With N_th = WL/2 every coded
word has fewer than WL/2 internal transitions. B2INV is its own inverse, so
the decoder applies the same operation.

For m = 2, WL = 4 the sixteen possible pairs of 2-bit samples code as follows
(coded word = the bit values sent; inv = decision bit, carried by phase):

| wire 1 | wire 2 | serial | N_t | inv | coded |
|---|---|---|---|---|---|
| 00 | 00 | 0000 | 0 | 0 | 0000 |
| 00 | 01 | 0001 | 1 | 0 | 0001 |
| 00 | 10 | 0100 | 2 | 1 | 0001 |
| 00 | 11 | 0101 | 3 | 1 | 0000 (flat, see below) |
| 01 | 00 | 0010 | 2 | 1 | 0111 |
| 01 | 01 | 0011 | 1 | 0 | 0011 |
| 01 | 10 | 0110 | 2 | 1 | 0011 |
| 01 | 11 | 0111 | 1 | 0 | 0111 |
| 10 | 00 | 1000 | 1 | 0 | 1000 |
| 10 | 01 | 1001 | 2 | 1 | 1100 |
| 10 | 10 | 1100 | 1 | 0 | 1100 |
| 10 | 11 | 1101 | 2 | 1 | 1000 |
| 11 | 00 | 1010 | 3 | 1 | 1111 (flat, see below) |
| 11 | 01 | 1011 | 2 | 1 | 1110 |
| 11 | 10 | 1110 | 1 | 0 | 1110 |
| 11 | 11 | 1111 | 0 | 0 | 1111 |

Several coded words appear twice (0001, 0011, 0111, 1000, 1100, 1110): once
plain and once inverted. The bit values alone do not identify the data; the
phase does.

## How the inversion flag travels: phase coding

### The line as two half-bit levels

The line is a data wire plus the clock. To let synchronous logic describe
"an edge in the middle of a bit period", the RTL describes each bit period
of the line by two levels, `eti_pkg::line_sym_t`:

* `first_half`: the level during the first half of the bit period,
* `second_half`: the level during the second half, which is the bit value.

A physical transmitter drives `first_half` and then `second_half` within one
clock period (a double-data-rate output); a receiver samples once in each
half (a flip-flop on the falling clock edge and one on the rising edge).
That output and input stage is not part of this RTL.

### Encoder side

* Plain word: `first_half = second_half = bit`. Edges only on bit
  boundaries: data in phase with the clock.
* Inverted word: the word is delayed by half a bit. Bit k is sent as
  `first_half = bit k-1`, `second_half = bit k`, where bit -1 is the level
  the line already holds from the previous word. Every edge of the word now
  sits mid-bit.

### The flat-word case

An inverted word can code to 0000 or 1111 (serial 0101 or 1010 with m = 2,
WL = 4). Such a word has no edge of its own, and if the line already holds
the same level there is nothing whose phase the receiver could see. The
encoder therefore sends the first bit of a *flat inverted* word as its
complement during the first half of the bit period: 0000 goes out as a short
1 pulse followed by 000, 1111 as a short 0 pulse followed by 111. Sampled at
the start of the word the line reads 1000 and 0111, but the sampled bit
values (second halves) are still 0000 and 1111. This costs at most one short
pulse, only for these two words.

The pulse is deliberately half a bit long. A full-bit flip (sending 1000 for
0000) would produce exactly the code of another inverted word (1101 codes to
1000), and the receiver could not tell them apart.

### Decoder side

The phase detector flags a bit period whose two halves differ: an edge in
the middle of the period. The decision bit decoder ORs that flag over the WL
bit periods of a word:

* a plain word never has a mid-bit edge;
* an inverted word that is not flat has an internal edge, which sits mid-bit;
* a flat inverted word has the forced first-half pulse.

So the OR is exactly the decision bit. The decoder then applies B2INV to
the second-half values when the bit is set.

`eti_encoder` carries two assertions for these line rules: a plain word has
no mid-bit edge, and an inverted word has no edge on a bit boundary after
its first bit.

## Bus invert, the parallel form of the decision

Bus-invert coding is the parallel ancestor of the same idea. For each new
word an XOR array forms the transition vector against the value on the bus,
an adder chain counts its ones, and when the count t reaches N/2 the
complement is driven and a separate decision line goes high. The data wires
then toggle N - t times instead of t, never more than N/2. Example, N = 8:
bus 10101011, next word 01110101, t = 6, so 10001010 is sent and only 2 data
wires toggle. `bus_invert_encoder` implements this with a registered bus and
decision line; the receiver recovers the word as bus XOR decision. Its cost
is the extra line, which is exactly what ETI avoids on a serial link.

## Block structure

```
par_in[M] --> serializer --> eti_encoder ======== line ========> eti_decoder --> deserializer --> par_out[M]
                              |                                   |
                              +- wl_indicator                     +- wl_indicator
                              +- check_transitions (D-FF, XOR,    +- phase_detector
                              |   adder, reset per word)          +- decision_decoder
                              +- word buffer + hold register      +- word buffer + hold register
                              |   of dff_qqn (Q and Q-bar)        |   of dff_qqn
                              +- b2inv                            +- b2inv
                              +- phase_encoder
```

| module | what it does |
|---|---|
| `eti_pkg` | `line_sym_t`, the two half-bit levels of a bit period |
| `eti_top` | top: `eti_link` and `bus_invert_encoder` side by side |
| `eti_link` | the whole ETI serial link |
| `bus_invert_encoder` | parallel bus-invert coder with decision line |
| `serializer` | one flip-flop per wire, samples the bus every M cycles, sends wire 1 first |
| `wl_indicator` | counts bits modulo WL, marks first and last bit of each word |
| `check_transitions` | previous-bit flip-flop, XOR, transition adder cleared at each word's first bit; decision = N_t >= N_th |
| `dff_qqn` | flip-flop with Q and Q-bar outputs (a master-slave D flip-flop) |
| `b2inv` | bit-two inversion, taking inverted bits from the flip-flops' Q-bar |
| `phase_encoder` | forms the two half-bit levels of each bit period (phase shift, flat-word pulse) |
| `eti_encoder` | check transitions + buffer + B2INV + phase encoder, with output register |
| `phase_detector` | mid-bit edge = first half XOR second half |
| `decision_decoder` | OR of mid-bit edges over the word |
| `eti_decoder` | phase detector + decision decoder + buffer + B2INV, with output register |
| `deserializer` | collects M decoded bits and drives them onto the parallel wires |

Using Q-bar of the buffer flip-flops instead of a separate inverter follows
the idea that the flip-flop already supplies the inverted data.

## Timing and framing

* The link runs one serial bit per clock. The serializer samples `par_in`
  on each rising edge where `par_take` is high, every M cycles while `en` is
  high.
* The encoder collects a whole word before it can decide, so it sends word
  n while word n+1 arrives: din to line is WL cycles. The decoder needs the
  whole word for the same reason: line to dout is WL cycles.
* End to end, a parallel word sampled at edge t is on `par_out`, with
  `par_out_valid` high for one cycle, after edge t + 2*WL + M + 2 (12 at the
  defaults).
* Framing is positional: every block counts words and frames from the first
  valid bit after reset. `line_valid` travels with the line as a link-up
  flag. If the stream stops (`en` low), the link stalls and the words inside
  it wait; they come out once the stream runs again.
* Reset is asynchronous, active low, and clears every register.

## What follows the published ETI scheme and what is this design's own

Follows the scheme: bus-invert decision and inversion;
serialization order; word of WL = 4 bits for m = 2; the
transition count inside the word and the threshold N_t >= N_th with
N_th = WL/2; B2INV on every 2-bit base; carrying the decision bit in the
clock/data phase instead of an extra bit; the coded values of all 16 table
rows; the encoder and decoder block structure; the check-transitions circuit
(D-FF, XOR, adder, word-length indicator); use of a flip-flop's Q-bar for
inversion.

Own choices, where the scheme leaves things open:

* The half-bit-level description of the line and the half-bit delay as the
  concrete phase difference.
* The flat-word pulse. The published coding lists 0000 -> 1000 and
  1111 -> 0111 for the two flat inverted words. Here that first-bit flip is
  half a bit long, which gives the same extra edges but keeps every word
  decodable.
* The decision bit decoder as an OR of mid-bit edges over the word.
* A count of exactly half the word or bus width inverts (the rule
  "invert unless the count is below half"), both in ETI and in bus invert.
* One word of buffering in encoder and decoder, output registers, the stall
  behaviour, framing from reset, asynchronous reset.
* `dff_qqn` is written at register level; the NAND master-slave netlist is
  left to the cell library.

Not covered: the analog side of the link (drivers, wire model, the physical
DDR output stage and sampling), and the power and energy figures at 250 ps
clock in 90 nm and 130 nm CMOS, which are circuit-level results. The
comparison schemes (parallel bus, plain serial, encode-then-serialize,
serialize-then-encode, TIC with an indication bit) are not implemented.

## Behaviour measured in simulation

`tb_eti_workloads` counts line transitions (including mid-bit edges and the
flat-word pulses) against the plain serial stream, 4000 words per run:

| data | m = 2 | m = 4 |
|---|---|---|
| random | 32 % fewer | 31 % fewer |
| counter | about equal | 38 % fewer |
| correlated wires (each flips with p = 1/8) | 48 % fewer | 19 % fewer |
| serial 0101... (all words flat after coding) | 51 % fewer | 51 % fewer |

Every word arrived unchanged in all runs.

## Simulating

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=F`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/eti_pkg.sv rtl/*.sv tb/tb_eti_link.sv --top-module tb_eti_link
./obj_dir/Vtb_eti_link
```

(`eti_pkg.sv` must come first; listing it twice only gives a duplicate
warning.) For the workload bench add `tb/eti_link_harness.sv` and use
`tb_eti_workloads` as top. `tb_eti_top` runs the whole design at default
parameters.

| testbench | what it checks |
|---|---|
| `tb_eti_top` | whole design at defaults: link data and latency, decision rule checked on every line word, decoder decision bits, bus-invert decisions and recovery; counts every mechanism |
| `tb_bus_invert_encoder` | the 8-bit worked example, then random words |
| `tb_eti_link` | link end to end at default size: data, exact latency, every line symbol against a reference coder, decoder decision bits, transition reduction; counts plain, inverted and flat inverted words |
| `tb_eti_workloads` | patterns above, at m = 2 and m = 4 |
| `tb_eti_encoder` | all 16 rows of the coding table, random words, edge placement, latency |
| `tb_eti_decoder` | decoding of reference line symbols, including flat words and a pause |
| `tb_check_transitions`, `tb_wl_indicator`, `tb_decision_decoder` | decision and word markers with idle cycles |
| `tb_phase_encoder` | exhaustive over word, decision, bit position, previous level |
| `tb_b2inv`, `tb_phase_detector`, `tb_dff_qqn`, `tb_serializer`, `tb_deserializer` | the small blocks |

## Changing the size

`eti_link #(.M(m), .WL(wl), .NTH(nth))`. WL must be even (B2INV works on
2-bit bases); the link end-to-end bench also delivers every word unchanged at
M/WL = 2/2, 3/6 and 4/8 with NTH = WL/2 (at WL = 2 every inverted word is
flat, so the bench's count of non-flat inverted words stays at zero). N_th defaults to WL/2, which keeps the
guarantee that every coded word has fewer than WL/2 internal transitions.
M and WL are independent; the serializer and the coder keep their own
counters.
