# FM3TR transmit chain: MSK modulator, BlockRAM FIFOs and up-converter interfaces

This RTL takes a window of binary data and turns it into the input and output
streams of a digital up-converter (DUC) for the FM3TR reference waveform. The
data moves through three BlockRAM "FIFOs":

```
source --> FIFO 0 --> MSK modulator --> FIFO 1 ==> [ DUC core ] --> FIFO 2 --> sink
           512x32       (logic)         512x32      (external)      1024x16
                clk  ------------------->|<------ clk_duc ------>|<--- clk ---->
```

The chain comes from a study of how an FPGA's embedded processor talks to the
logic around it. In the configuration built here, everything the processor
touches sits in on-chip-memory BlockRAM. That was the fastest configuration in
the study. The modulation task ran as software on the processor there. Here it
is logic with the same function, so the whole chain can be simulated and built
without a processor model.

The "FIFOs" are not circular buffers. Each holds one whole window in one
BlockRAM. The producer fills the BlockRAM through one port and the consumer
empties it through the other. There are no read/write pointers and no
full/empty flags. The producer and consumer synchronise in two ways: a polled
header word (FIFO 1) and a data qualifier (FIFO 2).

## The MSK modulator (`rtl/msk_modulator.sv`)

Minimum-shift keying sends each bit a_n ∈ {+1, −1} as a half-sine pulse
spanning two bit periods (2·Tb). Pulses alternate between the in-phase (I)
and quadrature (Q) outputs and are offset by one Tb. Written directly, the
pulse sign depends on the sum of all earlier bits. The modulator uses the
recursive form of the complex envelope instead:

    z_n = j · a_n · z_(n−1),     z ∈ {+1, −1, +j, −j}

so only the last symbol has to be stored. Each step turns z by a quarter turn
(forward for +1, backward for −1). The result is always on one axis:

* A real z starts a pulse of sign z on I.
* An imaginary z starts a pulse of sign Im(z) on Q.

In the logic, z is two flip-flops: the axis and the sign.

Sampling is 4 samples per Tb. One pulse is therefore 9 samples,
g[k] = round(32767·sin(πk/8)) for k = 0..8, in Q1.15. Because g[0] = g[8] = 0,
the next pulse on the same output starts exactly where the last one ends.
Output sample s is:

    Q[s] = sign_Q · g[s mod 8]          (Q pulses start at s ≡ 0 mod 8)
    I[s] = sign_I · g[(s + 4) mod 8]    (I pulses start at s ≡ 4 mod 8)

Before the first bit, the modulator sends a reference pulse so that later
phase changes are known relative to it. This design uses z = −j, a negative
Q pulse. With that reference, even bits land on I and odd bits on Q.
A window of N bits gives 4N + 9 I/Q sample pairs. Each pair is one 32-bit
word, with I in bits 31:16 and Q in bits 15:0.

Input samples are 8-bit two's-complement +1/−1 values, four per 32-bit FIFO 0
word. The first sample is in bits 31:24 (big-endian, as a processor stores a
char array). A negative byte counts as −1 and any other byte as +1.

### Control

The states follow the modulator's three-state machine, plus two states added
to end a window:

| state | what happens | leaves when |
|-------|--------------|-------------|
| INIT  | clears the FIFO 1 header, writes the first half of the reference pulse | `go` (start from the radio controller) |
| WAIT  | checks for unused samples (`src_count` above the bits already used) | new data → RUN; window closed (`src_done`) → FLUSH |
| RUN   | one FIFO 0 read when needed, one cycle to apply the bit, four cycles to write its samples; repeats while data is available | no more data → WAIT |
| FLUSH | writes the last 5 samples (the end of the final pulse), then the header | → DONE |
| DONE  | holds until reset | — |

Timing without stalls: N bits take 5N + ⌈N/4⌉ + 8 cycles from leaving INIT
to DONE. FIFO 1 can hold at most (depth − 10)/4 bits per window: 125 at the
default depth of 512. Any extra samples are ignored, and `truncated` is set.

## FIFO 1 handshake (`rtl/fifo1_duc_if.sv`)

FIFO 1 sits between two clock domains. The modulator writes it on `clk`.
The DUC-side interface reads it on `clk_duc`, which is the DUC input rate
(clk/16, i.e. 6.25 MHz from a 100 MHz clock). The only synchronisation is
word 0 of the BlockRAM, the header:

    header = { ready (bit 31), 15'b0, count (bits 15:0) }

The handshake runs in four steps:

1. The modulator clears the header when it starts.
2. The modulator writes the header only after the last sample word.
3. The interface reads word 0 on every `clk_duc` cycle. It acts only on a
   change: it must first see the word as not ready, and then see it as
   ready. A ready header left over from an earlier window is therefore never
   taken for a new one.
4. The interface then reads words 1..count back to back. It presents one
   sample per `clk_duc` cycle on `duc_din_i/q` with `duc_nd` high, then
   stops for good.

This is safe across the clock domains for two reasons. The sample words are
stable long before the header becomes ready. And only the header is read
while it might be changing.

## FIFO 2 capture (`rtl/fifo2_wr_if.sv`)

The DUC's qualified output (`duc_rdy`) arrives on `clk`.

* The interface ignores everything until the first qualified sample.
* From then on it writes one sample per clock to addresses 0, 1, 2, …
* It stops for good at the first unqualified sample or when the BlockRAM is
  full (`stop_full`).

The sink reads the result afterwards through the BlockRAM's other port
(`sink_en/sink_addr/sink_rdata`, one cycle of latency).

## Other blocks

* `rtl/bram_sdp.sv`: the BlockRAM. It has a write port and a read port on
  independent clocks, a read latency of one cycle, and read data that holds
  while not enabled. The contents start at zero.
* `rtl/pit_timer.sv`: a 32-bit interval timer. In the top it is cleared
  while the modulator is in INIT and counts while the modulator works, so
  `mod_cycles` gives the modulation time in `clk` cycles.
* `rtl/fm3tr_pkg.sv`: the pulse table, the I/Q word and header structs, and
  the modulator state enum.
* `rtl/fm3tr_app_top.sv`: the top. It wires everything together and brings
  the DUC's ports out.

## What is not in this RTL

* **The DUC core.** It is a vendor IP block. It has two interpolate-by-2 FIR
  stages (pulse shaping and CIC compensation) and a CIC interpolator with
  R = 4, for a total rate change of 16. It also has a direct digital
  synthesiser and an I/Q mixer that forms s = y_i·c_i − y_q·c_q. Its filter
  coefficients and word widths are not available, so its inputs
  (`duc_din_i/q`, `duc_nd`) and outputs (`duc_dout`, `duc_rdy`) are top-level
  ports.
  `tb/duc_model.sv` is a stand-in for simulation only. It holds each input
  for 16 outputs and mixes with a quarter-rate carrier. The DUC output width
  of 16 bits is an assumption.
* **The clock manager** that makes `clk_duc` from `clk`. Supply `clk_duc` as
  an input that is phase-related to `clk`.
* **The processor, its bus system and the bus-attached memories.** The study
  also measured configurations that reach FIFO 1 over the processor local
  bus or the peripheral bus, with and without caches. These need vendor bus
  IP and a processor, and are not modelled. The modulator drives the FIFO
  BlockRAM ports directly.

## Departures and own choices

Things this design decides for itself:

* The modulator is logic, not software. So its cycle counts bear no relation
  to the processor cycle counts of the original study. The original
  all-on-chip-memory software took about 21,000 cycles for its window.
* FIFO 0 is its own BlockRAM. In the original, the input samples shared the
  data-side on-chip memory with the program's data.
* Own encodings and formats:
  * the sign of the reference pulse;
  * the input byte order;
  * the header format and word layout;
  * the FLUSH/DONE states;
  * the `go`, `src_count` and `src_done` controls;
  * window truncation;
  * the "must see not-ready first" rule of the poller.
* Own sizes:
  * FIFO depths of 512 × 32 (FIFO 0 and 1) and 1024 × 16 (FIFO 2), each
    sized to one 18 Kb BlockRAM (parity bits not used);
  * a 16-bit sample count;
  * a DUC output width of 16 bits.
* Reset: one asynchronous active-low `rst_n` serves both clock domains. It
  must be released synchronously to each clock.
* Only one window is processed per reset, as in the original experiments.
  Streaming of successive windows is not implemented.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fm3tr_app_top rtl/fm3tr_pkg.sv tb/tb_fm3tr_app_top.sv
./obj_dir/Vtb_fm3tr_app_top
```

Replace the top-module name to run another testbench: `tb_msk_modulator`,
`tb_fifo1_duc_if`, `tb_fifo2_wr_if`, `tb_bram_sdp` or `tb_pit_timer`. The
expected values are computed independently of the RTL.

For the modulator, the testbench accumulates the carrier phase P (z = j^P,
P += a_n) and sums 9-sample half-sine pulses computed with `$sin`.

`tb_fm3tr_app_top` runs the whole chain at its default sizes, in two runs:

1. 9 bits arrive in three bursts, and `go` comes late. The full 720-sample
   passband output fits FIFO 2, so capture stops on unqualified data.
2. 130 bits arrive at once. The modulator truncates them to 125. FIFO 2
   stops at its capacity of 1024 samples.

It checks:

* every I/Q word at the DUC input;
* the DUC input rate of one sample per 160 ns;
* every FIFO 2 sample;
* the interval timer against 5N + ⌈N/4⌉ + 8.

It also counts that each mechanism happened: the INIT hold, the WAIT stall,
header polling, truncation, and both FIFO 2 stop conditions.

## Changing it

* Deeper FIFOs: set `F0_DEPTH`, `F1_DEPTH` and `F2_DEPTH` on
  `fm3tr_app_top`. The modulator's window limit follows from `F1_DEPTH`.
* A different number of samples per symbol: `SPS` and the pulse table in
  `fm3tr_pkg`. The table holds g[0..4] of the symmetric pulse. The phase
  arithmetic in the modulator assumes 8-sample pulses, so it would need the
  same change.
* A real DUC core: connect it to the `duc_*` ports. Its input clock is
  `clk_duc`, and its output qualifier goes to `duc_rdy`.
