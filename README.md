# ADC0809 acquisition front end with a 16 × 32 asynchronous FIFO

This is the FPGA half of a small data logger, the kind used to sample greenhouse
sensors (temperature, humidity, light). An ADC0809 8-bit converter runs
continuously under FPGA control. The FPGA packs its bytes four at a time into
32-bit words and buffers the words in an asynchronous FIFO. A downstream
processor on its own clock reads the FIFO in bursts. The processor only needs to
react to two flags. It empties the FIFO when it reports `full`, and stops
reading when it reports `empty`.

Everything is paced by the converter's output-enable pulse, `oe`. Each
conversion produces one `oe` pulse. That pulse drives a round-robin data
allocator and a five-phase pulse generator. The pulse generator tells four
latches when to take their byte, and tells the FIFO when to write the packed
word.

```
            d[7:0], eoc                       CLK1..CLK4          CLK5
  ADC0809 ───────────► adc0809_ctrl ──q──► data_alloc ──lane0..3──► data_latch x4 ──32b──► async_fifo ──q[31:0]──► processor
   chip   ◄─ale,start,oe,adda──┘  │          ▲                         ▲                   ▲  wr: clk     rd: clk1
                                  └── oe ────┴──────► clk_conv ────────┴───────────────────┘  we ─┘        re ─┘
```

## Files

| file | role |
|---|---|
| `rtl/daq_pkg.sv` | shared sizes (8-bit samples, 4 lanes, 32-bit words, 16 words) and the controller state type |
| `rtl/adc0809_ctrl.sv` | converter control state machine |
| `rtl/data_alloc.sv` | one-to-four data allocator |
| `rtl/data_latch.sv` | 8-bit latch with capture pulse and `ce` gate |
| `rtl/clk_conv.sv` | modulo-7 counter that makes the five phase pulses CLK1..CLK5 |
| `rtl/async_fifo.sv` | asynchronous FIFO, built from the four files below |
| `rtl/fifo_wr_ctrl.sv`, `rtl/fifo_rd_ctrl.sv` | write and read pointers, full and empty flags |
| `rtl/fifo_sync2.sv` | two-flop synchroniser for the Gray pointers |
| `rtl/fifo_dpram.sv` | 16 × 32 dual-port RAM |
| `rtl/daq_top.sv` | top level |
| `tb/adc0809_model.sv` | behavioural model of the converter's digital pins (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_daq_top` end to end |

## The converter cycle (`adc0809_ctrl`)

The state machine runs on `clk`, which also clocks the converter. It has five
states, encoded 0 to 4:

| state | outputs | leaves when |
|---|---|---|
| 0 IDLE | all low | next clock |
| 1 START | `ale`, `start` high | next clock |
| 2 WAIT | all low | `eoc` equals `EOC_DONE` (default 1) |
| 3 OE | `oe` high | next clock |
| 4 LOCK | `oe`, `lock` high | next clock |

The byte on `d` is stored into `q` on the edge that enters LOCK. That edge is
the rising edge of `lock`, and the converter's output is enabled at that point.
`adda` is held at 1, which selects a single channel. A conversion takes
`conv_clks + 5` clocks, where `conv_clks` is the converter's conversion time.

Two details deserve attention:

* **EOC polarity.** WAIT ends when `eoc` goes high, as on the ADC0809
  datasheet. If your converter or board inverts the signal, set `EOC_DONE = 0`.
* **Early EOC.** WAIT tests `eoc` from its first clock. A real ADC0809 can keep
  EOC high for up to 8 clocks plus 2 µs after START. If it does, WAIT ends at
  once and the old result is read again. The simulation model drops `eoc` on
  the clock after START, so this case is not exercised. On hardware, add a
  minimum dwell time in WAIT.

## Lanes, phases and what ends up in a word

`data_alloc` and `clk_conv` both count rising edges of `oe`. They count with
different moduli, and this is the least obvious part of the design.

* `data_alloc` counts modulo 4. Edge n sends the current byte to lane
  (n−1) mod 4, and each lane keeps its byte until its turn comes again.
* `clk_conv` counts modulo 7. While the count is k, for k = 1..5, output CLKk
  is high for one full `oe` period. At counts 0 and 6 all five outputs are low.
* Latch k loads its lane on the rising edge of CLKk, but only while `ce` is
  high. In the top, `ce` is tied to `we`.
* The FIFO writes `{latch4, latch3, latch2, latch1}` on the rising edge of
  CLK5, if `we` is high and the FIFO is not full. Latch 1 goes in bits 7:0.

So one 32-bit word is produced every 7 conversions. The two counters drift
against each other, but the result always works out to the same pattern. When
latch k fires, its lane holds the most recent byte dealt to it, and the four
latches end up holding four consecutive conversions in order. For example:

* frame 0 takes conversions 1–4;
* frame 1 takes 5–8;
* frame 2 takes 13–16.

Three of every seven conversions are therefore not stored. If you need every
sample, change `PHASE_MOD` in `daq_pkg` to 5, so that the counter cycle
matches the five phases. That configuration is not the one verified here.

There is also a one-conversion lag. The allocator samples `q` at the rising
edge of `oe`. The controller updates `q` one clock later, at `lock`. So the
byte taken with conversion n is the result of conversion n−1, and the first
byte after reset is 0.

## Clocking

On the write side, everything runs on one clock, `clk`. That covers the
controller, the allocator, the counter, the latches and the FIFO write port.
`oe` and CLK1..CLK5 are never used as clocks. Each block registers its pacing
input and acts on a detected rising edge. The resulting delays are:

| event | timing |
|---|---|
| `oe` rises | allocator and counter update 1 clock later |
| CLKk rises | latch k loads 1 clock after that |
| CLK5 rises | FIFO write happens 1 clock after that |

All of this finishes before the next START, so `we` may change at any clock
when `start` is high without splitting a frame.

The read port runs on `clk1`, which is unrelated to `clk`. `rst_n` is
asynchronous and active low, and it resets both domains.

## The FIFO (`async_fifo`)

The FIFO is 16 words of 32 bits (`W`, `DEPTH`; `DEPTH` must be a power of two,
at least 4). The write pointer and the read pointer are binary counters one bit
wider than the address. Each pointer is passed to the other clock domain in
Gray code through two flip-flops.

* **Empty** is set when the next read pointer equals the synchronised write
  pointer.
* **Full** is set when the next write pointer equals the synchronised read
  pointer with its top two bits inverted.

Both flags are conservative. After the other side moves, they clear two to
three clocks late, which costs throughput but never corrupts data.

* **Write:** one word per rising edge of `wr_ena`, taken on the first `wr_clk`
  edge that sees `wr_ena` high. The write happens only if `wr_en` is high and
  `full` is low. Holding `wr_ena` high for longer does not write again.
* **Read:** on an `rd_clk` edge with `rd_en` high and `empty` low, the oldest
  word is popped. It appears on `rd_data` after that edge, and `rd_data` holds
  until the next pop. `rd_data` reads 0 until the first pop after reset.
* Writes while full and reads while empty are ignored.

## Top-level ports (`daq_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | converter and write-side clock |
| `clk1` | in | 1 | read-side clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `d` | in | 8 | converter data bus |
| `eoc` | in | 1 | converter end of conversion |
| `ale`, `start`, `oe`, `adda` | out | 1 | converter controls |
| `lock` | out | 1 | result-latched strobe, for observation |
| `we` | in | 1 | write enable from the processor; also gates the latches |
| `re` | in | 1 | read enable, `clk1` domain |
| `full` | out | 1 | FIFO full, `clk` domain |
| `empty` | out | 1 | FIFO empty, `clk1` domain |
| `q` | out | 32 | FIFO read data, `clk1` domain |

The protocol the processor is expected to follow:

1. Keep `we` high until `full` is set, then drop `we`.
2. Raise `re` and read until `empty` is set.
3. Raise `we` again.

## Where this departs from the design it is based on

The block structure, pin names, counter ranges, state sequence and sizes follow
a published description of this system. The following points are choices made
here:

* **Clocking.** The original clocks the allocator and counter from `oe`, and
  each latch from its CLKk. Here those signals are edge-detected on `clk`
  instead, as described under Clocking.
* **Latch `ce`.** The original does not clearly say what drives it. Here it is
  tied to `we`.
* **FIFO internals.** The Gray-coded synchronisation and the write-on-`wr_ena`-edge
  rule are this design's own. The original lists only the parts: address
  logic, flag generation and a dual-port RAM.
* **FIFO size.** 16 × 32 is used. One block diagram of the original system
  shows a 64-word FIFO. To get that, set `FIFO_DEPTH = 64` in `daq_pkg`.
* **Reset.** The reset behaviour is this design's own throughout.

The parts outside the FPGA are not modelled in RTL:

* the analog front end and the ADC0809 itself (a behavioural pin model is in
  `tb/`);
* the clock multiplier and the oscillator;
* the downstream DSP and its RAM.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/daq_pkg.sv tb/tb_daq_top.sv --top-module tb_daq_top -o sim
./obj_dir/sim
```

Replace `tb_daq_top` with any other testbench name. What each one covers:

| testbench | covers |
|---|---|
| `tb_adc0809_ctrl` | pulse shapes, `oe` only after `eoc`, the latched byte, and the conversion period of `conv_clks + 5` clocks, for two conversion times |
| `tb_data_alloc` | round-robin lane order and holding, with random pulse lengths |
| `tb_data_latch` | loads only on a capture edge with `ce` high; includes a count-up sequence where `ce` opens late |
| `tb_clk_conv` | exactly one phase high at count k, never at counts 0 and 6; each phase pulses 10 times in 70 steps |
| `tb_fifo_dpram` | random writes and reads on two clocks |
| `tb_async_fifo` | two words written and read back; `wr_en` gating; one write per long pulse; fill past full; drain past empty; 600 random concurrent operations against a scoreboard |
| `tb_daq_top` | the whole design at default sizes, against the converter model |

`tb_daq_top` fills the FIFO and drains it three times, which is 48 words, each
checked against a pin-level reference. That reference rebuilds the
modulo-4/modulo-7 packing on its own. The test also drops `we` for random
single conversions. It fails unless words were written, frames were skipped,
and the FIFO reached both full and empty.
