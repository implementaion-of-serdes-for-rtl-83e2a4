# All-digital 10-bit SerDes for an optical X-ray detector link

An X-ray detector in a cardiac catheterization lab sends its image data over optical fibre to
an acquisition board. On that board a transceiver turns light back into a serial electrical
signal, and a SerDes chip turns the serial stream into 10-bit parallel characters for an FPGA.
The SerDes chip used so far (a dual-rate Fibre Channel / Gigabit Ethernet part) is no longer
made and has no drop-in replacement. This RTL is a replacement built from ordinary digital
logic, so it can live inside the FPGA instead.

It keeps the pin-level behaviour of the original part:

- 10-bit 8B/10B characters on `t[0:9]` and `r[0:9]`, bit 0 first on the wire;
- a clock multiplier of x10, x20 or x40 on `refclk`;
- 1.25 and 2.5 Gb/s line rates;
- recovered byte clocks `rbc0`/`rbc1`;
- K28.5 comma alignment with `comdet`;
- internal loopback (`ewrap`);
- a loss-of-signal flag (`rx_los`).

Encoding and decoding of 8B/10B is not part of the SerDes: the protocol logic on either side
does it.

## Block map

```
            refclk refrate txrate rxrate
                   |
            clock_multiplier (behavioural PLL model)
              |bit_clk                      |os_clk (OSR x bit rate)
              v                             v
 t[0:9] -> tx_input_reg -> serializer -+-> loopback_mux -> so
   tbc  ->   (TBC edge)    ^ load      |      |  ^ si
             tx_byte_counter (/10)     +------+  | ewrap
                                              v rx_in
                          clock_recovery (alexander_pd + loop_filter)
                                              | recovered bits
                           +------------------+------------------+
                           v                                     v
          comma_detect (10-bit window, K28.5)           signal_detect -> rx_los
                           | delayed bit + align             ^ si_amp_ok
                           v
           tree_demux (1:2, 2 x 1:5, /5) -> r[0:9], comdet
                           v
           rbc_gen (1/10 or 1/20) -> rbc0, rbc1
```

`serdes_top` wires these together. Shared constants are in `serdes_pkg`: the two K28.5 forms
and the multiplier ratio function.

## Clocks and rates

There are two clock domains. The transmitter runs on `bit_clk`, one cycle per serial bit. The
receiver runs on `os_clk`, which is `OSR` (default 4) times the receive bit rate. Both come
from the clock multiplier. The receiver clock has the right nominal frequency, but its phase
has no relation to the far-end transmitter: clock recovery has to track that.

| REFRATE | TXRATE / RXRATE | multiplier | example |
|---|---|---|---|
| 1 | 0 | x10 | 125 MHz -> 1.25 Gb/s |
| 1 | 1 | x20 | 125 MHz -> 2.5 Gb/s |
| 0 | 0 | x20 | 62.5 MHz -> 1.25 Gb/s |
| 0 | 1 | x40 | 62.5 MHz -> 2.5 Gb/s |

The original part is known to support x10/x20/x40 set by REFRATE and TXRATE. Which setting
gives which ratio is a choice of this design (`serdes_pkg::mult_ratio`). RXRATE selects the
receive rate in the same way.

`clock_multiplier` is the only part that is not synthesizable. It measures the REFCLK period
and generates both clocks with delays. In an FPGA it becomes a PLL/MMCM configured for the
same ratios. `os_clk` is started a quarter of its period after `bit_clk`, so that in loopback
the receiver never samples exactly on a transmit edge.

## Transmit path

- **`tx_input_reg`** brings TBC into the bit-clock domain through two synchronising
  flip-flops and finds its edge. It then latches `t` on the rising edge (TXRATE high) or the
  falling edge (TXRATE low, the half-speed mode) of TBC. TBC is expected at the character rate
  (bit rate / 10), frequency-locked to `bit_clk`. For example, the protocol device can use a
  divided `bit_clk`. `t` must be stable for four bit periods after the latching edge.
- **`tx_byte_counter`** is the divide-by-ten counter of the clock path. Its `load` output
  marks the last bit of each character.
- **`serializer`** is a ten-stage load/shift register followed by a retiming flip-flop. T0
  leaves first. Characters follow each other with no gap: one bit per `bit_clk`, ten clocks per
  character.
- **`loopback_mux`**:
  - With `ewrap` high, `so` is held HIGH and the serial stream goes to the receiver.
  - With `ewrap` low, `so` carries the stream and the receiver listens to `si`.

## Clock and data recovery

This is the part that needs the most care. The original chip uses an analog PLL with an
Alexander phase detector and a charge pump. Here, `clock_recovery` does the same job with
logic only:

1. `rx_in` passes through a two-flip-flop synchroniser and is sampled every `os_clk`.
2. A bit timer counts `OSR` samples per bit. It marks an *edge sample* in the middle of the
   count and a *data sample* at its end, so the edge sample should land on data transitions
   and the data sample in the middle of a bit.
3. **`alexander_pd`** keeps the previous data sample B, the edge sample T and the new data
   sample A:
   - If B != A and T equals B, the transition came after the edge sample: the sampling is
     *early*.
   - If T equals A, the transition came before it: the sampling is *late*.
   - If B == A, there is no information and no vote.
4. **`loop_filter`** stands in for the charge pump and loop capacitor. It is an up/down
   counter: +1 per early vote, -1 per late vote. At +LIMIT it asks to sample later; at -LIMIT
   it asks to sample earlier. It then restarts from zero.
5. A request changes the length of the next bit period to `OSR+1` samples (later) or `OSR-1`
   samples (earlier).

The result is a bang-bang loop. At lock it dithers by one sample around the transitions. It
tracks a frequency offset of up to roughly one sample per `LIMIT` transitions, far more than
any crystal offset. The outputs are `bit_out`/`bit_vld`: one strobe per received bit, 3 to
`OSR+1` `os_clk` cycles apart.

At OSR=4 and 1.25 Gb/s the model's sampling clock is 5 GHz. An FPGA implementation takes
the same four samples per bit from four phases of a bit-rate clock, or from a
deserializing input primitive. The logic after the samples is the same.

## Comma alignment and the tree demultiplexer

**`comma_detect`** shifts the recovered bits through a ten-bit window. It compares the window
with both forms of K28.5, `0011111010` and `1100000101`. The window is also a ten-bit delay
line: the bit leaving it goes on to the demultiplexer. When the window holds a comma, the next
bit to leave is the comma's first bit. With `encdet` high, `align` marks that bit. The `comma`
flag itself is produced whatever `encdet` is, because the loss-of-signal check needs it.

**`tree_demux`** rebuilds the characters in two levels:

- The first level splits the stream into even and odd bits (1:2).
- The second level shifts each half into a five-stage register (1:5).
- A divide-by-five count of bit pairs completes a character. The two halves are then
  interleaved into `r`, with R0 the first bit received.

`align` forces the current bit to position 0. A character in progress when the comma arrives
is dropped, and `stat_realign` pulses. `comdet` is high while `r` holds K28.5. `stat_word_vld`
pulses when `r` changes.

## Recovered byte clock

`rbc_gen` makes RBC0, and RBC1 = ~RBC0, following the receiver operation table of the
original part:

| RXRATE | RBCSYNC | line rate | RBC | behaviour here |
|---|---|---|---|---|
| 0 | 0 | 1.25 Gb/s | 62.5 MHz (1/20) | RBC0 toggles with every new `r` |
| 0 | 1 | 1.25 Gb/s | 125 MHz (1/10) | RBC0 rises with every new `r`, high for 5 bits |
| 1 | x | 2.5 Gb/s | 125 MHz (1/20) | RBC0 toggles with every new `r` |

In the 1/20 modes, successive characters go with the rising edges of RBC0 and RBC1 in turn.
RBC0/RBC1 are registered signals in the `os_clk` domain, not clock-tree clocks.

## Loss of signal

`rx_los` is low only while the input looks like a valid 8B/10B stream. It goes HIGH
immediately when either of these happens:

- `si_amp_ok` is low. This is the verdict of the analog swing detector in the line receiver:
  valid above 200 mV peak-to-peak, lost below 80 mV.
- The recovered stream has more than 6 equal bits in a row. `stat_rll_err` pulses.

At the end of every 1280-bit window (`WINDOW_BITS`), `rx_los` goes low only if that window
contained at least one K28.5, no run-length violation, and `si_amp_ok` stayed high. After
reset, `rx_los` is high.

## Interface summary (`serdes_top`)

| port | dir | meaning |
|---|---|---|
| `rst_n` | in | asynchronous active-low reset. Hold it until `pll_locked` and a few bit clocks. |
| `refclk`, `refrate`, `txrate`, `rxrate` | in | reference clock and rate selection (table above) |
| `tbc`, `t[0:9]` | in | transmit byte clock and character, T0 sent first |
| `ewrap` | in | loopback |
| `so` / `si` | out / in | serial line, single-ended. The differential buffers are outside. |
| `si_amp_ok` | in | amplitude verdict of the analog line receiver |
| `rbcsync`, `encdet` | in | RBC rate select; comma alignment enable |
| `r[0:9]`, `comdet`, `rbc0`, `rbc1`, `rx_los` | out | receive character, comma flag, byte clocks, loss of signal |
| `bit_clk`, `os_clk`, `pll_locked` | out | internal clocks, for the user logic and test |
| `stat_*` | out | one-cycle event pulses in `os_clk`: new character, realignment, phase steps, run-length error |

Parameters:

- `OSR` (top, 4): samples per bit.
- `LIMIT` (`clock_recovery`, 4): loop filter threshold.
- `RL_MAX` (`signal_detect`, 6): longest allowed run of equal bits.
- `WINDOW_BITS` (`signal_detect`, 1280): loss-of-signal window.
- `WORD_W` (10): character width. Leave it at 10; the comma constants assume it.

## What is fixed by the original part, and what is this design's choice

Taken from the original part's description:

- the block structure;
- 10-bit characters, T0/R0 first;
- K28.5 in both disparities;
- EWRAP behaviour (SO HIGH, internal wrap);
- the falling-edge latch in TXRATE-low mode;
- the x10/x20/x40 multiplier;
- the RBC rates of the table;
- the run-length limit of 6;
- the Alexander detector;
- a divide-by-5 tree demultiplexer restarted by the comma.

Chosen here:

- the oversampling clock recovery, its digital loop filter and its constants;
- the REFRATE/TXRATE-to-ratio mapping;
- TBC synchronisation;
- the comma window used as a delay line;
- the RBC duty cycle and its alignment to `r`;
- how the three loss-of-signal checks combine, and the window length;
- the reset and the status outputs.

Left out because they are analog or not part of the SerDes:

- the differential input buffer with its amplitude comparator;
- the SO line driver and its EQAMP equalizer;
- the PLL loop components;
- 8B/10B coding;
- the rest of the acquisition board: Fibre Channel controller, command and image buffers,
  FPDP, PCI and local bus.

`rx_los` does not gate `r`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. The testbenches use 1 ns time
units and need `--timing`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/serdes_pkg.sv tb/tb_serdes_top.sv --top-module tb_serdes_top
./obj_dir/Vtb_serdes_top
```

Use the same command for any block: pass its testbench and top-module name. The
synthesizable modules need no timescale.

`tb_serdes_top` runs the whole design at its default parameters, in three phases:

1. Loopback at 1.25 Gb/s, half-speed TBC latch, RBC 1/10.
2. Line mode at 1.25 Gb/s, against a far-end transmitter 0.25 % fast and then 0.25 % slow.
   This phase also checks:
   - the transmitted stream on `so`;
   - RBC at 1/20;
   - `rx_los` set by a run-length violation and by loss of amplitude, and cleared again;
   - a one-bit slip on the line: it stays uncorrected while `encdet` is low, and the next
     K28.5 realigns `r` once `encdet` is high again.
3. Loopback at 2.5 Gb/s from a 62.5 MHz reference (x40).

Apart from the deliberate slip, the received characters must match the sent ones with nothing
lost or repeated. The testbench also counts each mechanism (realignment, COMDET, both phase-step
directions, run-length error, RX_LOS set/clear, both TBC edges, both RBC rates, both ENCDET
settings) and fails if any of them never happened. It runs in well under a second.

The block testbenches cover the rest:

- `tb_serializer` includes the all-ones then all-zeros pattern.
- `tb_clock_recovery` checks that a stream with a ±0.3 % offset is recovered with no slip.
- `tb_tree_demux` and `tb_comma_detect` insert stray bits before commas to force
  realignment.

## Trust and limits

- Everything was checked with Verilator in two-state simulation, and with the slang front end
  for elaboration. Nothing has been run on hardware. Jitter tolerance has not been measured.
- The clock recovery is a first-order bang-bang loop. Its jitter and tracking were only tested
  with the ideal edges of the testbenches.
- `tx_input_reg` relies on TBC being frequency-locked to the bit clock. A free-running TBC
  would need a FIFO instead.
