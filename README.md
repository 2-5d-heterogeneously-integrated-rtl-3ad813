# 2.5D neural-sensing microsystem: digital logic in SystemVerilog

This design targets a neural recorder built from four dies on a silicon interposer:

- **Die-1 (acquisition)** amplifies 16 ECoG channels and digitises them with four
  11-bit hybrid ADCs. Each ADC serves four channels through an analog multiplexer.
- **Two low-power FPGA dies** extract features with a configurable lifting-based
  discrete wavelet transform (DWT). Each die holds two 4-channel, 5-level engines.
- **A microcontroller die** controls the system.

The dies talk over one shared on-interposer bus, u-SPI. It is an SPI-like,
multi-lane bus with:

- a two-level packet header;
- optional CRC;
- optional crosstalk-avoidance coding;
- acknowledgments;
- *master passing*, in place of arbitration.

The RTL here covers every block that has a logic function:

- the hybrid ADC's control and coarse encoder;
- the DWT datapath, scheduler and clock/power gating;
- the u-SPI master/slave node and bus;
- the die-level wrappers that tie these together.

The analog parts are behavioural models: the ADC's delay lines, DAC and
comparator, and the multiplexer. The amplifiers, bias circuits, probes, the
FPGA-side filters and the MCU core are not modelled. The top level brings out
the MCU's bus port and the 16 amplifier outputs.

## System view

```
 afe_in[16] ─► 4 x { analog_mux_model ─► hadc_analog_model ⇄ hadc_sar_ctrl ◄─ hadc_coarse_encoder }
                        ▲ mux_sel, conv_start (acq_sequencer)          │ 11-bit codes
                                                                       ▼
                                                              die1_wrapper (node 1)
                                                                       │
   MCU port (mcu_*) ── uspi_node (node 0) ════════ uspi_bus ═══════════╪═════════════╗
                                                                       │             ║
                                                     dwt_die (node 2) ═╝   dwt_die (node 3)
                                                     2 x dwt_engine        2 x dwt_engine
```

A normal cycle of operation:

1. The MCU holds the bus-master flag after reset. It can read the latest 16-channel
   frame from Die-1, configure the DWT dies (wavelets, coefficients) and read their
   result queues.
2. To stream samples, the MCU **passes the master flag to Die-1**. Die-1 waits for the
   next complete frame and writes channels 0–7 to the first DWT die and 8–15 to the
   second. It then passes the flag back to the MCU.
3. Writing the last sample address on a DWT die closes a sampling period. Both of its
   engines then run one period of their schedule. Results go into a 32-entry queue
   per engine, and the MCU drains the queues with burst reads.

One system clock drives every die in this model. The original system has a separate
clock on each die; see *Clocks and rates*.

## Hybrid ADC (`hadc_sar_ctrl`, `hadc_coarse_encoder`, `hadc_analog_model`)

The 11-bit converter has two stages:

- a 3-bit **coarse** stage: a voltage-to-time converter feeding a vernier delay line
  (a TDC);
- an 8-bit **fine** SAR stage whose DAC is *lifted* to the coarse block.

The coarse stage picks one of eight blocks of the input range. The SAR then resolves
the input inside that block, so its capacitor array needs only 8 bits.

The coarse boundaries are deliberately placed a little low (an offset of 30 mV). Near
a block edge the coarse stage may therefore name the block *below* the right one. The
SAR then saturates at `1111_1111`. The controller detects this "straight-ones" result
and runs the SAR again with block+1. This is the **re-comparison**, and `recmp`
reports it. If the result is all ones in block 7, no retry is possible and the code is
kept.

The output code is `{block[2:0], fine[7:0]}`.

Conversion sequence, as seen by `hadc_sar_ctrl`:

| phase | what happens | clocks |
|---|---|---|
| coarse | `coarse_start`; the model captures Vin and returns the taps one clock later; the encoder counts the taps (ones-count, bubble tolerant) and registers the block | 3 |
| sample | `dac_sample`: the DAC samples Vin with V_INN lifted to the block | 1 |
| 8 SAR bits | per bit: `cmp_req` is held until `cmp_done`; trial bits are set MSB first | 2–5 each |
| verify | on all ones (and block < 7): lift+1, sample again, 8 more bits | 0 or ~20 |

The original design times each SAR bit with Muller C-elements, with no clock. Here
that becomes a request/done handshake with the comparator, so a slow decision near
balance simply takes longer. The comparator model takes 4 extra clocks when the input
is within 1/512 of full scale of the DAC level.

The worst conversion seen in simulation is 70 clocks. The acquisition sequencer
allows 100 clocks per slot (`CONV_CYCLES`).

The original reports eight spikes in the converter's DNL, one per coarse block
boundary, caused by re-comparisons that go wrong there. The model reproduces the
re-comparison mechanism but not that analog error.

`hadc_analog_model` works in units of VDD/65536 (`volt_t`):

- tap k of the TDC is `Vin − OFFSET ≥ (k+1)·8192`;
- the comparator decides `Vin ≥ 32·{lift, trial}`.

`OFFSET` defaults to 1092, which is 30 mV of an assumed 1.8 V full scale.

## DWT engine (`dwt_engine`, `dwt_cc`, `dwt_coeff_mem`)

### The lifting backbone

All four mother wavelets share one 8-step lifting datapath: Haar, Daubechies-2,
Symlet-4 and Symlet-6. The datapath is built for Sym6, the longest. The others use a
subset of the steps, with some coefficients zero.

Every step has the form

    OUT = X + Di·Y + Dj·Z

The computation core `dwt_cc` evaluates it with two multipliers and one 3-term adder:

- operands are 10-bit two's complement;
- coefficients are 6-bit signed, scaled by 16 (Q2.4);
- products are shifted right by 4 (floor);
- the sum is saturated to 10 bits.

Changing the wavelet of a channel only changes which coefficient set `dwt_coeff_mem`
returns.

A 1-level iteration is 10 cycles:

1. **Read** (1 cycle): load the new input pair and this channel/level's lifting state.
2. **Compute** (8 cycles): one lifting step per cycle.
3. **Write** (1 cycle): store the state and emit the detail and approximation.

The backbone needs two samples of look-ahead. The engine therefore runs it causally:
each step uses state kept from one or two iterations earlier (the schedule is written
out in the header of `dwt_engine.sv`). As a result, **a result leaves the engine two
iterations after the input pair it belongs to**. The first two results of each level
are zero.

### Multi-channel, multi-level schedule and gating

One core serves 4 channels × 5 levels:

- A sampling period (one `sample_tick`) has 20 slots of 10 cycles, channel-major,
  which is 200 clocks.
- Level L runs only in periods whose number is a multiple of 2^L, because it needs a
  pair of approximations from level L−1.

This gives the gating scheme:

- **Odd periods** run nothing. The whole period is clock gated (`cg_en` low) and power
  gated (`pg_sleep` high). On the FPGA dies, power gating is the device's
  power-saving mode.
- **Even periods** run the due levels. The slots whose level is not due are only clock
  gated.
- `cg_en` is an enable on every datapath register. On silicon it would drive a
  clock-gating cell.

A tick that arrives before the 200 clocks are over sets the sticky `overrun` flag, and
the tick is dropped.

### Coefficients

The coefficient memory resets to this design's quantisations of **Haar** and **D2**
(table in `dwt_coeff_mem.sv`). **Sym4 and Sym6 reset to zero.** Their quantised
lifting coefficients are not part of this design; load them over u-SPI before
selecting those wavelets (addresses 0x40–0x7F of a DWT die).

## u-SPI (`uspi_node`, `uspi_bus`, `uspi_crc8`)

Every die has the same master/slave node. The **M/S flag** decides whether the node's
master side drives SCLK, SS and the data lanes. Exactly one node holds the flag. The
bus model ORs all enabled drivers, and an assertion fires if two nodes drive the data
lanes at once.

### Packets

A packet is sent most significant bit first, LANES bits per beat. It has these fields,
in order:

| field | width | notes |
|---|---|---|
| header 1 | 12 | `mode[1:0]` (0 write, 1 read, 2 pass, 3 none), `bcast`, `blm_en`, `bl[3:0]`, `amode[1:0]` (0/1/2/4 address bytes), `crc`, `cac` |
| slave select | 4 or 16 | one node ID, or a 16-bit mask when `bcast` |
| BLM | 8 | only when `blm_en`; words = (BL+1)·(BLM+1) |
| address | 0–32 | start address; it increments per word |
| data | 16 per word | written by the master, or read from the slave after one turnaround beat |
| CRC | 8 | when `crc`; CRC-8, polynomial 0x07, over the data words |
| ACK | 1 beat | write and pass only, after a turnaround beat; the slave drives all lanes high; silence means NAK; no ACK on broadcast |

With `cac` set, data and CRC use only the even lanes and hold the odd lanes low. No two
neighbouring wires can then switch in opposite directions, at the cost of half the
bandwidth. This shielding code is this design's choice of crosstalk-avoidance code.

### Master passing

A `PASS` packet to node n is acknowledged by n. When SS rises at the end of the packet:

- the sender clears its flag;
- node n sets its own flag and pulses `s_pass`.

Die-1 uses this to become master, push a frame and hand the flag back.

### Timing

SCLK is the system clock divided by 2·`SCLK_HALF` (default: 4 clocks per beat).
Slaves sample on the rising SCLK edge, seen through one register stage, so `SCLK_HALF`
must be at least 2.

Typical costs with 4 lanes:

- an 8-word write with a 1-byte address and CRC takes 42 beats (12-bit header, 4-bit select, address, 32 data beats, CRC, turnaround, ACK), about 170 clocks;
- a pass takes 6 beats.

## Die wrappers and register maps

**Die-1 (`die1_wrapper`, node 1).**

- ADC k converts channels 4k…4k+3.
- At each `frame_start` the live codes are copied into a frame buffer. The buffer is
  frozen while a push is in progress.

| address | access | meaning |
|---|---|---|
| 0x00–0x0F | R | last frame, channel 0–15 (11-bit code) |
| 0x10 / 0x11 | R | frames captured / frames pushed |
| 0x20 | R/W | push options: bit 0 CRC (default 1), bit 1 CAC |

A slave burst read is not frozen. To get one coherent frame, read right after
`frame_cnt` advances: a 16-word read takes about 300 clocks, and a frame takes
4·`CONV_CYCLES` = 400 clocks.

**DWT die (`dwt_die`, nodes 2 and 3).**

Writes:

| address | meaning |
|---|---|
| 0x00–0x07 | sample of die channel 0–7 (11-bit code, entering the DWT as `(code−1024)>>>1`); writing 0x07 closes the period |
| 0x20–0x27 | wavelet per channel (0 Haar, 1 D2, 2 Sym4, 3 Sym6) |
| 0x40–0x7F | coefficient memory of both engines: address bits [5:4] wavelet, [3:1] step, [0] Di/Dj; data bits [5:0] |

Reads:

| address | meaning |
|---|---|
| 0x100–0x1FF | pop the result queue of engine A |
| 0x200–0x2FF | pop the result queue of engine B |
| 0x10 | status: {overflow B, overflow A, overrun B, overrun A, busy, sleep} |
| 0x20–0x27 | wavelet registers |

A queue word is `{channel[2:0], kind[2:0], value[9:0]}`. Kind 0–4 is the detail of
level 1–5, and kind 5 the level-5 approximation. An empty queue reads `0xFFFF`.

## Clocks and rates

How the clock rates were chosen:

- The original gives a channel rate of 2 kHz and 8 kHz multiplexing, so each ADC runs
  at 8 kS/s.
- With `CONV_CYCLES` = 100, this needs an **800 kHz** Die-1 clock. This clock rate is
  an assumption of this design.
- The DWT schedule needs 200 clocks per 2 kHz period, which is **400 kHz**. This
  matches the original's formula 2k × 4 × 5 × 10. Its measurements quote 800 kHz, at
  which half of each period would sit idle.
- At 800 kHz, streaming one frame costs two 8-word pushes plus two passes on the bus.
  That is about one frame time (400 clocks), so Die-1 pushes about every
  other frame. A faster system clock on the bus side restores the full rate;
  `SCLK_HALF` cannot go below 2.

## Where this differs from the original design

- All dies share one clock, and the self-timed SAR is a clocked handshake.
- The coefficient values, the packet layout after the first header, the ACK and
  turnaround beats, the CRC polynomial, the CAC code, the register maps and the
  master-passing push flow are this design's own. The original gives the header
  fields, the existence of CRC, CAC, ACK and master passing, and the datapath
  structure.
- Sym4 and Sym6 coefficients are not supplied.
- The offset of the coarse stage is taken as 30 mV. One figure of the original
  labels it 50 mV.
- The DWT runs causally with a two-iteration latency.
- Full-duplex u-SPI transfers are not implemented.
- Not modelled: the amplifiers (AFE), bias circuits, the filters on the FPGA dies, the
  MCU core, and the probe, TSV and interposer structures.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops
by itself, or through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/neuro_pkg.sv rtl/*.sv \
          tb/tb_neuro_microsystem_top.sv --top-module tb_neuro_microsystem_top -o sim
./obj_dir/sim
```

(`rtl/neuro_pkg.sv` must come first; the glob lists it again, which Verilator accepts.)

| testbench | what it covers |
|---|---|
| `tb_neuro_microsystem_top` | whole system at default parameters. It checks a DC frame against expected codes including re-comparisons, configures wavelets by broadcast, writes to an absent node (NAK), and runs 32 rounds of pass → push → queue drain. It checks result counts per level, level-1 Haar details against a reference, the frame period and the absence of overruns, overflows and conflicts. It counts re-comparisons, clock- and power-gated cycles, passes, broadcasts, CRC and CAC packets, and NAKs. |
| `tb_dwt_engine` | 64 periods against an independent, non-causal reference model of the lifting equations (Haar and D2 channels), the level schedule, gating outputs and overrun |
| `tb_dwt_cc`, `tb_dwt_coeff_mem` | arithmetic and saturation; reset table, writes |
| `tb_hadc_sar_ctrl` | full conversions against the code formula, re-comparison, conversion time |
| `tb_hadc_coarse_encoder`, `tb_hadc_analog_model`, `tb_analog_mux_model` | encoder, analog model and multiplexer timing |
| `tb_acq_sequencer` | slot, conversion and frame timing |
| `tb_uspi_node` | write, read with CAC, broadcast with BLM, NAK, CRC error, pass and pass-back, packet duration |
| `tb_uspi_bus`, `tb_uspi_crc8` | line resolution and conflict flag; CRC check value 0xF4 of "123456789" |
| `tb_die1_wrapper`, `tb_dwt_die` | each die wrapper with u-SPI nodes around it |

The full-system test simulates about 55,000 clocks and runs in under a second.
