# PreFRED: calorimeter E_t sums for a Level 1 trigger

The PreFRED board sits in the Level 1 calorimeter trigger of a collider
detector. On every 132 ns beam crossing it receives the transverse energy
(E_t) of the 24 azimuthal calorimeter wedges from twelve CRATESUM boards.
From these it forms four numbers:

- the scalar sum SumEt;
- the vector components SumEx and SumEy;
- the missing E_t squared, MET^2 = SumEx^2 + SumEy^2.

It compares them with four programmable thresholds and sends four trigger
bits to the global decision crate (FRED). The bits are delayed so that they
line up with the other trigger boards.

Each result also waits in an L1 FIFO for the Level 1 decision:

- on an accept, it goes to a DAQ buffer and to the Level 2 trigger;
- on a reject, it is dropped.

The same board, loaded with another FPGA program (TOWTRG), ORs and counts
tower-trigger bits instead.

This repository holds synthesizable SystemVerilog for the whole board:

- the VME slave;
- the controller;
- the clock grid;
- the SUMET data processor with its six phi-weighting SRAMs;
- the DAQ interface;
- the TOWTRG program.

There is a self-checking testbench for every module, plus one end-to-end
board test.

## The arithmetic: folding 24 wedges onto 6 look-up tables

Wedge azimuths are 7.5 + 15k degrees, so the 24 wedges use only six
distinct values of |cos phi| (and the same six for |sin phi|). Sector s
(0..11, 30 degrees each) carries an even and an odd wedge. Because of the
symmetry of the four quadrants, the wedges that share a factor can be added
or subtracted *before* the multiplication. For group g = 0, 1, 2 and the
wedges of one parity:

    X_g = (S_g + S_{11-g}) - (S_{5-g} + S_{6+g})     -> times |cos|
    Y_g = (S_g + S_{5-g})  - (S_{6+g} + S_{11-g})    -> times |sin|

Six multiplications per half crossing remain. They are done by six 16K x 16
static RAMs used as look-up tables, because a multiplier would not fit the
FPGA or the latency.

- **Address.** The signed 12-bit partial sum (0.5 GeV per bit).
- **Data.** Sign in bit 11 and the magnitude of the product in bits 10:0
  (0.25 GeV per bit). A magnitude of 2047 means "saturated".
- **Routing.** The even wedges arrive in the first 66 ns of a crossing and
  the odd wedges in the second, so each LUT is used twice per crossing. LUT
  k takes partial sum k in the even half and partial sum 5-k in the odd
  half (`lut_addr_mux`), so each LUT needs only one factor:

| LUT | factor | even half | odd half |
|---|---|---|---|
| 0 | cos 7.5  | X_0 | Y_2 |
| 1 | cos 37.5 | X_1 | Y_1 |
| 2 | cos 67.5 | X_2 | Y_0 |
| 3 | cos 82.5 | Y_0 | X_2 |
| 4 | cos 52.5 | Y_1 | X_1 |
| 5 | cos 22.5 | Y_2 | X_0 |

The tables are not computed on the board. They are loaded over VME, and the
loading software must fill them as follows:

- entry a (12-bit two's complement) of LUT k holds
  round(2 * a * factor_k) in sign-magnitude form, limited to 2047;
- address bit 12 is always 0;
- address bit 13 is a bank bit that can be chosen from VME for tests.

`tb/sumet_ref_pkg.sv` contains exactly this function (`lut_word`).

After the LUTs:

- **SumEx** = even-half outputs of LUT 0-2 + odd-half outputs of LUT 3-5.
- **SumEy** = the other six outputs.
- **Output format.** Each sum is reduced to a sign and a 9-bit magnitude in
  0.5 GeV. A magnitude of 256 GeV or more is an overflow: the word becomes
  all ones, sign bit included.
- **MET^2.** Two 512 x 18 squaring tables and an adder give MET^2 in 1 GeV^2
  units on 16 bits. It saturates to FFFF on its own overflow or on any
  SumEx/SumEy overflow.
- **SumEt** is the plain sum of the 24 words, 11 bits in 1 GeV, saturated at
  2047.
- **Saturated input.** A wedge word of all ones (3FF) means a saturated
  input. It forces every output word to all ones and all trigger bits to 1.

## Trigger bits and thresholds

There are four 16-bit thresholds, written over VME in pairs.

- With the default `NUM_MET_THR = 2`, bits 0-1 compare SumEt (threshold
  bits 10:0) and bits 2-3 compare MET^2.
- `NUM_MET_THR = 3` or `4` moves more slots to MET^2.
- A bit is set when the value is strictly greater than its threshold, or
  when the corresponding overflow occurred.

## Timing: one 22 ns clock

The board derives several clocks from the 132 ns CDF clock: 22 ns spaced
tap-delayed copies, a 66 ns clock, and CS_132ns, which clocks the CRATESUM
data in. Here all of these become **clock enables on a single 22 ns clock
`clk`**, six ticks per crossing.

- **`clock_gen`** samples `cdf_clk` and counts ticks from its rising edge.
- **`lphase`** (0..5) counts from CS_132ns, which lies CS_delay ticks
  (0..5) after the CDF edge.
- **Enables.** `ce_cs132` is lphase 0; `ce_66` is lphase 0 and 3; `even` is
  lphase 0-2.

SUMET pipeline for the event whose even wedges are registered at lphase 0
of crossing n:

| when | what |
|---|---|
| n, lphase 0 | even words registered |
| n, lphase 3 | even partial sums; odd words registered |
| n+1, lphase 0 / 3 | LUT outputs of even / odd half latched |
| n+2, lphase 0 | SumEx, SumEy, SumEt and overflow flags |
| n+2, lphase 1-2 | squares, MET^2 |
| n+2, lphase 5 | `dataout` register and trigger bits |

Input to result takes 17 ticks = 374 ns, inside the three-crossing
(396 ns) budget.

### FRED alignment

The trigger bits and the delayed B0 tag then enter the FRED pipeline
(`fred_pipeline`):

- an 8-deep shift register clocked once per crossing;
- a coarse tap `fred_delay[5:3]`;
- an output register loaded on tick `fred_delay[2:0]` + 1 (fine delay in
  22 ns steps, 0-5).

## L1 FIFOs, DAQ buffers and Level 2

In run mode, once the first delayed B0 has been seen, one 72-bit word per
crossing is written into eight 256 x 9 FIFOs:

- `dataout` (56 bits);
- the bunch number (8 bits);
- 8 spare bits.

An L1 accept or reject reads one word. The previous word's SumEt is kept
aside.

On an accept, DAQ buffer `L1BA` (0-3) is written, and `FP_str` goes high
for 44 ns while the L2 port shows {SumEy, SumEx, SumEt}. Each DAQ buffer
holds four 32-bit words, read over VME:

| word | contents |
|---|---|
| 0 | board ID (24 bits), bunch number (8 bits) |
| 1 | 8'h0, MET trigger bits (23:22), SumEt trigger bits (21:20), FRED-delayed bits (19:16), MET^2 (15:0) |
| 2 | FRED-delayed B0 (31), SumEy (30:21), SumEx (20:11), SumEt (10:0) |
| 3 | SumEt of the previous crossing (10:0) |

## VME map and the controller

`vme_interface` responds to A32 data and block-transfer address modifiers
whose A[31:27] matches the slot (geographical address). It latches
A[26:2], and increments the address after each beat of a block transfer.

The controller decodes A[23:20] and answers with an acknowledge:

- after 6 ticks (132 ns) for most targets;
- after 30 ticks for `dataout` reads, so that a fake event can propagate.

| A[23:20] | target | access |
|---|---|---|
| 0 | control registers, word A[5:2], data in D[31:24] | R/W (RO words 6-9) |
| 1 | module ID, 32 ASCII characters | RO |
| 4 | LUT pair A[16:15], bank A[14], entry A[13:2]; D[11:0] = LUT 2p, D[23:12] = LUT 2p+1 | R/W |
| 5 | threshold pair A[2] | R/W |
| 6 | `dataout` words (A[15]), computed from fake E_t words taken from A[14:2] | RO |
| 7 | L1 FIFO pattern write | WO |
| 8-B | DAQ buffer 0-3, word A[3:2] | RO |

Control registers:

| word | contents |
|---|---|
| 0 | B0_offset |
| 1 | CS_delay |
| 2 | fred_delay |
| 3 | {L1BA[1:0], L1B_W, FIFO_R, FP_str, BP_trigbits_en, reset, run} |
| 4 | FF_mask |
| 5 | aux control |
| 6 | FIFO full flags (read only) |
| 7 | FIFO empty flags (read only) |
| 8 | controller version and source switch (read only) |
| 9 | data processor version (read only) |

**Modes.** `run = 0` is load mode; `run = 1` is run mode.

- In run mode only these accesses take effect: reading the DAQ buffers,
  registers, module ID and thresholds, and writing the run bit.
- Every other access is still acknowledged, but does nothing (reads return
  0).
- In load mode, writing word 3 with FIFO_R and/or L1B_W set moves one FIFO
  word to a DAQ buffer. Together with the FIFO pattern writes, this lets
  the DAQ chain be tested step by step.

**Run-side control.** The controller latches the P2 lines on the CDF tick:

- **_HALT** stops all FIFO and buffer traffic.
- **_RESET**, but only while halted, clears the FIFOs and the error flag.
- **FIFO writing** resumes at the next delayed B0.
- **_L1A/_L1R** pop the FIFO whenever the board runs and is not halted.
- **_cdf_error** latches any unmasked FIFO-full flag.

## TOWTRG

The TOWTRG program registers the two 10-bit packets that each CRATESUM
sends per crossing, and combines the twelve inputs into one 20-bit summary:

- the three 2-bit di-object counts (first packet, bits 5:0) are added and
  saturated at 3;
- all single-object bits are ORed.

The summary goes to the FIFO side (`tt_summary`) and, through the same FRED
pipeline 20 bits wide, to FRED (`tt_fred`). In the top it runs next to the
SUMET board, with its own inputs and delays, and has no separate VME or DAQ
side.

## Files

| file | role |
|---|---|
| `rtl/prefred_pkg.sv` | shared types: wedge words, LUT formats, VME targets, the `dataout_t` struct |
| `rtl/prefred_top.sv` | the board: all blocks below, plus TOWTRG beside it |
| `rtl/clock_gen.sv` | 22 ns tick grid, CS_delay, 66 ns enables |
| `rtl/vme_interface.sv` | VME slave: AM/slot match, strobes, block-transfer address counter |
| `rtl/controller.sv` | address decode, acknowledge, registers, run/load rules, L1 sequencing (uses `b0_bunch`) |
| `rtl/b0_bunch.sv` | B0 delay (0-63 crossings) and bunch counter |
| `rtl/sumet_data_processor.sv` | SUMET FPGA; uses the four blocks below plus `met_square`, `threshold_compare`, `fred_pipeline` |
| `rtl/sumet_adder_a.sv` | partial sums X_g, Y_g and pair sums |
| `rtl/lut_addr_mux.sv` | LUT address routing (even/odd/VME) |
| `rtl/sumet_xy_sum.sv` | SumEx / SumEy |
| `rtl/sumet_et_sum.sv` | SumEt |
| `rtl/phi_lut_sram.sv` | 16K x 16 SRAM |
| `rtl/met_square.sv` | MET^2; uses `square_rom.sv` |
| `rtl/threshold_compare.sv` | threshold registers and trigger bits |
| `rtl/fred_pipeline.sv` | coarse/fine FRED delay |
| `rtl/daq_interface.sv` | eight FIFOs (`l1_fifo.sv`), previous-SumEt register, DAQ buffers |
| `rtl/towtrg_logic.sv` | TOWTRG summary logic |
| `rtl/towtrg_data_processor.sv` | TOWTRG program |

Testbenches are named `tb/tb_<module>.sv`; `tb/tb_prefred_run_test.sv` is a
second board-level test that follows the bench procedure. `tb/sumet_ref_pkg.sv` is an
independent reference for the SUMET arithmetic. It works from the wedge
angles rather than from the RTL's adder structure.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, to run the end-to-end board test with default parameters:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
      rtl/prefred_pkg.sv tb/sumet_ref_pkg.sv tb/tb_prefred_top.sv \
      --top-module tb_prefred_top -Mdir obj_top
    ./obj_top/Vtb_prefred_top

A block test is built the same way with its own testbench file. Simulated
time is 1 unit per half tick; the testbenches use `always #1 clk = ~clk`.

`tb_prefred_top` works like a crate:

1. It reads the module ID and loads all six LUTs with 192 VME block
   transfers of 64 words.
2. It sets the thresholds and registers, reads back fake-E_t results, and
   fills the FIFOs to full to see the error line.
3. It then runs about 1000 crossings of random events with B0, L1
   accepts/rejects, HALT and HALT+RESET, and two FRED delays.
4. It checks the FRED bits every crossing, the L2 data on every accept, and
   the DAQ buffers over VME. The TOWTRG program is checked every crossing.

It counts each mechanism and fails if one never occurred.
`tb_sumet_data_processor` checks the SUMET latency tick by tick.

`tb_prefred_run_test` follows the bench procedure for a board fed by a test
card:

1. The card changes its words every 66 ns, timed to CDF_clk only.
2. For each CS_delay from 0 to 5 the bench makes a short run: FIFO reset,
   run mode, one B0, then back to load mode. It moves every stored event to
   a DAQ buffer with FIFO_R / L1B_W / L1BA and reads it with a block
   transfer.
3. It requires that some CS_delay values give correct, gap-free events and
   that others give wrong ones. With this clocking, 3 of the 6 values pass
   (0, 1 and 5). The bench takes the first good value after a bad one,
   which has the smallest latency.
4. It scans B0_offset from 4 upwards. The first event read must carry
   bunch 0, and the bunch numbers must count up. Exactly one offset must
   tag bunch 0 on the event meant for bunch 0. The bench's test card sends
   that event 3 crossings after B0; the real lag comes from outside the
   board.
5. It tries the six fine FRED delays and one coarse step. The backplane
   trigger bits from the b0_fred crossing on must be those of the events
   from bunch 0 on. They must shift by one tick per fine step and one
   crossing per coarse step.
6. With the chosen values it fills all 256 FIFO entries and reads every
   one back.

In this RTL, the event tagged bunch 0 is the one that arrived
`B0_offset - 2` crossings after B0. If B0 and the data of bunch 0
arrived in the same crossing, the offset would be 2. The document only
says the offset must include the processor latency and be more than 3.

## How far it can be trusted

All testbenches pass, and a deliberately broken copy of every module makes
its testbench fail. The arithmetic is compared with a model built from
geometry. Agreement is exact, including rounding in the tables and all
saturation cases.

Points where this RTL makes its own choices, or departs from the board as
specified:

- **Clocking.** One 22 ns clock with enables replaces the analog delay lines
  and the clock symmetriser. CDF_clk passes two sampling flops, which adds
  a fixed offset that CS_delay absorbs.
- **Split buses.** Bidirectional buses (VME data, SRAM data) are split into
  input and output ports. Open-collector VME outputs are plain active-low
  signals.
- **Synchronous models.** The asynchronous SRAMs and FIFO chips are modelled
  with writes on the clock edge. The FIFOs are synchronous and ignore writes
  when full and reads when empty.
- **Fake E_t mapping.** How the VME address bits become the twelve fake
  words is not specified. Here word i is bits i..i+9 of A[14:2] repeated
  twice, so published example values for that test will not match.
- **Board ID.** It is not stored in the FIFOs (it would not fit in 72
  bits). The buffer header takes it straight from the board.
- **FIFO pattern writes.** A VME pattern write puts {D[7:0], D, D} across
  the 72 FIFO bits.
- **Error line.** It uses all eight FIFO full flags with `FF_mask`. One
  description of the board mentions only four.
- **Own formats.** The module ID string, version numbers, the 30-tick
  acknowledge for `dataout` reads, strobe lengths, and the handling of
  refused run-mode accesses are this design's choices.
- **MET threshold reconfiguration.** The 3 or 4 MET thresholds are chosen
  by a parameter; how the real board selects them is not known.
- **TOWTRG.** The bit positions inside the packets are an assumption (only
  the di-object counts being in the first packet is given). The TOWTRG B0
  tag is not carried.
- **B0_offset value.** The event tagged bunch 0 is the one that arrived
  `B0_offset - 2` crossings after B0. Which offset the real board needs
  depends on when the data for bunch 0 arrive. That lag is set outside
  the board, so the offset cannot be checked against a known value.
- **Undelayed trigger bits.** They exist inside the data processor but
  leave the board only through the FRED pipeline.

Not built, because they hold no logic:

- the line-receiver mezzanine for the 120 inputs;
- the J3 backplane;
- the front-panel connectors and LEDs (the LED drive is in the controller);
- the FPGA configuration PROMs;
- the analog delay lines;
- the VME transceivers.
