# Digital readout controller for SCA-based gas-detector front ends

Gas detectors such as cathode-readout drift chambers (CRDC) and parallel-plate
avalanche counters (PPAC) can be read with front-end boards (FEE) of the STAR
TPC type. Each board amplifies and shapes 32 pad signals, stores them in a
*switched capacitor array* (SCA, an analog shift register of capacitor cells)
and digitises them with on-chip ramp ADCs. This RTL is the controller that uses
that analog memory instead of bypassing it. It runs in the FPGA of a CAMAC
logic module and does four things:

* it drives the 16 FEE control lines, so the SCA samples the detector signals
  and the wanted cells are read out and digitised;
* it reads the digitised values back over a 32-bit parallel bus from up to 8
  boards (256 channels);
* it drops every value that is not above a programmable threshold and subtracts
  the threshold from the values it keeps;
* it writes what is left, tagged with channel and cell, into the module's
  static memory. A readout program then reads that memory over CAMAC.

The controller has two ways of using the analog memory:

* **CRDC.** A trigger starts the sampling, and afterwards a "digital gate" of
  consecutive cells is read. The position of the gate is either fixed or
  written by the readout program once an external TDC has measured the
  electron drift time.
* **PPAC.** The SCA samples continuously as a circular analog delay line. A
  trigger that arrives about a microsecond after the signal stops it, and
  the readout looks back a set number of cells.

## Front-end interface

The controller drives the 16 control lines listed below, at the pin levels
given here. The names, meanings and polarities come from the FEE. The
polarities of ADC_OE and CARD_ENA were not available and are assumed active
high.

| line | meaning |
|---|---|
| RW_MUX | SCA write (0) / read (1) |
| SCA_CLK | falling edge: scroll to the next cell. Rising edge: connect it. Idles high |
| SR_RES | reset the SCA shift register to cell 0 |
| AN_RES | reset the SCA output amplifier, active high |
| ADC_CLK | ADC counter clock (boards of revision E do not need it) |
| ADC_RES | ADC counter and ramp reset, active low |
| ADC_LD | load the ADC output buffers, active high |
| ADC_ADR[3:0] | channel multiplexer address, active low |
| ADC_OE1/2 | output enable of SCA/ADC chip 1 (channels 1-16) / chip 2 (17-32) |
| CARD_ENA1/2 | enable card 1 / card 2 of a pair |
| SAS_RES | preamplifier-shaper reset, active high (a register bit) |

The boards work in pairs, and each pair drives one byte of the 32-bit data
bus. One multiplexer step therefore reads four channels, one per pair. 64
steps (2 cards × 2 chips × 16 addresses) read all 256 channels of one SCA
cell. A step lasts 100 ns, so a cell takes 6.4 µs. In the memory, channel
numbers are `{pair[1:0], card, chip, address[3:0]}`, from 0 to 255.

The clock is assumed to be **80 MHz** (12.5 ns). The two figures that fix it
are a 25 ns sample period (2 clocks) and a 100 ns multiplexer step (8 clocks).

## The analog memory and how the sequencer moves through it

All control of the SCA goes through its shift register. It can only scroll
forward or be reset to cell 0. The controller (`fee_sequencer`) assumes the
following behaviour of the array:

* After SR_RES, cell 0 is connected to the input (write mode) or to the output
  amplifier (read mode).
* A falling edge of SCA_CLK disconnects the connected cell and connects the
  next one. In write mode the disconnected cell then holds the sample taken at
  that edge. The 512th cell is followed by cell 0 again.
* In write mode, an SR_RES pulse also disconnects (stores) the connected cell
  before it returns to cell 0. The PPAC mode uses this pulse in place of a
  scroll to wrap from the last cell to cell 0.

So "cell k" always means the k-th cell after a shift-register reset. Cells are
written one sample period apart. Reading cell c means: reset, then c scroll
pulses (one per 4 clocks), then reading the cell, then one more pulse for the
next cell.

### Run modes

The mode is set in register A0.

* **CRDC (mode 0).** A trigger makes the sequencer reset the shift register
  and write `n_samples` cells. Each cell takes `sample_div` clocks: SCA_CLK is
  low for the first half and high for the second. After the last cell it
  switches to read mode and reads `width` cells, starting at `start`. The
  default settings reproduce the reference run: 510 samples of 25 ns
  (12.75 µs), a gate from cell 135 and 12 cells read.
* **CRDC2 (mode 1).** This mode samples like CRDC, then waits. The readout
  program reads the TDC and turns the drift time into a cell number (drift
  time / sample period). It then writes that number to the `start` register,
  and the write releases the gate. A write made before the sampling has
  finished, but after the trigger, is remembered.
* **PPAC (mode 2).** The sequencer samples without pause and wraps around
  the 512 cells. A trigger stops it at the end of the current sample. If L is
  the last cell written, the gate starts at `(L - lookback) mod 512`. A gate
  that runs past cell 511 wraps to cell 0 with an SR_RES pulse. With 25 ns
  sampling, a 1 µs trigger latency is a `lookback` of 40.
* **Off (mode 3).**

Once a gate has been read, the controller raises the CAMAC LAM and stays busy
until the readout program clears the LAM (F10). PPAC sampling restarts at that
point. While the gate is read, the detector is not sampled. The `busy` output
shows when a trigger would be ignored.

### Reading one cell (`adc_readout`)

| phase | clocks | lines |
|---|---|---|
| amplifier reset | 4 | AN_RES high |
| settle | 4 | – |
| conversion | 32 | ADC_RES released (high), ADC_CLK at clk/2 |
| load | 2 | ADC_LD high, ADC_RES still high |
| multiplexer | 64 × 8 | CARD_ENA, ADC_OE, ADC_ADR step through card → chip → address |
| gap | 8 | – |

A cell takes 562 clocks (7.0 µs), and 6.4 µs of that is the multiplexer. The
lengths of the reset, settle, conversion and load phases are parameters. They
are not known for the real chip, so check them against its data sheet
(`CONV_CYCLES` in particular).

## From the data bus to memory

The sequencers do not pass data. They send **tokens** down the data path:

* event start;
* cell (sent as the cell's AN_RES begins);
* capture (sent in the last clock of each multiplexer step, carrying the step
  number);
* event end.

The tokens from both sequencers merge into one stream.

**Return delay (`data_delay`).** The control lines leave the FPGA through a
register, cross the interface board and cables, and the selected byte comes
back some time later. Another register samples it. Capture tokens are delayed
by the `delay` register, 0 to 15 clocks. Let D be the number of clocks between
a control line changing at the FPGA pin and the data changing at the FPGA pin.
The byte is latched inside its step for any delay from D − 5 to D + 2. Values
near D − 2 sit in the middle of that window. Real boards need settling time,
so set the delay by scanning it with a pulser.

**Zero suppression (`zero_suppress`).** A capture token latches the 32-bit
word. Over the next four clocks, each byte strictly above `threshold` becomes
a hit of value `byte − threshold`. Bytes at or below it are dropped and
counted. All channels share one threshold, and it can be changed between
events.

**Event building (`event_builder`).** Each item becomes one 24-bit word at
the next address:

| word | bits |
|---|---|
| header | `1 000 event[19:0]` (event number since the last pointer clear) |
| cell | `1 001 00000000000 cell[8:0]` (cell the following hits come from) |
| hit | `0 0000000 channel[7:0] value[7:0]` |
| trailer | `1 010 hits[19:0]` (hits in this event) |

The static memory is taken as 1M words of 24 bits (3 MB, the CAMAC word
width). When it is full, further words are dropped and a sticky overflow flag
is set until the pointers are cleared. In the reference CRDC event the worst
case is 3086 words. `mem_ctrl` shares the single memory port: writes always
win, and CAMAC reads use the free clocks. Reads are prefetched, so a CAMAC
cycle never waits.

## CAMAC programming model (`camac_slave`)

The controller synchronises the strobes S1 and S2. Register writes take effect
at S1, and actions (pointer advance, clears) at S2. R, Q and X are valid while
N is asserted.

| command | action |
|---|---|
| F16 A0–A7 / F1 A0–A7 | write / read a register |
| F0 A0 | read the memory word at the read pointer and advance. Q = 0 when no unread word is left |
| F0 A1 | words stored (write pointer) |
| F0 A2 | status: bit 23 overflow, 22 LAM, 21 busy, 19:0 event count |
| F8 A0 | test LAM (Q) |
| F9 A0 | clear the memory pointers, the event count and overflow |
| F10 A0 | clear the LAM and re-arm the sequencer |
| F17 A0 | load the read pointer |
| F25 A0 | software trigger |
| Z·S2 | registers to their defaults, pointers and LAM cleared. C·S2: pointers and LAM cleared. I: triggers inhibited |

| register | content | default |
|---|---|---|
| A0 | [1:0] mode, [2] SAS_RES | off |
| A1 | total samples (CRDC) | 510 |
| A2 | sample period in clocks (≥ 2) | 2 (25 ns) |
| A3 | threshold | 0 |
| A4 | return delay in clocks | 0 |
| A5 | first cell of the gate. A write releases a waiting CRDC2 event | 135 |
| A6 | gate width in cells | 12 |
| A7 | PPAC lookback in cells | 0 |

A CRDC2 readout program runs these steps:

1. Load the registers, then write mode 1.
2. On each event, read the TDC, compute the start cell, and write it with
   F16 A5.
3. Wait for the LAM.
4. Read words with F0 A0 until Q = 0.
5. Clear the LAM with F10 and the pointers with F9.

## Modules

| file | role |
|---|---|
| `rtl/ulm_pkg.sv` | shared types: run parameters, control-line bundle, tokens, items, word formats |
| `rtl/ulm_top.sv` | top: trigger synchroniser, pin registers, wiring |
| `rtl/camac_slave.sv` | CAMAC dataway slave, registers, LAM, memory reads |
| `rtl/fee_sequencer.sv` | SCA write / wait / scroll / read control, three modes |
| `rtl/adc_readout.sv` | one-cell conversion and 64-step multiplexer sequence |
| `rtl/data_delay.sv` | programmable return delay of the token stream |
| `rtl/zero_suppress.sv` | threshold comparison and subtraction |
| `rtl/event_builder.sv` | memory word formatting, write pointer, overflow |
| `rtl/mem_ctrl.sv` | single-port memory sharing |

The memory port, the CAMAC dataway, the trigger, `busy`, the 16 control lines
and the 32-bit data bus are the top's ports. Only the FPGA logic is RTL. The
static memory, the analog FEE parts (preamplifier-shaper, SCA, ADC), the
interface board's level translators, the multihit TDC and the module's DSP are
outside it.

## Simulation

The testbenches use two behavioural models:

* `tb/fee_model.sv`: eight boards with the SCA, ADC and multiplexer behaviour
  described above, a cable delay, and a synthetic pulse on every channel.
* `tb/sram_model.sv`: the static memory.

Every testbench checks its own results and prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ulm_pkg.sv tb/tb_ulm_top.sv --top-module tb_ulm_top
obj_dir/Vtb_ulm_top
```

| testbench | what it checks |
|---|---|
| `tb_ulm_top` | CRDC, CRDC2 and PPAC events through CAMAC, with every memory word compared against the samples the FEE model stored. Also covers the sampling and readout wrap, the CRDC2 wait, memory overflow (4096-word memory), LAM and Q-stop, sample spacing, the 6.4 µs per cell, and that a return delay outside its window corrupts the data |
| `tb_ppac_lookback` | PPAC use at 25 ns sampling: a pulse, the trigger 1 µs later, a lookback of 46 cells. The pulse peak must fall inside the 16-cell gate for three ring positions, one of them wrapping |
| `tb_ulm_top_full` | one reference CRDC event (510 × 25 ns, cells 135–146) with every parameter at its default, including the 1M-word memory |
| `tb_camac_slave`, `tb_fee_sequencer`, `tb_adc_readout`, `tb_data_delay`, `tb_zero_suppress`, `tb_event_builder`, `tb_mem_ctrl` | each block alone |

All testbenches finish in well under a second. With the FEE model's 6-clock cable, `tb_ulm_top_full` passes for every delay setting from 1 to 8 and fails at 0 and 9, which is the D − 5 … D + 2 window given above.

## What follows the original system and what does not

The following come from the original system:

* the control lines and their meanings;
* the pairing of boards on a 32-bit bus;
* the 100 ns step and 6.4 µs per sample;
* the three ways of using the SCA: triggered CRDC, CRDC with the gate start
  from the TDC, and PPAC look-back;
* the run parameters (samples, sample frequency, threshold, delay, start,
  width);
* thresholding with subtraction before storage;
* storage in the module's memory for CAMAC readout.

The following are this design's own choices and should be checked before the
RTL is used on hardware:

* the 80 MHz clock;
* the 512-cell array depth;
* the SCA addressing model above;
* the ADC phase lengths;
* the read order within a pair;
* the polarities of ADC_OE and CARD_ENA;
* the CAMAC function codes and register map;
* the memory word format, the 24-bit memory organisation and the overflow
  rule;
* the LAM / re-arm handshake;
* the register stages at the pins.

Not included:

* the two-gate variant of the CRDC2 mode for double hits, which is an
  extension of the original system rather than part of its running
  configuration;
* any processing of the stored pulses (integration, centroid fitting);
* the planned VME successor of the logic module.
