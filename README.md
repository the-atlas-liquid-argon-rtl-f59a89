# Processing unit of a calorimeter read-out driver

This is the logic of a DSP processing-unit mezzanine for a calorimeter read-out driver.
Each front-end board (FEB) digitises 128 calorimeter cells with 16 ADCs and sends every
triggered event over a 17-bit, 80 MHz link. The processing unit has to:

- take that stream apart,
- check it word by word,
- lay it out in memory in the order a DSP's filtering code wants, and
- hand it over to the DSP without the DSP ever waiting on the link.

Around this data path sit the board services: trigger (TTC) information forwarded to the
DSPs over serial ports, and a VME-visible register file that resets, configures and talks
to the DSPs and to the input FPGAs.

The RTL covers both FPGAs of the board:

- **Input FPGA (`in_fpga`)**, one per DSP. Each holds two independent FEB channels. The
  second channel is the "staged" FEB, used when a board serves twice the usual number of
  FEBs.
- **Output FPGA (`out_fpga`)**, one per board. It holds the TTC and VME interfaces.

The top level, `rod_pu`, has two input FPGAs and one output FPGA. It takes four FEB links
and two DSPs' worth of pins. The DSPs, their output FIFOs and the motherboard are outside
the RTL; their signals are ports of `rod_pu`.

```
 FEB1 ─┐   in_fpga #0 ── EMIFA / EXT_INT4,5 ──► DSP 1
 FEB3 ─┘
 FEB2 ─┐   in_fpga #1 ── EMIFA / EXT_INT4,5 ──► DSP 2
 FEB4 ─┘
 TTC, VME ── out_fpga ── McBSP0/1/2, reset/control lines, InFPGA config pins ──► both
```

## One FEB channel

A channel is four blocks in a row:

```
feb_data[16:0] ─► feb_parallelizer ─► data_organizer ─► dpram (2 banks) ─► dsp_interface ─► EMIFA
      80 MHz        words + status      row/lane writes     64 x 512         120 MHz
```

### The link and the parallelizer (`feb_parallelizer`)

The FEB's 16 ADCs come in two halves (ADC 0-7 and ADC 8-15) that share the link in
alternate clock cycles:

- `feb_data[16]` says which half is on the bus in the current cycle.
- `feb_data[2i+1:2i]` carries two bits of ADC *i* (or *i+8*), most significant pair first.

So every 16 clocks, each of the 16 ADCs completes one 16-bit word. The parallelizer keeps
one shift register per ADC.

An event starts when ADC 0 of the first half holds the start tag `FFFF`. From then on, a
counter frames every word of every ADC. Each ADC sends this sequence per event:

| word | content |
|------|---------|
| start tag | `FFFF` |
| ctrl1 | parity, ADC id, phase, event number |
| ctrl2 | parity, BCID |
| per sample: RADD | parity, cell address and flags, then 8 × *nb_gains* data words (parity, gain, 12-bit ADC value) |
| ctrl3 | SCAC status, `4801` or `0805` |
| end tag | `0000` |

The number of samples and gains is not in the stream. It comes from the configuration
register, so a mis-configured channel shows up as framing errors in the status word.

The 16 words with the same index form a group. Each group is checked as a whole, then sent
out one word per clock in the order ADC0, ADC8, ADC1, ADC9, … ADC7, ADC15. Each word is
tagged with its kind, sample, gain and channel (`rod_pkg::feb_word_t`). Because a group
takes 16 clocks to arrive and 16 clocks to leave, the parallelizer keeps up with the link
at full rate with no buffering.

The checks fill an 18-bit event status word (bit numbers in `rod_pkg`, `ST_*`). The working
word is cleared at each start tag. At the last end-tag word (`evt_done`) it is copied to the
`status` output, which then holds the status of the last finished event. Events may follow
each other with no idle clock, as at the full 100 kHz rate with 5 samples:

| bit | meaning |
|-----|---------|
| 0 | start tag missing on one of the 16 ADCs |
| 1, 2, 3, 4 | EVTID/phase, BCID, RADD or SCAC status differ between the ADCs of one half |
| 5 | a channel's gain changed between samples |
| 6 | odd-parity error (all words except the start and end tags) |
| 7, 8, 9 | BCID, RADD or EVTID/phase differ between the two halves |
| 10 | end tag missing on one of the 16 ADCs |
| 11, 12 | ctrl3 of half 1 or half 2 is not a valid SCAC status |
| 13 | a word of all zeros or all ones inside the event |
| 14 | ADC 0's identifier is not zero |
| 15 | 0 on the first FEB's channel, 1 on the staged FEB's channel |
| 16 | the event did not start with the half-FEB flag at 0 |
| 17 | the half-FEB flag stopped alternating |

### Memory layouts (`data_organizer`)

Each channel owns 32 kbit of dual-port RAM (`dpram`: 64 bits × 512 rows) split into two
256-row banks. The organizer writes 16-bit words into lanes of 64-bit rows. Lane 0 is bits
63..48.

Which layout is used is a build-time choice (`FORMAT` parameter). There is one input-FPGA
build per format.

- **Format 0, transparent:** the words in arrival order, parity and gain kept.
  - The ctrl1 and ctrl2 groups take 4 rows each; each RADD group takes 4 rows; each sample
    group takes 32 rows.
  - A final row holds `{status, nb_gains, nb_samples}`.
  - The event is 1 + 12 + 4·ns + 32·ns·ng rows. With 5 samples and 1 gain that is 193 rows.
- **Format 2:** like format 0, with these differences:
  - Row 0 is `{0, 0, EventID, BCID}`.
  - Row 1 is `{ctrl1, ctrl2, nb_gains, nb_samples}`. Only ADC 4's control words are kept.
  - Each channel's gain bits are masked on every sample but the first.
  - The last row is `{status, ctrl3, 0}`.
  - The event is 3 + 4·ns + 32·ns·ng rows.
- **Format 1:** the layout tuned for the filtering code. It is only defined for 5 samples
  and 1 gain.
  - Rows 0-2 hold the status, EventID, BCID, the control words and the five RADDs (ADC 4).
  - Then, for each channel pair (Ck, Ck+64), three rows hold: gain, S1..S5 of Ck, then gain,
    S1..S5 of Ck+64.
  - Samples are stored as the 12-bit value in bits 13..2 with the gain in bits 15..14.
  - The event is always 195 rows.

  Format 1 words land at computed positions, not in sequence. This is why the buffer is a
  RAM and not a FIFO.

### Banks, chunks and the DSP side (`dsp_interface`)

The writer fills one bank while the DSP reads the other. The writer hands a bank over when
either of these happens:

- the event ends, or
- the bank holds *chunk size* rows. The chunk size is configuration bits 15..8, plus 1.

A long event therefore reaches the DSP as a series of chunks. There is one interrupt per
chunk, and the banks alternate. This is how events larger than a bank are carried:
32 samples × 3 gains in format 0 is 3213 rows, which is 13 chunks.

If an event starts while neither bank is free, the event is dropped. The channel pulses
`overflow` and the DSP sees nothing of it. `busy` shows that both banks are waiting for the
DSP.

The hand-over crosses from the 80 MHz FEB clock to the DSP's 120 MHz EMIFA clock:

- Per bank, the writer toggles `wr_done_tgl` when the bank is full.
- The reader toggles `rd_free_tgl` when it has fetched the bank's last row.
- Each side sees the other's toggles through a two-flop synchroniser.
- The row count of each bank is stable before its toggle changes.

On the DSP side, a newly ready bank raises a one-clock interrupt. `EXT_INT4` is for the
first FEB and `EXT_INT5` for the staged one. The DSP then reads the bank like a FIFO:

- Every clock with the channel's chip enable and `are_n` both low fetches the next row.
  `CE3` selects the first FEB and `CE1` the staged one.
- The row appears on `ed` two clocks later, marked by `ed_valid`.
- Reads while no bank is ready return nothing.

Both channels of an input FPGA share the 64-bit data bus. An assertion checks that only one
chip enable is active at a time.

### Configuration

The 16-bit configuration register of each input FPGA holds:

| bits | field |
|------|-------|
| 15..8 | chunk size − 1 |
| 7..6 | number of gains |
| 5..0 | number of samples |

It resets to `FF45`: chunks of 256 rows, 1 gain, 5 samples. The output FPGA writes it as a
16-bit word plus a toggle, synchronised into the FEB clock. A toggle level already present
when the input FPGA leaves reset is ignored. The status register reads
`{version (0355), configuration}`.

### Input-FPGA pins

- **LEDs:** LED1 follows the DSP's GP0 and LED2 its GP3.
- **TINP1:** the AND of the two LinkLocked signals.
- **Test points:** TP1 shows a FEB 1 event arriving and TP2 the DSP reading FEB 1 data.
  TP3 shows BUSY (a FEB channel has no free bank). TP4 is a 5 MHz clock for the
  watchdog: the FEB clock divided by 16.
- **PU IRQ and BUSY:** the DSP's GP9 and GP10 pass through the input FPGA as `pu_irq` and
  `pu_busy`. `pu_busy` is also raised while a FEB channel has no free bank.

## Output FPGA (`out_fpga`)

### TTC forwarding (`ttc_interface`)

The motherboard sends two serial streams on a 40 MHz clock. Each frame is a frame pulse,
then data bits most significant bit first from the next clock:

- {BCID (12 bits), event ID (32 bits)}
- trigger type (8 bits)

Each stream is deserialised (`serial_rx`) and queued (`sync_fifo`, 16 frames). It is then
sent as one frame to both DSPs:

- McBSP0 carries the 44-bit {BCID, event ID} frame.
- McBSP1 carries the trigger type.

A frame cut short by a new frame pulse sets `frame_err`. A frame arriving while the queue is
full is lost and sets `overflow`.

### Registers (`vme_registers`)

A plain register bus stands in for the link from the motherboard's VME FPGA:
`addr[4:0]`, `wr`, `rd`, and 32-bit data. Address bit 4 selects DSP block 1 or 2. The low
four bits select:

| addr | register | access |
|------|----------|--------|
| 0 | test | R/W |
| 1 | control | R/W |
| 2 | HPI | R/W |
| 3 | status | R |
| 4 | broadcast HPI | W |
| 5 | word to McBSP2 | W |
| 6 | word from McBSP2 | R, pops |
| 7 | InFPGA configuration | W |
| 8 | InFPGA programming byte | W, bits 31..24 |
| 9 | InFPGA status | R |
| 10 | broadcast programming | W |
| 11 | version | R |

- **Control bits 0-6:** DSP reset, partial FIFO reset, input-FPGA reset, HPI reset,
  HPI burst, DSP launch, input-FPGA nCONFIG.
- **Status register** collects:
  - the output-FIFO read counter and flags,
  - the McBSP2 receive-FIFO fill level and flags (almost full above 24, full at 32),
  - GP11-GP13, HPI INT and ready,
  - the input FPGA's nSTATUS and CONF_DONE.
- **McBSP2** goes both ways. A write sends a 32-bit frame to the DSP. Frames from the DSP
  fill a 32-word FIFO that address 6 pops.

### Other output-FPGA functions

- **Input-FPGA programming** (`infpga_programmer`): one byte at a time on `data0`/`dclk`,
  least significant bit first, at 40 MHz / 8 = 5 MHz. A broadcast write programs both input
  FPGAs.
- **FIFO read counter** per DSP: counts the words the output controller reads from that
  DSP's output FIFO. It pulses `EXT_INT7` every 256 words and is cleared by the DSP's GP13.
- **FIFO flags to the DSPs:** each DSP gets its own output FIFO's almost-full flag on
  GP6/EXT_INT6 and its empty flag on GP14.
- **LEDs and test points:** LED1 is FIFO 1 empty, LED2 is FIFO 1 almost full. The test
  points show GP11, the TTC BCID frame and GP12. TP4 ("PU CTRL ADD") pulses on every
  register access.

## Clocks and resets

| clock | frequency | used by |
|-------|-----------|---------|
| `feb_clk` | 80 MHz | parallelizers, organizers, RAM write ports, configuration registers |
| `emif_clk[d]` | 120 MHz per DSP | RAM read ports, `dsp_interface` |
| `clk` | 40 MHz | the whole output FPGA |

All resets are asynchronous and active low. Control bit 2 holds the matching input FPGA in
reset. This also restores its configuration to `FF45`.

## Departures and limits

- **The motherboard link:** the six-line protocol to the VME FPGA is replaced by the simple
  register bus.
- **Output FPGA to input FPGA link:** this serial link is replaced by a parallel word with a
  toggle.
- **HPI:** the HPI protocol engine is not included. HPI register reads and writes come out
  as strobes and data, for an external engine.
- **FPGA configuration:** the input FPGA's own configuration (what `data0`/`dclk` program) is
  outside the logic. `nCONFIG`, `nSTATUS` and `CONF_DONE` are only wired to registers and
  pins.
- **Format 1** is only built for 5 samples and 1 gain, and it is applied whatever the
  configuration says.
- **SCAC status:** both `4801` and `0805` are accepted as a good status.
- **Read latency:** the DSP-side latency is 2 clocks from read strobe to data. A DSP
  configured for 3-cycle reads includes its own input register.
- **Dropped events:** an event that finds no free bank is dropped whole. There is no
  back-pressure to the FEB link.
- **Own choices, not taken from a specification:**
  - the TTC queue depth,
  - the 44-bit McBSP0 frame,
  - the one-clock gap after every frame pulse,
  - LSB-first programming.

## Files

- **`rtl/`**: one module or package per file.
  - `rod_pkg.sv` holds the shared word types, the status-bit numbers and the configuration
    struct.
  - `serial_rx`, `serial_tx` and `sync_fifo` are small helpers.
- **`tb/`**: one self-checking testbench per block (`tb_<module>.sv`).
  - `feb_tb_pkg.sv` generates FEB events and the expected memory rows for all three formats.
    The ADC values come from a formula, so no data files are needed.
  - Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_rod_pu` runs the whole board at its default parameters. It sends:

- simultaneous events on four FEBs, read back by both DSP models,
- a parity error,
- a 7-sample event in 100-row chunks (configuration written over the register bus),
- an input-FPGA reset,
- two events that fill both banks and a third that is dropped,
- TTC frames,
- McBSP2 traffic both ways,
- a programming byte,
- 260 output-FIFO reads.

It counts each of these mechanisms and fails if any of them did not happen.

`tb_workloads` runs the event sizes and the trigger rate on three input FPGAs, built for
formats 0, 2 and 1:

- Every size in the format 0 and format 2 tables is tested: 3, 5, 7, 16 and 32 samples,
  with 1 or 3 gains.
- For each size, the testbench checks the table's row count, the number of chunks
  (rows / 256, rounded up) and every row.
- Format 1 is tested with one 5-sample, 1-gain event of 195 rows.
- The rate test sends twenty 5-sample events back to back with no idle clock. This is
  100 kHz. No event may be dropped, and the interrupts must come 10 µs apart.
- The staging test sends ten such events on both links of one input FPGA at once. The DSP
  model serves both channels over the shared data bus. No event may be dropped, and each
  channel must raise ten interrupts.

To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rod_pkg.sv tb/feb_tb_pkg.sv tb/tb_rod_pu.sv -y rtl --top-module tb_rod_pu -o sim
./obj_dir/sim
```

Replace `tb_rod_pu` with any other testbench name. The testbenches reset or initialise
everything they read, so they also pass with random initial register values
(`+verilator+rand+reset+2`).
