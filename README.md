# CCD camera controller as an algorithmic state machine

This is the digital front end of a CCD camera controller. It was first built
around a DSP processor; here it is a single clocked state machine for an FPGA.
The host PC steps the controller through its work with 24-bit serial commands:
bootstrap, load the bias DACs, set static control lines, clear the CCD rows,
pre-flush, take the read-out parameters, read a frame, reset. Each executed
command is answered with the byte `AA`. During read-out the controller makes the
CCD clock waveforms and the controls of the analog correlated double sampling
(DCS) integrator. It starts the ADC once per binned pixel and sends every
16-bit sample to the host over an 8-bit parallel port with a strobe.

Only the digital part is here. The CCD and its dewar, the preamplifier, the
analog DCS integrator, the ADC, the DACs and clock drivers of the bias board,
the RS-422 line drivers and the host are all outside this design. The
controller's side of each of them is brought out as ports.

```
 host serial Rx/Clock ──► cmd_rx ──word──► asm_ctrl ──ack──► ack_tx ──► host serial Tx/Clock (AA)
                                             │  ▲
                              wg_start/seq   │  │ wg_done
                                             ▼  │
                                           wavegen ──► sbits[15:0]  (CCD clocks, DCS controls)
                          adc_start ◄── asm_ctrl ◄── adc_done/adc_data  (external ADC)
                                        asm_ctrl ──► pix_port ──► pd[7:0], pstb  (host data port)
                                        asm_ctrl ──► dac_load/dac_data, gpo       (bias board, static lines)
```

All blocks run on one clock `clk` and share an asynchronous, active-low reset
`rst_n`. The numbers below assume a 50 MHz clock.

## The state machine and how the host drives it

`asm_ctrl` has twelve states. Their codes and the transitions between them
come from the original design's state table:

| code | state | leaves for | when |
|---|---|---|---|
| 0000 | T0 IDLE | T1 | `start` input high |
| 0001 | T1 BOOTSTRAP | T2 | A1[16] |
| 0010 | T2 LOADDAC | T3 | A1[17] |
| 0011 | T3 OUTDATA | T4 | A1[18] |
| 0100 | T4 CLRROWS | T5 | A1[21] |
| 0101 | T5 PREFLUSH | T6 | A1[19] |
| 0110 | T6 GETPAR | T7 | A1[22] |
| 0111 | T7 READROW | T8 | rows left, no row shifts left, no prescan rows left |
| 1000 | T8 PRESHIFT | T9 | no preshift left |
| 1001 | T9 STRBDATA | T10 | no binned pixel left in the row |
| 1010 | T10 POSTSHIFT | T7 | no postshift left |
| 0111 | T7 READROW | T11 | no rows left and A1[20] |
| 1011 | T11 RESET | T0 | always |

**A1** is a 24-bit register that holds the last command word received.
Bits 16 to 22 are control bits. Bits 15:0 are a payload. A state first does its
own work. Then it waits until the control bit printed for its exit is set in
A1, clears that bit and moves on. A state whose bit never arrives simply waits,
so the host decides the pace. A word with several control bits set runs
through several states in a row, all of them using the same payload.

What each state does:

| state | work | payload |
|---|---|---|
| T1 BOOTSTRAP | clears the read-out parameters and A1 (commands sent before `start` are dropped) | – |
| T2 LOADDAC | one-cycle `dac_load` with the word on `dac_data` | DAC word |
| T3 OUTDATA | latches the word onto the static outputs `gpo` | output levels |
| T4 CLRROWS | plays the row-transfer waveform N times | N |
| T5 PREFLUSH | plays the flush waveform N times | N |
| T6 GETPAR | every word without bit 22 writes a parameter: index in bits 18:16, value in 15:0 | value |
| T7..T10 | read one frame (next section) | – |
| T11 RESET | clears A1 and the parameters | – |

The parameters (index: name):
0 `NROWS`: binned rows to read.
1 `PBIN`: row binning factor.
2 `SBIN`: column binning factor.
3 `NPIX`: binned pixels per row.
4 `PRESCAN`: rows thrown away before the first row is read.
5 `PRESHIFT`: serial shifts thrown away at the start of each row.
6 `POSTSHIFT`: serial shifts thrown away at the end of each row.
7 `INTTIME`: DCS integration time in clock cycles (bits 7:0). Writing 0
restores the default `INT_TIME`.
Parameters 0 to 6 together select a binned region of interest. BOOTSTRAP and
RESET set them to zero and the integration time to `INT_TIME`.

A typical session, with one word per line (hex):

```
start pulse                       -> T1
01_xxxx  A1[16], DAC word         -> T2, AA
02_xxxx  A1[17], output levels    -> T3, AA
04_000N  A1[18], N row clears     -> T4, AA when done
20_000N  A1[21], N flushes        -> T5, AA when done
08_0000  A1[19]                   -> T6, AA
0i_vvvv  parameter words          -> AA each   (i = index 0..7 in bits 18:16)
40_0000  A1[22]                   -> T7 ... frame read ... AA when the frame is done
10_0000  A1[20]                   -> T11 -> T0, AA
```

`ack` (and so one `AA` byte) comes when LOADDAC, OUTDATA, CLRROWS or PREFLUSH
finishes its work, when GETPAR is entered, for each parameter word, when a
frame is complete and in RESET. `start` is a level input and gets no `AA`.

## Reading a frame (T7 to T10)

The read-out keeps one down-counter per quantity of the state table:
`rows_left` (NOOFBROWS), `pbin_left` (PBIN), `prescan_left` (PRESCAN),
`sso_left` (iSSO, the preshift), `bn_left` (BNSERIAL, the binned pixels) and
`post_left` (iPOSTSHIFT). One waveform request is made per count:

1. **T7 READROW.** While there are rows to read, each of the `PRESCAN` rows
   is first moved into the read-out register and thrown away: a row transfer,
   then a clear of the register. This happens once per frame. Then `PBIN` row
   transfers add `PBIN` rows into the read-out register; this is row binning.
   Leaving for T8 takes one off `rows_left`.
2. **T8 PRESHIFT.** `PRESHIFT` serial shifts move unwanted columns out.
3. **T9 STRBDATA.** For each of the `NPIX` binned pixels:
   - the output node is reset and the reference level is integrated;
   - `SBIN` serial shifts put `SBIN` columns of charge onto the output node
     (column binning);
   - the signal is integrated;
   - `adc_start` starts the ADC;
   - the result taken at `adc_done` is handed to the parallel port.
4. **T10 POSTSHIFT.** `POSTSHIFT` serial shifts empty the rest of the row,
   then the controller goes back to T7 for the next row.

When `rows_left` is zero, T7 sends the frame's `AA` and waits for A1[20].

At the defaults, one binned pixel takes about `2*int_time + 13*SBIN` cycles
plus the ADC latency plus about 10 cycles. With `INT_TIME = 250` and no column
binning, that is roughly 11 µs at 50 MHz.

## Waveform words

`wavegen` plays a waveform as a list of 24-bit words. Each word holds:

- **time** (bits 23:16): how many clock cycles the word lasts;
- **state bits** (bits 15:0): the levels driven on D15..D0 (`sbits`) for
  that time.

A word with time 0 ends the waveform. Between waveforms `sbits` rests at
`SBITS_IDLE`, where only SBIT12 is high. From a one-cycle `start` to the
one-cycle `done`, a waveform takes the sum of its time fields plus one cycle.
The word lists are computed by the function `wave_word` in `rtl/wavegen.sv`.

State bits:

| bit | name | bit | name |
|---|---|---|---|
| 0–2 | P1–P3 parallel (image) clocks | 8 | RG output-node reset gate |
| 3 | TG transfer gate | 9 | DCS integrator reset |
| 4–6 | S1–S3 serial clocks | 11 | SBIT11 DCS polarity: low = reference (+), high = signal (−) |
| 7 | SW summing well | 12 | SBIT12 DCS integrate, active low |

Bits 10 and 13–15 are unused.

| waveform | words × cycles | purpose |
|---|---|---|
| `SEQ_PARALLEL` | 6 × `PAR_TIME` (8) | one three-phase row transfer through TG |
| `SEQ_SERIAL` | 6 × `SER_TIME` (2) | one three-phase serial shift into the summing well |
| `SEQ_FLUSH` | 4 × `FLS_TIME` (16) | all clocks and RG together: empties the CCD |
| `SEQ_DUMP` | 2 × `FLS_TIME` | serial clocks and RG: empties the read-out register |
| `SEQ_REF` | 2+2+`int_time`+1 | reset node and integrator, integrate the reference (SBIT11 low, SBIT12 low) |
| `SEQ_SIG` | 2+`int_time`+1 | summing well to node, integrate the signal (SBIT11 high, SBIT12 low) |

Correlated double sampling depends on the reference and the signal being
integrated for the same time. Both words take their time from the one input
`int_time`, which the state machine drives from parameter 7. The default,
`INT_TIME` = 250 cycles, is 5 µs. Changing the integration time changes the
gain of the integrator. Change it only between frames; a value of 0 is never
passed on, because a zero time would end the waveform early.

## Links to the host

- **Commands (`cmd_rx`).** The host drives a serial clock `rx_sclk` and data
  `rx_sdi`. The controller samples one bit on each rising clock edge,
  most significant bit first, 24 bits per word. Each half of the clock period
  must last at least two controller clocks. If the clock stops for
  `FRAME_TIMEOUT` (4096) cycles in the middle of a word, the partial word is
  dropped.
- **Acknowledge (`ack_tx`).** The controller drives `tx_sclk` and `tx_sdo`.
  It sends 8'hAA most significant bit first. The data changes while the clock
  is low, and the host samples on the rising edge. A byte takes `16*TX_HALF`
  cycles (64 at the default). Up to 7 more acknowledges can wait in a queue;
  when the queue is full, `ack_overflow` is set.
- **Image data (`pix_port`).** Each 16-bit sample goes out as two bytes on
  `pd`, high byte first. The host can latch a byte on either edge of `pstb`:
  the byte is on `pd` one cycle before the strobe rises and stays one cycle
  after it falls. The strobe is `STB_W` (4) cycles high, so a sample takes
  `2*(STB_W+2)` = 12 cycles.
- **ADC.** `adc_start` is a one-cycle pulse. The ADC answers with a one-cycle
  `adc_done` and the result on `adc_data`, after any number of cycles.

## Where this design follows the original and where it fills gaps

Taken from the original description:

- the twelve state names and codes and every transition of the table;
- the 24-bit command word A1 and its control bits 16 to 22;
- clearing a control bit when its transition is taken;
- the `AA` acknowledge after a command has been executed;
- the 24-bit waveform word made of a time field and 16 state bits;
- the meaning of SBIT11 and SBIT12, and equal reference and signal
  integration;
- the 5 µs integration;
- the order of a pixel: row binning, then column binning onto the output
  node, then conversion;
- the prescan and postscan region of interest;
- a serial link with Tx, Rx and Clock lines, and an 8-bit parallel data port
  with a strobe.

Choices made here, because the original does not give them:

- the work of T1 to T6 and T11, which the original only names;
- the format of the parameter words and which counter means what;
- waiting in a state until its bit arrives;
- which bit of the waveform word is which, and all clock shapes and times;
- the throwing away of prescan rows;
- all link protocols and timing: clock direction, bit order, byte order,
  strobe width, ADC handshake;
- the 16-bit widths of samples and parameters;
- the reset style;
- setting the integration time with a parameter word. The original says only
  that the time can be varied through SBIT12.

Treat the waveform shapes as placeholders. They must be fitted to the CCD in
use before the controller drives real hardware.

Not built: the proposed replacement of the copper links by a fibre optic link,
whose protocol was never described. None of the analog or external parts is
built.

## Files and simulation

`rtl/`:

- `ccd_pkg.sv`: shared types and constants. It holds the state codes, the
  control bits, the parameter indices, the waveform numbers and the
  state-bit positions.
- `asm_ctrl.sv`, `wavegen.sv`, `cmd_rx.sv`, `ack_tx.sv` and `pix_port.sv`:
  the five blocks.
- `ccd_ctrl_top.sv`: the top level.

Top-level parameters: `INT_TIME`, `STB_W` and `TX_HALF`.

`tb/` has one self-checking testbench per block and `tb_ccd_ctrl_top.sv`.
That testbench runs two complete operations, from `start` to reset, through
the real serial and parallel links at the default parameters. It uses a
behavioural ADC model, `tb/adc_model.sv`. It checks:

- every pixel value;
- the number of row transfers, serial shifts and flushes on the clock lines;
- the DCS integration times, at the default and after a parameter word
  changed them;
- the order of the states;
- the number of `AA` bytes.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ccd_pkg.sv tb/adc_model.sv \
          tb/tb_ccd_ctrl_top.sv --top-module tb_ccd_ctrl_top
./obj_dir/Vtb_ccd_ctrl_top
```

`-y rtl` lets Verilator find each module by its file name. The package has
to be listed first. A block testbench is built the same way, for example
`verilator --binary --timing --assert -y rtl rtl/ccd_pkg.sv tb/tb_wavegen.sv
--top-module tb_wavegen`. The end-to-end run takes about 30 000 clock cycles and a
few seconds.
