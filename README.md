# FPGA digital lock-in amplifier for DOP photoluminescence scans

This is synthesizable SystemVerilog for the digital lock-in amplifier (DLIA) platform of a
degree-of-polarization (DOP) photoluminescence scanning setup. A chopper and a rotating
polarizer modulate the light. The DLIA finds the amplitude and phase of the detector
signal at each modulation frequency:

- the chopper frequency gives the photoluminescence (PL) signal;
- the polarizer frequency gives the DOP/ROP signal.

A host PC sets up the platform and receives the results as packets over a serial line.

## Structure

```
dlia_system (top)
├── host_decoder      5-byte packet protocol, memory bus, interrupt packets
├── csr               64 x 16-bit registers (bank 0)
├── dlia[0], dlia[1]  one lock-in sub-system per analog input
│   ├── adc_controller    serial ADC: convert pulse, shift-in, clock-domain crossing
│   ├── fir_lowpass       65-tap symmetric anti-aliasing FIR
│   └── 2 channels, each:
│       delay_line → sync_measure → pulse_gen → downsampler → psd (+ psd_mean_calc)
│       2 × ref_lut       inphase and quadrature reference tables
├── dac_driver        any sample-path point → external serial DAC
└── sram_controller   host access to external SRAM, real-time sample capture
```

Shared helpers:

- `dlia_pkg` holds the command codes, the register map and the types.
- `rollover_counter` is a programmable-period strobe counter.

Each sub-system demodulates one ADC input at two reference frequencies. The sample path
of one sub-system runs like this:

1. The ADC converts at a fixed rate; the default is 100 kHz, set by `ADC_DIV` = 500 clocks at an assumed 50 MHz clock.
2. The FIR lowpass filters every ADC sample at that rate.
3. Each channel's downsampler then picks out exactly 2^n samples per period of its own sync signal.
4. The PSD multiplies each of those samples by a cosine and a sine reference word and averages 2^m of each kind of product. The two means are the inphase (I) and quadrature (Q) components at that frequency.

## The hard part: sampling locked to the sync

Lock-in detection works only if reference index k always falls at the same phase of the
modulation. The design does not use a PLL. It measures the sync and derives the
sampling from that measurement:

- **delay_line** delays the 1-bit sync (after its synchroniser) through 64 flip-flops.
  - The flip-flops shift once every `DLY_DIV` clocks.
  - `DLY_SEL` picks the output tap.
  - This shifts the reference phase by fine amounts, smaller than one sample, without touching the tables.
- **sync_measure** counts clocks between rising edges of the delayed sync (24-bit, saturating).
  - It shifts that period right by `SPP_LOG2` to get the clock count between samples.
  - The shift always rounds down, so 2^n samples always fit in a period.
- **pulse_gen** is a rollover counter loaded with that divide value.
  - It is restarted by every sync edge and strobes on the edge itself.
  - **This design adds a limit:** it stops after 2^n strobes until the next edge. Because the divide rounds down, one extra strobe (2^n + 1) could otherwise fit before the edge. That extra sample would shift every later reference index by one.
  - With the limit, every period holds exactly 2^n samples, and sample 0 is always the one taken at the sync edge.
- **downsampler** registers the filter output on each strobe.
- **psd** counts samples modulo 2^n.
  - In external-sync mode the first sample after each sync edge is count 0.
  - The table index is `(count + phase) mod 2^n`, where `phase` is the user's phase offset (channel `PHASE` register).
  - The tables hold one period in their first 2^n words (256 words are built).
  - The host writes cos into the inphase table and sin into the quadrature table.

The sync period can change while the system runs (a drifting chopper). Each new
measurement takes effect at the next period, so the sampling follows the frequency.

### PSD state machines

The phase/sample FSM runs these states: INIT, NEXT_SAMPLE, MULTIPLY, STORE, CALC_MEAN,
RESET_PHASE, CHANGE_SIGN, SHIFT_90, SHIFT_270, SHIFT_180, ADJUST_PHASE.

- **Per sample:** 3 cycles to read the tables, multiply and store both products.
- **Mean:** once 2^m products are stored (m = `AVG_LOG2`, at most 10 with the 1024-word stores), CALC_MEAN starts the mean FSM (`psd_mean_calc`). It sums both stores and shifts the sums right by m. That takes about 2^m clocks. Samples that arrive meanwhile are not stored, but they still advance the index.
- **External sync mode:** RESET_PHASE reloads the user phase after each mean.
- **Auto sync mode** needs no sync edge. After every mean the FSM corrects `phase` using the sign and size of I and Q:
  - if |Q| > |I|, it jumps a quarter period (SHIFT_90 for Q > 0, SHIFT_270 for Q < 0);
  - if I < 0, it jumps half a period (SHIFT_180);
  - otherwise it steps one index in the current direction (ADJUST_PHASE). It first reverses that direction (CHANGE_SIGN) if |I| dropped since the last mean.
  - The result climbs to the +I axis and then dithers within about one step (360/2^n degrees) of it.

With a cos inphase table, a shift of X degrees lowers `phase` by X/360 of a period.

The result is a 32-bit mean of 16 × 16-bit products. For a sine of amplitude A at the
reference frequency, |(I, Q)| = A · |H(f)| · 32767 / 2. Here |H(f)| is the filter gain.
The host receives bits [30:15] of each mean.

### ADC clock-domain crossing

The AD977A-style ADC shifts data out on its own discontinuous `sclk`. While the ADC is
idle, its busy flag holds the bit counter in that domain at zero, so every word starts
at bit 0. The 16th bit toggles a word flag. The flag crosses to the system clock through
two flip-flops. Each change loads the parallel register from the shift register, which
is stable by then.

Lint tools report `busyb` as used both as an asynchronous clear and as a synchronised
input. That is intended.

## Host protocol

The serial line carries 5-byte packets `{COMMAND, ADDR[15:0], DATA[15:0]}`. The UART
receives and sends the DATA low byte first and the COMMAND byte last. The UART itself is
not part of this code; `dlia_system` exposes a byte handshake instead:

| Direction | Signals |
|---|---|
| Receive | `rx_rdy`, `rx_byte`, `rx_strobe` |
| Send | `tx_rdy`, `tx_byte`, `tx_strobe` |
| Flow control | `host_busyb` (active low) |

| Command | Code | Meaning |
|---|---|---|
| WRITEk | 3k+1 | write DATA to bank k, ADDR |
| READk | 3k+2 | read bank k, ADDR |
| READk_RESP | 3k+3 | reply: same ADDR, the data |
| INT0..INT4 | 0x20..0x24 | unsolicited: scan step, PSD0, PSD1, PSD2, beam toggled |

Behaviour of the decoder:

- Unknown commands are dropped.
- A read that nobody answers is dropped after 16 clocks.
- Interrupt packets carry the Q word in ADDR and the I word in DATA.
  - INT0 DATA is the scan-step count.
  - INT4 DATA is the new beam level.
- A newer interrupt replaces data that has not been sent yet.

The banks:

| Bank | Contents |
|---|---|
| 0 | registers |
| 1 | sub-system 0 tables: PSD0_REF0 at 0x000, PSD0_REF1 0x100, PSD1_REF0 0x200, PSD1_REF1 0x300 |
| 2 | the same for PSD2/PSD3 |
| 3 | SRAM bits [15:0] |
| 4 | SRAM bits [31:16] |

### Bank 0 register map

| Addr | Name | Reset | Meaning |
|---|---|---|---|
| 0 | CTRL | 6 | [0] host test mode (received packets dropped), [1] flush PSDs on scan step, [2] re-align ADC conversions to channel 0 sync |
| 1 | ADC_DIV | 500 | ADC sampling period in clocks |
| 2 | ADC_PW | 5 | convert pulse width in clocks |
| 3 | DAC_SEL | 0 | sample-path point to DAC (4d+k: k=0 ADC, 1 LPF, 2/3 downsampler ch0/ch1) |
| 4 | CAP_SEL | 0 | sample-path point captured to SRAM |
| 5 | CAP_LEN | 0xFFFF | capture length − 1 |
| 6 | CAP_START | – | any write starts a capture |
| 7 | STATUS | RO | [0] capture busy, [2:1] ADC busy errors |
| 8+8c+0 | SPP_LOG2 | 5 | log2 samples per period (up to 8) |
| 8+8c+1 | PHASE | 0 | reference phase offset (table index) |
| 8+8c+2 | DLY_DIV | 1 | delay line step in clocks |
| 8+8c+3 | DLY_SEL | 0 | delay line tap |
| 8+8c+4 | MODE | 0 | [0] auto sync, [1] flush (self-clearing) |
| 8+8c+5 | AVG_LOG2 | 10 | log2 products per mean (≤ 10) |
| 8+8c+6/7 | I_MEAN / Q_MEAN | RO | last mean, bits [30:15] |

In the table, c is the channel number, 0..3 (= 2·sub-system + channel).

## Departures from the document and own choices

- **Register map, reset values, interrupt data layout:** all are this design's. The document names the register block but gives no addresses.
- **Sample limit in pulse_gen:** this design adds it (see above).
- **Sample stores:** 1024 words per channel. The document uses 3072 samples per location; the host gets those as three 1024-sample means and averages them. The mean length must be a power of two.
- **Auto sync after CHANGE_SIGN:** if the inphase mean is negative, the FSM continues to SHIFT_180 rather than ADJUST_PHASE. This goes straight to the half-period jump instead of waiting one more mean for it.
- **Flush:** a scan step flushes the PSD stores (CTRL[1]), so a mean never mixes two locations.
- **SRAM:** taken to be a pipelined (ZBT-style) 64K × 36 synchronous part. The host sees it as two 16-bit banks; the parity bits [35:32] are not used. Capture writes the lower half of consecutive words.
- **DAC:** taken to be a serial 16-bit offset-binary part.
- **FIR coefficients:** computed at elaboration as a Hamming-windowed sinc (1.5 kHz at 100 kHz), scaled to a total weight of 2^16 so that a right shift divides. The window choice is this design's.
- **Clock:** 50 MHz is assumed; the document gives no clock frequency. Change `ADC_DIV` for another clock.
- **PSD3:** has no interrupt (the document defines only INT1..INT3 for results). Read its result through registers 38/39.
- **Not built:**
  - the UART (an outside core in the document);
  - the RS-232 transceiver;
  - the ADC, DAC and SRAM chips (behavioural models of the ADC and the SRAM are in `tb/`);
  - the analog front end;
  - the host software.

## Simulation with Verilator

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and stops, and
each has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_dlia_system \
  rtl/dlia_pkg.sv rtl/*.sv tb/ad977a_model.sv tb/zbt_sram_model.sv tb/tb_dlia_system.sv
./obj_dir/Vtb_dlia_system
```

`tb_dlia` also switches the signal and both syncs from 200/1000 Hz to the DOP scan
frequencies, 230 Hz (polarizer) and 1070 Hz (chopper). It checks that the measured periods,
the 32 samples per period and the result magnitude follow the new frequencies.

Swap in `tb_<block>.sv` and `--top-module tb_<block>` to test a single block. Only
`tb_adc_controller`, `tb_dlia` and `tb_dlia_system` need the ADC model, and only
`tb_sram_controller` and `tb_dlia_system` need the SRAM model.

`tb_dlia_system` runs the top at its default sizes and takes about a minute. It counts and checks each mechanism:

- packet writes and reads of every bank;
- read timeout;
- all five interrupts;
- PSD magnitudes against the filter gain for 1 kHz / 500 Hz syncs;
- auto sync;
- delay-line phase shift;
- flush on scan step;
- DAC stream;
- SRAM capture and read-back;
- ADC error status;
- test mode.

## Limits

- The checks cover noise-free sine inputs; noise rejection over long means was not measured.
- Auto sync is only as fine as one table step. For finer phase, use the delay line.
- The PSD needs its samples at least 4 clocks apart; an assertion checks this.
