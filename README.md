# SensorDSP demonstration board logic

The SensorDSP is an ultra-low-power signal-classification chip. It runs a
heartbeat detector in well under a microwatt from a 1.5 V supply and a clock
of about 1 kHz. Inside it are a distributed-arithmetic matched filter, a small
VLIW filter unit (NLSL) and a micro-controller. The chip has almost no pins to
spare, so it is awkward to use on its own:

* every table and program word has to be shifted in through its JTAG port;
* input samples arrive one bit at a time on a serial pin;
* results come out on a single 12-bit test port behind an 8-way multiplexer;
* it needs an external clock whose speed it changes on the fly.

This RTL is the digital logic of a board that makes the chip a stand-alone
heartbeat monitor. You press START, and the board streams the complete chip
program from a PROM into the JTAG port. It then feeds the chip samples from an
8-bit A/D converter (or from a PROM of recorded test data), watches the chip's
program counter for the "heartbeat found" address, flashes an LED, and shows
an approximate beats-per-minute count on three digits.

On the board, the logic is spread over three CPLDs:

| module (rtl/)      | board part | job |
|--------------------|------------|-----|
| `clock_gen`        | clock CPLD | chip clock `f_ref / 2^(CCONF+2)` (or `f_ref/2` in fast mode), read trigger, 14.4 kHz programming clock |
| `pgm_ctrl`         | programming CPLD | programming state machine, PROM address, repeat, shift and bit counters |
| `jtag_tms_ctrl`    | programming CPLD | TMS sequencer for one IR or DR scan |
| `shift_reg`        | both | 8-bit parallel-to-serial register (LSB first for JTAG, MSB first for samples) |
| `input_ctrl`       | I/O CPLD | A/D or test-PROM read every N clocks, N-bit serial sample out |
| `output_ctrl`      | I/O CPLD | test-port select, detection LED, beats-per-minute digits |
| `sensordsp_board`  | top | wires the above to the chip, PROM and A/D pins |
| `sensordsp_pkg`    | - | TAP instruction codes, word widths, programming sequence table, enums |

The chip itself, the two PROMs and the AD670 converter are not part of the RTL.
Their pins are ports of `sensordsp_board`. Behavioural models of them are in
`tb/` for simulation.

## Clocks

The board has one crystal reference, `clk2x` = 230.4 kHz. This is twice the
chip's fast clock. `clock_gen` runs a 16-bit counter on it:

* A multiplexer selects counter bit `CCONF`.
* In fast mode (requested by the chip on its FASTMODE pin) a second
  multiplexer selects `clk2x` itself.
* A toggle flip-flop halves the selected clock to give `SDSPCLK`:

      f_sdspclk = 230.4 kHz / 2^(CCONF+2)     (slow)
      f_sdspclk = 115.2 kHz                   (fast mode)

  The default `CCONF = 6` gives 900 Hz.
* A second toggle flip-flop runs on the inverted selected clock, so it is a
  copy of `SDSPCLK` delayed by a quarter period. `RD_TRIG` is high while both
  are high: a pulse in the second half of each high phase of `SDSPCLK`,
  which the chip uses to time its SRAM reads. The two gate inputs switch on
  opposite edges of the selected clock, so the pulse is free of runts.
* Counter bit 3 is the 14.4 kHz programming clock.

The I/O controller runs on `SDSPCLK` itself, the same clock as the chip. So its
sample frame and its LED and display timers are counted in chip clocks.
Switching between slow and fast clocks through a multiplexer can make a short
pulse. On the board, this is handled by padding the chip's micro-code with NOPs
around the switch, not by the clock logic. The RTL keeps the plain
multiplexer.

## Programming the chip over JTAG

This is the most involved part of the design.

### What is sent

The chip's TAP has a 7-bit, one-hot instruction register. Each instruction
selects which internal register the next data scan writes:

| instruction   | code    | data word (width) |
|---------------|---------|-------------------|
| MUCTRL_INSTR0 | 0000001 | micro-controller instruction (31) |
| NLSL_INSTR0   | 0000010 | NLSL instruction (37) |
| NLSL_INSTR1   | 0000100 | NLSL configuration (9) |
| DA_INSTR0     | 0001000 | write enables (DA 1, NLSL 1, micro-controller 2) |
| DA_INSTR1     | 0010000 | DA table address (19: 16 one-hot table bits + 3 entry bits) |
| DA_INSTR2     | 0100000 | DA table value (11) |
| DA_INSTR3     | 1000000 | DA configuration (34) |

The full program is a fixed sequence of 2224 scans (916 IR and 1308 DR). It is
kept as a table in `sensordsp_pkg::pgm_step`:

    x128  IR DA_INSTR1, DR addr(19), IR DA_INSTR2, DR value(11),
          IR DA_INSTR0, DR we(1)=1, DR we(1)=0           -- 16 tables x 8 entries
    x1    IR DA_INSTR1, DR addr(19)=0, IR DA_INSTR3, DR config(34)
    x1    IR NLSL_INSTR1, DR config(9)                     -- NLSL set-up
    x8    IR NLSL_INSTR0, DR instr(37), IR DA_INSTR0, DR we(1), DR we(1)
    x1    IR NLSL_INSTR1, DR config(9)                     -- final truncations
    x256  IR MUCTRL_INSTR0, DR instr(31), IR DA_INSTR0, DR we(2), DR we(2)

Each table entry carries a word kind (IR or DR) and a width, and marks the end
of a repeated group with the group's first entry and repeat count. The
controller walks the table with the repeat counter. The PROM therefore holds
only the words, with no headers.

### PROM image format

Every word, the IR codes included, starts on a byte boundary. It is stored
lowest byte first, and the unused top bits of its last byte are ignored. A
37-bit word takes 5 bytes, and a 1-bit write enable takes one. The whole image
is 3416 bytes, so the 64K x 8 PROM holds 16 programs in 4 KB blocks. The
`PGMROMSEL` switches select the block, and the controller's 12-bit address
counter steps through it. The data values themselves (filter tables,
instructions, configuration bits) come from the chip's tool flow and are just
bytes to this logic. The write-enable words should be stored as a 1 followed by
a 0, to pulse the enable.

### How a scan is timed

`jtag_tms_ctrl` drives TMS through
`IDLE -> SELECT-DR -> [SELECT-IR] -> CAPTURE -> SHIFT... -> EXIT -> UPDATE -> IDLE`.
The TMS levels are 0, 1, 1, 0, 0, 1 and 1, each moving the chip's TAP one state
at the next TCK rise. `TCK` is the inverted programming clock, so TMS and TDI
change on TCK's falling edge and are stable when it rises.

The subtle part is the one-cycle offset between this FSM and the chip's TAP:

* in the first SHIFT cycle the TAP is only entering Shift-xR and samples
  nothing;
* it samples a bit in each later SHIFT cycle, and the last bit in EXIT.

`tap_shift` marks exactly the cycles in which a bit is sampled. The programming
controller:

* advances its shift counter and the shift register only on `tap_shift`;
* reloads the shift register from the PROM every 8 sampled bits (3-bit
  counter);
* raises `compare` when the second-to-last bit is sampled, so the FSM leaves
  SHIFT in time.

A word of W bits costs W + 6 programming clocks, plus one for an IR scan. The
whole program takes 34,111 clocks, 2.4 s at 14.4 kHz.

### Board states

| state | LEDs | TRST | entered by |
|-------|------|------|------------|
| IDLE | green | held active | power-on or the RESET button (from any state) |
| PROGRAM (LOAD/SCAN/NEXT) | red | released | START |
| RUN | green and red | released | end of the sequence |

`programmed` (RUN) together with the I/O RST switch released enables the chip's
micro-controller.

Releasing I/O RST starts the chip's program and the input controller on the
same clock edge. With 8-bit samples, the first sample is loaded at the 8th
clock and its first bit reaches the chip 8 clocks after the program starts.
Heartbeat micro-code depends on this: it enables the filters exactly 8 clocks
into the program to stay aligned with the sample stream.

## Feeding samples

`input_ctrl` runs frames of N chip clocks, where N = 8, 4, 2 or 1 is the input
width chosen with `bw_sel` (it must match the width configured in the chip).
In the last clock of each frame it reads a sample:

* sensor mode: it strobes the AD670 (R/W high, /CE low);
* test mode (MODE switch up): it enables the test-data PROM, and the PROM
  address then advances by one, so recorded data arrives at the same rate as
  real samples. `DATAROMSEL` selects one of 16 blocks of 4 KB.

The byte is loaded into the shift register at the end of that clock and goes
out MSB first over the next N clocks. An N-bit sample is thus the top N bits of
the byte. On the board, the converter and the PROM share one tri-state bus. Here
the two are separate inputs with a multiplexer, which has the same effect.

## Heartbeat indicator

The heartbeat program in the chip jumps to one fixed instruction address
whenever it classifies a beat. `output_ctrl` keeps the test-port multiplexer on
the program counter (select 111) and compares the PC (low 8 bits of the port)
with the eight CONTROL switches:

* The first cycle of a match is a detection. It lights the DETECT LED for
  `LED_HOLD` = 180 chip clocks, 0.2 s at 900 Hz: long enough to see, and gone
  before the next beat.
* Detections are counted over `BPM_WINDOW` = 54,000 chip clocks (one minute at
  900 Hz). At the end of each window the count goes to three BCD digits
  (saturating at 999), which give beats per minute, and counting restarts.

The controller has to run on the chip's own clock, fast mode included. The
heartbeat code classifies a segment at the fast clock rate and passes the
detection address in a single fast clock, so a controller clocked only at
the slow rate would miss it. The price is that both timers count chip
clocks, so fast-mode bursts make the "minute" a little shorter. Also, the
input controller reads samples at the fast rate during a burst. The chip's
filters are switched off then, so those samples are lost, as the chip's own
design already assumes.

## Where this design fills in or departs from its source

The chip interface is taken as published: instruction codes, word widths,
repeat counts, test-port selects, the divider equation, the 230.4 kHz and
14.4 kHz clocks, the counter sizes and the MSB/LSB shift orders. The following
are this design's own choices:

* The programming state machine's states and the exact scan framing. An IR
  scan comes before every data word, and each write enable is pulsed as two
  scans, set and then clear. The DA address register is cleared before the DA
  configuration is written. The NLSL configuration is written before and after
  the NLSL instructions.
* The shift counter is 6 bits, not 5, because the 37-bit NLSL word needs it.
* The micro-controller programming word is 31 bits, as in the word-width table
  (enable, 8-bit address, a zero bit, 21-bit instruction).
* `RD_TRIG` is built from the two-flip-flop circuit. Its pulse starts a
  quarter `SDSPCLK` period after the rising edge, where a 45-degree phase
  shift is sometimes quoted for it. The original gates the delayed
  flip-flop with the inverted selected clock. That gives the same pulse plus
  a runt at each fall of the flip-flop, so here it is gated with `SDSPCLK`
  instead.
* The LED hold time, the one-minute window, detection on the rising edge of a
  match and the BCD display are assumptions. The source only says that the LED
  is held for a visible, fixed time and that the display shows approximate
  beats per minute.
* How the board learns the sample width N is not specified, so `bw_sel` is a
  board input.
* TRST is held active while the board is idle.

Not built as logic: the chip and its internals, the PROMs, the AD670, the
analog sensor, the power-measurement bar graph, the regulators and the test
headers.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog. With
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/sensordsp_pkg.sv \
        tb/tb_pgm_ctrl.sv --top-module tb_pgm_ctrl -o sim && ./obj_dir/sim

Replace `tb_pgm_ctrl` with `tb_clock_gen`, `tb_jtag_tms_ctrl`, `tb_shift_reg`,
`tb_input_ctrl`, `tb_output_ctrl` or `tb_sensordsp_board`.

* `tb_pgm_ctrl` runs the whole 2224-scan program into `tap_model`, a full
  16-state IEEE 1149.1 TAP that logs every scan. It compares each IR code, DR
  width and DR value with the PROM image, checks the exact clock count, the
  LEDs and a RESET abort.
* `tb_sensordsp_board` is the end-to-end test at full size, with the top's
  default parameters and real clock ratios (about 60 s of board time, a few
  seconds to simulate). It:
  * aborts programming once with RESET, then programs the chip completely and
    checks all 916 IR and 1308 DR scans;
  * runs test-data mode with 8-bit samples for one full minute, decoding every
    serial sample against the PROM;
  * drives a chip model that raises fast mode once per beat and passes the
    detection address for a single fast clock;
  * checks one LED flash per beat, the fast clock at `f_ref/2` and the
    displayed beat count;
  * switches to sensor mode with 4-bit samples;
  * changes CCONF and checks the new chip clock and the read trigger.

  It counts each of these mechanisms and fails any that never occurred.

The chip model in `tb/sensordsp_chip_model.sv` only imitates the chip's pins
(TAP, a program counter that loops and visits the detection address inside
each fast-mode burst, the fast-mode request). It does no signal processing.
