// clock_gen -- board clock generator CPLD.
//
// A 2x reference clock (230.4 kHz on the board, twice the SensorDSP fast
// clock) drives a 16-bit synchronous binary counter. A multiplexer picks
// counter bit CCONF, a second multiplexer replaces it with the reference
// itself in fast mode, and a toggle flip-flop on that selected clock
// halves it to give the SensorDSP system clock:
//     f_sdspclk = f_ref / 2^(CCONF+2)   (slow),   f_ref / 2   (fast).
// A second toggle flip-flop runs on the inverted selected clock, so it
// is a copy of the system clock that lags by a quarter period. The read
// trigger is high while both are high: a pulse in the second half of each
// high phase of the system clock, which the chip uses to time its SRAM
// reads. The document's schematic feeds the inverted selected clock into
// that gate instead of the system clock; taken literally that gives the
// same pulse plus a runt each time the second flip-flop falls (it switches
// on the very edge that re-opens the gate), so the system clock is used
// here. The gate's two inputs switch on opposite edges of the selected
// clock, so they never change together. Counter bit PGM_CLK_BIT is the
// programming controller's clock (bit 3: 230.4 kHz / 16 = 14.4 kHz).
//
// The divider equation, the fast-mode bypass, the two toggle flip-flops
// and the 16-bit counter follow the document's schematic (the read
// trigger gate's second input is this design's, see above); the programming
// clock tap is derived from the document's 14.4 kHz figure. Selecting a
// clock through a multiplexer can produce a short pulse when CCONF or
// fast_mode changes; the board's micro-code pads the switch point with
// NOPs for that reason, so the glitch is left as the schematic has it.
//
// Interface: clk2x (reference), rst_n (async, active low), cconf[3:0],
// fast_mode (from the chip's FAST_MODE pin); outputs sdspclk, rd_trig,
// pgm_clk.
module clock_gen #(
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned PGM_CLK_BIT = 3
) (
  input  logic       clk2x,
  input  logic       rst_n,
  input  logic [3:0] cconf,
  input  logic       fast_mode,
  output logic       sdspclk,
  output logic       rd_trig,
  output logic       pgm_clk
);

  logic [CNT_W-1:0] cnt;
  logic             sel_clk, sel_clk_n, trig_q;

  always_ff @(posedge clk2x or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  assign sel_clk   = fast_mode ? clk2x : cnt[cconf];
  assign sel_clk_n = ~sel_clk;

  // system clock: toggle on every rising edge of the selected clock
  always_ff @(posedge sel_clk or negedge rst_n)
    if (!rst_n) sdspclk <= 1'b0;
    else        sdspclk <= ~sdspclk;

  // quarter-period delayed copy, toggled on the falling edge
  always_ff @(posedge sel_clk_n or negedge rst_n)
    if (!rst_n) trig_q <= 1'b0;
    else        trig_q <= ~trig_q;

  assign rd_trig = trig_q & sdspclk;
  assign pgm_clk = cnt[PGM_CLK_BIT];

endmodule
