// jtag_tms_ctrl -- TMS sequencer for one instruction- or data-register scan.
//
// The SensorDSP chip is programmed through an IEEE 1149.1 test access
// port. This FSM walks the chip's TAP from Run-Test/Idle through one scan
// and back: IDLE -> SELECT-DR -> (SELECT-IR when ir_dr=1) -> CAPTURE ->
// SHIFT (held while compare=0) -> EXIT -> UPDATE -> IDLE. Each state
// drives the TMS level that moves the TAP one step at the next rising
// TCK: IDLE 0, SELECT-DR 1, SELECT-IR 1, CAPTURE 0, SHIFT 0, EXIT 1,
// UPDATE 1. The states and their TMS values follow the document's state
// diagram; the `tap_shift` output is this design's.
//
// The controller runs on the rising edge of its clock and the chip's TCK
// is the inverted clock, so TMS and TDI change on TCK's falling edge and
// are stable at its rising edge, as the standard requires.
//
// Timing seen by the TAP (one row per controller cycle):
//   CAPTURE   TAP Select-xR -> Capture-xR
//   SHIFT #1  TAP Capture   -> Shift     (no bit sampled)
//   SHIFT #k  TAP samples one TDI bit, stays in Shift
//   EXIT      TAP samples the last bit, -> Exit1
//   UPDATE    TAP Exit1 -> Update (register takes the shifted word)
//   IDLE      TAP Update -> Run-Test/Idle
// So a scan of N bits spends N cycles in SHIFT and samples bits in SHIFT
// cycles 2..N and in EXIT. `tap_shift` is high in exactly those cycles;
// the caller raises `compare` in the cycle whose sampled bit is the
// second-to-last one (or, for N=1, in SHIFT #1).
// `done` is a one-cycle pulse in UPDATE; `shift` is high in SHIFT.
module jtag_tms_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic go,        // start a scan (sampled in IDLE)
  input  logic ir_dr,     // 1: instruction register, 0: data register
  input  logic compare,   // last-but-one bit is being sampled
  output logic tms,
  output logic shift,     // FSM is in SHIFT
  output logic tap_shift, // TAP samples TDI at this cycle's TCK rise
  output logic done,      // scan finished (UPDATE)
  output logic idle
);

  typedef enum logic [2:0] {
    S_IDLE, S_SEL_DR, S_SEL_IR, S_CAPTURE, S_SHIFT, S_EXIT, S_UPDATE
  } state_e;

  state_e state, state_n;
  logic   first_q;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:    if (go) state_n = S_SEL_DR;
      S_SEL_DR:  state_n = ir_dr ? S_SEL_IR : S_CAPTURE;
      S_SEL_IR:  state_n = S_CAPTURE;
      S_CAPTURE: state_n = S_SHIFT;
      S_SHIFT:   if (compare) state_n = S_EXIT;
      S_EXIT:    state_n = S_UPDATE;
      S_UPDATE:  state_n = S_IDLE;
      default:   state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      first_q <= 1'b0;
    end else begin
      state   <= state_n;
      first_q <= (state == S_CAPTURE);
    end
  end

  always_comb begin
    unique case (state)
      S_SEL_DR, S_SEL_IR, S_EXIT, S_UPDATE: tms = 1'b1;
      default:                              tms = 1'b0;
    endcase
  end

  assign shift     = (state == S_SHIFT);
  assign tap_shift = (shift && !first_q) || (state == S_EXIT);
  assign done      = (state == S_UPDATE);
  assign idle      = (state == S_IDLE);

endmodule
