// pgm_ctrl -- programming interface CPLD: streams the program PROM into
// the SensorDSP chip through its JTAG test access port.
//
// Everything the chip needs (distributed-arithmetic tables, NLSL
// instructions and configuration, micro-controller instructions) is kept
// in a 64Kx8 PROM as a packed list of words: each TAP instruction (7 bits)
// and each data word (1 to 37 bits) starts on a byte boundary, lowest byte
// first, and its unused top bits are padding. The controller knows the
// shape of that list -- which word is an IR or a DR scan, how wide it is
// and how often a group of words repeats -- from the sequence table in
// sensordsp_pkg, so the PROM needs no headers.
//
// Datapath (after the document's block diagram): a 12-bit PROM address
// counter (the PROM's top four address bits are the PGMROMSEL switches,
// one 4 KB program block each), an 8-bit shift register sending LSB first
// on TDI, a 3-bit bit-in-byte counter that reloads the shift register
// every 8 bits, a shift counter that counts bits of the current word and
// an 8-bit repeat counter for the repeated groups (128 DA entries,
// 8 NLSL instructions, 256 micro-controller instructions). The document's
// diagram prints a 5-bit shift counter; it is 6 bits here because the
// longest word, the 37-bit NLSL instruction, needs it.
//
// Board states, shown on two LEDs: IDLE (green; TRST held low), PROGRAM
// (red), RUN (both). START leaves IDLE, the end of the sequence enters
// RUN, RESET returns to IDLE from anywhere.
//
// Timing: one TDI bit per clock (the 14.4 kHz programming clock); TCK is
// the inverted clock, so TMS/TDI change on TCK's falling edge. A word of
// W bits takes W + 6 clocks (LOAD, SELECT-DR, [SELECT-IR], CAPTURE,
// W x SHIFT, EXIT, UPDATE, with the TAP's return to idle overlapped with
// the next LOAD), plus one for SELECT-IR in an IR scan; the whole default
// sequence is 2224 words and takes 34,111 clocks (2.4 s at 14.4 kHz).
// The sequence order and the byte packing are this design's reading of
// the document's loading procedure; the counters are the document's.
// The handshake assertions at the end are switched off by the power-on
// reset, so lint sees rst_n used both as an asynchronous reset and in
// clocked logic; the flip-flops themselves only use it asynchronously.
module pgm_ctrl
  import sensordsp_pkg::*;
#(
  parameter int unsigned ADDR_W = 12,  // address bits inside one program block
  parameter int unsigned SEL_W  = 4    // block-select switch bits
) (
  input  logic                    clk,        // programming clock
  input  logic                    rst_n,      // power-on reset
  input  logic                    reset_btn,  // RESET push button
  input  logic                    start_btn,  // START push button
  input  logic [SEL_W-1:0]        romsel,     // PGMROMSEL switches
  output logic [SEL_W+ADDR_W-1:0] prom_addr,
  input  logic [7:0]              prom_data,
  output logic                    tck,
  output logic                    tms,
  output logic                    tdi,
  output logic                    trst_n,
  output logic                    led_green,
  output logic                    led_red,
  output logic                    pgm_idle,   // board is in IDLE
  output logic                    programmed  // board is in RUN
);

  typedef enum logic [2:0] {P_IDLE, P_LOAD, P_SCAN, P_NEXT, P_RUN} pstate_e;

  pstate_e                 state;
  logic [ADDR_W-1:0]       addr_q;
  logic [STEP_IDX_W-1:0]   step_q;
  logic [7:0]              rep_q;     // repeat counter
  logic [5:0]              shcnt_q;   // bits of the current word sampled
  logic [2:0]              bitcnt_q;  // bits of the current byte sampled
  pgm_step_t               step;

  logic btn_rst_n, core_rst_n;
  logic go, sr_load, sr_shift;
  logic j_shift, j_tap_shift, j_done, j_idle, compare;
  logic last_bit;

  // RESET button, registered, acts as a reset of the whole controller.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) btn_rst_n <= 1'b0;
    else        btn_rst_n <= !reset_btn;
  assign core_rst_n = rst_n && btn_rst_n;

  assign step = pgm_step(step_q);

  // Bit being sampled this cycle is the word's last one.
  assign last_bit = (shcnt_q == step.width - 6'd1);
  // The TAP samples the last-but-one bit now (or, for a 1-bit word, the
  // FSM is in its first SHIFT cycle): leave SHIFT after this cycle.
  assign compare  = j_shift &&
                    ((shcnt_q + {5'd0, j_tap_shift}) == step.width - 6'd1);

  assign go       = (state == P_LOAD);
  assign sr_load  = (state == P_LOAD) ||
                    (state == P_SCAN && j_tap_shift && bitcnt_q == 3'd7 && !last_bit);
  assign sr_shift = (state == P_SCAN) && j_tap_shift;

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      state    <= P_IDLE;
      addr_q   <= '0;
      step_q   <= '0;
      rep_q    <= '0;
      shcnt_q  <= '0;
      bitcnt_q <= '0;
    end else begin
      unique case (state)
        P_IDLE: begin
          addr_q <= '0;
          step_q <= '0;
          rep_q  <= '0;
          if (start_btn) state <= P_LOAD;
        end
        P_LOAD: begin
          // first byte of the word enters the shift register; scan starts
          addr_q   <= addr_q + 1'b1;
          shcnt_q  <= '0;
          bitcnt_q <= '0;
          state    <= P_SCAN;
        end
        P_SCAN: begin
          if (j_tap_shift) begin
            shcnt_q  <= shcnt_q + 1'b1;
            bitcnt_q <= bitcnt_q + 1'b1;
            if (sr_load) addr_q <= addr_q + 1'b1;
          end
          if (j_done) state <= P_NEXT;
        end
        P_NEXT: begin
          if (step.seg_last && rep_q == step.seg_rep_m1) begin
            rep_q <= '0;
            if (step.seq_last) state <= P_RUN;
            else begin
              step_q <= step_q + 1'b1;
              state  <= P_LOAD;
            end
          end else if (step.seg_last) begin
            rep_q  <= rep_q + 1'b1;
            step_q <= step.seg_first;
            state  <= P_LOAD;
          end else begin
            step_q <= step_q + 1'b1;
            state  <= P_LOAD;
          end
        end
        P_RUN: ;
        default: state <= P_IDLE;
      endcase
    end
  end

  jtag_tms_ctrl u_tms (
    .clk       (clk),
    .rst_n     (core_rst_n),
    .go        (go),
    .ir_dr     (step.is_ir),
    .compare   (compare),
    .tms       (tms),
    .shift     (j_shift),
    .tap_shift (j_tap_shift),
    .done      (j_done),
    .idle      (j_idle)
  );

  shift_reg #(.WIDTH(8), .LSB_FIRST(1'b1)) u_sr (
    .clk   (clk),
    .rst_n (core_rst_n),
    .load  (sr_load),
    .shift (sr_shift),
    .d     (prom_data),
    .q     (),
    .sout  (tdi)
  );

  assign prom_addr  = {romsel, addr_q};
  assign tck        = ~clk;
  assign trst_n     = (state != P_IDLE);
  assign pgm_idle   = (state == P_IDLE);
  assign programmed = (state == P_RUN);
  assign led_green  = (state == P_IDLE) || (state == P_RUN);
  assign led_red    = (state != P_IDLE);

  // A new scan only starts when the TMS sequencer is back in IDLE.
  assert property (@(posedge clk) disable iff (!rst_n) go |-> j_idle);
  // A word never needs more bits than the widest programming word.
  assert property (@(posedge clk) disable iff (!rst_n)
                   j_tap_shift |-> shcnt_q < 6'(W_MAX));

endmodule
