// output_ctrl -- output half of the I/O controller CPLD: the heartbeat
// indicator.
//
// The SensorDSP chip shows its internals on one 12-bit test port through
// an 8-way multiplexer. The heartbeat program jumps to one fixed
// instruction address each time it classifies a segment as a heartbeat,
// so this controller keeps the multiplexer on the program counter
// (select 111) and compares the low 8 bits of the port -- the 8-bit PC --
// with the CONTROL switches. A match that was not present in the previous
// cycle is a detection: it lights the DETECT LED for LED_HOLD clock
// cycles (long enough to see, shorter than the time between beats; a new
// detection restarts the hold) and is counted. The count over a window of
// BPM_WINDOW cycles (one minute at the default 900 Hz chip clock) is
// latched onto three decimal digits, an approximate beats-per-minute
// reading, and the count restarts.
//
// The PC select, the switch comparison and the held LED follow the
// document; the hold length, the one-minute counting window, the
// rising-edge detection and the decimal (BCD, saturating at 999) digits
// are this design's choices. The controller runs on the chip's clock,
// fast mode included, because the heartbeat code passes the detection
// address in a single fast-clock cycle. The hold and window are therefore
// counted in chip clock cycles, and the short fast-clock bursts during
// classification shorten them slightly.
//
// Interface: clk (chip clock), rst_n, ytest[11:0] (chip test port),
// control_sw[7:0]; outputs ysel[2:0], led_detect, digits (3 x 4 bits,
// digits[2] most significant), detect (one-cycle pulse).
module output_ctrl
  import sensordsp_pkg::*;
#(
  parameter int unsigned LED_HOLD   = 180,    // 0.2 s at 900 Hz
  parameter int unsigned BPM_WINDOW = 54000   // 60 s at 900 Hz
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [11:0]     ytest,
  input  logic [7:0]      control_sw,
  output ysel_e           ysel,
  output logic            led_detect,
  output logic [2:0][3:0] digits,
  output logic            detect
);

  localparam int unsigned HOLD_W = $clog2(LED_HOLD + 1);
  localparam int unsigned WIN_W  = $clog2(BPM_WINDOW + 1);

  logic              match, match_q;
  logic [HOLD_W-1:0] hold_q;
  logic [WIN_W-1:0]  win_q;
  logic [2:0][3:0]   bcd_q;
  logic              win_end;

  assign ysel    = YSEL_PC;
  assign match   = (ytest[7:0] == control_sw);
  assign detect  = match && !match_q;
  assign win_end = (win_q == WIN_W'(BPM_WINDOW - 1));

  // three-digit decimal counter, saturating at 999
  function automatic logic [2:0][3:0] bcd_inc(logic [2:0][3:0] v);
    logic [2:0][3:0] r = v;
    if (v == {4'd9, 4'd9, 4'd9}) return v;
    for (int i = 0; i < 3; i++) begin
      if (r[i] == 4'd9) r[i] = 4'd0;
      else begin
        r[i] = r[i] + 4'd1;
        break;
      end
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_q <= 1'b0;
      hold_q  <= '0;
      win_q   <= '0;
      bcd_q   <= '0;
      digits  <= '0;
    end else begin
      match_q <= match;
      if (detect)            hold_q <= HOLD_W'(LED_HOLD);
      else if (hold_q != '0) hold_q <= hold_q - 1'b1;

      if (win_end) begin
        win_q  <= '0;
        digits <= detect ? bcd_inc(bcd_q) : bcd_q;
        bcd_q  <= '0;
      end else begin
        win_q <= win_q + 1'b1;
        if (detect) bcd_q <= bcd_inc(bcd_q);
      end
    end
  end

  assign led_detect = (hold_q != '0);

endmodule
