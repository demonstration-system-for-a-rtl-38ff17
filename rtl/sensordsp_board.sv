// sensordsp_board -- digital logic of the SensorDSP demonstration board.
//
// The board turns a finished ultra-low-power heartbeat-classification
// chip (the SensorDSP: a distributed-arithmetic matched filter, a small
// VLIW filter unit and a micro-controller, about 500 nW at 1.5 V and a
// 1 kHz clock) into a stand-alone instrument. Three pieces of logic,
// each a CPLD on the board, surround the chip:
//   * clock_gen   -- divides the 230.4 kHz reference into the chip clock
//                    (f_ref / 2^(CCONF+2), or f_ref / 2 while the chip
//                    asks for fast mode), its read trigger, and the
//                    14.4 kHz programming clock;
//   * pgm_ctrl    -- after START, scans the whole chip program (DA tables,
//                    NLSL code, micro-controller code) from the program
//                    PROM into the chip's JTAG port, then signals RUN;
//   * input_ctrl + output_ctrl (one I/O CPLD on the board) -- feed A/D
//                    or test-PROM samples to the chip's serial input and
//                    watch the chip's program counter on its test port to
//                    flash the DETECT LED and show beats per minute.
// The chip, both PROMs and the A/D converter are outside this module;
// their pins are this module's ports. The I/O controller and the chip
// share the chip clock; the I/O RST switch holds the I/O controller in
// reset and keeps the chip's micro-controller disabled, and the chip runs
// only once programming has finished.
// The partitioning follows the document's system block diagram; the
// chip enable gating (programmed and I/O RST released) is this design's
// reading of the board's start-up procedure.
module sensordsp_board
  import sensordsp_pkg::*;
#(
  parameter int unsigned LED_HOLD   = 180,
  parameter int unsigned BPM_WINDOW = 54000
) (
  // board clock, reset, buttons and switches
  input  logic            clk2x,         // 230.4 kHz reference
  input  logic            rst_n,         // power-on reset
  input  logic            reset_btn,
  input  logic            start_btn,
  input  logic [3:0]      cconf,         // clock speed switches
  input  logic [3:0]      pgmromsel,
  input  logic [3:0]      dataromsel,
  input  logic            mode_sw,       // 1: test data, 0: sensor
  input  logic            io_rst_sw,     // 1: I/O control disabled
  input  bitwidth_e       bw_sel,        // serial sample width
  input  logic [7:0]      control_sw,    // PC value that means "heartbeat"
  output logic            led_green,
  output logic            led_red,
  output logic            led_detect,
  output logic [2:0][3:0] hex_digits,
  output logic            pgm_idle,      // test port: programming FSM idle
  output logic            sample_load,   // test port: a sample was read
  output logic            detect,        // test port: heartbeat detected
  // program PROM
  output logic [15:0]     pgm_prom_addr,
  input  logic [7:0]      pgm_prom_data,
  // test-data PROM and A/D converter
  output logic [15:0]     data_prom_addr,
  input  logic [7:0]      data_prom_data,
  output logic            data_prom_ce_n,
  input  logic [7:0]      ad_data,
  output logic            ad_rw,
  output logic            ad_ce_n,
  // SensorDSP chip pins
  output logic            chip_clk,      // CLK_IN
  output logic            chip_rd_trig,  // RD_TRIG
  input  logic            chip_fast_mode,// FAST_MODE
  output logic            chip_tck,
  output logic            chip_tms,
  output logic            chip_tdi,
  output logic            chip_trst_n,
  output logic            chip_muctrl_en,
  output logic            chip_xin,
  output ysel_e           chip_ysel,
  input  logic [11:0]     chip_ytest
);

  logic pgm_clk, programmed;
  logic io_rst_n;

  clock_gen u_clk (
    .clk2x     (clk2x),
    .rst_n     (rst_n),
    .cconf     (cconf),
    .fast_mode (chip_fast_mode),
    .sdspclk   (chip_clk),
    .rd_trig   (chip_rd_trig),
    .pgm_clk   (pgm_clk)
  );

  pgm_ctrl u_pgm (
    .clk        (pgm_clk),
    .rst_n      (rst_n),
    .reset_btn  (reset_btn),
    .start_btn  (start_btn),
    .romsel     (pgmromsel),
    .prom_addr  (pgm_prom_addr),
    .prom_data  (pgm_prom_data),
    .tck        (chip_tck),
    .tms        (chip_tms),
    .tdi        (chip_tdi),
    .trst_n     (chip_trst_n),
    .led_green  (led_green),
    .led_red    (led_red),
    .pgm_idle   (pgm_idle),
    .programmed (programmed)
  );

  assign io_rst_n       = rst_n && !io_rst_sw;
  assign chip_muctrl_en = programmed && !io_rst_sw;

  input_ctrl u_in (
    .clk         (chip_clk),
    .rst_n       (io_rst_n),
    .mode        (mode_sw),
    .bw          (bw_sel),
    .datarom_sel (dataromsel),
    .ad_data     (ad_data),
    .ad_rw       (ad_rw),
    .ad_ce_n     (ad_ce_n),
    .prom_data   (data_prom_data),
    .prom_ce_n   (data_prom_ce_n),
    .prom_addr   (data_prom_addr),
    .xin         (chip_xin),
    .sample_load (sample_load)
  );

  output_ctrl #(.LED_HOLD(LED_HOLD), .BPM_WINDOW(BPM_WINDOW)) u_out (
    .clk        (chip_clk),
    .rst_n      (io_rst_n),
    .ytest      (chip_ytest),
    .control_sw (control_sw),
    .ysel       (chip_ysel),
    .led_detect (led_detect),
    .digits     (hex_digits),
    .detect     (detect)
  );

endmodule
