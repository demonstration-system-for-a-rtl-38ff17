// tb_sensordsp_board -- full-size, end-to-end test of the board logic.
//
// The board top runs with its default parameters and the real clock
// ratios (230.4 kHz reference; CCONF = 6 gives a 900 Hz chip clock; the
// programming clock is 14.4 kHz). Around it sit behavioural models of the
// program PROM, the test-data PROM, the AD670 and the SensorDSP chip.
// The run goes through the board's whole operating procedure:
//   1. power-on: IDLE, green LED, TRST low;
//   2. START, then RESET part-way: programming is abandoned;
//   3. START again: the whole chip program (2224 scans) is streamed into
//      the chip's TAP; every scan is compared with the PROM image and the
//      chip's word widths; RUN lights both LEDs;
//   4. I/O RST released in test-data mode with 8-bit samples: the first
//      sample is loaded at the 8th clock edge, and the serial input carries
//      the test-data PROM contents, MSB first, one sample every 8 chip
//      clocks;
//   5. the chip model reports heartbeats (program counter at the CONTROL
//      address for a single clock inside a fast-mode burst): every beat
//      must light the DETECT LED, the chip clock must speed up to f_ref/2
//      in fast mode, and after one minute the display must show that
//      minute's count;
//   6. I/O RST, then sensor mode with 4-bit samples: the serial input
//      carries the top four bits of the A/D results;
//   7. CCONF changed to 3: the chip clock must become f_ref/32 with one
//      read trigger per chip clock.
// Each mechanism (IR scan, DR scan, each repeated group, RESET abort,
// both input modes, both sample widths, LED detection, LED hold expiry,
// fast mode, display update, clock speed change) is counted, and one that
// never happened is a failure.
`timescale 1ns/1ps
module tb_sensordsp_board;
  import sensordsp_pkg::*;

  localparam realtime REF_HALF = 1e9 / 230400.0 / 2.0;   // ns
  localparam int      WINDOW   = 54000;                   // output_ctrl default

  logic clk2x = 1'b0, rst_n = 1'b1;
  logic reset_btn = 0, start_btn = 0;
  logic [3:0] cconf = 4'd6, pgmromsel = 4'd2, dataromsel = 4'd9;
  logic mode_sw = 1'b1, io_rst_sw = 1'b1;
  bitwidth_e bw_sel = BW_8;
  logic [7:0] control_sw = 8'hC8;
  logic led_green, led_red, led_detect, pgm_idle, sample_load, detect;
  logic [2:0][3:0] hex_digits;
  logic [15:0] pgm_prom_addr, data_prom_addr;
  logic [7:0]  pgm_prom_data, data_prom_data, ad_data;
  logic data_prom_ce_n, ad_rw, ad_ce_n;
  logic chip_clk, chip_rd_trig, chip_fast_mode, chip_tck, chip_tms, chip_tdi,
        chip_trst_n, chip_muctrl_en, chip_xin;
  ysel_e chip_ysel;
  logic [11:0] chip_ytest;

  int checks = 0, failures = 0;

  always #(REF_HALF) clk2x = ~clk2x;

  sensordsp_board dut (.*);

  sensordsp_chip_model chip (
    .clk_in (chip_clk), .rd_trig (chip_rd_trig), .tck (chip_tck), .tms (chip_tms),
    .tdi (chip_tdi), .trst_n (chip_trst_n), .muctrl_en (chip_muctrl_en),
    .xin (chip_xin), .ysel (chip_ysel), .ytest (chip_ytest), .fast_mode (chip_fast_mode)
  );

  // ---- PROM and A/D models ----
  logic [7:0] pgm_prom [65536];
  assign pgm_prom_data  = pgm_prom[pgm_prom_addr];
  function automatic logic [7:0] data_byte(logic [15:0] a);
    return 8'(a * 16'd29 + (a >> 5) + 16'h33);
  endfunction
  assign data_prom_data = data_byte(data_prom_addr);
  logic [7:0] ad_val = 8'h7E;
  assign ad_data = ad_val;
  always @(posedge chip_clk) if (!ad_ce_n && ad_rw) #1 ad_val = 8'($urandom);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_abort, n_samples_test, n_samples_sensor, n_bw8, n_bw4;
  int n_led_on, n_led_off, n_fast_clk, n_display, n_detect_seen;
  int n_speed_change = 0, n_rd_trig = 0;
  int n_da_grp = 0, n_nlsl_grp = 0, n_muc_grp = 0, n_detect_fast = 0;
  always @(posedge chip_rd_trig) n_rd_trig++;

  // ---- serial sample decoder (on the chip clock) ----
  logic [7:0] pend [$];
  int         bits_left = 0;
  logic [7:0] cur, got;
  bit         decode_on = 0;
  always @(negedge chip_clk) if (decode_on) begin
    if (bits_left > 0) begin
      got = {got[6:0], chip_xin};
      bits_left--;
      if (bits_left == 0) begin
        int n;
        n = bitwidth_bits(bw_sel);
        check((got & 8'((1 << n) - 1)) == (cur >> (8 - n)),
              $sformatf("sample %h expected %h (mode %0d, %0d bits)", got & 8'((1 << n) - 1), cur >> (8 - n), mode_sw, n));
        if (mode_sw) n_samples_test++; else n_samples_sensor++;
        if (n == 8) n_bw8++; else if (n == 4) n_bw4++;
      end
    end
    if (sample_load) begin
      cur = mode_sw ? data_prom_data : ad_data;
      got = '0;
      bits_left = bitwidth_bits(bw_sel);
    end
  end

  // ---- LED, fast mode and display reference ----
  int win_cyc = 0, win_cnt = 0, exp_disp = 0, hold_exp = 0;
  bit prev_led = 0, run_ref = 0;
  realtime last_edge = 0;
  always @(posedge chip_clk) begin
    realtime p;
    p = $realtime - last_edge; last_edge = $realtime;
    if (chip_fast_mode && p > 1.5 * REF_HALF && p < 4.5 * REF_HALF) n_fast_clk++;
    if (run_ref) begin
      if (chip_ytest[7:0] == control_sw && chip_ysel == YSEL_PC) begin
        n_detect_seen++;
        if (chip_fast_mode) n_detect_fast++;
      end
      if (win_cyc == WINDOW - 1) begin win_cyc = 0; n_display++; end
      else win_cyc++;
    end
  end
  always @(led_detect) begin
    if (led_detect) n_led_on++; else n_led_off++;
  end

  // ---- expected program words ----
  typedef struct { logic [6:0] ir; int w; } word_t;
  word_t words [$];
  task automatic add_ir(input logic [6:0] c); words.push_back('{c, 7}); endtask
  task automatic add_dr(input int w);         words.push_back('{7'd0, w}); endtask

  task automatic wait_chip(input int n);
    repeat (n) @(posedge chip_clk);
  endtask

  initial begin
    int a, n_ir, n_dr, beats0, led0;
    logic [6:0] cur_ir;
    n_abort = 0; n_samples_test = 0; n_samples_sensor = 0; n_bw8 = 0; n_bw4 = 0;
    n_led_on = 0; n_led_off = 0; n_fast_clk = 0; n_display = 0; n_detect_seen = 0;
    for (int i = 0; i < 128; i++) begin
      add_ir(7'b0010000); add_dr(19); add_ir(7'b0100000); add_dr(11);
      add_ir(7'b0001000); add_dr(1); add_dr(1);
    end
    add_ir(7'b0010000); add_dr(19); add_ir(7'b1000000); add_dr(34);
    add_ir(7'b0000100); add_dr(9);
    for (int i = 0; i < 8; i++) begin
      add_ir(7'b0000010); add_dr(37); add_ir(7'b0001000); add_dr(1); add_dr(1);
    end
    add_ir(7'b0000100); add_dr(9);
    for (int i = 0; i < 256; i++) begin
      add_ir(7'b0000001); add_dr(31); add_ir(7'b0001000); add_dr(2); add_dr(2);
    end
    foreach (pgm_prom[i]) pgm_prom[i] = 8'($urandom);
    a = int'(pgmromsel) << 12;
    foreach (words[i])
      if (words[i].ir != 0) begin pgm_prom[a] = {1'b0, words[i].ir}; a++; end
      else a += (words[i].w + 7) / 8;

    // 1. power-on: a reset pulse (an edge, so that every asynchronously
    //    reset register is cleared even where its clock is not yet running)
    #1 rst_n = 1'b0;
    repeat (20) @(posedge clk2x);
    rst_n = 1'b1;
    repeat (100) @(posedge clk2x);
    check(led_green && !led_red && pgm_idle && !chip_trst_n, "IDLE after power-on");

    // 2. START then RESET
    start_btn = 1; repeat (40) @(posedge clk2x); start_btn = 0;
    repeat (16 * 500) @(posedge clk2x);
    check(led_red && !led_green, "programming in progress");
    reset_btn = 1; repeat (40) @(posedge clk2x); reset_btn = 0;
    repeat (100) @(posedge clk2x);
    if (pgm_idle && led_green && !led_red) n_abort++;
    check(pgm_idle, "RESET abandons programming");
    chip.tap.log_ir.delete(); chip.tap.log_dr_ir.delete(); chip.tap.log_dr_n.delete();
    chip.tap.log_dr_v.delete(); chip.tap.ir_bits.delete();

    // 3. full programming
    start_btn = 1; repeat (40) @(posedge clk2x); start_btn = 0;
    wait (led_green && led_red);
    repeat (100) @(posedge clk2x);
    check(!chip_muctrl_en, "chip held while I/O RST is up");
    n_ir = 0; n_dr = 0; cur_ir = '0; a = int'(pgmromsel) << 12;
    foreach (words[i]) begin
      if (words[i].ir != 0) begin
        check(n_ir < chip.tap.log_ir.size() && chip.tap.log_ir[n_ir] == words[i].ir, $sformatf("IR scan %0d", n_ir));
        cur_ir = words[i].ir; n_ir++; a++;
      end else begin
        logic [63:0] v;
        int nb;
        v = '0; nb = (words[i].w + 7) / 8;
        for (int b = 0; b < nb; b++) v[8*b +: 8] = pgm_prom[a + b];
        v &= (64'd1 << words[i].w) - 1;
        a += nb;
        check(n_dr < chip.tap.log_dr_n.size() && chip.tap.log_dr_ir[n_dr] == cur_ir &&
              chip.tap.log_dr_n[n_dr] == words[i].w &&
              (chip.tap.log_dr_v[n_dr] & ((64'd1 << words[i].w) - 1)) == v, $sformatf("DR scan %0d", n_dr));
        n_dr++;
      end
    end
    check(chip.tap.log_ir.size() == 916 && chip.tap.log_dr_n.size() == 1308,
          $sformatf("scan counts %0d IR, %0d DR", chip.tap.log_ir.size(), chip.tap.log_dr_n.size()));
    $display("programmed: %0d IR scans, %0d DR scans", chip.tap.log_ir.size(), chip.tap.log_dr_n.size());
    // repeated groups, counted from the scans the chip received
    n_da_grp = 0; n_nlsl_grp = 0; n_muc_grp = 0;
    foreach (chip.tap.log_dr_n[i]) begin
      if (chip.tap.log_dr_ir[i] == 7'b0100000 && chip.tap.log_dr_n[i] == 11) n_da_grp++;
      if (chip.tap.log_dr_ir[i] == 7'b0000010 && chip.tap.log_dr_n[i] == 37) n_nlsl_grp++;
      if (chip.tap.log_dr_ir[i] == 7'b0000001 && chip.tap.log_dr_n[i] == 31) n_muc_grp++;
    end
    check(n_da_grp == 128 && n_nlsl_grp == 8 && n_muc_grp == 256,
          $sformatf("groups: %0d DA entries, %0d NLSL, %0d micro-controller", n_da_grp, n_nlsl_grp, n_muc_grp));

    // 4./5. run in test-data mode for just over one counting window
    mode_sw = 1; bw_sel = BW_8;
    @(negedge chip_clk); io_rst_sw = 0; decode_on = 1; run_ref = 1; win_cyc = 0;
    beats0 = chip.n_beats; led0 = n_led_on;
    // the first 8-bit sample is loaded at the 8th clock edge after release,
    // so its first bit reaches the chip 8 clocks after the program starts
    begin
      int k;
      k = 0;
      do begin @(negedge chip_clk); k++; end while (!sample_load && k < 100);
      check(k == 7, $sformatf("first sample loaded at clock edge %0d after release", k + 1));
    end
    wait_chip(WINDOW + 20);
    check(n_display >= 1, "one counting window elapsed");
    $display("after one window: beats=%0d seen=%0d display=%1d%1d%1d", chip.n_beats - beats0, n_detect_seen,
             hex_digits[2], hex_digits[1], hex_digits[0]);
    check(int'(hex_digits[2]) * 100 + int'(hex_digits[1]) * 10 + int'(hex_digits[0]) == n_detect_seen,
          "display shows the beats of the first minute");
    check(n_led_on - led0 == chip.n_beats - beats0, "one LED flash per beat");
    check(n_led_off >= n_led_on - 1, "LED goes out between beats");

    // 6. sensor mode, 4-bit samples
    io_rst_sw = 1; decode_on = 0; run_ref = 0;
    repeat (2000) @(posedge clk2x);
    check(!chip_muctrl_en && !led_detect, "I/O RST stops the chip and the indicator");
    mode_sw = 0; bw_sel = BW_4; bits_left = 0;
    @(negedge chip_clk); io_rst_sw = 0; decode_on = 1;
    wait_chip(2000);
    decode_on = 0;

    // 7. another clock speed: CCONF = 3 gives f_ref / 32 (7.2 kHz), and
    //    one read trigger per chip clock
    cconf = 4'd3;
    wait_chip(4);
    begin
      realtime t0, t1;
      int nt;
      @(posedge chip_clk);
      while (chip_fast_mode) @(posedge chip_clk);
      t0 = $realtime; nt = n_rd_trig;
      repeat (16) @(posedge chip_clk);
      t1 = $realtime;
      if (!chip_fast_mode) begin
        check(t1 - t0 > 16 * 64 * REF_HALF - 1 && t1 - t0 < 16 * 64 * REF_HALF + 1,
              $sformatf("CCONF=3 chip clock period %0.1f ns", (t1 - t0) / 16));
        check(n_rd_trig - nt == 16, $sformatf("%0d read triggers in 16 chip clocks", n_rd_trig - nt));
        n_speed_change++;
      end
    end

    // mechanisms
    check(n_abort > 0, "RESET abort happened");
    check(n_samples_test > 1000 && n_samples_sensor > 100, $sformatf("samples test=%0d sensor=%0d", n_samples_test, n_samples_sensor));
    check(n_bw8 > 0 && n_bw4 > 0, "both sample widths used");
    check(n_led_on > 10 && n_led_off > 10, "LED flashes");
    check(chip.n_fast_entries > 10 && n_fast_clk > 100, $sformatf("fast mode entries=%0d fast clocks=%0d", chip.n_fast_entries, n_fast_clk));
    check(n_display > 0, "display update");
    check(n_speed_change > 0, "clock speed change");
    check(n_detect_fast > 0, "detection address seen for one fast clock");
    $display("mechanisms: ir=%0d dr=%0d da_groups=%0d nlsl_groups=%0d muc_groups=%0d abort=%0d test_samples=%0d sensor_samples=%0d bw8=%0d bw4=%0d led_on=%0d led_off=%0d fast_entries=%0d fast_clocks=%0d display_updates=%0d speed_changes=%0d rd_trig=%0d fast_detections=%0d",
             chip.tap.log_ir.size(), chip.tap.log_dr_n.size(), n_da_grp, n_nlsl_grp, n_muc_grp, n_abort, n_samples_test, n_samples_sensor,
             n_bw8, n_bw4, n_led_on, n_led_off, chip.n_fast_entries, n_fast_clk, n_display, n_speed_change, n_rd_trig, n_detect_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk2x);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
