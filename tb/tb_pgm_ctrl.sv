// tb_pgm_ctrl -- checks the programming controller end to end against a
// reference TAP.
//
// The testbench builds a program-PROM image in the layout the controller
// expects: for every word of the loading procedure, the TAP instruction
// byte (codes of the chip's instruction table) or the data bytes (random),
// each word padded to whole bytes, lowest byte first. The image is placed
// in program block PGMROMSEL = 5. After START the TAP model must record,
// in order: every instruction with 7 bits and the right code, every data
// word with the width the chip's table gives for the instruction in force
// (DA address 19, DA value 11, write enables 1/1/2, DA configuration 34,
// NLSL instruction 37, NLSL configuration 9, micro-controller
// instruction 31) and with the bytes stored in the PROM; 128 DA entries,
// 8 NLSL and 256 micro-controller instructions. It also checks the LED
// states (IDLE green, PROGRAM red, RUN both), TRST held in IDLE, RESET
// abandoning a run in progress, and the total time: one TDI bit per clock
// plus a fixed 6 clocks per word (7 for an instruction).
module tb_pgm_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reset_btn = 1'b0, start_btn = 1'b0;
  logic [3:0] romsel = 4'd5;
  logic [15:0] prom_addr;
  logic [7:0]  prom_data;
  logic tck, tms, tdi, trst_n, led_green, led_red, pgm_idle, programmed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pgm_ctrl dut (.*);
  tap_model tap (.tck, .tms, .tdi, .trst_n);

  logic [7:0] prom [65536];
  assign prom_data = prom[prom_addr];

  // expected word list: IR code (0 = data word) and width
  typedef struct { logic [6:0] ir; int w; } word_t;
  word_t words [$];

  task automatic add_ir(input logic [6:0] code); words.push_back('{code, 7}); endtask
  task automatic add_dr(input int w);            words.push_back('{7'd0, w}); endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int a;
    int exp_cycles, n_ir, n_dr;
    int t_start, t_end;
    logic [6:0] cur_ir;
    // ---- loading procedure ----
    for (int i = 0; i < 128; i++) begin
      add_ir(7'b0010000); add_dr(19);
      add_ir(7'b0100000); add_dr(11);
      add_ir(7'b0001000); add_dr(1); add_dr(1);
    end
    add_ir(7'b0010000); add_dr(19);
    add_ir(7'b1000000); add_dr(34);
    add_ir(7'b0000100); add_dr(9);
    for (int i = 0; i < 8; i++) begin
      add_ir(7'b0000010); add_dr(37);
      add_ir(7'b0001000); add_dr(1); add_dr(1);
    end
    add_ir(7'b0000100); add_dr(9);
    for (int i = 0; i < 256; i++) begin
      add_ir(7'b0000001); add_dr(31);
      add_ir(7'b0001000); add_dr(2); add_dr(2);
    end
    // ---- PROM image ----
    foreach (prom[i]) prom[i] = 8'($urandom);
    a = int'(romsel) << 12;
    exp_cycles = 0;
    foreach (words[i]) begin
      if (words[i].ir != 0) begin prom[a] = {1'b0, words[i].ir}; a++; end
      else a += (words[i].w + 7) / 8;
      exp_cycles += words[i].w + 6 + (words[i].ir != 0 ? 1 : 0);
    end
    check(a - (int'(romsel) << 12) < 4096, "program fits in one 4 KB block");
    $display("program image: %0d bytes, %0d words", a - (int'(romsel) << 12), words.size());

    // ---- reset, IDLE ----
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(led_green && !led_red && pgm_idle && !trst_n, "IDLE: green LED, TRST asserted");

    // ---- start, then RESET in the middle ----
    start_btn = 1'b1; @(posedge clk); #1 start_btn = 1'b0;
    repeat (300) @(posedge clk);
    #1;
    check(!led_green && led_red && trst_n, "PROGRAM: red LED");
    reset_btn = 1'b1; @(posedge clk); @(posedge clk); #1 reset_btn = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(pgm_idle && led_green && !led_red && !trst_n, "RESET returns to IDLE");
    tap.log_ir.delete(); tap.log_dr_ir.delete(); tap.log_dr_n.delete(); tap.log_dr_v.delete(); tap.ir_bits.delete();

    // ---- full run ----
    start_btn = 1'b1; @(posedge clk); t_start = 0; #1 start_btn = 1'b0;
    while (!programmed) begin @(posedge clk); t_start++; #1; end
    t_end = t_start;
    check(led_green && led_red && trst_n, "RUN: both LEDs");
    check(t_end == exp_cycles, $sformatf("programming took %0d clocks, expected %0d", t_end, exp_cycles));
    repeat (4) @(posedge clk);

    // ---- compare the TAP log ----
    n_ir = 0; n_dr = 0; cur_ir = '0;
    a = int'(romsel) << 12;
    foreach (words[i]) begin
      if (words[i].ir != 0) begin
        check(n_ir < tap.log_ir.size() && tap.log_ir[n_ir] == words[i].ir && tap.ir_bits[n_ir] == 7,
              $sformatf("IR scan %0d", n_ir));
        cur_ir = words[i].ir; n_ir++; a++;
      end else begin
        logic [63:0] v;
        int nb;
        v  = '0;
        nb = (words[i].w + 7) / 8;
        for (int b = 0; b < nb; b++) v[8*b +: 8] = prom[a + b];
        v &= (64'd1 << words[i].w) - 1;
        a += nb;
        if (n_dr < tap.log_dr_n.size())
          check(tap.log_dr_ir[n_dr] == cur_ir && tap.log_dr_n[n_dr] == words[i].w &&
                (tap.log_dr_v[n_dr] & ((64'd1 << words[i].w) - 1)) == v,
                $sformatf("DR scan %0d: ir %b bits %0d (exp %0d) value %h exp %h", n_dr, tap.log_dr_ir[n_dr], tap.log_dr_n[n_dr], words[i].w, tap.log_dr_v[n_dr], v));
        else check(0, "missing DR scan");
        n_dr++;
      end
    end
    check(tap.log_ir.size() == n_ir && tap.log_dr_n.size() == n_dr,
          $sformatf("scan counts IR %0d/%0d DR %0d/%0d", tap.log_ir.size(), n_ir, tap.log_dr_n.size(), n_dr));
    check(prom_addr == 16'(a), "PROM address ends after the image");
    check(tap.st == tap.RTI, "TAP left in Run-Test/Idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
