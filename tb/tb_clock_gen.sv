// tb_clock_gen -- checks the board clock generator.
//
// For several CCONF settings and for fast mode, the testbench counts
// reference cycles between rising edges of the chip clock and compares
// them with f_ref / 2^(CCONF+2) (slow) and f_ref / 2 (fast). It checks
// that the read trigger pulses once per chip clock period, only while the
// chip clock is high, starting a quarter period after its rising edge and
// ending with its falling edge, and that the programming clock is the
// reference divided by 16 (230.4 kHz -> 14.4 kHz).
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk2x = 1'b0, rst_n = 1'b0;
  logic [3:0] cconf = 4'd0;
  logic fast_mode = 1'b0;
  logic sdspclk, rd_trig, pgm_clk;
  int checks = 0, failures = 0;

  always #10 clk2x = ~clk2x;   // 20 ns reference period

  clock_gen dut (.*);

  int n_trig = 0, n_clk = 0;
  always @(posedge rd_trig) n_trig++;
  always @(posedge sdspclk) n_clk++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // measure one period of sdspclk in reference cycles, plus the trigger
  task automatic measure(input int exp_period);
    realtime t0, t1, tr_rise, tr_fall, t_fall;
    @(posedge sdspclk); @(posedge sdspclk);
    t0 = $realtime;
    @(negedge sdspclk); t_fall = $realtime;
    @(posedge sdspclk); t1 = $realtime;
    check(int'((t1 - t0) / 20.0) == exp_period,
          $sformatf("cconf=%0d fast=%0d period %0d refs, expected %0d", cconf, fast_mode, int'((t1 - t0) / 20.0), exp_period));
    // read trigger within the next period
    @(posedge rd_trig); tr_rise = $realtime;
    check(sdspclk == 1'b1, "rd_trig rises while clock high");
    check(int'((tr_rise - t1) * 4.0 / (t1 - t0)) == 1,
          $sformatf("rd_trig at quarter period (offset %0t)", tr_rise - t1));
    @(negedge rd_trig); tr_fall = $realtime;
    check(tr_fall - t1 == t_fall - t0, "rd_trig falls with the clock");
    // exactly one trigger pulse per clock period over four periods
    begin
      int nt, nc;
      @(posedge sdspclk); nt = n_trig; nc = n_clk;
      repeat (4) @(posedge sdspclk);
      check(n_trig - nt == 4 && n_clk - nc == 4,
            $sformatf("%0d read triggers in %0d clock periods", n_trig - nt, n_clk - nc));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk2x);
    rst_n = 1'b1;
    for (int c = 0; c < 7; c++) begin
      cconf = 4'(c);
      measure(1 << (c + 2));   // f = f_ref / 2^(c+2)
    end
    fast_mode = 1'b1;
    measure(2);
    fast_mode = 1'b0;
    cconf = 4'd6;
    measure(256);
    // programming clock: 16 reference cycles
    begin
      realtime a, b;
      @(posedge pgm_clk); a = $realtime;
      @(posedge pgm_clk); b = $realtime;
      check(int'((b - a) / 20.0) == 16, "programming clock = f_ref/16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk2x);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
