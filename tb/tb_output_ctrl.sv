// tb_output_ctrl -- checks the heartbeat indicator.
//
// The testbench plays a program counter on the test port that loops
// through addresses and passes the "heartbeat" address a known number of
// times per counting window (sometimes staying on it for several cycles,
// which must count once). It checks that the multiplexer select stays on
// the program counter, that the LED lights in the cycle after a match
// and stays lit exactly LED_HOLD cycles, that a new detection restarts the
// hold, and that the three decimal digits show each window's count.
// Short hold and window lengths keep the run brief.
module tb_output_ctrl;
  import sensordsp_pkg::*;
  localparam int HOLD = 6, WIN = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] ytest = '0;
  logic [7:0]  control_sw = 8'hA5;
  ysel_e ysel;
  logic led_detect, detect;
  logic [2:0][3:0] digits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_ctrl #(.LED_HOLD(HOLD), .BPM_WINDOW(WIN)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model of LED and window count
  int ref_hold = 0, ref_cnt = 0, ref_disp = 0, win_cyc = 0;
  bit prev_match = 0;
  int n_detect = 0, n_window = 0, n_restart = 0;

  function automatic int bcd_val(logic [2:0][3:0] d);
    return d[2] * 100 + d[1] * 10 + d[0];
  endfunction

  // per-cycle scoreboard, evaluated after each clock edge
  always @(posedge clk) if (rst_n) begin
    bit m, det;
    m   = (ytest[7:0] == control_sw);
    det = m && !prev_match;
    prev_match = m;
    if (det) begin
      if (ref_hold > 0) n_restart++;
      ref_hold = HOLD; n_detect++;
    end else if (ref_hold > 0) ref_hold--;
    if (win_cyc == WIN - 1) begin
      ref_disp = det ? (ref_cnt + 1 > 999 ? 999 : ref_cnt + 1) : ref_cnt;
      ref_cnt = 0; win_cyc = 0; n_window++;
    end else begin
      win_cyc++;
      if (det) ref_cnt = ref_cnt + 1 > 999 ? 999 : ref_cnt + 1;
    end
    #1;
    check(led_detect == (ref_hold > 0), "LED hold");
    check(bcd_val(digits) == ref_disp, $sformatf("digits %0d expected %0d", bcd_val(digits), ref_disp));
    check(ysel == YSEL_PC, "test port shows the program counter");
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      case ($urandom_range(0, 19))
        0:       ytest = {4'($urandom), control_sw};        // heartbeat address
        1:       ytest = ytest;                              // stay
        default: ytest = {4'($urandom), 8'($urandom_range(0, 255)) & 8'h7F}; // elsewhere
      endcase
    end
    // back-to-back detections restart the hold
    @(negedge clk) ytest = 12'h0A5;
    @(negedge clk) ytest = 12'h001;
    @(negedge clk) ytest = 12'h0A5;
    @(negedge clk) ytest = 12'h002;
    repeat (WIN + 10) @(negedge clk);
    check(n_detect > 50 && n_window >= 10 && n_restart > 0, "mechanisms exercised");
    $display("detections=%0d windows=%0d hold_restarts=%0d", n_detect, n_window, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
