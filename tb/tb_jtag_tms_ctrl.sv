// tb_jtag_tms_ctrl -- checks the TMS sequencer against a standard TAP.
//
// For IR and DR scans of 1 to 37 bits the testbench drives go/ir_dr,
// raises compare from its own bit count, and checks: the TMS level of
// every cycle against the expected walk (1,[1],0, N x 0, 1,1, 0), the
// cycle count of a scan (N + 5 for DR, N + 6 for IR from go to done),
// that a reference TAP model samples exactly N bits, and that the value
// it captured equals the bits sent.
module tb_jtag_tms_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic go = 1'b0, ir_dr = 1'b0, compare;
  logic tms, shift, tap_shift, done, idle;
  logic tdi = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  jtag_tms_ctrl dut (.*);
  tap_model tap (.tck(~clk), .tms(tms), .tdi(tdi), .trst_n(rst_n));

  int unsigned sent, width;
  logic [63:0] word;
  assign compare = shift && ((sent + (tap_shift ? 1 : 0)) == width - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input bit is_ir, input int unsigned w, input logic [63:0] v);
    logic exp_tms [$];
    int unsigned cyc = 0, k = 0;
    int unsigned n_ir0 = tap.n_ir_scans, n_dr0 = tap.n_dr_scans;
    width = w; word = v; sent = 0;
    // expected TMS: IDLE(with go) SELDR [SELIR] CAP SHIFTxw EXIT UPD
    exp_tms.push_back(0); exp_tms.push_back(1);
    if (is_ir) exp_tms.push_back(1);
    exp_tms.push_back(0);
    repeat (w) exp_tms.push_back(0);
    exp_tms.push_back(1); exp_tms.push_back(1);
    @(negedge clk);
    go = 1'b1; ir_dr = is_ir; tdi = word[0];
    forever begin
      bit ts, dn;
      if (k < exp_tms.size()) check(tms == exp_tms[k], $sformatf("tms cycle %0d w=%0d ir=%0d", k, w, is_ir));
      k++;
      ts = tap_shift; dn = done;
      @(posedge clk); #1;
      go = 1'b0;
      if (ts) sent++;
      tdi = word[sent];
      cyc++;
      if (dn) break;
      @(negedge clk); #1;
    end
    check(cyc == w + (is_ir ? 6 : 5), $sformatf("scan length %0d for w=%0d ir=%0d", cyc, w, is_ir));
    @(negedge clk); @(negedge clk); @(negedge clk);
    if (is_ir) begin
      check(tap.n_ir_scans == n_ir0 + 1, "one IR update");
      check(tap.ir_bits[$] == w, $sformatf("IR bits %0d", tap.ir_bits[$]));
      check(tap.log_ir[$] == v[6:0], "IR value");
    end else begin
      check(tap.n_dr_scans == n_dr0 + 1, "one DR update");
      check(tap.log_dr_n[$] == w, $sformatf("DR bits %0d expected %0d", tap.log_dr_n[$], w));
      check((tap.log_dr_v[$] & ((64'd1 << w) - 1)) == (v & ((64'd1 << w) - 1)), "DR value");
    end
    check(tap.st == tap.RTI, "TAP back in Run-Test/Idle");
    check(idle, "sequencer idle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    scan(1'b1, 7, 64'h55);
    for (int unsigned w = 1; w <= 37; w++)
      scan(1'b0, w, {$urandom, $urandom});
    scan(1'b1, 7, 64'h2A);
    scan(1'b0, 1, 64'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
