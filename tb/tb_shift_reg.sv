// tb_shift_reg -- checks both shift directions of the board shift register.
// Random bytes are loaded and shifted out; the serial output must show the
// byte LSB first (programming direction) or MSB first (sample direction),
// one bit per shift cycle, with load taking priority over shift and a
// held value when neither is asserted.
module tb_shift_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_l, shift_l, load_m, shift_m;
  logic [7:0] d, q_l, q_m;
  logic sout_l, sout_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_reg #(.WIDTH(8), .LSB_FIRST(1'b1)) u_l (.clk, .rst_n, .load(load_l), .shift(shift_l), .d, .q(q_l), .sout(sout_l));
  shift_reg #(.WIDTH(8), .LSB_FIRST(1'b0)) u_m (.clk, .rst_n, .load(load_m), .shift(shift_m), .d, .q(q_m), .sout(sout_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    load_l = 0; shift_l = 0; load_m = 0; shift_m = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      logic [7:0] v = 8'($urandom);
      @(negedge clk); d = v; load_l = 1; load_m = 1; shift_l = 1; shift_m = 1; // load wins
      @(negedge clk); load_l = 0; load_m = 0; shift_l = 0; shift_m = 0; d = ~v;
      check(q_l == v && q_m == v, "load");
      @(negedge clk);
      check(q_l == v && q_m == v, "hold without shift");
      for (int b = 0; b < 8; b++) begin
        check(sout_l == v[b], $sformatf("LSB-first bit %0d", b));
        check(sout_m == v[7-b], $sformatf("MSB-first bit %0d", b));
        shift_l = 1; shift_m = 1;
        @(negedge clk);
        shift_l = 0; shift_m = 0;
      end
      check(q_l == 8'h00 && q_m == 8'h00, "zero fill after eight shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
