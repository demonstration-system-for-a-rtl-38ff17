// tb_input_ctrl -- checks the serial sample feed of the I/O controller.
//
// Behavioural A/D and test-data PROM models answer the controller's read
// strobes. For each bit-width (8, 4, 2, 1) and both modes the testbench
// rebuilds the samples from the serial output (MSB first, N bits per
// sample) and compares them with the top N bits of the values the
// models returned, checks one read strobe every N cycles (the sample
// rate), that only the selected source is enabled, and that the PROM
// address advances once per sample inside the DATAROMSEL block.
module tb_input_ctrl;
  import sensordsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mode;
  bitwidth_e bw;
  logic [3:0] datarom_sel;
  logic [7:0] ad_data, prom_data;
  logic ad_rw, ad_ce_n, prom_ce_n, xin, sample_load;
  logic [15:0] prom_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_ctrl dut (.*);

  // A/D model: next conversion result, advanced by each read
  logic [7:0] ad_val;
  assign ad_data   = ad_val;
  // the read strobe ends the conversion cycle; the next result follows
  always @(posedge clk) if (!ad_ce_n && ad_rw) #1 ad_val = 8'($urandom);
  // PROM model: contents are a hash of the address
  function automatic logic [7:0] prom_byte(logic [15:0] a);
    return 8'(a * 8'd37 + (a >> 8) * 8'd11 + 8'h5A);
  endfunction
  assign prom_data = prom_byte(prom_addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic m, input bitwidth_e b, input int nsamp);
    int n = bitwidth_bits(b);
    logic [7:0] expq [$];
    logic [15:0] a0;
    int cyc = 0, last_read = -1;
    mode = m; bw = b; datarom_sel = 4'($urandom);
    rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    a0 = {datarom_sel, 12'd0};
    // collect reads and serial bits
    for (int s = 0; s < nsamp + 1; s++) begin
      logic [7:0] got = '0;
      // the sample loaded at the end of the previous frame is shifted now
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        cyc++;
        got = {got[6:0], xin};
        if (!ad_ce_n || !prom_ce_n) begin
          check(m ? (ad_ce_n && !prom_ce_n && !ad_rw) : (!ad_ce_n && ad_rw && prom_ce_n), "only the selected source is read");
          if (last_read >= 0) check(cyc - last_read == n, $sformatf("read every %0d cycles", n));
          last_read = cyc;
          if (m) begin
            check(prom_addr == a0 + 16'(expq.size()), "PROM address steps once per sample");
            expq.push_back(prom_data);
          end else begin
            expq.push_back(ad_val);
          end
          check(k == n - 1, "read in the frame's last cycle");
        end
      end
      check(expq.size() == s + 1, $sformatf("one read in frame %0d", s));
      if (s > 0 && expq.size() >= s) begin
        logic [7:0] e = expq[s-1];
        logic [7:0] g = got & 8'((1 << n) - 1);
        check(g == (e >> (8 - n)), $sformatf("bw=%0d mode=%0d sample %0d got %h exp %h", n, m, s, g, e >> (8 - n)));
      end
    end
  endtask

  initial begin
    mode = 0; bw = BW_8; datarom_sel = 0; ad_val = 8'h81;
    repeat (2) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      run(m[0], BW_8, 40);
      run(m[0], BW_4, 40);
      run(m[0], BW_2, 40);
      run(m[0], BW_1, 40);
    end
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
