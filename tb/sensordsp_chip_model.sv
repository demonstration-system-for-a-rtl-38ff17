// sensordsp_chip_model -- behavioural model of the SensorDSP chip's pins,
// for the board testbench only.
//
// It holds a JTAG TAP model that logs everything scanned in, and a
// stand-in for the running heartbeat program: while the micro-controller
// is enabled its program counter walks round a small loop (addresses
// 0x00..0x3F). Every BEAT_PERIOD clocks a segment is complete: the model
// raises FAST_MODE for FAST_CYCLES clocks, runs through addresses from
// 0x40 as the feature-extraction code would, and halfway through visits
// DETECT_ADDR for a single fast clock -- the heartbeat code's "heart
// class" instruction, which it passes in one cycle at the fast rate. The
// 12-bit test port shows the program counter when select 111 is applied
// and a fixed pattern (0xABC) otherwise. The serial input pin is not
// interpreted here; the testbench decodes it.
module sensordsp_chip_model #(
  parameter int unsigned BEAT_PERIOD = 750,
  parameter int unsigned FAST_CYCLES = 64,
  parameter logic [7:0]  DETECT_ADDR = 8'hC8
) (
  input  logic        clk_in,
  input  logic        rd_trig,
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  input  logic        muctrl_en,
  input  logic        xin,
  input  logic [2:0]  ysel,
  output logic [11:0] ytest,
  output logic        fast_mode
);
  tap_model tap (.tck, .tms, .tdi, .trst_n);

  logic [7:0]  pc;
  int unsigned beat_cnt, fast_cnt;
  int unsigned n_beats, n_fast_entries;

  initial begin
    pc = '0; beat_cnt = 0; fast_cnt = 0; fast_mode = 1'b0;
    n_beats = 0; n_fast_entries = 0;
  end

  always @(posedge clk_in) begin
    if (!muctrl_en) begin
      pc <= '0; beat_cnt <= 0; fast_cnt <= 0; fast_mode <= 1'b0;
    end else if (fast_mode) begin
      if (fast_cnt == FAST_CYCLES - 1) begin
        fast_mode <= 1'b0; fast_cnt <= 0; pc <= 8'h00;
      end else begin
        fast_cnt <= fast_cnt + 1;
        pc <= (fast_cnt == FAST_CYCLES / 2 - 1) ? DETECT_ADDR : 8'h40 + 8'(fast_cnt[5:0]);
      end
    end else if (beat_cnt == BEAT_PERIOD - 1) begin
      beat_cnt <= 0; fast_cnt <= 0; fast_mode <= 1'b1; pc <= 8'h40;
      n_beats <= n_beats + 1; n_fast_entries <= n_fast_entries + 1;
    end else begin
      beat_cnt <= beat_cnt + 1;
      pc <= (pc + 8'd1) & 8'h3F;
    end
  end

  // rd_trig is only used inside the real chip for SRAM timing
  logic unused_rd_trig, unused_xin;
  assign unused_rd_trig = rd_trig;
  assign unused_xin     = xin;

  assign ytest = (ysel == 3'b111) ? {4'h0, pc} : 12'hABC;
endmodule
