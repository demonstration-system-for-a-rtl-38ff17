// input_ctrl -- input half of the I/O controller CPLD: feeds samples to
// the SensorDSP chip's serial data input.
//
// The chip takes its input x[k] as a serial bit stream, N bits per sample
// (N = 8, 4, 2 or 1, matching the chip's configured input bit-width). The
// controller runs an N-cycle frame on the chip's clock. In the last cycle
// of a frame it reads one sample -- from the AD670 converter (R/W high,
// /CE low) in sensor mode, or from the test-data PROM (PROM /CE low) in
// test mode -- and loads it into an 8-bit shift register at the frame's
// end. Over the next N cycles the register shifts the sample out MSB
// first, so an N-bit sample uses the top N bits of the byte. After each
// read the test-data PROM address advances, so the PROM is stepped at the
// same rate at which the A/D would be sampled. The top four PROM address
// bits are the DATAROMSEL switches (16 blocks of 4 KB).
//
// On the board the A/D and the PROM share one tri-state data bus and the
// controller disables one of them; here the two data buses are separate
// inputs and the mode selects between them, which is the same function.
// The frame, the MSB-first shift and the read-then-load timing follow the
// document's timing diagram; the 2-bit bit-width encoding and the
// separate buses are this design's choices. The AD670 starts its next
// conversion after each read and finishes it (10 us) long before the next
// frame at the board's sub-kHz sample rates.
//
// Interface: clk (chip clock), rst_n (I/O RST switch / power-on),
// mode (1 = test data, 0 = sensor), bw (bitwidth_e), datarom_sel[3:0],
// ad_data, prom_data in; ad_rw, ad_ce_n, prom_ce_n, prom_addr, xin,
// sample_load out.
module input_ctrl
  import sensordsp_pkg::*;
#(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned SEL_W  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode,
  input  bitwidth_e               bw,
  input  logic [SEL_W-1:0]        datarom_sel,
  input  logic [7:0]              ad_data,
  output logic                    ad_rw,
  output logic                    ad_ce_n,
  input  logic [7:0]              prom_data,
  output logic                    prom_ce_n,
  output logic [SEL_W+ADDR_W-1:0] prom_addr,
  output logic                    xin,
  output logic                    sample_load
);

  logic [2:0]        frame_q;
  logic [2:0]        last_cnt;
  logic [ADDR_W-1:0] addr_q;
  logic [7:0]        bus;
  logic              read_cyc;

  assign last_cnt = 3'(bitwidth_bits(bw) - 1);
  assign read_cyc = (frame_q >= last_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '0;
      addr_q  <= '0;
    end else begin
      frame_q <= read_cyc ? 3'd0 : frame_q + 1'b1;
      if (read_cyc && mode) addr_q <= addr_q + 1'b1;
    end
  end

  assign ad_rw       = read_cyc && !mode;
  assign ad_ce_n     = !(read_cyc && !mode);
  assign prom_ce_n   = !(read_cyc && mode);
  assign prom_addr   = {datarom_sel, addr_q};
  assign bus         = mode ? prom_data : ad_data;
  assign sample_load = read_cyc;

  shift_reg #(.WIDTH(8), .LSB_FIRST(1'b0)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (read_cyc),
    .shift (!read_cyc),
    .d     (bus),
    .q     (),
    .sout  (xin)
  );

endmodule
