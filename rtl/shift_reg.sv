// shift_reg -- parallel-to-serial shift register of the board's CPLDs.
//
// Both board interfaces to the SensorDSP chip are serial: the programming
// PROM bytes go out LSB first on TDI, and the A/D or test-data samples go
// out MSB first on the chip's serial data input. This register serves
// both: `load` captures the parallel byte, `shift` moves the next bit to
// the serial output, and LSB_FIRST picks the direction. Load has priority
// over shift. The serial output is the register's end bit, so a loaded
// byte presents its first bit in the cycle after the load edge with no
// further shift. Vacated positions fill with zeros.
//
// Interface: clk, rst_n (async, active low), load, shift, d (WIDTH bits),
// q (the register contents, for inspection), sout (serial output).
// Timing: one bit per clock on which `shift` is high.
// The width (8) and the two shift directions are the document's; the zero
// fill and load priority are this design's choice.
module shift_reg #(
  parameter int unsigned WIDTH     = 8,
  parameter bit          LSB_FIRST = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             sout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (load)
      q <= d;
    else if (shift)
      q <= LSB_FIRST ? {1'b0, q[WIDTH-1:1]} : {q[WIDTH-2:0], 1'b0};
  end

  assign sout = LSB_FIRST ? q[0] : q[WIDTH-1];

endmodule
