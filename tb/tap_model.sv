// tap_model -- behavioural model of the SensorDSP chip's JTAG test access
// port, for testbenches only.
//
// A full IEEE 1149.1 sixteen-state TAP: TMS is sampled on the rising edge
// of TCK, TDI is shifted into the instruction or data scan register in
// Shift-IR / Shift-DR, and on Update the shifted word is recorded. A 7-bit
// instruction register holds the last instruction; each data scan is
// logged together with that instruction, its bit count and its value
// (first bit shifted = bit 0). TRST low forces Test-Logic-Reset.
// The logs are read by the testbench through hierarchical references.
module tap_model (
  input logic tck,
  input logic tms,
  input logic tdi,
  input logic trst_n
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e        st;
  logic [6:0]  ir;
  logic [63:0] sh;
  int unsigned nbits;

  // scan log
  int unsigned      n_ir_scans, n_dr_scans;
  logic [6:0]       log_ir   [$];   // IR value of every IR update
  logic [6:0]       log_dr_ir[$];   // IR in force at each DR update
  int unsigned      log_dr_n [$];   // bits in each DR scan
  logic [63:0]      log_dr_v [$];   // value of each DR scan
  int unsigned      ir_bits  [$];   // bits in each IR scan

  initial begin
    st = TLR; ir = '0; sh = '0; nbits = 0; n_ir_scans = 0; n_dr_scans = 0;
  end

  always @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      st <= TLR;
    end else begin
      // actions of the current state
      case (st)
        CAP_DR, CAP_IR: begin sh <= '0; nbits <= 0; end
        SH_DR, SH_IR: begin
          sh[nbits] <= tdi;
          nbits     <= nbits + 1;
        end
        UPD_IR: begin end
        default: ;
      endcase
      // next state
      case (st)
        TLR:    st <= tms ? TLR    : RTI;
        RTI:    st <= tms ? SEL_DR : RTI;
        SEL_DR: st <= tms ? SEL_IR : CAP_DR;
        CAP_DR: st <= tms ? EX1_DR : SH_DR;
        SH_DR:  st <= tms ? EX1_DR : SH_DR;
        EX1_DR: st <= tms ? UPD_DR : PA_DR;
        PA_DR:  st <= tms ? EX2_DR : PA_DR;
        EX2_DR: st <= tms ? UPD_DR : SH_DR;
        UPD_DR: st <= tms ? SEL_DR : RTI;
        SEL_IR: st <= tms ? TLR    : CAP_IR;
        CAP_IR: st <= tms ? EX1_IR : SH_IR;
        SH_IR:  st <= tms ? EX1_IR : SH_IR;
        EX1_IR: st <= tms ? UPD_IR : PA_IR;
        PA_IR:  st <= tms ? EX2_IR : PA_IR;
        EX2_IR: st <= tms ? UPD_IR : SH_IR;
        UPD_IR: st <= tms ? SEL_DR : RTI;
        default: st <= TLR;
      endcase
    end
  end

  // record on entry to the update states (after the edge)
  always @(posedge tck) begin
    #1;
    if (st == UPD_IR) begin
      ir = sh[6:0];
      log_ir.push_back(sh[6:0]);
      ir_bits.push_back(nbits);
      n_ir_scans++;
    end else if (st == UPD_DR) begin
      log_dr_ir.push_back(ir);
      log_dr_n.push_back(nbits);
      log_dr_v.push_back(sh);
      n_dr_scans++;
    end
  end
endmodule
