// sensordsp_pkg -- constants shared by the SensorDSP demonstration-board logic.
//
// Holds the SensorDSP TAP instruction codes, the bit widths of every word
// that the programming controller scans into the chip, the programming
// sequence (which words, how often repeated), the test-port multiplexer
// selects and the input bit-width encoding used by the input controller.
// The instruction codes, word widths and test-port selects are the chip's
// published values. The order of the programming sequence follows the
// chip's loading procedure (DA tables, DA configuration, NLSL, then
// micro-controller); the exact per-word framing (one IR scan before every
// data word, write enable pulsed as two scans of 1 then 0) and the
// bit-width select encoding are choices of this design.
package sensordsp_pkg;

  // ---- TAP instruction register (7 bits, one-hot) ----
  localparam int unsigned TAP_IR_W = 7;
  typedef logic [TAP_IR_W-1:0] tap_ir_t;
  localparam tap_ir_t MUCTRL_INSTR0 = 7'b0000001; // micro-controller instructions
  localparam tap_ir_t NLSL_INSTR0   = 7'b0000010; // NLSL instructions
  localparam tap_ir_t NLSL_INSTR1   = 7'b0000100; // NLSL configuration
  localparam tap_ir_t DA_INSTR0     = 7'b0001000; // write enable bits for all units
  localparam tap_ir_t DA_INSTR1     = 7'b0010000; // DA table address
  localparam tap_ir_t DA_INSTR2     = 7'b0100000; // DA table value
  localparam tap_ir_t DA_INSTR3     = 7'b1000000; // DA configuration

  // ---- data register widths of the programming words ----
  localparam int unsigned W_MUCTRL_INSTR = 31;
  localparam int unsigned W_MUCTRL_WE    = 2;
  localparam int unsigned W_NLSL_INSTR   = 37;
  localparam int unsigned W_NLSL_CONF    = 9;
  localparam int unsigned W_NLSL_WE      = 1;
  localparam int unsigned W_DA_ADDR      = 19;
  localparam int unsigned W_DA_VALUE     = 11;
  localparam int unsigned W_DA_WE        = 1;
  localparam int unsigned W_DA_CONF      = 34;
  localparam int unsigned W_MAX          = 37;

  // ---- repeat counts of the programming sequence ----
  localparam int unsigned N_DA_ENTRIES   = 128; // 16 tables x 8 entries
  localparam int unsigned N_NLSL_INSTR   = 8;
  localparam int unsigned N_MUCTRL_INSTR = 256;

  // One word of the programming sequence as the controller sees it: an IR or
  // DR scan of a given width. A group of words forms a segment that is
  // repeated; the last word of a segment carries the segment's first index
  // and its repeat count minus one.
  localparam int unsigned STEP_IDX_W = 5;
  typedef struct packed {
    logic                  is_ir;      // 1: instruction-register scan
    logic [5:0]            width;      // bits in the scan, 1..37
    logic                  seg_last;   // last word of its segment
    logic [STEP_IDX_W-1:0] seg_first;  // index of the segment's first word
    logic [7:0]            seg_rep_m1; // segment repeats minus one
    logic                  seq_last;   // last word of the whole sequence
  } pgm_step_t;

  localparam int unsigned N_STEPS = 25;

  function automatic pgm_step_t ir_step();
    return '{is_ir: 1'b1, width: 6'(TAP_IR_W), seg_last: 1'b0, seg_first: '0,
             seg_rep_m1: '0, seq_last: 1'b0};
  endfunction

  function automatic pgm_step_t dr_step(int unsigned w);
    return '{is_ir: 1'b0, width: 6'(w), seg_last: 1'b0, seg_first: '0,
             seg_rep_m1: '0, seq_last: 1'b0};
  endfunction

  function automatic pgm_step_t seg_end(pgm_step_t s, int unsigned first, int unsigned reps);
    pgm_step_t r = s;
    r.seg_last   = 1'b1;
    r.seg_first  = STEP_IDX_W'(first);
    r.seg_rep_m1 = 8'(reps - 1);
    return r;
  endfunction

  // The programming sequence. Every data word is preceded by the IR scan
  // that selects its register; the PROM holds the instruction byte too.
  //   0- 6  x128 : DA_INSTR1 addr(19), DA_INSTR2 value(11), DA_INSTR0 WE(1), WE(1)
  //   7-10  x1   : DA_INSTR1 addr(19) (cleared), DA_INSTR3 config(34)
  //  11-12  x1   : NLSL_INSTR1 config(9)
  //  13-17  x8   : NLSL_INSTR0 instr(37), DA_INSTR0 WE(1), WE(1)
  //  18-19  x1   : NLSL_INSTR1 config(9) (final truncation settings)
  //  20-24  x256 : MUCTRL_INSTR0 instr(31), DA_INSTR0 WE(2), WE(2)
  function automatic pgm_step_t pgm_step(logic [STEP_IDX_W-1:0] idx);
    pgm_step_t s;
    unique case (idx)
      5'd0:  s = ir_step();
      5'd1:  s = dr_step(W_DA_ADDR);
      5'd2:  s = ir_step();
      5'd3:  s = dr_step(W_DA_VALUE);
      5'd4:  s = ir_step();
      5'd5:  s = dr_step(W_DA_WE);
      5'd6:  s = seg_end(dr_step(W_DA_WE), 0, N_DA_ENTRIES);
      5'd7:  s = ir_step();
      5'd8:  s = dr_step(W_DA_ADDR);
      5'd9:  s = ir_step();
      5'd10: s = seg_end(dr_step(W_DA_CONF), 7, 1);
      5'd11: s = ir_step();
      5'd12: s = seg_end(dr_step(W_NLSL_CONF), 11, 1);
      5'd13: s = ir_step();
      5'd14: s = dr_step(W_NLSL_INSTR);
      5'd15: s = ir_step();
      5'd16: s = dr_step(W_NLSL_WE);
      5'd17: s = seg_end(dr_step(W_NLSL_WE), 13, N_NLSL_INSTR);
      5'd18: s = ir_step();
      5'd19: s = seg_end(dr_step(W_NLSL_CONF), 18, 1);
      5'd20: s = ir_step();
      5'd21: s = dr_step(W_MUCTRL_INSTR);
      5'd22: s = ir_step();
      5'd23: s = dr_step(W_MUCTRL_WE);
      5'd24: begin
        s = seg_end(dr_step(W_MUCTRL_WE), 20, N_MUCTRL_INSTR);
        s.seq_last = 1'b1;
      end
      default: s = dr_step(1);
    endcase
    return s;
  endfunction

  // Bytes the sequence takes in the PROM (each word padded to whole bytes).
  function automatic int unsigned pgm_image_bytes();
    int unsigned total = 0;
    int unsigned seg = 0;
    for (int unsigned i = 0; i < N_STEPS; i++) begin
      pgm_step_t s = pgm_step(STEP_IDX_W'(i));
      seg += (32'(s.width) + 7) / 8;
      if (s.seg_last) begin
        total += seg * (32'(s.seg_rep_m1) + 1);
        seg = 0;
      end
    end
    return total;
  endfunction

  // ---- SensorDSP test-port multiplexer selects ----
  typedef enum logic [2:0] {
    YSEL_DA_OUT     = 3'b000,
    YSEL_SAC_OUT    = 3'b001,
    YSEL_MAC_OUT    = 3'b010,
    YSEL_DA_BUF     = 3'b011,
    YSEL_SAC_BUF    = 3'b100,
    YSEL_MAC_BUF    = 3'b101,
    YSEL_MEM_DATA   = 3'b110,
    YSEL_PC         = 3'b111
  } ysel_e;

  // ---- serial input sample width (input controller select) ----
  typedef enum logic [1:0] {
    BW_8 = 2'b00,
    BW_4 = 2'b01,
    BW_2 = 2'b10,
    BW_1 = 2'b11
  } bitwidth_e;

  function automatic int unsigned bitwidth_bits(bitwidth_e bw);
    unique case (bw)
      BW_8: return 8;
      BW_4: return 4;
      BW_2: return 2;
      default: return 1;
    endcase
  endfunction

endpackage
