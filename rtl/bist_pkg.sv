// bist_pkg: types and constants shared by the ADC self-test (BIST) blocks.
//
// Analog quantities (the ramp from the delta-sigma DAC, the external analog
// input, comparator offsets) are carried as unsigned fixed-point fractions of
// the ADC reference range REF- .. REF+: a value v on VA_W bits stands for
// REF- + v / 2**VA_W * (REF+ - REF-). This keeps the analog models in plain
// two-state integer arithmetic. The 16-bit width is this design's choice; it
// leaves 4 fractional bits below the 12-bit ramp step.
//
// The JTAG instruction codes are also this design's own: the control
// interface is a JTAG bus, but its instruction set is not fixed by the
// architecture. BYPASS is all ones as IEEE 1149.1 requires.
package bist_pkg;

  // Width of the fixed-point "analog" value, fraction of REF+ - REF-.
  localparam int unsigned VA_W = 16;

  typedef logic [VA_W-1:0]        analog_t;
  typedef logic signed [VA_W-1:0] aoffset_t;   // comparator input offset

  // JTAG instruction register
  localparam int unsigned IR_W = 4;

  typedef enum logic [IR_W-1:0] {
    IR_BIST_CTRL = 4'b0010,  // 2-bit DR: capture {done,busy}; update bit0=start, bit1=rewind read address
    IR_SRAM_READ = 4'b0100,  // 8-bit DR: capture loads next SRAM byte, shifts out LSB first
    IR_BYPASS    = 4'b1111   // 1-bit bypass register
  } jtag_instr_e;

  // IEEE 1149.1 TAP controller states
  typedef enum logic [3:0] {
    TAP_RESET      = 4'h0,
    TAP_IDLE       = 4'h1,
    TAP_SEL_DR     = 4'h2,
    TAP_CAPTURE_DR = 4'h3,
    TAP_SHIFT_DR   = 4'h4,
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SEL_IR     = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_e;

  // Self-test sequencer states
  typedef enum logic [1:0] {
    CTL_IDLE   = 2'd0,
    CTL_SETTLE = 2'd1,   // ramp step applied, waiting for the DAC output to settle
    CTL_AVG    = 2'd2,   // 2**AVG_LOG2 ADC samples go to the averager
    CTL_WRITE  = 2'd3    // averaged byte written to the SRAM
  } ctl_state_e;

endpackage
