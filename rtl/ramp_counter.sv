// ramp_counter: the code generator of the self-test ramp.
//
// A WIDTH-bit up-counter (12 bits in the reference configuration) whose value
// is the digital input of the delta-sigma DAC, so that stepping it through all
// 2**WIDTH codes produces a monotonic voltage ramp at the ADC input. The
// counter width follows the architecture; the synchronous clear, the count
// enable and the terminal-count flag are this design's choices, used by the
// sequencer to start a ramp and to recognise its last step.
//
// The count is held in a triple-modular-redundant register (tmr_reg) so that
// a single upset cannot skip or repeat a ramp step; that hardening is this
// design's reading of the architecture's call for TMR.
//
// Interface: clr has priority over inc; both act on the rising clk edge.
// last is combinational and high while the count is 2**WIDTH-1. After the top
// code the counter wraps to zero.
module ramp_counter #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] code,
  output logic             last
);

  tmr_reg #(.WIDTH(WIDTH)) u_code (
    .clk, .rst_n,
    .en (clr | inc),
    .d  (clr ? '0 : code + 1'b1),
    .q  (code)
  );

  assign last = &code;

endmodule
