// ds_dac_filter: behavioural model of the analog back end of the ramp DAC.
//
// Behavioural model, not synthesizable intent: it stands for the one-bit DAC
// switch and the analog reconstruction low-pass filter that turn the
// modulator bit stream into the test voltage. The filter is modelled as an
// ideal boxcar (moving average) over the last 2**OSR_LOG2 bits: the output is
// the count of ones in that window, scaled to the full VA_W-bit analog range.
// With OSR_LOG2 equal to the modulator width the output reproduces the ramp
// code exactly once the window holds only bits of the current code, that is
// 2**OSR_LOG2 clocks after a step. Real filters would add a settling tail and
// some noise; neither is modelled.
//
// The oversampling ratio is not specified by the architecture beyond "high";
// 2**12 is this design's choice, the smallest window that gives 12 bits from
// a first-order stream.
//
// Interface: bit_in sampled every rising clk edge; vout registered, in units
// of (REF+ - REF-) / 2**VA_W. OSR_LOG2 must not exceed VA_W.
module ds_dac_filter
  import bist_pkg::*;
#(
  parameter int unsigned OSR_LOG2 = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    bit_in,
  output analog_t vout
);

  localparam int unsigned LEN = 2 ** OSR_LOG2;

  logic [LEN-1:0]    window;   // window[LEN-1] is the oldest bit
  logic [OSR_LOG2:0] ones;     // 0 .. LEN
  logic [OSR_LOG2:0] ones_next;

  assign ones_next = ones + {{OSR_LOG2{1'b0}}, bit_in} - {{OSR_LOG2{1'b0}}, window[LEN-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window <= '0;
      ones   <= '0;
    end else begin
      window <= {window[LEN-2:0], bit_in};
      ones   <= ones_next;
    end
  end

  // Scale the count to the analog range, saturating a full window of ones.
  always_comb begin
    if (ones[OSR_LOG2]) vout = '1;
    else                vout = analog_t'({ones[OSR_LOG2-1:0], {(VA_W-OSR_LOG2){1'b0}}});
  end

  initial assert (OSR_LOG2 >= 2 && OSR_LOG2 <= VA_W)
    else $error("ds_dac_filter: OSR_LOG2 out of range");

endmodule
