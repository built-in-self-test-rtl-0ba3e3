// ds_modulator: digital first-order delta-sigma modulator of the ramp DAC.
//
// Turns the WIDTH-bit ramp code x into a one-bit stream whose density of ones
// is exactly x / 2**WIDTH. Every clock the code is added to a WIDTH-bit phase
// accumulator and the carry out of the addition is the output bit (an error-
// feedback first-order loop). For a constant code the bit pattern repeats
// with a period that divides 2**WIDTH, so any 2**WIDTH consecutive bits hold
// exactly x ones: a boxcar reconstruction filter of that length recovers the
// code without error, which is the linearity the ramp needs.
//
// The architecture calls for a 12-bit delta-sigma DAC whose resolution comes
// from oversampling; the loop order (first), the accumulator form and the
// clocking at the system clock are this design's choices.
//
// Interface: code is sampled every rising clk edge; bit_out is registered.
module ds_modulator #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] code,
  output logic             bit_out
);

  logic [WIDTH-1:0] acc;
  logic [WIDTH:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, code};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      bit_out <= 1'b0;
    end else begin
      acc     <= sum[WIDTH-1:0];
      bit_out <= sum[WIDTH];
    end
  end

endmodule
