// therm_decoder: thermometer-to-binary decoder of a flash sub-ADC.
//
// A flash converter's comparator array yields a thermometer code: comparator
// k is high when the input exceeds reference k. The decoder turns the
// 2**BITS-1 comparator outputs into a BITS-bit binary code. It counts the
// ones rather than looking for the top of the thermometer, so a single bubble
// (an out-of-order comparator, for example one shifted by a radiation-induced
// offset) costs at most one code instead of a large jump. The presence of the
// decoder follows the architecture; the ones-counting form is this design's
// choice.
//
// Interface: purely combinational; therm[0] is the lowest comparator.
module therm_decoder #(
  parameter int unsigned BITS = 4
) (
  input  logic [2**BITS-2:0] therm,
  output logic [BITS-1:0]    bin
);

  always_comb begin
    bin = '0;
    for (int i = 0; i < 2**BITS-1; i++) bin = bin + BITS'(therm[i]);
  end

endmodule
