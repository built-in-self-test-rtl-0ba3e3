// analog_mux: behavioural model of the analog input multiplexer of the ADC.
//
// Behavioural model of an analog switch pair: with test_sel low the ADC sees
// the normal analog input, with test_sel high it sees the self-test ramp from
// the delta-sigma DAC. Switching is modelled as ideal and instantaneous (no
// on-resistance, charge injection or leakage). Both inputs and the output are
// fixed-point analog values (see bist_pkg).
module analog_mux
  import bist_pkg::*;
(
  input  logic    test_sel,
  input  analog_t normal_in,
  input  analog_t test_in,
  output analog_t vout
);

  always_comb vout = test_sel ? test_in : normal_in;

endmodule
