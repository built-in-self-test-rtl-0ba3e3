// subranging_adc: behavioural model of the two-step sub-ranging ADC under test.
//
// Behavioural model of the 8-bit converter the self-test circuit monitors. It
// is built like the device: a reference ladder of 2**SUB_BITS "large"
// segments, each made of 2**SUB_BITS "small" resistors, a coarse flash
// sub-ADC of 2**SUB_BITS-1 comparators on the large-segment taps giving the
// upper bits, and a fine flash sub-ADC of 2**SUB_BITS-1 comparators connected
// to the small taps of the segment the coarse result selects, giving the
// lower bits. Both comparator arrays feed thermometer-to-binary decoders and
// the two halves are captured in output registers.
//
// Each comparator has an input-referred offset (ports msb_offset and
// lsb_offset) so that total-ionizing-dose damage can be simulated. A coarse
// comparator offset makes the fine array look at the wrong segment near a
// segment boundary; the fine result then clips at all-ones or all-zeros and
// whole groups of 2**SUB_BITS codes go missing, which is the failure the
// self-test is meant to catch.
//
// The structure follows the device description; the ideal ladder, the offset
// ports, the one-register latency and the decoder form are this model's own.
//
// Interface: vin is sampled on each rising clk edge and its code appears on
// code after that edge (latency one clock, one conversion per clock). vin and
// the offsets are in units of (REF+ - REF-) / 2**VA_W.
module subranging_adc
  import bist_pkg::*;
#(
  parameter int unsigned SUB_BITS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  analog_t               vin,
  input  aoffset_t              msb_offset [2**SUB_BITS-1],
  input  aoffset_t              lsb_offset [2**SUB_BITS-1],
  output logic [2*SUB_BITS-1:0] code
);

  localparam int unsigned NCMP  = 2**SUB_BITS - 1;
  localparam int unsigned SEG   = 2**(VA_W - SUB_BITS);     // large resistor
  localparam int unsigned SMALL = 2**(VA_W - 2*SUB_BITS);   // small resistor
  localparam int unsigned CW    = VA_W + 3;                 // comparison width

  logic [NCMP-1:0]     msb_therm, lsb_therm;
  logic [SUB_BITS-1:0] msb, lsb;
  logic signed [CW-1:0] vin_s, seg_base;

  assign vin_s = signed'(CW'(vin));

  // Coarse flash: comparator k on tap (k+1) of the large-resistor ladder.
  always_comb begin
    for (int k = 0; k < NCMP; k++)
      msb_therm[k] = vin_s >= signed'(CW'((k + 1) * SEG)) + CW'(msb_offset[k]);
  end

  therm_decoder #(.BITS(SUB_BITS)) u_msb_dec (.therm(msb_therm), .bin(msb));

  // Fine flash: comparator j on small tap (j+1) inside the selected segment.
  assign seg_base = signed'(CW'(msb) * CW'(SEG));

  always_comb begin
    for (int j = 0; j < NCMP; j++)
      lsb_therm[j] = vin_s >= seg_base + signed'(CW'((j + 1) * SMALL)) + CW'(lsb_offset[j]);
  end

  therm_decoder #(.BITS(SUB_BITS)) u_lsb_dec (.therm(lsb_therm), .bin(lsb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= {msb, lsb};
  end

endmodule
