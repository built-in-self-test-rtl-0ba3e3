// bist_top: built-in self-test for total-ionizing-dose effects in an ADC.
//
// Radiation slowly shifts comparator offsets and leakage in an ADC until it
// misses codes or loses linearity. This block lets the chip measure its own
// converter in place. A 2**CODE_BITS-step counter drives a delta-sigma DAC
// whose output is a slow, highly linear voltage ramp. During a self-test cycle
// an analog multiplexer puts that ramp on the ADC input instead of the normal
// signal. For every ramp step the ADC converts 2**AVG_LOG2 times at its full
// rate, the averager reduces those results to one byte and the byte is
// stored in a 4 KB result SRAM at the address equal to the ramp code. The
// stored transfer curve is read out over JTAG (through a parallel-to-serial
// converter) and analysed off chip with the ramp-histogram method for
// missing codes, offset, gain error, DNL and INL.
//
// The ADC under test is the two-step sub-ranging converter model with
// per-comparator offset inputs (tid_msb_offset, tid_lsb_offset) that stand
// for radiation damage; tie them to zero for an undamaged converter.
//
// Single clock clk, the ADC sample clock (16 MHz in the reference design);
// JTAG runs from the same clock through synchronisers (TCK <= clk/6).
// A full cycle lasts 2**CODE_BITS * (SETTLE_CYCLES + 2**AVG_LOG2 + 1) clocks,
// about 17.3 M clocks or 1.1 s at 16 MHz with the defaults.
// The block structure and sizes (12-bit counter and DAC, 8-bit ADC, average
// of 64, 4 KB SRAM, 8-bit serialiser, JTAG) follow the architecture; the DAC
// oversampling ratio, the settle time and all interface details are this
// design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned CODE_BITS     = 12,
  parameter int unsigned SUB_BITS      = 4,
  parameter int unsigned AVG_LOG2      = 6,
  parameter int unsigned DAC_OSR_LOG2  = 12,
  parameter int unsigned SETTLE_CYCLES = 2**DAC_OSR_LOG2 + 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // normal analog input of the ADC, and the ADC's digital output
  input  analog_t               analog_in,
  output logic [2*SUB_BITS-1:0] adc_data,
  // radiation-induced comparator offsets of the ADC model
  input  aoffset_t              tid_msb_offset [2**SUB_BITS-1],
  input  aoffset_t              tid_lsb_offset [2**SUB_BITS-1],
  // JTAG
  input  logic                  tck,
  input  logic                  tms,
  input  logic                  tdi,
  input  logic                  trst_n,
  output logic                  tdo,
  // status
  output logic                  bist_busy,
  output logic                  bist_done
);

  localparam int unsigned DATA_W = 2 * SUB_BITS;

  logic [CODE_BITS-1:0] code;
  logic                 code_last, cnt_clr, cnt_inc;
  logic                 ds_bit;
  analog_t              ramp_v, adc_vin;
  logic                 test_sel;
  logic                 avg_clr, avg_in_valid, avg_out_valid;
  logic [DATA_W-1:0]    avg_data;
  logic                 sram_we;
  logic [CODE_BITS-1:0] sram_addr;
  logic [DATA_W-1:0]    sram_wdata, sram_rdata;
  logic                 bist_start, rd_rewind;
  logic                 dr_capture, dr_shift, dr_update, dr_tdi, read_sout;

  ramp_counter #(.WIDTH(CODE_BITS)) u_counter (
    .clk, .rst_n, .clr(cnt_clr), .inc(cnt_inc), .code, .last(code_last)
  );

  ds_modulator #(.WIDTH(CODE_BITS)) u_dsm (
    .clk, .rst_n, .code, .bit_out(ds_bit)
  );

  ds_dac_filter #(.OSR_LOG2(DAC_OSR_LOG2)) u_dac_filter (
    .clk, .rst_n, .bit_in(ds_bit), .vout(ramp_v)
  );

  analog_mux u_mux (
    .test_sel, .normal_in(analog_in), .test_in(ramp_v), .vout(adc_vin)
  );

  subranging_adc #(.SUB_BITS(SUB_BITS)) u_adc (
    .clk, .rst_n, .vin(adc_vin),
    .msb_offset(tid_msb_offset), .lsb_offset(tid_lsb_offset),
    .code(adc_data)
  );

  averager #(.DATA_W(DATA_W), .AVG_LOG2(AVG_LOG2)) u_avg (
    .clk, .rst_n, .clr(avg_clr), .in_valid(avg_in_valid), .in_data(adc_data),
    .out_valid(avg_out_valid), .out_data(avg_data)
  );

  bist_sram #(.ADDR_W(CODE_BITS), .DATA_W(DATA_W)) u_sram (
    .clk, .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata)
  );

  bist_control #(
    .ADDR_W(CODE_BITS), .DATA_W(DATA_W), .AVG_LOG2(AVG_LOG2),
    .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_ctrl (
    .clk, .rst_n,
    .start(bist_start), .rd_next(dr_update), .rd_rewind,
    .busy(bist_busy), .done(bist_done),
    .test_sel,
    .cnt_clr, .cnt_inc, .code, .last(code_last),
    .avg_clr, .avg_in_valid, .avg_out_valid, .avg_data,
    .sram_we, .sram_addr, .sram_wdata
  );

  p2s_converter #(.WIDTH(DATA_W)) u_p2s (
    .clk, .rst_n, .load(dr_capture), .pdata(sram_rdata),
    .shift(dr_shift), .sin(dr_tdi), .sout(read_sout)
  );

  jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .bist_start, .rd_rewind, .bist_busy, .bist_done,
    .dr_capture, .dr_shift, .dr_update, .dr_tdi, .read_sout
  );

  initial assert (DAC_OSR_LOG2 >= CODE_BITS)
    else $error("bist_top: the DAC window must cover the full code period");

endmodule
