// tb_bist_top_10bit: the self-test system configured for a 10-bit converter
// (two 5-bit flash halves, 10-bit averager, result words and JTAG read
// register) with the full 12-bit, 4096-step ramp: the widest ADC the 12-bit
// DAC is meant to serve. Runs the damaged-converter cycle of
// bist_top_flow.svh; damage offsets sit on coarse comparators 2, 7 and 11.
module tb_bist_top_10bit;
  import bist_pkg::*;
  localparam int unsigned SUB_BITS = 5;
  localparam int unsigned CODE_BITS = 12, AVG_LOG2 = 6, DAC_OSR_LOG2 = 12;
  localparam int TCK_HALF = 4;
  localparam bit DO_CLEAN_RUN = 1'b0;

  logic clk = 0, rst_n = 0;
  analog_t analog_in;
  logic [2*SUB_BITS-1:0] adc_data;
  aoffset_t tid_msb_offset [2**SUB_BITS-1];
  aoffset_t tid_lsb_offset [2**SUB_BITS-1];
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, bist_busy, bist_done;

  bist_top #(.CODE_BITS(CODE_BITS), .SUB_BITS(SUB_BITS), .AVG_LOG2(AVG_LOG2), .DAC_OSR_LOG2(DAC_OSR_LOG2)) dut (.*);

  always #5 clk = ~clk;

  `include "jtag_driver.svh"
  `include "bist_top_flow.svh"

  // watchdog: three full cycles' worth of clocks plus JTAG traffic
  initial begin
    repeat (3 * CYCLE + 2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
