// tb_bist_top_full: end-to-end test of the self-test system at its full
// default size: 4096-step ramp from the 12-bit DAC (4096-bit window), average
// of 64, 4 KB result memory, all 4096 bytes read over JTAG. Runs a clean and a
// damaged self-test cycle (about 17 M clocks each). See bist_top_flow.svh.
module tb_bist_top_full;
  import bist_pkg::*;
  localparam int unsigned SUB_BITS = 4;
  localparam int unsigned CODE_BITS = 12, AVG_LOG2 = 6, DAC_OSR_LOG2 = 12;
  localparam int TCK_HALF = 4;
  localparam bit DO_CLEAN_RUN = 1'b1;

  logic clk = 0, rst_n = 0;
  analog_t analog_in;
  logic [7:0] adc_data;
  aoffset_t tid_msb_offset [15];
  aoffset_t tid_lsb_offset [15];
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, bist_busy, bist_done;

  bist_top dut (.*);

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
