// tb_bist_top: end-to-end test of the self-test system at reduced size
// (8-bit ramp, DAC window of 256 bits), so that both the clean and the
// damaged self-test cycles and their JTAG read-outs run in seconds. See
// bist_top_flow.svh for the flow and the checks.
module tb_bist_top;
  import bist_pkg::*;
  localparam int unsigned SUB_BITS = 4;
  localparam int unsigned CODE_BITS = 8, AVG_LOG2 = 6, DAC_OSR_LOG2 = 8;
  localparam int TCK_HALF = 4;
  localparam bit DO_CLEAN_RUN = 1'b1;

  logic clk = 0, rst_n = 0;
  analog_t analog_in;
  logic [7:0] adc_data;
  aoffset_t tid_msb_offset [15];
  aoffset_t tid_lsb_offset [15];
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo, bist_busy, bist_done;

  bist_top #(.CODE_BITS(CODE_BITS), .AVG_LOG2(AVG_LOG2), .DAC_OSR_LOG2(DAC_OSR_LOG2)) dut (.*);

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
