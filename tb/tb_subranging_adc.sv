// tb_subranging_adc: checks the converter model three ways.
//  1. No offsets: every input gives floor(v / 256), the ideal 8-bit code,
//     one clock after it is applied (latency 1).
//  2. A positive offset on coarse comparator 7 (the mid-scale tap): inputs
//     just above mid-scale stay in segment 7 and the fine result clips at
//     0x7F, so codes 0x80.. are missing - the sub-ranging failure mode.
//  3. A negative offset on the same comparator: inputs just below mid-scale
//     jump to segment 8 and read 0x80.
// Expected values come from these rules, not from the model.
module tb_subranging_adc;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  analog_t vin;
  aoffset_t msb_offset [15];
  aoffset_t lsb_offset [15];
  logic [7:0] code;
  int checks = 0, failures = 0;

  subranging_adc #(.SUB_BITS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int v, input int expect_code, input string what);
    vin = analog_t'(v);
    @(posedge clk); #1;
    checks++;
    if (int'(code) != expect_code) begin
      failures++;
      if (failures < 20) $display("FAIL %s: v=%0d code=%02h expected %02h", what, v, code, expect_code);
    end
  endtask

  initial begin
    int exp_c;
    foreach (msb_offset[i]) begin msb_offset[i] = '0; lsb_offset[i] = '0; end
    vin = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. ideal transfer curve, every 16th fixed-point step
    for (int v = 0; v < 65536; v += 16) convert(v, v >> 8, "ideal");
    // latency: the code must not change before the sampling edge
    vin = analog_t'(16'h4000);
    @(posedge clk); #1;
    vin = analog_t'(16'h8000);
    #2 checks++;
    if (code != 8'h40) begin failures++; $display("FAIL latency: %02h", code); end
    // 2. coarse comparator 7 shifted up by 1000
    msb_offset[7] = aoffset_t'(1000);
    for (int v = 30000; v < 36000; v += 8) begin
      if (v >= 32768 && v < 32768 + 1000) exp_c = 8'h7F;
      else exp_c = v >> 8;
      convert(v, exp_c, "offset+");
    end
    // 3. shifted down by 1000
    msb_offset[7] = aoffset_t'(-1000);
    for (int v = 30000; v < 36000; v += 8) begin
      if (v >= 32768 - 1000 && v < 32768) exp_c = 8'h80;
      else exp_c = v >> 8;
      convert(v, exp_c, "offset-");
    end
    // fine comparator offset moves one transition inside each segment
    msb_offset[7] = '0;
    lsb_offset[2] = aoffset_t'(100);   // transition 2->3 moves from 768 to 868 in-segment
    for (int v = 4096 + 700; v < 4096 + 900; v++) begin
      exp_c = (v - 4096 < 768) ? 8'h12 : (v - 4096 < 868) ? 8'h12 : 8'h13;
      convert(v, exp_c, "lsb offset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
