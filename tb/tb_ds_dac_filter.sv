// tb_ds_dac_filter: drives the filter model with bit streams of known density
// (a reference accumulator in the testbench) and checks that after one window
// the output equals the density times full scale, and that all-ones saturates.
module tb_ds_dac_filter;
  import bist_pkg::*;
  localparam int unsigned L = 8;
  localparam int unsigned N = 2**L;
  logic clk = 0, rst_n = 0, bit_in = 0;
  analog_t vout;
  int checks = 0, failures = 0;

  ds_dac_filter #(.OSR_LOG2(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, dens;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++; if (vout != 0) begin failures++; $display("FAIL reset output %0d", vout); end
    for (int t = 0; t < 30; t++) begin
      dens = (t == 0) ? N - 1 : (t == 1) ? 1 : $urandom_range(0, N - 1);
      acc = 0;
      for (int k = 0; k < 3 * N; k++) begin
        acc += dens;
        bit_in = (acc >= N);
        if (acc >= N) acc -= N;
        @(posedge clk); #1;
        if (k >= N + 1) begin
          checks++;
          if (vout != analog_t'(dens << (VA_W - L))) begin
            failures++;
            if (failures < 10) $display("FAIL density %0d: vout=%0d", dens, vout);
          end
        end
      end
    end
    bit_in = 1;
    repeat (N + 2) @(posedge clk);
    #1 checks++;
    if (vout != '1) begin failures++; $display("FAIL saturation vout=%0d", vout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
