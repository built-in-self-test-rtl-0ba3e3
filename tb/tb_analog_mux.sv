// tb_analog_mux: random inputs, both select values, output compared with the
// selected input.
module tb_analog_mux;
  import bist_pkg::*;
  logic test_sel;
  analog_t normal_in, test_in, vout;
  int checks = 0, failures = 0;

  analog_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      normal_in = analog_t'($urandom);
      test_in   = analog_t'($urandom);
      test_sel  = i[0];
      #1;
      checks++;
      if (vout != (i[0] ? test_in : normal_in)) begin
        failures++;
        $display("FAIL sel=%0b vout=%0d", test_sel, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
