// tb_therm_decoder: every clean thermometer code and random bubbled codes;
// expected output is the number of ones, counted by the testbench.
module tb_therm_decoder;
  localparam int unsigned B = 4;
  logic [2**B-2:0] therm;
  logic [B-1:0] bin;
  int checks = 0, failures = 0;

  therm_decoder #(.BITS(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int k = 0; k < 2**B; k++) begin
      therm = '0;
      for (int i = 0; i < k; i++) therm[i] = 1'b1;
      #1 checks++;
      if (int'(bin) != k) begin failures++; $display("FAIL clean %0d -> %0d", k, bin); end
    end
    for (int r = 0; r < 300; r++) begin
      therm = (2**B-1)'($urandom);
      n = 0;
      for (int i = 0; i < 2**B-1; i++) n += int'(therm[i]);
      #1 checks++;
      if (int'(bin) != n) begin failures++; $display("FAIL %b -> %0d", therm, bin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
