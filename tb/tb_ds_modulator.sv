// tb_ds_modulator: for random codes, checks that every window of 2**WIDTH
// consecutive output bits holds exactly `code` ones (the modulator's linearity
// property), and that code 0 gives no ones at all.
module tb_ds_modulator;
  localparam int unsigned W = 8;   // 256-bit period keeps the run short
  localparam int unsigned N = 2**W;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] code;
  logic bit_out;
  int checks = 0, failures = 0;
  bit hist [$];

  ds_modulator #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic [W-1:0] codes [$];
    codes = '{0, 1, N-1, N/2, 3};
    for (int i = 0; i < 20; i++) codes.push_back(W'($urandom));
    code = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (codes[c]) begin
      code = codes[c];
      // let one period pass, then test several windows
      repeat (N + 2) @(posedge clk);
      hist.delete();
      repeat (N + 17) begin
        @(posedge clk); #1;
        hist.push_back(bit_out);
      end
      for (int s = 0; s < 17; s += 4) begin
        ones = 0;
        for (int k = 0; k < N; k++) ones += int'(hist[s + k]);
        checks++;
        if (ones != int'(code)) begin
          failures++;
          $display("FAIL code=%0d window %0d: %0d ones", code, s, ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
