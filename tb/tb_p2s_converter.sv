// tb_p2s_converter: loads random bytes, shifts them out with random gaps and
// checks the serial order (LSB first) and the bits entering from sin.
module tb_p2s_converter;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, sin = 0, sout;
  logic [W-1:0] pdata = '0;
  int checks = 0, failures = 0;

  p2s_converter #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sent;
    logic [2*W-1:0] expect_bits;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      pdata = W'($urandom);
      sent  = W'($urandom);          // bits pushed in through sin
      expect_bits = {sent, pdata};
      load = 1;
      @(posedge clk); #1 load = 0;
      for (int b = 0; b < 2 * W; b++) begin
        checks++;
        if (sout !== expect_bits[b]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d: %0b", t, b, sout);
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);   // hold without shift
        #1 shift = 1; sin = sent[b % W];
        if (b >= W) sin = 1'b0;
        @(posedge clk); #1 shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
