// tb_averager: random sample streams, with and without gaps in in_valid;
// each result is compared with floor(sum of 64 samples / 64) computed in the
// testbench, and must appear exactly one clock after the 64th sample.
module tb_averager;
  localparam int unsigned DW = 8, AL = 6, N = 2**AL;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [DW-1:0] in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0;

  averager #(.DATA_W(DW), .AVG_LOG2(AL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      sum = 0; n = 0;
      while (n < N) begin
        in_valid = (blk < 20) ? 1'b1 : ($urandom_range(0, 2) != 0);
        in_data  = (blk == 0) ? 8'hFF : (blk == 1) ? 8'h00 : DW'($urandom);
        if (in_valid) begin sum += int'(in_data); n++; end
        @(posedge clk); #1;
        if (n < N) begin
          checks++;
          if (out_valid && blk > 0 || (out_valid && n > 0)) begin
            failures++; $display("FAIL early out_valid blk %0d n %0d", blk, n);
          end
        end
      end
      in_valid = 1'b0;
      checks++;
      if (!out_valid || int'(out_data) != sum / N) begin
        failures++;
        $display("FAIL block %0d: valid=%0b out=%0d expected %0d", blk, out_valid, out_data, sum / N);
      end
    end
    // clr discards a partial sum
    in_valid = 1; in_data = 8'hFF;
    repeat (10) @(posedge clk);
    #1 clr = 1; in_valid = 0;
    @(posedge clk); #1 clr = 0;
    in_valid = 1; in_data = 8'd3;
    repeat (N) @(posedge clk);
    #1 in_valid = 0;
    checks++;
    if (!out_valid || out_data != 8'd3) begin failures++; $display("FAIL after clr: %0d", out_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
