// tb_ramp_counter: checks clear, count enable, terminal-count flag and wrap
// of the ramp code counter against a reference count kept in the testbench.
module tb_ramp_counter;
  localparam int unsigned W = 12;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [W-1:0] code;
  logic last;
  int checks = 0, failures = 0;
  int ref_code;

  ramp_counter #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (code !== W'(ref_code) || last !== (ref_code == 2**W - 1)) begin
      failures++;
      $display("FAIL %s: code=%0d last=%0b expected %0d", what, code, last, ref_code);
    end
  endtask

  initial begin
    ref_code = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk); check("after reset");
    // count through the whole range with random enable gaps, then wrap
    for (int i = 0; i < 2**W + 10; ) begin
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (inc) begin ref_code = (ref_code + 1) % (2**W); i++; end
      check("count");
    end
    // clear has priority over inc
    inc = 1; clr = 1;
    @(posedge clk); #1; ref_code = 0; check("clear");
    clr = 0; inc = 0;
    @(posedge clk); #1; check("hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
