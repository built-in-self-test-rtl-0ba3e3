// tb_tmr_reg: loads random values and, between loads, forces one of the three
// copies to a wrong value for one clock. The output must always show the last
// loaded value, and after the force is released the copy must be repaired on
// the next edge so that a second upset in another copy is also masked.
module tb_tmr_reg;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, expected;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .RESET_VALUE(8'hA5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(input string what);
    checks++;
    if (q !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%02h expected %02h", what, q, expected);
    end
  endtask

  task automatic upset(input int copy, input logic [W-1:0] bad);
    @(negedge clk);
    case (copy)
      0: force dut.r0 = bad;
      1: force dut.r1 = bad;
      default: force dut.r2 = bad;
    endcase
    #1 check_q("during upset");
    @(posedge clk); #1;
    check_q("upset edge");
    case (copy)
      0: release dut.r0;
      1: release dut.r1;
      default: release dut.r2;
    endcase
    @(posedge clk); #1;
    check_q("after repair edge");
  endtask

  initial begin
    expected = 8'hA5;
    repeat (2) @(posedge clk);
    #1 check_q("reset value");
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = 1; d = W'($urandom); expected = d;
      @(posedge clk); #1 en = 0;
      check_q("load");
      d = W'($urandom);                    // ignored while en is low
      upset(i % 3, ~expected);
      upset((i + 1) % 3, expected ^ 8'h3C);
      check_q("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
