// tb_bist_sram: writes every word of the full-size 4096 x 8 memory with a
// pattern, reads all back (one clock read latency), and checks random
// overwrites against a reference array.
module tb_bist_sram;
  localparam int unsigned AW = 12, DW = 8;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  bist_sram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a);
    addr = AW'(a); we = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: %02h expected %02h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); wdata = DW'(a * 7 + (a >> 8)); we = 1;
      model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < 2**AW; a++) rd(a);
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = $urandom_range(0, 2**AW - 1);
      if ($urandom_range(0, 1)) begin
        addr = AW'(a); wdata = DW'($urandom); we = 1; model[a] = wdata;
        @(posedge clk); #1 we = 0;
      end else rd(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
