// tb_bist_control: runs the sequencer with a small configuration (16 codes,
// average of 4, settle of 5) against testbench models of the counter and the
// averager. Checks: one SRAM write per code, in code order, with the
// averager's data; exactly 2**AVG_LOG2 sample strobes and one accumulator
// clear per step; settle time before sampling; the multiplexer in test
// position exactly while busy; a busy time of exactly 16 * (5 + 4 + 1)
// clocks; start ignored while busy; read pointer stepping and rewinding.
module tb_bist_control;
  import bist_pkg::*;
  localparam int unsigned AW = 4, DW = 8, AL = 2, ST = 5;
  localparam int unsigned NCODE = 2**AW;
  localparam int unsigned STEP = ST + 2**AL + 1;

  logic clk = 0, rst_n = 0;
  logic start = 0, rd_next = 0, rd_rewind = 0;
  logic busy, done, test_sel, cnt_clr, cnt_inc, last;
  logic [AW-1:0] code;
  logic avg_clr, avg_in_valid, avg_out_valid;
  logic [DW-1:0] avg_data;
  logic sram_we;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_wdata;
  int checks = 0, failures = 0;

  bist_control #(.ADDR_W(AW), .DATA_W(DW), .AVG_LOG2(AL), .SETTLE_CYCLES(ST)) dut (.*);

  always #5 clk = ~clk;

  // counter model
  always_ff @(posedge clk) begin
    if (!rst_n || cnt_clr) code <= '0;
    else if (cnt_inc)      code <= code + 1'b1;
  end
  assign last = (code == AW'(NCODE - 1));

  // averager model: result one clock after every 2**AL-th sample
  int n_in;
  always_ff @(posedge clk) begin
    avg_out_valid <= 1'b0;
    if (!rst_n || avg_clr) n_in <= 0;
    else if (avg_in_valid) begin
      if (n_in == 2**AL - 1) begin
        n_in <= 0;
        avg_out_valid <= 1'b1;
        avg_data <= DW'(code) ^ 8'h5A;
      end else n_in <= n_in + 1;
    end
  end

  // observers
  int busy_cycles, writes, next_addr, strobes, clears, settle_run;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (test_sel != busy) begin failures++; $display("FAIL test_sel=%0b busy=%0b", test_sel, busy); end
    if (avg_in_valid) strobes++;
    if (avg_clr) begin
      clears++;
      checks++;
      if (settle_run != ST - 1) begin failures++; $display("FAIL settle %0d clocks", settle_run + 1); end
    end
    if (busy && !avg_in_valid && !avg_out_valid && !avg_clr && !cnt_clr) settle_run++;
    if (avg_in_valid || avg_out_valid) settle_run = 0;
    if (sram_we) begin
      checks++;
      if (sram_addr != AW'(next_addr) || sram_wdata != (DW'(next_addr) ^ 8'h5A)) begin
        failures++;
        $display("FAIL write %0d: addr %0d data %02h", next_addr, sram_addr, sram_wdata);
      end
      next_addr++;
      writes++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycle();
    busy_cycles = 0; writes = 0; next_addr = 0; strobes = 0; clears = 0; settle_run = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy did not rise"); end
    // a second start during the cycle must be ignored
    repeat (37) @(negedge clk);
    start = 1; @(negedge clk) start = 0;
    wait (!busy);
    @(negedge clk);
    checks += 5;
    if (busy_cycles != NCODE * STEP) begin failures++; $display("FAIL busy %0d clocks, expected %0d", busy_cycles, NCODE * STEP); end
    if (writes != NCODE) begin failures++; $display("FAIL %0d writes", writes); end
    if (strobes != NCODE * 2**AL) begin failures++; $display("FAIL %0d sample strobes", strobes); end
    if (clears != NCODE) begin failures++; $display("FAIL %0d clears", clears); end
    if (!done) begin failures++; $display("FAIL done not set"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done || test_sel) begin failures++; $display("FAIL idle after reset"); end
    run_cycle();
    // read pointer: starts at 0, steps, rewinds
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (sram_addr != AW'(i) || sram_we) begin failures++; $display("FAIL read addr %0d", sram_addr); end
      rd_next = 1; @(negedge clk) rd_next = 0; @(negedge clk);
    end
    rd_rewind = 1; @(negedge clk) rd_rewind = 0;
    checks++;
    if (sram_addr != 0) begin failures++; $display("FAIL rewind"); end
    // second cycle works the same way
    run_cycle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
