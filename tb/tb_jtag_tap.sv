// tb_jtag_tap: drives the TAP through its pins. Checks the 0001 IR capture
// value, BYPASS as a one-bit delay, BIST_CTRL status capture and the start and
// rewind strobes (exactly one clock each), and the SRAM_READ path: the byte a
// parallel-to-serial model loads at capture must come out LSB first, with one
// update strobe per scan. Also checks that TRST_N returns to BYPASS.
module tb_jtag_tap;
  import bist_pkg::*;
  localparam int TCK_HALF = 4;
  logic clk = 0, rst_n = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic bist_start, rd_rewind, bist_busy = 0, bist_done = 0;
  logic dr_capture, dr_shift, dr_update, dr_tdi, read_sout;
  int checks = 0, failures = 0;

  jtag_tap dut (.*);

  always #5 clk = ~clk;

  `include "jtag_driver.svh"

  // parallel-to-serial model holding the "SRAM" byte
  logic [7:0] byte_src = 8'h00, sr;
  int n_start, n_rewind, n_update, n_capture;
  always_ff @(posedge clk) begin
    if (dr_capture)    sr <= byte_src;
    else if (dr_shift) sr <= {dr_tdi, sr[7:1]};
    if (bist_start) n_start++;
    if (rd_rewind)  n_rewind++;
    if (dr_update)  n_update++;
    if (dr_capture) n_capture++;
  end
  assign read_sout = sr[0];

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h expected %h", what, got, want); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] cap;
    logic [31:0] dout;
    n_start = 0; n_rewind = 0; n_update = 0; n_capture = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    jtag_reset();
    // default instruction after reset is BYPASS: one-bit delay, leading 0
    jtag_dr(8, 32'hB5, dout);
    expect_eq(dout[7:0], {7'h35, 1'b0}, "bypass after reset");
    // IR capture pattern
    jtag_ir(IR_BIST_CTRL, cap);
    expect_eq(cap, 4'b0001, "IR capture");
    // status capture
    bist_busy = 1; bist_done = 0;
    jtag_dr(2, 32'h0, dout);
    expect_eq(dout[1:0], 2'b01, "status busy");
    bist_busy = 0; bist_done = 1;
    jtag_dr(2, 32'h0, dout);
    expect_eq(dout[1:0], 2'b10, "status done");
    expect_eq(n_start, 0, "no start on zero write");
    // start strobe
    jtag_dr(2, 32'h1, dout);
    @(posedge clk);
    expect_eq(n_start, 1, "start strobe");
    expect_eq(n_rewind, 0, "no rewind with start");
    jtag_dr(2, 32'h2, dout);
    @(posedge clk);
    expect_eq(n_rewind, 1, "rewind strobe");
    expect_eq(n_start, 1, "no start with rewind");
    // read path
    jtag_ir(IR_SRAM_READ, cap);
    for (int i = 0; i < 20; i++) begin
      byte_src = 8'($urandom);
      jtag_dr(8, 32'h0, dout);
      expect_eq(dout[7:0], byte_src, "read byte");
      expect_eq(n_update, i + 1, "update per byte");
      expect_eq(n_capture, i + 1, "capture per byte");
    end
    // no read strobes under another instruction
    jtag_ir(IR_BYPASS, cap);
    jtag_dr(8, 32'h0, dout);
    expect_eq(n_update, 20, "no update under BYPASS");
    // TRST_N forces BYPASS
    jtag_ir(IR_SRAM_READ, cap);
    trst_n = 0; repeat (6) @(posedge clk); trst_n = 1; repeat (4) @(posedge clk);
    jtag_clock(1'b0, 1'b0, cap[0]);
    jtag_dr(8, 32'hC3, dout);
    expect_eq(dout[7:0], {7'h43, 1'b0}, "bypass after trst");
    expect_eq(n_update, 20, "no update after trst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
