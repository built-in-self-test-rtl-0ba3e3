// jtag_driver.svh: JTAG bit-banging tasks shared by the testbenches.
// Include inside a module that declares clk, tck, tms, tdi and tdo and the
// localparam TCK_HALF (clk cycles per TCK phase). TMS/TDI change at TCK fall,
// TDO is sampled at TCK rise, as IEEE 1149.1 prescribes.

task automatic jtag_clock(input logic tms_v, input logic tdi_v, output logic tdo_v);
  tms = tms_v;
  tdi = tdi_v;
  repeat (TCK_HALF) @(posedge clk);
  tdo_v = tdo;
  tck = 1'b1;
  repeat (TCK_HALF) @(posedge clk);
  tck = 1'b0;
endtask

task automatic jtag_reset();
  logic d;
  for (int i = 0; i < 6; i++) jtag_clock(1'b1, 1'b0, d);
  jtag_clock(1'b0, 1'b0, d);   // Run-Test/Idle
endtask

// From Run-Test/Idle: load an instruction, return to Run-Test/Idle.
task automatic jtag_ir(input logic [3:0] instr, output logic [3:0] captured);
  logic d;
  jtag_clock(1'b1, 1'b0, d);   // Select-DR
  jtag_clock(1'b1, 1'b0, d);   // Select-IR
  jtag_clock(1'b0, 1'b0, d);   // Capture-IR
  jtag_clock(1'b0, 1'b0, d);   // Shift-IR
  for (int i = 0; i < 4; i++) begin
    jtag_clock(i == 3, instr[i], d);   // last bit exits to Exit1-IR
    captured[i] = d;
  end
  jtag_clock(1'b1, 1'b0, d);   // Update-IR
  jtag_clock(1'b0, 1'b0, d);   // Run-Test/Idle
endtask

// From Run-Test/Idle: shift n data bits (LSB first), return to Run-Test/Idle.
task automatic jtag_dr(input int n, input logic [31:0] din, output logic [31:0] dout);
  logic d;
  dout = '0;
  jtag_clock(1'b1, 1'b0, d);   // Select-DR
  jtag_clock(1'b0, 1'b0, d);   // Capture-DR
  jtag_clock(1'b0, 1'b0, d);   // Shift-DR
  for (int i = 0; i < n; i++) begin
    jtag_clock(i == n - 1, din[i], d);
    dout[i] = d;
  end
  jtag_clock(1'b1, 1'b0, d);   // Update-DR
  jtag_clock(1'b0, 1'b0, d);   // Run-Test/Idle
endtask
