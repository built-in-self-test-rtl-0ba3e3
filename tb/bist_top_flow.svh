// bist_top_flow.svh: end-to-end test flow of bist_top, shared by the reduced
// and the full-size testbench. The including module declares the localparams
// CODE_BITS, SUB_BITS, AVG_LOG2, DAC_OSR_LOG2, TCK_HALF, the flag DO_CLEAN_RUN and the
// DUT signals, and includes jtag_driver.svh first.
//
// Flow: (1) normal operation, the ADC converts the analog input; (2) a
// self-test cycle of the undamaged converter, started and polled over JTAG,
// result memory read out over JTAG and compared with the ideal ramp; (3)
// radiation damage injected as coarse-comparator offsets, a second cycle,
// read-out compared with a reference of the damaged transfer curve, and the
// missing codes counted. In both cycles the ADC output seen directly on the
// adc_data port in the middle of each ramp step is recorded, and the stored
// curve must equal this directly measured curve. Mechanism counters are reported at the end and a
// mechanism that never occurred is a failure.

localparam int unsigned NCODE   = 2**CODE_BITS;
localparam int unsigned ADC_BITS = 2 * SUB_BITS;
localparam int unsigned STEP_V  = 2**(VA_W - CODE_BITS);   // ramp step in analog units
localparam int unsigned SETTLE  = 2**DAC_OSR_LOG2 + 8;
localparam int unsigned CYCLE   = NCODE * (SETTLE + 2**AVG_LOG2 + 1);

int checks = 0, failures = 0;
int n_normal_conv = 0, n_bist_start = 0, n_bist_done = 0, n_mux_to_test = 0,
    n_mux_to_normal = 0, n_avg_writes = 0, n_busy_polls = 0, n_bytes_read = 0,
    n_rewinds = 0, n_missing_codes = 0, n_mismatch_free_runs = 0, n_direct_match = 0;
int direct_code [NCODE];
localparam int unsigned STEP_CLK = SETTLE + 2**AVG_LOG2 + 1;

// coarse comparator offsets of the "irradiated" converter (analog units)
int tid_k [3] = '{2, 7, 11};
int tid_o [3] = '{700, -900, 1500};

// Reference transfer curve, from the sub-ranging rule: a coarse threshold T
// moved up by o sends inputs in [T, T+o) to the top code of the segment
// below; moved down, inputs in [T+o, T) read the first code of the segment.
function automatic int ref_code(input int v, input bit damaged);
  int c, t;
  c = v >> (VA_W - ADC_BITS);
  if (damaged)
    for (int i = 0; i < 3; i++) begin
      t = (tid_k[i] + 1) << (VA_W - SUB_BITS);
      if (tid_o[i] > 0 && v >= t && v < t + tid_o[i]) c = (t >> (VA_W - ADC_BITS)) - 1;
      if (tid_o[i] < 0 && v >= t + tid_o[i] && v < t) c = t >> (VA_W - ADC_BITS);
    end
  return c;
endfunction

task automatic set_damage(input bit on);
  foreach (tid_msb_offset[i]) begin tid_msb_offset[i] = '0; tid_lsb_offset[i] = '0; end
  if (on) for (int i = 0; i < 3; i++) tid_msb_offset[tid_k[i]] = aoffset_t'(tid_o[i]);
endtask

// mechanism observers
logic busy_q = 0;
int busy_rise = 0, busy_fall = 0;
always @(posedge clk) if (rst_n) begin
  busy_q <= bist_busy;
  if (bist_busy && !busy_q) begin n_mux_to_test++; busy_rise = cycle; end
  if (!bist_busy && busy_q) begin n_mux_to_normal++; busy_fall = cycle; end
  if (bist_busy && busy_q && (cycle - busy_rise) % int'(STEP_CLK) == int'(SETTLE) + 32)
    direct_code[(cycle - busy_rise) / int'(STEP_CLK)] = int'(adc_data);
end

task automatic run_and_check(input bit damaged);
  logic [3:0] cap;
  logic [31:0] dout;
  int t0, t1, got, expc;
  bit seen [2**ADC_BITS];
  set_damage(damaged);
  jtag_ir(IR_BIST_CTRL, cap);
  jtag_dr(2, 32'h1, dout);          // start
  n_bist_start++;
  t0 = cycle;
  jtag_dr(2, 32'h0, dout);          // status poll right after start
  checks++;
  if (dout[1:0] != 2'b01) begin failures++; $display("FAIL status after start %b", dout[1:0]); end
  else n_busy_polls++;
  wait (bist_done);
  t1 = cycle;
  jtag_dr(2, 32'h0, dout);
  checks++;
  if (dout[1:0] != 2'b10) begin failures++; $display("FAIL status at end %b", dout[1:0]); end
  else n_bist_done++;
  // cycle length: busy must last exactly CYCLE clocks
  checks++;
  if (busy_fall - busy_rise != int'(CYCLE)) begin
    failures++; $display("FAIL cycle took %0d clocks, expected %0d", busy_fall - busy_rise, CYCLE);
  end
  // read-out
  jtag_ir(IR_SRAM_READ, cap);
  foreach (seen[i]) seen[i] = 0;
  for (int c = 0; c < int'(NCODE); c++) begin
    jtag_dr(ADC_BITS, 32'h0, dout);
    n_bytes_read++;
    got  = int'(dout[ADC_BITS-1:0]);
    expc = ref_code(c * int'(STEP_V), damaged);
    seen[got] = 1;
    checks++;
    if (got == direct_code[c]) n_direct_match++;
    else begin
      failures++;
      if (failures < 20) $display("FAIL code %0d: stored %0d, ADC output read directly %0d", c, got, direct_code[c]);
    end
    checks++;
    if (got == expc) n_avg_writes++;
    else begin
      failures++;
      if (failures < 20) $display("FAIL %s code %0d: stored %0d expected %0d", damaged ? "damaged" : "clean", c, got, expc);
    end
  end
  // rewind and re-read the first bytes
  jtag_ir(IR_BIST_CTRL, cap);
  jtag_dr(2, 32'h2, dout);
  n_rewinds++;
  jtag_ir(IR_SRAM_READ, cap);
  for (int c = 0; c < 4; c++) begin
    jtag_dr(ADC_BITS, 32'h0, dout);
    checks++;
    if (int'(dout[ADC_BITS-1:0]) != ref_code(c * int'(STEP_V), damaged)) begin
      failures++; $display("FAIL re-read %0d: %0d", c, dout[ADC_BITS-1:0]);
    end
  end
  // missing codes seen in the stored curve (range 0 .. top code reached)
  if (damaged) begin
    for (int k = 0; k < 2**ADC_BITS && k <= ref_code((int'(NCODE) - 1) * int'(STEP_V), 1'b0); k++)
      if (!seen[k]) n_missing_codes++;
  end
  jtag_ir(IR_BYPASS, cap);
endtask

int cycle = 0;
always @(posedge clk) cycle++;

initial begin
  logic [3:0] cap;
  set_damage(1'b0);
  analog_in = '0;
  repeat (3) @(posedge clk);
  #1 rst_n = 1;
  // (1) normal conversions of the analog input, one clock latency
  for (int i = 0; i < 200; i++) begin
    @(negedge clk) analog_in = analog_t'($urandom);
    @(negedge clk);
    checks++;
    if (int'(adc_data) != ref_code(int'(analog_in), 1'b0)) begin
      failures++; $display("FAIL normal conversion %0d -> %0d", analog_in, adc_data);
    end else n_normal_conv++;
  end
  jtag_reset();
  // (2) undamaged converter
  if (DO_CLEAN_RUN) begin
    run_and_check(1'b0);
    n_mismatch_free_runs++;
  end
  // (3) damaged converter, started during normal operation
  analog_in = analog_t'(16'h1234);
  run_and_check(1'b1);
  // back in normal mode after the cycle
  @(negedge clk) analog_in = analog_t'(16'h2000);
  @(negedge clk); @(negedge clk);
  checks++;
  if (int'(adc_data) != ref_code(16'h2000, 1'b0)) begin failures++; $display("FAIL normal mode after test: %02h", adc_data); end
  else n_normal_conv++;

  $display("mechanisms: normal_conv=%0d bist_start=%0d bist_done=%0d mux_to_test=%0d mux_to_normal=%0d avg_writes=%0d busy_polls=%0d bytes_read=%0d rewinds=%0d missing_codes=%0d stored_equals_direct=%0d",
           n_normal_conv, n_bist_start, n_bist_done, n_mux_to_test, n_mux_to_normal,
           n_avg_writes, n_busy_polls, n_bytes_read, n_rewinds, n_missing_codes, n_direct_match);
  checks += 10;
  if (n_direct_match != n_bist_start * int'(NCODE)) begin failures++; $display("FAIL stored curve differs from direct ADC output"); end
  if (n_normal_conv == 0)  begin failures++; $display("FAIL no normal conversion"); end
  if (n_bist_done != n_bist_start || n_bist_start == 0) begin failures++; $display("FAIL bist start/done"); end
  if (n_mux_to_test != n_bist_start) begin failures++; $display("FAIL mux switch to test"); end
  if (n_mux_to_normal != n_bist_start) begin failures++; $display("FAIL mux switch back"); end
  if (n_avg_writes != n_bist_start * int'(NCODE)) begin failures++; $display("FAIL averaged writes %0d", n_avg_writes); end
  if (n_busy_polls == 0) begin failures++; $display("FAIL no busy status"); end
  if (n_bytes_read == 0) begin failures++; $display("FAIL nothing read"); end
  if (n_rewinds == 0)    begin failures++; $display("FAIL no rewind"); end
  if (n_missing_codes == 0) begin failures++; $display("FAIL damage produced no missing codes"); end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
