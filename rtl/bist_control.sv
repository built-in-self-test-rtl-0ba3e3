// bist_control: sequencer of the ADC self-test cycle and of the result read-out.
//
// A self-test cycle walks the ramp counter through all 2**ADDR_W codes. For
// each code it (1) switches the ADC input to the test ramp and waits
// SETTLE_CYCLES clocks so the delta-sigma DAC output settles on the new
// level, (2) feeds the next 2**AVG_LOG2 ADC conversions, one per clock, into
// the averager, (3) writes the averaged byte to the result SRAM at the
// address equal to the ramp code, and steps the counter. After the last code
// the ADC input returns to the normal analog input, busy falls and done is
// set; a cycle can be started at any time during normal operation.
//
// Between cycles the SRAM address comes from a read pointer that the JTAG
// side advances one byte at a time (rd_next) and can rewind to zero
// (rd_rewind); a new cycle also rewinds it. The task split (counter, DAC,
// averager, SRAM, read-out, controller) follows the architecture; the state
// sequence, the settle-then-average timing and the read pointer are this
// design's choices. All state (sequencer state, timer, done flag, read
// pointer) sits in triple-modular-redundant registers (tmr_reg), the form of
// the architecture's radiation hardening chosen here.
//
// Timing: busy rises the clock after start and stays high for exactly
// 2**ADDR_W * (SETTLE_CYCLES + 2**AVG_LOG2 + 1) clocks. start is ignored
// while busy; rd_next and rd_rewind are ignored while busy. sram_wdata is
// avg_data itself: the averager's output register already holds the byte
// during the write cycle, so no copy is made here.
module bist_control
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W        = 12,
  parameter int unsigned DATA_W        = 8,
  parameter int unsigned AVG_LOG2      = 6,
  parameter int unsigned SETTLE_CYCLES = 4104
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              start,
  input  logic              rd_next,
  input  logic              rd_rewind,
  output logic              busy,
  output logic              done,
  // analog input multiplexer
  output logic              test_sel,
  // ramp counter
  output logic              cnt_clr,
  output logic              cnt_inc,
  input  logic [ADDR_W-1:0] code,
  input  logic              last,
  // averager
  output logic              avg_clr,
  output logic              avg_in_valid,
  input  logic              avg_out_valid,
  input  logic [DATA_W-1:0] avg_data,
  // result SRAM
  output logic              sram_we,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_wdata
);

  localparam int unsigned NAVG  = 2**AVG_LOG2;
  localparam int unsigned TMAX  = (SETTLE_CYCLES > NAVG) ? SETTLE_CYCLES : NAVG;
  localparam int unsigned TW    = $clog2(TMAX + 1);

  ctl_state_e        state, state_d;
  logic [TW-1:0]     timer, timer_d;
  logic [ADDR_W-1:0] rd_addr, rd_addr_d;
  logic              done_d;
  logic [1:0]        state_q;

  assign state = ctl_state_e'(state_q);

  always_comb begin
    state_d   = state;
    timer_d   = timer;
    done_d    = done;
    rd_addr_d = rd_addr;
    unique case (state)
      CTL_IDLE: begin
        if (start) begin
          state_d   = CTL_SETTLE;
          timer_d   = '0;
          done_d    = 1'b0;
          rd_addr_d = '0;
        end else if (rd_rewind) begin
          rd_addr_d = '0;
        end else if (rd_next) begin
          rd_addr_d = rd_addr + 1'b1;
        end
      end
      CTL_SETTLE: begin
        if (timer == TW'(SETTLE_CYCLES - 1)) begin
          state_d = CTL_AVG;
          timer_d = '0;
        end else begin
          timer_d = timer + 1'b1;
        end
      end
      CTL_AVG: begin
        if (timer == TW'(NAVG - 1)) begin
          state_d = CTL_WRITE;
          timer_d = '0;
        end else begin
          timer_d = timer + 1'b1;
        end
      end
      CTL_WRITE: begin
        if (avg_out_valid) begin
          if (last) begin
            state_d = CTL_IDLE;
            done_d  = 1'b1;
          end else begin
            state_d = CTL_SETTLE;
          end
        end
      end
      default: state_d = CTL_IDLE;
    endcase
  end

  // All sequencer state lives in triple-modular-redundant registers.
  tmr_reg #(.WIDTH(2), .RESET_VALUE(CTL_IDLE)) u_state (
    .clk, .rst_n, .en(1'b1), .d(state_d), .q(state_q));
  tmr_reg #(.WIDTH(TW)) u_timer (
    .clk, .rst_n, .en(1'b1), .d(timer_d), .q(timer));
  tmr_reg #(.WIDTH(1)) u_done (
    .clk, .rst_n, .en(1'b1), .d(done_d), .q(done));
  tmr_reg #(.WIDTH(ADDR_W)) u_rd_addr (
    .clk, .rst_n, .en(1'b1), .d(rd_addr_d), .q(rd_addr));

  // The averager must deliver exactly one result per ramp step, in WRITE.
  // Checked from the first clock after reset.
  logic chk_armed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_armed <= 1'b0;
    else        chk_armed <= 1'b1;

  always @(posedge clk)
    if (chk_armed)
      a_avg_in_step: assert (!avg_out_valid || state == CTL_WRITE)
        else $error("bist_control: averager result outside the write state");

  always_comb begin
    busy         = (state != CTL_IDLE);
    test_sel     = busy;
    cnt_clr      = (state == CTL_IDLE) && start;
    cnt_inc      = (state == CTL_WRITE) && avg_out_valid && !last;
    avg_clr      = (state == CTL_SETTLE) && (timer == TW'(SETTLE_CYCLES - 1));
    avg_in_valid = (state == CTL_AVG);
    sram_we      = (state == CTL_WRITE) && avg_out_valid;
    sram_addr    = busy ? code : rd_addr;
    sram_wdata   = avg_data;
  end

  initial assert (SETTLE_CYCLES >= 1) else $error("bist_control: SETTLE_CYCLES must be >= 1");

endmodule
