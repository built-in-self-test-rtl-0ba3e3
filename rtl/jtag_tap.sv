// jtag_tap: JTAG (IEEE 1149.1) test access port that controls the self-test.
//
// The self-test is started, polled and read out over a JTAG bus. This TAP
// has the standard 16-state controller, a 4-bit instruction register and
// three data registers: BYPASS (1 bit), BIST_CTRL (2 bits; capture reads
// {done, busy}, update with bit 0 set starts a self-test cycle and with bit 1
// set rewinds the read pointer) and SRAM_READ, whose data register is the
// external parallel-to-serial converter: capture loads the next result byte
// into it, Shift-DR moves it out on TDO least significant bit first, and
// Update-DR advances the read pointer to the next byte.
//
// Using JTAG follows the architecture; the instruction set, the register
// layout and the clocking are this design's choices. The slow JTAG pins are
// brought into the system clock domain through two-flop synchronisers and TCK
// edges are detected there, so the whole design has a single clock. TCK must
// therefore run at most at clk/6, with each TCK phase at least three clocks.
// TMS and TDI are sampled at the detected TCK rise, TDO changes at the
// detected TCK fall, as the standard prescribes. TRST_N and rst_n reset the
// controller to Test-Logic-Reset with BYPASS selected.
//
// Strobes dr_capture / dr_shift / dr_update (SRAM_READ only), bist_start and
// rd_rewind last one clock.
module jtag_tap
  import bist_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // JTAG pins
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo,
  // self-test control
  output logic bist_start,
  output logic rd_rewind,
  input  logic bist_busy,
  input  logic bist_done,
  // SRAM_READ data register (parallel-to-serial converter)
  output logic dr_capture,
  output logic dr_shift,
  output logic dr_update,
  output logic dr_tdi,
  input  logic read_sout
);

  logic [2:0] tck_sync;           // two synchroniser stages + edge history
  logic [1:0] tms_sync, tdi_sync, trst_sync;
  logic       tck_rise, tck_fall, tms_s, tdi_s, trst_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_sync  <= '0;
      tms_sync  <= '1;
      tdi_sync  <= '0;
      trst_sync <= '0;
    end else begin
      tck_sync  <= {tck_sync[1:0], tck};
      tms_sync  <= {tms_sync[0], tms};
      tdi_sync  <= {tdi_sync[0], tdi};
      trst_sync <= {trst_sync[0], trst_n};
    end
  end

  assign tck_rise = tck_sync[1] & ~tck_sync[2];
  assign tck_fall = ~tck_sync[1] & tck_sync[2];
  assign tms_s    = tms_sync[1];
  assign tdi_s    = tdi_sync[1];
  assign trst_s   = trst_sync[1];

  tap_state_e        state, state_next;
  logic [IR_W-1:0]   ir, ir_sr;
  logic [1:0]        ctrl_sr;
  logic              byp;
  logic              sel_read, sel_ctrl;

  always_comb begin
    unique case (state)
      TAP_RESET:      state_next = tms_s ? TAP_RESET   : TAP_IDLE;
      TAP_IDLE:       state_next = tms_s ? TAP_SEL_DR  : TAP_IDLE;
      TAP_SEL_DR:     state_next = tms_s ? TAP_SEL_IR  : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: state_next = tms_s ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   state_next = tms_s ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   state_next = tms_s ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   state_next = tms_s ? TAP_EXIT2_DR : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   state_next = tms_s ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  state_next = tms_s ? TAP_SEL_DR  : TAP_IDLE;
      TAP_SEL_IR:     state_next = tms_s ? TAP_RESET   : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: state_next = tms_s ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   state_next = tms_s ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   state_next = tms_s ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   state_next = tms_s ? TAP_EXIT2_IR : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   state_next = tms_s ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  state_next = tms_s ? TAP_SEL_DR  : TAP_IDLE;
      default:        state_next = TAP_RESET;
    endcase
  end

  assign sel_read = (ir == IR_SRAM_READ);
  assign sel_ctrl = (ir == IR_BIST_CTRL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= TAP_RESET;
      ir      <= IR_BYPASS;
      ir_sr   <= '0;
      ctrl_sr <= '0;
      byp     <= 1'b0;
      tdo     <= 1'b0;
    end else if (!trst_s) begin
      state   <= TAP_RESET;
      ir      <= IR_BYPASS;
    end else begin
      if (tck_rise) begin
        state <= state_next;
        unique case (state)
          TAP_RESET:      ir    <= IR_BYPASS;
          TAP_CAPTURE_IR: ir_sr <= IR_W'(1);          // "...01" as 1149.1 requires
          TAP_SHIFT_IR:   ir_sr <= {tdi_s, ir_sr[IR_W-1:1]};
          TAP_UPDATE_IR:  ir    <= ir_sr;
          TAP_CAPTURE_DR: begin
            byp     <= 1'b0;
            ctrl_sr <= {bist_done, bist_busy};
          end
          TAP_SHIFT_DR: begin
            byp     <= tdi_s;
            ctrl_sr <= {tdi_s, ctrl_sr[1]};
          end
          default: ;
        endcase
      end
      if (tck_fall) begin
        if (state == TAP_SHIFT_IR)      tdo <= ir_sr[0];
        else if (state == TAP_SHIFT_DR) tdo <= sel_read ? read_sout :
                                               sel_ctrl ? ctrl_sr[0] : byp;
      end
    end
  end

  always_comb begin
    dr_capture = tck_rise && trst_s && sel_read && (state == TAP_CAPTURE_DR);
    dr_shift   = tck_rise && trst_s && sel_read && (state == TAP_SHIFT_DR);
    dr_update  = tck_rise && trst_s && sel_read && (state == TAP_UPDATE_DR);
    dr_tdi     = tdi_s;
    bist_start = tck_rise && trst_s && sel_ctrl && (state == TAP_UPDATE_DR) && ctrl_sr[0];
    rd_rewind  = tck_rise && trst_s && sel_ctrl && (state == TAP_UPDATE_DR) && ctrl_sr[1];
  end

endmodule
