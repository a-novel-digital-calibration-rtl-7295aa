// cal_controller: sequencer of the background calibration, including the
// mode control logic for comparator offset.
//
// A calibration cycle walks from stage 14 down to stage 1, spending about
// STAGE_PERIODS sample periods (2^12 in the design) on each stage, then
// starts again, so calibration never stops the conversion. Once every
// SKIP_PERIOD periods it may skip an input sample and ask the analog front
// end (cmd) to insert a ladder voltage into the stage under calibration.
// The measurements of one voltage come in pairs: first with the stage in
// 1.5-bit mode, then in multiply-by-two mode. When the result of a slot
// returns from the reconstruction chain (tap_*), it is written into
// cal_memory; after the second of a pair the LMS engine is told to update
// that stage (lms_upd, one cycle later, once the memory holds the pair).
// Stages 1..NCUBIC alternate pairs with V1 and V2; the other stages use V1
// only.
//
// Mode control: if the 1.5-bit-mode measurement with V1 returns a decision
// other than +1, a comparator offset has moved the threshold past V1. That
// measurement is discarded, the stage's bit in force_mask is set, and from
// then on the stage's DAC is forced to +Vref/2 in 1.5-bit mode (the effective
// decision written to memory is +1).
//
// The order, the two modes, the two voltages and the mode control follow
// the design. The slot period, the pair order, the strict one-slot-in-flight
// rule and the timeout are this implementation's choices. SKIP_PERIOD must
// exceed the slot's round trip (FE_LAT + CHAIN_LAT + 2 cycles) and be at
// least 41, so that the 80-tap fill filter never sees two skipped samples.
//
// Interface: clk, rst_n (synchronous, active low), enable; cmd to the front
// end (valid in the cycle before the sampling edge it configures); the tap of
// the reconstruction chain; the memory write port; lms_upd/lms_stage/
// lms_vsel; status: cur_stage, pass_cnt (completed cycles), force_mask.
module cal_controller
  import adc_cal_pkg::*;
#(
  parameter int unsigned SKIP_PERIOD   = 64,
  parameter int unsigned STAGE_PERIODS = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output cal_cmd_t   cmd,
  input  logic       tap_valid,
  input  cal_cmd_t   tap_tag,
  input  fx_t        tap_dout,
  input  scode_t     tap_d,
  output logic       mem_we,
  output vsel_e      mem_vsel,
  output cal_mode_e  mem_mode,
  output fx_t        mem_wdata,
  output scode_t     mem_wd,
  output logic       lms_upd,
  output stage_idx_t lms_stage,
  output vsel_e      lms_vsel,
  output stage_idx_t cur_stage,
  output logic [15:0] pass_cnt,
  output logic [NSTAGES-1:0] force_mask
);

  typedef enum logic [1:0] {S_ISSUE, S_WAIT, S_UPD} state_e;

  localparam int unsigned SLW = $clog2(SKIP_PERIOD);
  localparam int unsigned STW_T = $clog2(STAGE_PERIODS + 1) + 1;
  localparam int unsigned TMO = 2 * SKIP_PERIOD;

  state_e            state;
  logic [SLW-1:0]    slot_cnt;
  logic [STW_T-1:0]  stage_time;
  logic [SLW+1:0]    wait_cnt;
  cal_mode_e         step;
  vsel_e             vsel;
  logic              forced;

  assign forced = force_mask[cur_stage - 1];

  // Slot request: one cycle, applied to the sample taken at the next edge
  always_comb begin
    cmd = '0;
    if (enable && state == S_ISSUE && slot_cnt == '0) begin
      cmd.slot      = 1'b1;
      cmd.stage     = cur_stage;
      cmd.mode      = step;
      cmd.vsel      = vsel;
      cmd.force_dac = (step == MODE_1P5) && forced;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_ISSUE;
      slot_cnt   <= '0;
      stage_time <= '0;
      wait_cnt   <= '0;
      step       <= MODE_1P5;
      vsel       <= VSEL_V1;
      cur_stage  <= stage_idx_t'(NSTAGES);
      pass_cnt   <= '0;
      force_mask <= '0;
      mem_we     <= 1'b0;
      mem_vsel   <= VSEL_V1;
      mem_mode   <= MODE_1P5;
      mem_wdata  <= '0;
      mem_wd     <= '0;
      lms_upd    <= 1'b0;
      lms_stage  <= stage_idx_t'(NSTAGES);
      lms_vsel   <= VSEL_V1;
    end else begin
      mem_we  <= 1'b0;
      lms_upd <= 1'b0;
      slot_cnt <= (slot_cnt == SLW'(SKIP_PERIOD - 1)) ? '0 : slot_cnt + 1'b1;
      if (enable && stage_time != STW_T'(STAGE_PERIODS)) stage_time <= stage_time + 1'b1;

      unique case (state)
        S_ISSUE: begin
          if (cmd.slot) begin
            state    <= S_WAIT;
            wait_cnt <= '0;
          end
        end

        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (tap_valid && tap_tag.stage == cur_stage && tap_tag.mode == step) begin
            state <= S_ISSUE;
            if (step == MODE_1P5) begin
              if (!forced && tap_d != 2'sd1) begin
                // Comparator offset: redo this measurement with the DAC forced
                force_mask[cur_stage - 1] <= 1'b1;
              end else begin
                mem_we    <= 1'b1;
                mem_vsel  <= vsel;
                mem_mode  <= MODE_1P5;
                mem_wdata <= tap_dout;
                mem_wd    <= forced ? 2'sd1 : tap_d;
                step      <= MODE_X2;
              end
            end else begin
              mem_we    <= 1'b1;
              mem_vsel  <= vsel;
              mem_mode  <= MODE_X2;
              mem_wdata <= tap_dout;
              mem_wd    <= '0;
              step      <= MODE_1P5;
              state     <= S_UPD;
            end
          end else if (wait_cnt == (SLW+2)'(TMO)) begin
            state <= S_ISSUE;   // lost slot: measure again
          end
        end

        S_UPD: begin
          // memory holds the pair now
          lms_upd   <= 1'b1;
          lms_stage <= cur_stage;
          lms_vsel  <= vsel;
          state     <= S_ISSUE;
          if (cur_stage <= stage_idx_t'(NCUBIC) && vsel == VSEL_V1) begin
            vsel <= VSEL_V2;
          end else begin
            vsel <= VSEL_V1;
            if (stage_time == STW_T'(STAGE_PERIODS)) begin
              stage_time <= '0;
              if (cur_stage == stage_idx_t'(1)) begin
                cur_stage <= stage_idx_t'(NSTAGES);
                pass_cnt  <= pass_cnt + 1'b1;
              end else begin
                cur_stage <= cur_stage - 1'b1;
              end
            end
          end
        end

        default: state <= S_ISSUE;
      endcase
    end
  end

  // One calibration slot in flight at a time
  assert property (@(posedge clk) disable iff (!rst_n) cmd.slot |-> state == S_ISSUE);
  assert property (@(posedge clk) disable iff (!rst_n) lms_upd |-> !mem_we);

endmodule
