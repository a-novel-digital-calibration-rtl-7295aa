// tb_cal_controller: the sequencer against a stand-in for the analog front
// end and the reconstruction chain, which answers every slot 30 cycles
// later with the slot's tag, a decision (stage 5's comparator is made to
// miss V1 until its DAC is forced) and a value that encodes the slot.
// Checks: slots only on SKIP_PERIOD boundaries, one in flight; stages in the
// order 14, 13, ..., 1, 14 with at least STAGE_PERIODS on each; each
// multiply-by-two slot follows a 1.5-bit slot of the same stage and voltage;
// V2 only for stages 1 and 2, alternating with V1; the memory writes carry
// the returned values and the effective decision; one LMS update per pair;
// the forced-DAC mode control of stage 5; the pass counter.
module tb_cal_controller;
  import adc_cal_pkg::*;

  localparam int SKIP = 64, DWELL = 512, RESP = 30;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  cal_cmd_t cmd, tap_tag;
  logic tap_valid;
  fx_t tap_dout, mem_wdata;
  scode_t tap_d, mem_wd;
  logic mem_we, lms_upd;
  vsel_e mem_vsel, lms_vsel;
  cal_mode_e mem_mode;
  stage_idx_t lms_stage, cur_stage;
  logic [15:0] pass_cnt;
  logic [NSTAGES-1:0] force_mask;

  cal_controller #(.SKIP_PERIOD(SKIP), .STAGE_PERIODS(DWELL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cycle, s);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Responder
  cal_cmd_t pend_tag;
  int       pend_at = -1;
  function automatic fx_t code_of(cal_cmd_t c);
    return fx_t'({c.stage, c.mode, c.vsel, c.force_dac}) + fx_t'(1000);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    tap_valid <= 1'b0;
    if (cmd.slot) begin
      pend_tag = cmd;
      pend_at  = cycle + RESP;
    end
    if (cycle == pend_at) begin
      tap_valid <= 1'b1;
      tap_tag   <= pend_tag;
      tap_dout  <= code_of(pend_tag);
      tap_d     <= (pend_tag.mode == MODE_X2) ? 2'sd0 :
                   (pend_tag.stage == 5 && !pend_tag.force_dac) ? 2'sd0 : 2'sd1;
    end
  end

  // Monitors
  int last_slot = -1000, last_change = 0;
  stage_idx_t last_stage = stage_idx_t'(NSTAGES);
  cal_cmd_t last_cmd;
  int n_pairs_done = 0, n_upd = 0, n_x2 = 0, n_v2 = 0, n_forced_slots = 0, n_wraps = 0;
  vsel_e last_v_stage1;
  logic [15:0] last_pass = 0;
  bit have_last = 0;

  always @(posedge clk) if (rst_n && enable) begin
    if (cmd.slot) begin
      checks++;
      if ((cycle % SKIP) != (last_slot % SKIP) && last_slot >= 0) fail("slot off the skip grid");
      if (cycle - last_slot < SKIP && last_slot >= 0) fail("slots too close");
      if (cmd.stage != cur_stage) fail("slot for a stage other than the current");
      if (cmd.vsel == VSEL_V2) begin
        n_v2++;
        if (cmd.stage > NCUBIC) fail("V2 for a linear stage");
      end
      if (cmd.mode == MODE_X2) begin
        n_x2++;
        if (!have_last || last_cmd.mode != MODE_1P5 || last_cmd.stage != cmd.stage || last_cmd.vsel != cmd.vsel)
          fail("multiply-by-two slot without its 1.5-bit slot");
      end
      if (cmd.force_dac) begin
        n_forced_slots++;
        if (cmd.stage != 5 || cmd.mode != MODE_1P5) fail("unexpected forced DAC");
      end
      if (cmd.stage == 5 && cmd.mode == MODE_1P5 && force_mask[4] && !cmd.force_dac)
        fail("stage 5 not forced after the offset was found");
      last_slot = cycle;
      last_cmd  = cmd;
      have_last = 1;
    end
    if (mem_we) begin
      checks++;
      if (mem_wdata != code_of(last_cmd) || mem_mode != last_cmd.mode || mem_vsel != last_cmd.vsel)
        fail("memory write does not match the slot");
      if (mem_mode == MODE_1P5 && mem_wd != 2'sd1) fail("effective decision not +1");
    end
    if (lms_upd) begin
      n_upd++;
      checks++;
      if (lms_stage != last_cmd.stage || lms_vsel != last_cmd.vsel || last_cmd.mode != MODE_X2)
        fail("LMS update not after a pair");
    end
    if (cur_stage != last_stage) begin
      checks++;
      if (!((cur_stage == last_stage - 1) || (last_stage == 1 && cur_stage == NSTAGES)))
        fail($sformatf("stage %0d after %0d", cur_stage, last_stage));
      if (cycle - last_change < DWELL) fail("stage left too early");
      if (cycle - last_change > DWELL + 4 * SKIP + 8) fail("stage held too long");
      last_change = cycle;
      last_stage  = cur_stage;
    end
    if (pass_cnt != last_pass) begin
      n_wraps++;
      checks++;
      if (cur_stage != NSTAGES) fail("pass counted away from stage 14");
      last_pass = pass_cnt;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    checks++;
    @(posedge clk);
    if (cur_stage != NSTAGES || cmd.slot) fail("reset state");
    enable <= 1'b1;
    wait (pass_cnt == 16'd2);
    repeat (10) @(posedge clk);
    $display("updates %0d, x2 slots %0d, V2 slots %0d, forced slots %0d, force_mask %b",
             n_upd, n_x2, n_v2, n_forced_slots, force_mask);
    checks += 5;
    if (n_upd != n_x2 && n_upd != n_x2 - 1) fail("one LMS update per pair");
    if (n_v2 == 0) fail("no V2 slots");
    if (n_forced_slots == 0) fail("no forced slots");
    if (force_mask != 14'b00000000010000) fail("force mask");
    if (n_wraps != 2) fail("pass count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
