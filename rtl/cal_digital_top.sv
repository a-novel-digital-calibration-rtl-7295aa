// cal_digital_top: the digital part of the calibrated pipelined ADC. It
// turns the aligned stage codes into 12-bit output words, runs the
// background calibration, and fills the samples that calibration skips.
//
// Data path: codes/fcode -> recon_chain (inverse stage functions with the
// current coefficients, 15 cycles) -> 16-bit word, 14 fractional bits ->
// skip_fill_fir (replaces skipped samples, 41 cycles) -> rounded and
// saturated to 12 bits, two's complement, 2048 == +Vref.
// Calibration path: cal_controller issues a slot command to the analog front
// end; the same command is delayed by FE_LAT cycles here so that it tags the
// codes of that slot. The chain's tap returns the digitised stage residue,
// cal_controller stores it in cal_memory, and lms_engine updates the stage's
// coefficients, which the chain uses from then on.
//
// Latency from the codes of a sample to its dout word: CHAIN_LAT + NTAPS/2
// + 2 cycles (57 by default), to which the front end adds FE_LAT; dout_valid marks valid words and dout_filled
// words that were interpolated. The block split follows the design; the
// widths and the pipelining are this implementation's choices.
module cal_digital_top
  import adc_cal_pkg::*;
#(
  parameter int unsigned SKIP_PERIOD   = 64,
  parameter int unsigned STAGE_PERIODS = 4096,
  parameter int unsigned MU1_SHIFT     = 1,
  parameter int unsigned MU3_SHIFT     = 1,
  parameter int unsigned NTAPS         = 80
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cal_en,
  input  codes_t                codes,
  input  fcode_t                fcode,
  output cal_cmd_t              cmd,
  output logic signed [OUT_BITS-1:0] dout,
  output logic                  dout_valid,
  output logic                  dout_filled,
  output fx_t                   beta1 [NSTAGES],
  output fx_t                   beta3 [NCUBIC],
  output fx_t                   lms_err,
  output stage_idx_t            cal_stage,
  output logic [15:0]           cal_pass,
  output logic [NSTAGES-1:0]    force_mask
);

  localparam int unsigned XW = 16, XFRAC = 14;

  // Command and valid delayed to meet the codes of their sample
  // (the command is registered at the sampling edge, the codes FE_LAT
  // edges later)
  cal_cmd_t tag_dl [FE_LAT+1];
  logic     vld_dl [FE_LAT+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(FE_LAT); i++) begin
        tag_dl[i] <= '0;
        vld_dl[i] <= 1'b0;
      end
    end else begin
      tag_dl[0] <= cmd;
      vld_dl[0] <= 1'b1;
      for (int i = 1; i <= int'(FE_LAT); i++) begin
        tag_dl[i] <= tag_dl[i-1];
        vld_dl[i] <= vld_dl[i-1];
      end
    end
  end

  // Valid flag alongside the reconstruction chain
  logic chain_vld [CHAIN_LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CHAIN_LAT); i++) chain_vld[i] <= 1'b0;
    end else begin
      chain_vld[0] <= vld_dl[FE_LAT];
      for (int i = 1; i < int'(CHAIN_LAT); i++) chain_vld[i] <= chain_vld[i-1];
    end
  end

  fx_t      rec;
  cal_cmd_t rec_tag, tap_tag;
  logic     tap_valid;
  fx_t      tap_dout;
  scode_t   tap_d;

  recon_chain u_chain (
    .clk      (clk),
    .rst_n    (rst_n),
    .codes    (codes),
    .fcode    (fcode),
    .tag_in   (tag_dl[FE_LAT]),
    .beta1    (beta1),
    .beta3    (beta3),
    .dout     (rec),
    .tag_out  (rec_tag),
    .tap_valid(tap_valid),
    .tap_tag  (tap_tag),
    .tap_dout (tap_dout),
    .tap_d    (tap_d)
  );

  logic       mem_we, lms_upd;
  vsel_e      mem_vsel, lms_vsel;
  cal_mode_e  mem_mode;
  fx_t        mem_wdata, m_dout1, m_dout2;
  scode_t     mem_wd, m_d;
  stage_idx_t lms_stage;

  cal_controller #(
    .SKIP_PERIOD  (SKIP_PERIOD),
    .STAGE_PERIODS(STAGE_PERIODS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (cal_en),
    .cmd       (cmd),
    .tap_valid (tap_valid),
    .tap_tag   (tap_tag),
    .tap_dout  (tap_dout),
    .tap_d     (tap_d),
    .mem_we    (mem_we),
    .mem_vsel  (mem_vsel),
    .mem_mode  (mem_mode),
    .mem_wdata (mem_wdata),
    .mem_wd    (mem_wd),
    .lms_upd   (lms_upd),
    .lms_stage (lms_stage),
    .lms_vsel  (lms_vsel),
    .cur_stage (cal_stage),
    .pass_cnt  (cal_pass),
    .force_mask(force_mask)
  );

  cal_memory u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (mem_we),
    .wvsel(mem_vsel),
    .wmode(mem_mode),
    .wdata(mem_wdata),
    .wd   (mem_wd),
    .rvsel(lms_vsel),
    .dout1(m_dout1),
    .dout2(m_dout2),
    .d    (m_d)
  );

  lms_engine #(
    .MU1_SHIFT(MU1_SHIFT),
    .MU3_SHIFT(MU3_SHIFT)
  ) u_lms (
    .clk  (clk),
    .rst_n(rst_n),
    .upd  (lms_upd),
    .stage(lms_stage),
    .d    (m_d),
    .dout1(m_dout1),
    .dout2(m_dout2),
    .beta1(beta1),
    .beta3(beta3),
    .err  (lms_err)
  );

  // Reconstructed value to a 16-bit word with XFRAC fractional bits
  logic signed [XW-1:0] xw;
  fx_t                  xs;
  always_comb begin
    xs = rec >>> (FRAC - XFRAC);
    if (xs > fx_t'((1 <<< (XW - 1)) - 1))  xw = {1'b0, {(XW-1){1'b1}}};
    else if (xs < -fx_t'(1 <<< (XW - 1)))  xw = {1'b1, {(XW-1){1'b0}}};
    else                                   xw = xs[XW-1:0];
  end

  logic                 f_valid, f_skip;
  logic signed [XW-1:0] f_y;

  skip_fill_fir #(.NTAPS(NTAPS), .XW(XW)) u_fill (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_valid(chain_vld[CHAIN_LAT-1]),
    .x      (xw),
    .x_skip (rec_tag.slot),
    .y_valid(f_valid),
    .y      (f_y),
    .y_skip (f_skip)
  );

  // 12-bit output: round away the extra fractional bits, saturate
  localparam int unsigned SH = XFRAC - (OUT_BITS - 1);
  logic signed [XW:0] r;
  always_comb r = (f_y + (XW+1)'(1 <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout        <= '0;
      dout_valid  <= 1'b0;
      dout_filled <= 1'b0;
    end else begin
      dout_valid  <= f_valid;
      dout_filled <= f_skip;
      if (r > (XW+1)'((1 <<< (OUT_BITS - 1)) - 1))  dout <= {1'b0, {(OUT_BITS-1){1'b1}}};
      else if (r < -(XW+1)'(1 <<< (OUT_BITS - 1)))  dout <= {1'b1, {(OUT_BITS-1){1'b0}}};
      else                                          dout <= r[OUT_BITS-1:0];
    end
  end

endmodule
