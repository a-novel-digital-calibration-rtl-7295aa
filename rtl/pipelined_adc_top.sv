// pipelined_adc_top: a 12-bit pipelined ADC, fourteen 1.5-bit stages and a
// 2-bit flash, whose stage errors (capacitor mismatch, finite amplifier gain,
// amplifier nonlinearity) are removed by digital background calibration.
//
// It joins the behavioural model of the analog part (analog_frontend) with
// the synthesizable calibration and reconstruction logic (cal_digital_top).
// Every SKIP_PERIOD samples the calibration logic may skip one input sample;
// in that slot a ladder voltage is converted by the stage under calibration,
// in 1.5-bit or multiply-by-two mode, and the result drives an LMS update of
// that stage's coefficients. The skipped sample is rebuilt by an 80-tap
// Lagrange interpolator, so the output stream has no gaps.
//
// Interface: clk (one rising edge per sample, 80 MS/s in the design);
// rst_n, synchronous, active low; cal_en enables calibration slots; vin,
// the analog input in Vref units (full scale +/-1.0). dout is the 12-bit
// two's complement output (+2048 == +Vref) for the sample taken
// FE_LAT + CHAIN_LAT + NTAPS/2 + 2 = 72 edges earlier, with dout_valid and
// dout_filled (interpolated word). The coefficients and the calibration
// state are brought out for observation.
module pipelined_adc_top
  import adc_cal_pkg::*;
#(
  parameter int unsigned SKIP_PERIOD   = 64,
  parameter int unsigned STAGE_PERIODS = 4096,
  parameter int unsigned MU1_SHIFT     = 1,
  parameter int unsigned MU3_SHIFT     = 1,
  parameter int unsigned NTAPS         = 80
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cal_en,
  input  real                        vin,
  output logic signed [OUT_BITS-1:0] dout,
  output logic                       dout_valid,
  output logic                       dout_filled,
  output cal_cmd_t                   cmd,
  output fx_t                        beta1 [NSTAGES],
  output fx_t                        beta3 [NCUBIC],
  output fx_t                        lms_err,
  output stage_idx_t                 cal_stage,
  output logic [15:0]                cal_pass,
  output logic [NSTAGES-1:0]         force_mask
);

  codes_t codes;
  fcode_t fcode;

  analog_frontend u_afe (
    .clk  (clk),
    .vin  (vin),
    .cmd  (cmd),
    .codes(codes),
    .fcode(fcode)
  );

  cal_digital_top #(
    .SKIP_PERIOD  (SKIP_PERIOD),
    .STAGE_PERIODS(STAGE_PERIODS),
    .MU1_SHIFT    (MU1_SHIFT),
    .MU3_SHIFT    (MU3_SHIFT),
    .NTAPS        (NTAPS)
  ) u_dig (
    .clk        (clk),
    .rst_n      (rst_n),
    .cal_en     (cal_en),
    .codes      (codes),
    .fcode      (fcode),
    .cmd        (cmd),
    .dout       (dout),
    .dout_valid (dout_valid),
    .dout_filled(dout_filled),
    .beta1      (beta1),
    .beta3      (beta3),
    .lms_err    (lms_err),
    .cal_stage  (cal_stage),
    .cal_pass   (cal_pass),
    .force_mask (force_mask)
  );

endmodule
