// adc_cal_pkg: types and constants shared by the calibrated pipelined ADC.
//
// The converter is 14 pipelined 1.5-bit stages followed by a 2-bit flash.
// All digital arithmetic uses one signed fixed-point format, fx_t, whose
// unit is the reference voltage Vref: a value of 1.0 is +Vref. The stage
// count and the 14/2 split between linear-only and cubic-corrected stages
// follow the design; the word widths and the fixed-point scaling are this
// implementation's own choice.
package adc_cal_pkg;

  // Converter organisation
  localparam int unsigned NSTAGES    = 14;  // 1.5-bit stages
  localparam int unsigned NCUBIC     = 2;   // stages 1..NCUBIC also get a beta3 term
  localparam int unsigned OUT_BITS   = 12;  // converter resolution

  // Fixed point: DW bits, FRAC fractional bits, value 1.0 == Vref
  localparam int unsigned DW   = 32;
  localparam int unsigned FRAC = 24;
  typedef logic signed [DW-1:0] fx_t;

  localparam fx_t FX_ONE  = fx_t'(1) <<< FRAC;
  localparam fx_t FX_HALF = fx_t'(1) <<< (FRAC - 1);

  // Stage sub-ADC decision: -1, 0 or +1 (two's complement, 2 bits)
  typedef logic signed [1:0] scode_t;
  // Codes of all stages of one sample; element k-1 belongs to stage k
  typedef scode_t [NSTAGES-1:0] codes_t;
  // 2-bit flash output, 0..3 for -0.75, -0.25, +0.25, +0.75 Vref
  typedef logic [1:0] fcode_t;

  // Stage configuration during a calibration slot
  typedef enum logic [0:0] {
    MODE_1P5 = 1'b0,   // normal 1.5-bit operation, Vdac = D * Vref/2
    MODE_X2  = 1'b1    // multiply-by-two (sample and hold), Vdac = 0
  } cal_mode_e;

  // Which ladder voltage is inserted
  typedef enum logic [0:0] {
    VSEL_V1 = 1'b0,
    VSEL_V2 = 1'b1
  } vsel_e;

  localparam int unsigned STW = $clog2(NSTAGES + 1);  // stage index width
  typedef logic [STW-1:0] stage_idx_t;                 // 1..NSTAGES

  // One calibration insertion: skip the input sample and feed Vcal to a stage
  typedef struct packed {
    logic       slot;       // this sample period is a calibration slot
    stage_idx_t stage;      // stage that receives Vcal
    cal_mode_e  mode;       // 1.5-bit or multiply-by-two
    vsel_e      vsel;       // V1 or V2
    logic       force_dac;  // mode control: Vdac forced to +Vref/2 in 1.5-bit mode
  } cal_cmd_t;

  // Latencies, in sample periods, of the blocks (checked by the testbenches)
  localparam int unsigned FE_LAT    = NSTAGES + 1;  // input sample to aligned codes
  localparam int unsigned CHAIN_LAT = NSTAGES + 1;  // aligned codes to reconstructed word

  // Value of a flash code in fx_t: (2c-3)/4 Vref
  function automatic fx_t flash_value(fcode_t c);
    return fx_t'((2 * int'(c) - 3)) <<< (FRAC - 2);
  endfunction

  // Fixed-point product, truncated back to FRAC fractional bits
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return fx_t'(p >>> FRAC);
  endfunction

endpackage
