// mdac_stage: behavioural model of one 1.5-bit pipeline stage with a
// non-flip-around multiplying DAC (MDAC). This is an analog circuit; the
// model is not synthesizable and exists so the calibration logic can be
// simulated against a stage with realistic errors.
//
// On each rising clock edge the stage samples vin (phase 1), its two
// comparators at +/-Vref/4 (shifted together by CMP_OFFSET) give the sub-ADC
// decision d in {-1,0,+1}, and the amplified residue (phase 2)
//     vout = g(vin - Vdac),   g(x) = G*x - A3*(G*x)^3,   G = 2*(1+GAIN_ERR)
// is held until the next edge. GAIN_ERR lumps capacitor mismatch and the
// finite amplifier gain; A3 is the amplifier's compressive nonlinearity.
// Vdac is d*Vref/2 in 1.5-bit mode and 0 in multiply-by-two mode, as in the
// design. When force_dac is set in 1.5-bit mode, Vdac is +Vref/2 whatever
// the comparators decided: that is the mode control used when a comparator
// offset stops V1 from producing d=+1. Voltages are in units of Vref.
// The output swing is clipped at +/-1.5 Vref as a stand-in for the
// amplifier's rails; the clip level is a modelling choice.
//
// Interface: clk; vin (real); mode, force_dac (calibration configuration
// for the sample taken at this edge); vout (real), d (registered).
module mdac_stage
  import adc_cal_pkg::*;
#(
  parameter real GAIN_ERR   = 0.0,   // relative closed-loop gain error
  parameter real A3         = 0.0,   // cubic compression of the amplifier
  parameter real CMP_OFFSET = 0.0    // comparator offset, Vref units
) (
  input  logic      clk,
  input  real       vin,
  input  cal_mode_e mode,
  input  logic      force_dac,
  output real       vout,
  output scode_t    d
);

  real    vdac, y, g;
  scode_t dec;

  always_comb begin
    if (vin > 0.25 + CMP_OFFSET)       dec = 2'sd1;
    else if (vin < -0.25 + CMP_OFFSET) dec = -2'sd1;
    else                               dec = 2'sd0;

    if (mode == MODE_X2)  vdac = 0.0;
    else if (force_dac)   vdac = 0.5;
    else                  vdac = 0.5 * real'(dec);

    y = 2.0 * (1.0 + GAIN_ERR) * (vin - vdac);
    g = y - A3 * y * y * y;
    if (g > 1.5)       g = 1.5;
    else if (g < -1.5) g = -1.5;
  end

  always_ff @(posedge clk) begin
    vout <= g;
    d    <= dec;
  end

endmodule
