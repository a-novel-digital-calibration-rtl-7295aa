// stage_recon: the digital inverse of one pipeline stage,
//     D_in = D * Vref/2 + beta1 * D_out + beta3 * D_out^3,
// where D is the stage's sub-ADC decision (-1, 0, +1), D_out the digital
// value of the stage's residue as resolved by the stages behind it, and
// beta1, beta3 the stage's calibrated coefficients. The cubic term is built
// only when HAS_B3 is set (stages 1 and 2 of the converter); the later
// stages use the linear term alone. Weighting D by Vref/2 follows from the
// non-flip-around MDAC, whose DAC levels are the reference voltages
// themselves, so every gain error is carried by beta1 and beta3.
//
// Purely combinational; all values are adc_cal_pkg::fx_t (1.0 == Vref).
module stage_recon
  import adc_cal_pkg::*;
#(
  parameter bit HAS_B3 = 1'b0
) (
  input  scode_t d,
  input  fx_t    dout,
  input  fx_t    beta1,
  input  fx_t    beta3,
  output fx_t    din
);

  fx_t dac, lin, cub;

  always_comb begin
    dac = (d == 2'sd1) ? FX_HALF : (d == -2'sd1) ? -FX_HALF : '0;
    lin = fx_mul(beta1, dout);
    cub = HAS_B3 ? fx_mul(beta3, fx_mul(fx_mul(dout, dout), dout)) : '0;
    din = dac + lin + cub;
  end

endmodule
