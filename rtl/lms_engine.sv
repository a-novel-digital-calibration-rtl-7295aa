// lms_engine: least-mean-square extraction of the stage coefficients, and
// the register file that holds them.
//
// For the stage under calibration, with the two stored measurements of one
// calibration voltage, it forms
//     delta  = D_out2 - D_out1
//     delta3 = D_out2^3 - D_out1^3          (stages 1..NCUBIC only, else 0)
//     e      = D*Vref/2 - beta1*delta - beta3*delta3
// and, on upd, applies
//     beta1 += mu1 * e * delta,   beta3 += mu3 * e * delta3.
// This is the design's update rule; the step sizes are powers of two,
// mu = 2^-MU_SHIFT, which the design leaves open. beta1 of every stage
// starts at the ideal 1/2 and beta3 at 0 (reset values chosen here).
//
// Timing: the error is combinational from the inputs; the coefficients and
// err (the error of the last update) change on the clock edge where upd is
// high. Synchronous active-low reset.
module lms_engine
  import adc_cal_pkg::*;
#(
  parameter int unsigned MU1_SHIFT = 1,
  parameter int unsigned MU3_SHIFT = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,
  input  stage_idx_t stage,    // 1..NSTAGES
  input  scode_t     d,        // effective D of the 1.5-bit-mode measurement
  input  fx_t        dout1,    // residue value, 1.5-bit mode
  input  fx_t        dout2,    // residue value, multiply-by-two mode
  output fx_t        beta1 [NSTAGES],
  output fx_t        beta3 [NCUBIC],
  output fx_t        err
);

  fx_t delta, delta3, dac, b1, b3, e;
  logic cubic;
  int unsigned si, ci;   // stage and cubic-coefficient index

  function automatic fx_t cube(fx_t x);
    return fx_mul(fx_mul(x, x), x);
  endfunction

  always_comb begin
    si     = (stage >= 1 && stage <= stage_idx_t'(NSTAGES)) ? int'(stage) - 1 : 0;
    ci     = si % NCUBIC;
    cubic  = (stage >= 1) && (stage <= stage_idx_t'(NCUBIC));
    b1     = beta1[si];
    b3     = cubic ? beta3[ci] : '0;
    delta  = dout2 - dout1;
    delta3 = cubic ? cube(dout2) - cube(dout1) : '0;
    dac    = (d == 2'sd1) ? FX_HALF : (d == -2'sd1) ? -FX_HALF : '0;
    e      = dac - fx_mul(b1, delta) - fx_mul(b3, delta3);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beta1 <= '{default: FX_HALF};
      beta3 <= '{default: '0};
      err   <= '0;
    end else if (upd && stage >= 1 && stage <= stage_idx_t'(NSTAGES)) begin
      beta1[si] <= b1 + (fx_mul(e, delta) >>> MU1_SHIFT);
      if (cubic) beta3[ci] <= b3 + (fx_mul(e, delta3) >>> MU3_SHIFT);
      err <= e;
    end
  end

endmodule
