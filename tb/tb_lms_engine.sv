// tb_lms_engine: the LMS update against a floating-point copy of the rule
//     e = D/2 - b1*(d2-d1) - b3*(d2^3-d1^3),  b1 += mu1*e*(d2-d1),
//     b3 += mu3*e*(d2^3-d1^3)
// for single random updates (one step, all stages), and convergence: with
// measurements made by a stage of known inverse coefficients, repeated
// updates with V1 and V2 pairs must find beta1 and beta3 of stage 1, and
// beta1 of a linear stage. Reset values: beta1 = 1/2, beta3 = 0.
module tb_lms_engine;
  import adc_cal_pkg::*;

  localparam int MU1 = 1, MU3 = 1;

  logic clk = 1'b0, rst_n = 1'b0, upd = 1'b0;
  stage_idx_t stage;
  scode_t d;
  fx_t dout1, dout2, err;
  fx_t beta1 [NSTAGES];
  fx_t beta3 [NCUBIC];

  lms_engine #(.MU1_SHIFT(MU1), .MU3_SHIFT(MU3)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fx_t x);
    return real'(x) / real'(FX_ONE);
  endfunction
  function automatic fx_t f(real x);
    return fx_t'($rtoi(x * real'(FX_ONE)));
  endfunction
  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  task automatic step(int s, int dd, real d1, real d2);
    @(negedge clk);
    stage = stage_idx_t'(s); d = scode_t'(dd); dout1 = f(d1); dout2 = f(d2); upd = 1'b1;
    @(negedge clk);
    upd = 1'b0;
  endtask

  // Stage whose input is x = b1*y + b3*y^3 for output y: the two
  // measurements of voltage v (D = +1 in 1.5-bit mode) found by bisection
  function automatic real invert(real v, real b1, real b3);
    real lo = -2.0, hi = 2.0, mid;
    for (int i = 0; i < 80; i++) begin
      mid = 0.5 * (lo + hi);
      if (b1 * mid + b3 * mid * mid * mid < v) lo = mid; else hi = mid;
    end
    return mid;
  endfunction

  initial begin
    stage = 1; d = 0; dout1 = 0; dout2 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (beta1[5] != FX_HALF || beta3[1] != '0) begin
      failures++;
      $display("reset values wrong");
    end

    // One-step updates
    for (int n = 0; n < 200; n++) begin
      int s, dd;
      real d1, d2, b1, b3, dl, dl3, e, nb1, nb3;
      s  = 1 + $urandom_range(NSTAGES - 1);
      dd = int'($urandom_range(2)) - 1;
      d1 = real'($urandom_range(2000)) / 1000.0 - 1.0;
      d2 = real'($urandom_range(2000)) / 1000.0 - 1.0;
      b1 = r(beta1[s-1]);
      b3 = (s <= int'(NCUBIC)) ? r(beta3[s-1]) : 0.0;
      dl = r(f(d2)) - r(f(d1));
      dl3 = (s <= int'(NCUBIC)) ? r(f(d2)) ** 3 - r(f(d1)) ** 3 : 0.0;
      e = 0.5 * dd - b1 * dl - b3 * dl3;
      nb1 = b1 + e * dl / real'(1 << MU1);
      nb3 = b3 + e * dl3 / real'(1 << MU3);
      step(s, dd, d1, d2);
      checks += 2;
      if (rabs(r(beta1[s-1]) - nb1) > 1e-5 || rabs(r(err) - e) > 1e-5) begin
        failures++;
        $display("stage %0d: beta1 %f expected %f, e %f expected %f", s, r(beta1[s-1]), nb1, r(err), e);
      end
      if (s <= int'(NCUBIC) && rabs(r(beta3[s-1]) - nb3) > 1e-5) begin
        failures++;
        $display("stage %0d: beta3 %f expected %f", s, r(beta3[s-1]), nb3);
      end
      // keep the coefficients in a sensible range for the next steps
      if (n % 20 == 19) begin
        rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
      end
    end

    // Convergence, stage 1 (cubic) and stage 7 (linear)
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      real v, y1, y2;
      v  = (n % 2 == 0) ? 0.28 : 0.465;
      // 1.5-bit mode: x = v - 1/2 ; multiply-by-two mode: x = v
      y1 = invert(v - 0.5, 0.5185, 0.0027);
      y2 = invert(v, 0.5185, 0.0027);
      step(1, 1, y1, y2);
      y1 = invert(0.28 - 0.5, 0.5172, 0.0);
      y2 = invert(0.28, 0.5172, 0.0);
      step(7, 1, y1, y2);
    end
    $display("stage 1: beta1 %f beta3 %f, stage 7: beta1 %f", r(beta1[0]), r(beta3[0]), r(beta1[6]));
    checks += 3;
    if (rabs(r(beta1[0]) - 0.5185) > 1e-4) failures++;
    if (rabs(r(beta3[0]) - 0.0027) > 2e-4) failures++;
    if (rabs(r(beta1[6]) - 0.5172) > 1e-5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
