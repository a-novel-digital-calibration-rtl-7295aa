// tb_pipelined_adc_top: end-to-end test of the calibrated converter at its
// default parameters (14 stages, 2^12 periods per stage, 80-tap filler).
//
// A full-scale sine drives the converter. The test first measures the
// uncalibrated error, then lets background calibration run for three full
// cycles (stage 14 down to 1, three times) and measures again. Each output
// word is compared with the ideal 12-bit quantisation of the input sample it
// belongs to, found by the fixed latency of the design. Checks:
//   * the latency and valid flag of the output stream;
//   * after calibration the error of every word is within ERR_LIM LSB,
//     interpolated words included, and far below the uncalibrated error;
//   * the coefficients approach the values implied by the stage model;
//   * each mechanism happens: calibration slots in both modes, V2 slots,
//     LMS updates of beta3, filled words, forced DAC (comparator offset),
//     the wrap from stage 1 back to stage 14.
module tb_pipelined_adc_top;
  import adc_cal_pkg::*;

  // Design latency is FE_LAT + CHAIN_LAT + 40 + 2 = 72 edges; the history
  // index below is two further back because vin is set at the falling edge
  // for the next sample and the history and counter update together.
  localparam int LAT     = FE_LAT + CHAIN_LAT + 40 + 2 + 2;
  localparam int ERR_LIM = 1;                             // LSB
  localparam real FIN    = 1.0 / 80.0 * 0.9917;            // ~1 MHz at 80 MS/s
  localparam real AMP    = 0.95;

  logic clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0;
  real  vin;
  logic signed [OUT_BITS-1:0] dout;
  logic dout_valid, dout_filled;
  cal_cmd_t cmd;
  fx_t beta1 [NSTAGES];
  fx_t beta3 [NCUBIC];
  fx_t lms_err;
  stage_idx_t cal_stage;
  logic [15:0] cal_pass;
  logic [NSTAGES-1:0] force_mask;

  pipelined_adc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int ideal_hist [0:255];
  int n_slot_1p5 = 0, n_slot_x2 = 0, n_slot_v2 = 0, n_filled = 0, n_b3_upd = 0;
  int n_wrap = 0;
  int max_err_pre = 0, max_err_post = 0, max_err_fill = 0;
  bit measuring_pre = 0, measuring_post = 0;
  logic [15:0] last_pass;
  fx_t last_b3;

  function automatic int ideal_code(real v);
    real q;
    q = v * 2048.0;
    q = (q >= 0.0) ? q + 0.5 : q - 0.5;
    if (q > 2047.0) q = 2047.0;
    if (q < -2048.0) q = -2048.0;
    return int'($rtoi(q));
  endfunction

  // Mismatch spread of stage k, as in the front-end model (SEED 1)
  function automatic real spread(int k);
    return real'(((k + 3) * 7919 + 104729) % 201 - 100) / 100.0;
  endfunction

  function automatic int iabs(int a);
    return a < 0 ? -a : a;
  endfunction

  // Input sample taken at each edge, and its ideal code
  always @(negedge clk) vin = AMP * $sin(2.0 * 3.14159265358979 * FIN * real'(cyc + 1));

  always @(posedge clk) begin
    ideal_hist[cyc % 256] <= ideal_code(vin);
    cyc <= cyc + 1;
  end

  // Compare outputs with the delayed ideal codes
  always @(posedge clk) begin
    if (rst_n && cyc > LAT + 2 && dout_valid) begin
      int e;
      e = iabs(int'(dout) - ideal_hist[(cyc - LAT) % 256]);
      if (measuring_pre && e > max_err_pre) max_err_pre = e;
      if (measuring_post) begin
        checks++;
        if (e > ERR_LIM) begin
          failures++;
          if (failures < 10) $display("post-cal error %0d LSB at cycle %0d (filled=%0b)", e, cyc, dout_filled);
        end
        if (e > max_err_post) max_err_post = e;
        if (dout_filled && e > max_err_fill) max_err_fill = e;
      end
    end
    if (dout_filled) n_filled++;
    if (cmd.slot) begin
      if (cmd.mode == MODE_1P5) n_slot_1p5++; else n_slot_x2++;
      if (cmd.vsel == VSEL_V2) n_slot_v2++;
    end
    if (rst_n && beta3[0] != last_b3) n_b3_upd++;
    last_b3 <= beta3[0];
    if (rst_n && cal_pass != last_pass) n_wrap++;
    last_pass <= cal_pass;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    // Output valid appears after the pipeline fills
    t0 = 0;
    while (!dout_valid) begin @(posedge clk); t0++; end
    check(t0 == LAT + 1, $sformatf("valid after %0d cycles", t0));
    // Uncalibrated
    repeat (200) @(posedge clk);
    measuring_pre = 1;
    repeat (4000) @(posedge clk);
    measuring_pre = 0;
    // Background calibration: three full cycles
    cal_en <= 1'b1;
    wait (cal_pass == 16'd3);
    repeat (200) @(posedge clk);
    measuring_post = 1;
    repeat (8192) @(posedge clk);
    measuring_post = 0;

    $display("max error before %0d LSB, after %0d LSB (filled words %0d LSB)",
             max_err_pre, max_err_post, max_err_fill);
    for (int k = 0; k < NSTAGES; k++)
      $display("beta1[%0d] = %f", k + 1, real'(beta1[k]) / real'(FX_ONE));
    for (int k = 0; k < NCUBIC; k++)
      $display("beta3[%0d] = %f", k + 1, real'(beta3[k]) / real'(FX_ONE));
    $display("slots 1.5-bit %0d, x2 %0d, V2 %0d, filled %0d, beta3 updates %0d, wraps %0d, force_mask %b",
             n_slot_1p5, n_slot_x2, n_slot_v2, n_filled, n_b3_upd, n_wrap, force_mask);

    check(max_err_pre > 8 * ERR_LIM, "uncalibrated error should be large");
    // Expected beta1 = 1/G of each stage model, G = 2(1 + gain error), the
    // gain error being that of a 38 dB amplifier at feedback 1/3 plus the
    // stage's mismatch. An error in beta1 of stage k moves the output by at
    // most err * 2^-(k-1) Vref: require less than half a 12-bit LSB.
    for (int k = 1; k <= NSTAGES; k++) begin
      real b, g, ideal;
      b = real'(beta1[k-1]) / real'(FX_ONE);
      g = 2.0 * (1.0 - 1.0 / (1.0 + (10.0 ** (38.0 / 20.0)) / 3.0) + 0.001 * spread(k));
      ideal = 1.0 / g;
      check((b > ideal ? b - ideal : ideal - b) / real'(1 << (k - 1)) < 1.0 / 4096.0,
            $sformatf("beta1[%0d]=%f expected %f", k, b, ideal));
    end
    // Expected beta3 ~ A3/G = 0.0026 for stages 1 and 2
    for (int k = 0; k < NCUBIC; k++)
      check(real'(beta3[k]) / real'(FX_ONE) > 0.0015 && real'(beta3[k]) / real'(FX_ONE) < 0.004,
            $sformatf("beta3[%0d]", k + 1));
    check(n_slot_1p5 > 0, "1.5-bit-mode slots");
    check(n_slot_x2 > 0, "multiply-by-two slots");
    check(n_slot_v2 > 0, "V2 slots");
    check(n_filled > 0, "filled samples");
    check(n_b3_upd > 0, "beta3 updates");
    check(n_wrap >= 3, "calibration cycle wrap");
    check(force_mask != '0, "forced-DAC mode control");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
