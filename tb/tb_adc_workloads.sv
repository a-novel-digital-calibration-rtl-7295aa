// tb_adc_workloads: the converter at its default parameters put through the
// measurements used to judge it:
//  * linearity: a slow full-scale ramp (16 samples per code); the input at
//    which each output code is first reached, against the ideal transition,
//    gives the INL of every code, and the distance between two transitions
//    its DNL (resolution 1/16 LSB), before and after calibration;
//  * SNDR with sine inputs near 1 MHz, 10 MHz and 30 MHz at 80 MS/s
//    (frequencies as fractions of the sample rate), from the error between
//    each output word and the exact input sample, after calibration, with
//    and without the interpolated words;
//  * SFDR at the same frequencies: the frequencies are M/NFFT with M odd, so
//    NFFT consecutive output words hold a whole number of periods; a direct
//    DFT of those words (cosine table, no window) gives the fundamental and
//    the largest other bin between DC and fs/2;
//  * calibration time: the number of sample periods per full calibration
//    cycle against 14 x 2^12.
module tb_adc_workloads;
  import adc_cal_pkg::*;

  localparam int LAT = FE_LAT + CHAIN_LAT + 40 + 2 + 2;  // see tb_pipelined_adc_top
  localparam real PI = 3.14159265358979;

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

  // Input generator: 0 = ramp, 1 = sine
  int  mode = 1;
  real fsig = 0.0123, amp = 0.98;
  longint t_start = 0;
  real hist [0:255];

  function automatic real input_at(longint t);
    if (mode == 0) return -1.0 + 2.0 * real'(t - t_start) / (4096.0 * 16.0);
    return amp * $sin(2.0 * PI * fsig * real'(t));
  endfunction

  always @(negedge clk) vin = input_at(cyc + 1);
  always @(posedge clk) begin
    hist[cyc % 256] <= vin;
    cyc <= cyc + 1;
  end

  // Measurement accumulators
  bit  meas = 0;
  real sig_p, err_p, err_p_nf;
  int  n_meas, n_nf;
  int  first_hit [0:4095];
  real vin_of_word;

  // Spectrum capture
  localparam int NFFT = 8192;
  real xbuf [0:NFFT-1];
  real ctab [0:NFFT-1];
  int  n_cap;

  always @(posedge clk) begin
    if (meas && dout_valid && cyc > LAT) begin
      real v, e;
      v = hist[(cyc - LAT) % 256];
      e = real'(dout) / 2048.0 - v;
      if (mode == 1) begin
        if (n_cap < NFFT) begin
          xbuf[n_cap] = real'(dout) / 2048.0;
          n_cap++;
        end
        sig_p += v * v;
        err_p += e * e;
        n_meas++;
        if (!dout_filled) begin
          err_p_nf += e * e;
          n_nf++;
        end
      end else begin
        int c;
        c = int'(dout) + 2048;
        for (int k = 0; k < 4096; k++)
          if (k <= c && first_hit[k] < 0) first_hit[k] = $rtoi((v + 1.0) * 2048.0 * 16.0);
      end
    end
  end

  // SFDR in dB of the captured words; the input is in bin m
  function automatic real sfdr_of(int m);
    real pk, ps, re, im, p;
    pk = 0.0; ps = 0.0;
    for (int k = 1; k < NFFT / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        int ph;
        ph = int'((longint'(k) * longint'(n)) % NFFT);
        re += xbuf[n] * ctab[ph];
        im += xbuf[n] * ctab[(ph + NFFT / 4) % NFFT];
      end
      p = re * re + im * im;
      if (k == m) pk = p;
      else if (p > ps) ps = p;
    end
    return 10.0 * $log10(pk / ps);
  endfunction

  task automatic run_sine(int m, int n, output real sndr, output real sndr_nf, output real sfdr);
    mode = 1; fsig = real'(m) / real'(NFFT);
    repeat (LAT + 10) @(posedge clk);
    sig_p = 0.0; err_p = 0.0; err_p_nf = 0.0; n_meas = 0; n_nf = 0; n_cap = 0;
    meas = 1;
    repeat (n) @(posedge clk);
    meas = 0;
    sndr    = 10.0 * $log10(sig_p / err_p);
    sndr_nf = 10.0 * $log10((sig_p / n_meas) / (err_p_nf / n_nf));
    sfdr    = sfdr_of(m);
  endtask

  // INL in LSB: transition of code k is ideally at input (k - 2048 - 0.5) LSB.
  // Codes never reached (missing codes) are counted and left out.
  int n_missing;
  real dnl;
  task automatic run_ramp(output real inl);
    for (int k = 0; k < 4096; k++) first_hit[k] = -1;
    mode = 0;
    t_start = cyc + 1;
    repeat (LAT + 2) @(posedge clk);
    meas = 1;
    repeat (4096 * 16 - 40) @(posedge clk);
    meas = 0;
    inl = 0.0;
    dnl = 0.0;
    n_missing = 0;
    for (int k = 8; k < 4087; k++) begin
      real w;
      if (first_hit[k] < 0 || first_hit[k+1] < 0) continue;
      w = real'(first_hit[k+1] - first_hit[k]) / 16.0 - 1.0;
      if (w < 0.0) w = -w;
      if (w > dnl) dnl = w;
    end
    for (int k = 8; k < 4088; k++) begin
      real d;
      if (first_hit[k] == first_hit[k+1]) begin
        n_missing++;
        continue;
      end
      d = real'(first_hit[k]) / 16.0 - (real'(k) - 0.5);
      if (d < 0.0) d = -d;
      if (d > inl) inl = d;
    end
    mode = 1;
  endtask

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real inl_pre, inl_post, s_pre, snf_pre, s1, s1nf, s10, s10nf, s30, s30nf;
    real f_pre, f1, f10, f30;
    longint p1, p2;
    int miss_pre, miss_post;
    real dnl_pre, dnl_post;
    for (int n = 0; n < NFFT; n++) ctab[n] = $cos(2.0 * PI * real'(n) / real'(NFFT));
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (100) @(posedge clk);
    run_ramp(inl_pre);
    miss_pre = n_missing;
    dnl_pre = dnl;
    run_sine(101, 8192, s_pre, snf_pre, f_pre);      // ~1 MHz
    cal_en <= 1'b1;
    wait (cal_pass == 16'd1);
    p1 = cyc;
    wait (cal_pass == 16'd2);
    p2 = cyc;
    wait (cal_pass == 16'd3);
    run_ramp(inl_post);
    miss_post = n_missing;
    dnl_post = dnl;
    run_sine(101, 16384, s1, s1nf, f1);      // 0.99 MHz at 80 MS/s
    run_sine(1009, 16384, s10, s10nf, f10);  // 9.85 MHz
    run_sine(3057, 16384, s30, s30nf, f30);  // 29.85 MHz
    $display("calibration cycle: %0d sample periods (14 x 2^12 = %0d)", p2 - p1, 14 * 4096);
    $display("peak INL: before %.2f LSB (%0d missing codes), after %.2f LSB (%0d missing codes)",
             inl_pre, miss_pre, inl_post, miss_post);
    $display("peak |DNL|: before %.2f LSB, after %.2f LSB", dnl_pre, dnl_post);
    $display("SNDR ~1 MHz: before %.1f dB, after %.1f dB (%.1f dB without filled words)", s_pre, s1, s1nf);
    $display("SNDR ~10 MHz after %.1f dB (%.1f dB without filled words)", s10, s10nf);
    $display("SNDR ~30 MHz after %.1f dB (%.1f dB without filled words)", s30, s30nf);
    $display("SFDR ~1 MHz: before %.1f dB, after %.1f dB; ~10 MHz %.1f dB; ~30 MHz %.1f dB",
             f_pre, f1, f10, f30);
    checks += 12;
    if (dnl_post > 0.5) failures++;
    if (f_pre > 55.0) failures++;
    if (f1 < 75.0) failures++;
    if (f10 < 75.0) failures++;
    if (miss_post != 0) failures++;
    if (p2 - p1 < 14 * 4096 || p2 - p1 > 14 * (4096 + 4 * 64)) failures++;
    if (inl_pre < 20.0) failures++;
    if (inl_post > 1.0) failures++;
    if (s_pre > 55.0) failures++;
    if (s1 < 68.0) failures++;
    if (s10 < 68.0) failures++;
    if (s30nf < 68.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
