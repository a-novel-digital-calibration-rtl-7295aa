// tb_cal_digital_top: the digital calibration processor fed by a simple
// stage model written here (linear stages of known gain, a comparator
// offset in stage 4 that makes V1 miss its threshold, ideal flash), at the
// default parameters, over three calibration cycles.
// Checks: words leave FE_LAT + 57 cycles after their sample (one more here,
// as the bench presents codes a cycle after the model makes them); after
// calibration every word, filled words included, is within 1 LSB of the
// ideal 12-bit code; beta1 of each stage reaches 1/G within half an LSB of
// output effect and beta3 stays near 0 (within one LSB of effect); stage 4's DAC is forced; slot
// commands follow the calibration order.
module tb_cal_digital_top;
  import adc_cal_pkg::*;

  localparam int  LAT = FE_LAT + CHAIN_LAT + 40 + 2;
  localparam int  NCYC = 215000;
  localparam real V1 = 0.28, V2 = 0.46;

  logic clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0;
  codes_t codes;
  fcode_t fcode;
  cal_cmd_t cmd;
  logic signed [OUT_BITS-1:0] dout;
  logic dout_valid, dout_filled;
  fx_t beta1 [NSTAGES];
  fx_t beta3 [NCUBIC];
  fx_t lms_err;
  stage_idx_t cal_stage;
  logic [15:0] cal_pass;
  logic [NSTAGES-1:0] force_mask;

  cal_digital_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  codes_t ch [NCYC];
  fcode_t fh [NCYC];
  int     ideal [NCYC];

  initial begin
    repeat (NCYC + 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gain(int k);
    return 2.0 * (0.97 + 0.002 * real'(k % 5));
  endfunction

  // Codes of one sample (vin, or a calibration slot)
  task automatic convert(real vin, cal_cmd_t c, output codes_t cd, output fcode_t fc);
    real v;
    v = vin;
    cd = '0;
    for (int k = 1; k <= int'(NSTAGES); k++) begin
      real thr, vdac;
      scode_t d;
      cal_mode_e m;
      logic force_d;
      m = MODE_1P5;
      force_d = 1'b0;
      if (c.slot && int'(c.stage) == k) begin
        v = (c.vsel == VSEL_V2) ? V2 : V1;
        m = c.mode;
        force_d = c.force_dac;
      end
      thr = (k == 4) ? 0.30 : 0.25;
      d = (v > thr) ? 2'sd1 : (v < -thr) ? -2'sd1 : 2'sd0;
      vdac = (m == MODE_X2) ? 0.0 : force_d ? 0.5 : 0.5 * real'(d);
      cd[k-1] = d;
      v = gain(k) * (v - vdac);
    end
    fc = (v > 0.5) ? 2'd3 : (v > 0.0) ? 2'd2 : (v > -0.5) ? 2'd1 : 2'd0;
  endtask

  function automatic int iabs(int a);
    return a < 0 ? -a : a;
  endfunction

  int  e, max_post = 0, n_filled_checked = 0, n_post = 0, t_valid = -1;
  bit  post = 0;

  initial begin
    codes = '0; fcode = '0;
    for (int m = 0; m < NCYC; m++) begin
      real vin, q;
      vin = 0.97 * $sin(2.0 * 3.14159265358979 * 0.00731 * real'(m));
      q = vin * 2048.0;
      q = q >= 0.0 ? q + 0.5 : q - 0.5;
      ideal[m] = $rtoi(q) > 2047 ? 2047 : $rtoi(q);
      if (m == 3) rst_n = 1'b1;
      if (m == 500) cal_en = 1'b1;
      @(negedge clk);
      // sample m is taken at the coming edge with the command now on cmd
      convert(vin, cmd, ch[m], fh[m]);
      @(posedge clk); #1;
      if (m >= int'(FE_LAT)) begin
        codes = ch[m - int'(FE_LAT)];
        fcode = fh[m - int'(FE_LAT)];
      end
      if (dout_valid && t_valid < 0) t_valid = m;
      if (cal_pass == 16'd3) post = 1;
      if (post && dout_valid) begin
        e = iabs(int'(dout) - ideal[m - LAT - 1]);
        checks++;
        n_post++;
        if (e > 1) begin
          failures++;
          if (failures < 10) $display("cycle %0d: dout %0d ideal %0d filled %0b", m, dout, ideal[m - LAT - 1], dout_filled);
        end
        if (dout_filled) n_filled_checked++;
        if (e > max_post) max_post = e;
      end
    end
    $display("valid from cycle %0d, max error after calibration %0d LSB, filled words checked %0d",
             t_valid, max_post, n_filled_checked);
    checks += 4;
    if (n_post < 10000) begin failures++; $display("only %0d words after calibration", n_post); end
    if (t_valid != LAT + 4) begin failures++; $display("first valid word at %0d", t_valid); end
    if (n_filled_checked < 20) failures++;
    if (force_mask != 14'b00000000001000) begin failures++; $display("force mask %b", force_mask); end
    for (int k = 1; k <= int'(NSTAGES); k++) begin
      real b;
      b = real'(beta1[k-1]) / real'(FX_ONE);
      checks++;
      if ((b > 1.0 / gain(k) ? b - 1.0 / gain(k) : 1.0 / gain(k) - b) / real'(1 << (k - 1)) > 1.0 / 4096.0) begin
        failures++;
        $display("beta1[%0d] = %f expected %f", k, b, 1.0 / gain(k));
      end
    end
    for (int k = 0; k < int'(NCUBIC); k++) begin
      real b;
      b = real'(beta3[k]) / real'(FX_ONE);
      checks++;
      if ((b < 0.0 ? -b : b) / real'(1 << k) > 1.0 / 2048.0) begin failures++; $display("beta3[%0d] = %f", k + 1, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
