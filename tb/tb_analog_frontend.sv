// tb_analog_frontend: checks the behavioural front end with its errors
// switched off, so that the codes can be predicted exactly.
//  * Normal conversion: the codes of each sample, weighted by 2^-k (and the
//    flash by 2^-14), rebuild the input to within a quarter of the flash
//    step, FE_LAT edges after the sample was taken.
//  * Calibration slots: for a slot at stage i the codes of stages i+1..14
//    and the flash rebuild that stage's residue: 2*V in multiply-by-two
//    mode, 2*V - Vref in 1.5-bit mode (decision +1), also with the DAC
//    forced, for V1 and V2.
module tb_analog_frontend;
  import adc_cal_pkg::*;

  localparam real V1 = 0.30, V2 = 0.45;
  localparam int  N  = 600;

  logic clk = 1'b0;
  real vin;
  cal_cmd_t cmd;
  codes_t codes;
  fcode_t fcode;

  analog_frontend #(
    .OPEN_LOOP_DB(400.0), .MISMATCH_MAX(0.0), .A3_FRONT(0.0), .CMP_OFS_MAX(0.0),
    .V1_NOM(V1), .V2_NOM(V2), .LADDER_ERR(0.0)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real      vh [N];
  cal_cmd_t ch [N];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Residue of stage i rebuilt from the codes behind it (i = 0: the input)
  function automatic real rebuild(int i);
    real r;
    r = flash_val(fcode) * (2.0 ** -(NSTAGES - i));
    for (int k = i + 1; k <= NSTAGES; k++) r += 0.5 * real'(codes[k-1]) * (2.0 ** -(k - 1 - i));
    return r;
  endfunction

  function automatic real flash_val(fcode_t c);
    return (2.0 * real'(c) - 3.0) / 4.0;
  endfunction

  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  initial begin
    int n_slot = 0;
    for (int n = 0; n < N; n++) begin
      cal_cmd_t c;
      c = '0;
      if (n % 20 == 7) begin
        c.slot      = 1'b1;
        c.stage     = stage_idx_t'(1 + (n / 20) % NSTAGES);
        c.mode      = ((n / 20) % 2 == 0) ? MODE_X2 : MODE_1P5;
        c.vsel      = ((n / 40) % 2 == 0) ? VSEL_V1 : VSEL_V2;
        c.force_dac = ((n / 80) % 2 == 1) && c.mode == MODE_1P5;
      end
      ch[n] = c;
      vh[n] = real'($urandom_range(1980)) / 1000.0 - 0.99;
      @(negedge clk);
      vin = vh[n];
      cmd = c;
      @(posedge clk); #1;
      if (n >= int'(FE_LAT)) begin
        int       s;
        cal_cmd_t t;
        s = n - int'(FE_LAT);
        t = ch[s];
        checks++;
        if (!t.slot) begin
          if (rabs(rebuild(0) - vh[s]) > 0.25 * (2.0 ** -NSTAGES) + 1e-9) begin
            failures++;
            $display("sample %0d: rebuilt %f, input %f", s, rebuild(0), vh[s]);
          end
        end else begin
          int  i;
          real v, exp_r;
          i = int'(t.stage);
          v = (t.vsel == VSEL_V2) ? V2 : V1;
          exp_r = (t.mode == MODE_X2) ? 2.0 * v : 2.0 * v - 1.0;
          n_slot++;
          if (rabs(rebuild(i) - exp_r) > 0.25 * (2.0 ** -(NSTAGES - i)) + 1e-9) begin
            failures++;
            $display("slot %0d at stage %0d mode %0d: residue %f expected %f", s, i, t.mode, rebuild(i), exp_r);
          end
          if (t.mode == MODE_1P5) begin
            checks++;
            if (codes[i-1] != 2'sd1) begin
              failures++;
              $display("slot %0d: decision %0d expected +1", s, codes[i-1]);
            end
          end
        end
      end
    end
    checks++;
    if (n_slot < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
