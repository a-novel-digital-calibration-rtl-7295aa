// tb_recon_chain: random codes and random coefficients; the reconstructed
// value is recomputed here in floating point from the inverse stage
// functions D_in = D/2 + beta1*D_out + beta3*D_out^3 and must match to
// within the fixed-point truncation. Also checks the 15-cycle latency, the
// tag, and the calibration tap: value, decision and its exact cycle.
module tb_recon_chain;
  import adc_cal_pkg::*;

  localparam int N = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  codes_t codes;
  fcode_t fcode;
  cal_cmd_t tag_in, tag_out, tap_tag;
  fx_t beta1 [NSTAGES];
  fx_t beta3 [NCUBIC];
  fx_t dout, tap_dout;
  logic tap_valid;
  scode_t tap_d;

  recon_chain dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real    b1r [NSTAGES];
  real    b3r [NCUBIC];
  codes_t chist [N];
  fcode_t fhist [N];
  cal_cmd_t thist [N];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_r(fx_t x);
    return real'(x) / real'(FX_ONE);
  endfunction

  // Value of the residue entering stage i's unit (i = 0: the output)
  function automatic real expect_din(int s, int i);
    real r;
    r = (2.0 * real'(fhist[s]) - 3.0) / 4.0;
    for (int k = NSTAGES; k > i; k--) begin
      real c;
      c = (k <= int'(NCUBIC)) ? b3r[k-1] : 0.0;
      r = 0.5 * real'(chist[s][k-1]) + b1r[k-1] * r + c * r * r * r;
    end
    return r;
  endfunction

  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  function automatic scode_t rcode();
    return scode_t'(int'($urandom_range(2)) - 1);
  endfunction

  int tap_seen = 0, tap_expected = 0;
  int cycle = 0;

  initial begin
    for (int k = 0; k < int'(NSTAGES); k++) begin
      beta1[k] = fx_t'(FX_HALF + fx_t'($urandom_range(1000000)) - fx_t'(500000));
      b1r[k] = to_r(beta1[k]);
    end
    for (int k = 0; k < int'(NCUBIC); k++) begin
      beta3[k] = fx_t'(int'($urandom_range(160000)) - 80000);
      b3r[k] = to_r(beta3[k]);
    end
    codes = '0; fcode = '0; tag_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      cal_cmd_t t;
      t = '0;
      for (int k = 0; k < int'(NSTAGES); k++) chist[n][k] = rcode();
      fhist[n] = fcode_t'($urandom_range(3));
      if (n % 25 == 3 && n < N - 40) begin
        t.slot  = 1'b1;
        t.stage = stage_idx_t'(1 + (n / 25) % NSTAGES);
        t.mode  = cal_mode_e'(n % 2);
        tap_expected++;
      end
      thist[n] = t;
      @(negedge clk);
      codes = chist[n]; fcode = fhist[n]; tag_in = t;
      @(posedge clk); #1;
      // output of sample n - CHAIN_LAT + 1 is now visible
      if (n >= int'(CHAIN_LAT) - 1) begin
        int s;
        s = n - int'(CHAIN_LAT) + 1;
        checks += 2;
        if (rabs(to_r(dout) - expect_din(s, 0)) > 1e-5) begin
          failures++;
          $display("sample %0d: dout %f expected %f", s, to_r(dout), expect_din(s, 0));
        end
        if (tag_out != thist[s]) begin
          failures++;
          $display("sample %0d: tag mismatch", s);
        end
      end
      if (tap_valid) begin
        int s, i;
        tap_seen++;
        checks += 3;
        // find the slot this tap belongs to
        s = -1;
        for (int m = 0; m <= n; m++)
          if (thist[m].slot && m + int'(CHAIN_LAT) - int'(thist[m].stage) == n) s = m;
        if (s < 0 || tap_tag != thist[s]) begin
          failures++;
          $display("cycle %0d: unexpected tap", n);
        end else begin
          i = int'(thist[s].stage);
          if (rabs(to_r(tap_dout) - expect_din(s, i)) > 1e-5) begin
            failures++;
            $display("tap of slot %0d stage %0d: %f expected %f", s, i, to_r(tap_dout), expect_din(s, i));
          end
          if (tap_d != chist[s][i-1]) begin
            failures++;
            $display("tap of slot %0d: decision %0d expected %0d", s, tap_d, chist[s][i-1]);
          end
        end
      end
    end
    checks++;
    if (tap_seen != tap_expected) begin
      failures++;
      $display("taps seen %0d expected %0d", tap_seen, tap_expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
