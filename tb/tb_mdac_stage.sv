// tb_mdac_stage: checks the 1.5-bit stage model against its transfer
// function, worked out here from first principles: comparator decisions
// at +/-Vref/4 plus offset, Vdac = D*Vref/2 in 1.5-bit mode, 0 in
// multiply-by-two mode, +Vref/2 when forced, residue 2(1+eps)(vin-Vdac)
// with cubic compression, one clock of latency.
module tb_mdac_stage;
  import adc_cal_pkg::*;

  localparam real EPS = -0.03, A3 = 0.004, OFS = 0.02;

  logic clk = 1'b0;
  real vin, vout;
  cal_mode_e mode;
  logic force_dac;
  scode_t d;

  mdac_stage #(.GAIN_ERR(EPS), .A3(A3), .CMP_OFFSET(OFS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(real v, cal_mode_e m, logic f);
    int  ed;
    real edac, y, ev;
    @(negedge clk);
    vin = v; mode = m; force_dac = f;
    ed = (v > 0.27) ? 1 : (v < -0.23) ? -1 : 0;
    edac = (m == MODE_X2) ? 0.0 : f ? 0.5 : 0.5 * ed;
    y = 1.94 * (v - edac);
    ev = y - A3 * y * y * y;
    if (ev > 1.5) ev = 1.5;
    if (ev < -1.5) ev = -1.5;
    @(posedge clk); #1;
    checks += 2;
    if (int'(d) != ed) begin
      failures++;
      $display("vin %f: d %0d expected %0d", v, d, ed);
    end
    if (vout - ev > 1e-9 || ev - vout > 1e-9) begin
      failures++;
      $display("vin %f mode %0d force %0b: vout %f expected %f", v, m, f, vout, ev);
    end
  endtask

  initial begin
    // Sweep in 1.5-bit mode, including both sides of each shifted threshold
    for (int i = -100; i <= 100; i++) apply(real'(i) / 100.0, MODE_1P5, 1'b0);
    apply(0.265, MODE_1P5, 1'b0);
    apply(0.275, MODE_1P5, 1'b0);
    apply(-0.235, MODE_1P5, 1'b0);
    apply(-0.225, MODE_1P5, 1'b0);
    // Multiply-by-two mode: residue is 2x input whatever the decision
    for (int i = -50; i <= 50; i += 5) apply(real'(i) / 100.0, MODE_X2, 1'b0);
    // Forced DAC: below the offset threshold D=0 but Vdac=+Vref/2
    apply(0.26, MODE_1P5, 1'b1);
    apply(0.40, MODE_1P5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
