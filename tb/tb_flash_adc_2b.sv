// tb_flash_adc_2b: sweeps the 2-bit flash model and checks each code against
// thresholds at -Vref/2, 0, +Vref/2 (plus the offset), one clock of latency.
module tb_flash_adc_2b;
  import adc_cal_pkg::*;

  localparam real OFS = 0.01;

  logic clk = 1'b0;
  real vin;
  fcode_t code;

  flash_adc_2b #(.CMP_OFFSET(OFS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -120; i <= 120; i++) begin
      real v;
      int  e;
      v = real'(i) / 100.0 + 0.003;
      e = (v > 0.51) ? 3 : (v > 0.01) ? 2 : (v > -0.49) ? 1 : 0;
      @(negedge clk) vin = v;
      @(posedge clk); #1;
      checks++;
      if (int'(code) != e) begin
        failures++;
        $display("vin %f: code %0d expected %0d", v, code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
