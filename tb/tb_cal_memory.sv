// tb_cal_memory: random writes to the four measurement words and the two
// decisions, compared after each write with a reference copy held here;
// checks that a multiply-by-two write leaves the decision alone, that
// nothing changes without we, and that reset clears everything.
module tb_cal_memory;
  import adc_cal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  vsel_e wvsel, rvsel;
  cal_mode_e wmode;
  fx_t wdata, dout1, dout2;
  scode_t wd, d;

  cal_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fx_t    ref_w [2][2];
  scode_t ref_d [2];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int v = 0; v < 2; v++) begin
      rvsel = vsel_e'(v);
      #1;
      checks++;
      if (dout1 !== ref_w[v][0] || dout2 !== ref_w[v][1] || d !== ref_d[v]) begin
        failures++;
        $display("vsel %0d: %h %h %0d expected %h %h %0d", v, dout1, dout2, d,
                 ref_w[v][0], ref_w[v][1], ref_d[v]);
      end
    end
  endtask

  initial begin
    ref_w = '{default: '0};
    ref_d = '{default: '0};
    wvsel = VSEL_V1; wmode = MODE_1P5; wdata = '0; wd = '0; rvsel = VSEL_V1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 500; n++) begin
      logic w;
      @(negedge clk);
      w     = ($urandom_range(3) != 0);
      we    = w;
      wvsel = vsel_e'($urandom_range(1));
      wmode = cal_mode_e'($urandom_range(1));
      wdata = fx_t'($urandom);
      wd    = scode_t'(int'($urandom_range(2)) - 1);
      if (w) begin
        ref_w[wvsel][wmode] = wdata;
        if (wmode == MODE_1P5) ref_d[wvsel] = wd;
      end
      @(negedge clk);
      we = 1'b0;
      compare();
    end
    // Reset clears
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ref_w = '{default: '0};
    ref_d = '{default: '0};
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
