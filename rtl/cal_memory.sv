// cal_memory: the small memory that holds one calibration measurement set.
//
// For each calibration voltage (V1, V2) it keeps the digitised residue of
// the stage under calibration in 1.5-bit mode (D_out1) and in
// multiply-by-two mode (D_out2), plus the effective sub-ADC decision D used
// in 1.5-bit mode. The design stores exactly these values "in a memory";
// organising them as four words plus two decisions, addressed by
// {vsel, mode}, is this implementation's choice.
//
// Timing: one synchronous write port (we, wvsel, wmode, wdata, wd; the
// decision is written only with a 1.5-bit-mode word) and one asynchronous
// read port selected by rvsel that returns both words and the decision of
// that voltage. Synchronous active-low reset clears the contents.
module cal_memory
  import adc_cal_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,
  input  vsel_e     wvsel,
  input  cal_mode_e wmode,
  input  fx_t       wdata,
  input  scode_t    wd,
  input  vsel_e     rvsel,
  output fx_t       dout1,
  output fx_t       dout2,
  output scode_t    d
);

  fx_t    mem  [2][2];   // [vsel][mode]
  scode_t dmem [2];      // [vsel]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem  <= '{default: '0};
      dmem <= '{default: '0};
    end else if (we) begin
      mem[wvsel][wmode] <= wdata;
      if (wmode == MODE_1P5) dmem[wvsel] <= wd;
    end
  end

  assign dout1 = mem[rvsel][MODE_1P5];
  assign dout2 = mem[rvsel][MODE_X2];
  assign d     = dmem[rvsel];

endmodule
