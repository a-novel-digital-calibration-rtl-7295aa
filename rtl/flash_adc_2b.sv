// flash_adc_2b: behavioural model of the 2-bit flash converter that ends the
// pipeline. It is an analog part (three comparators), so the model is not
// synthesizable.
//
// On each rising clock edge it compares vin with thresholds at -Vref/2, 0
// and +Vref/2 (shifted together by CMP_OFFSET) and registers the code
// c = 0..3, whose reconstruction value is (2c-3)/4 Vref. The design names a
// 2-bit flash as the last stage; the thresholds are this model's choice,
// placed so that the four levels cover the +/-Vref residue range evenly.
//
// Interface: clk; vin (real, Vref units); code (registered, one cycle).
module flash_adc_2b
  import adc_cal_pkg::*;
#(
  parameter real CMP_OFFSET = 0.0   // comparator offset, Vref units
) (
  input  logic   clk,
  input  real    vin,
  output fcode_t code
);

  fcode_t c;

  always_comb begin
    if (vin > 0.5 + CMP_OFFSET)       c = 2'd3;
    else if (vin > 0.0 + CMP_OFFSET)  c = 2'd2;
    else if (vin > -0.5 + CMP_OFFSET) c = 2'd1;
    else                              c = 2'd0;
  end

  always_ff @(posedge clk) code <= c;

endmodule
