// analog_frontend: behavioural model of the analog part of the converter:
// fourteen 1.5-bit stages (mdac_stage), the 2-bit flash (flash_adc_2b), the
// resistor ladder that makes the two calibration voltages V1 and V2, and
// the input multiplexers that insert them. Not synthesizable.
//
// Operation. Every rising edge takes one sample period. A sample is taken by
// stage 1 at edge e, moves to stage k at edge e+k-1 and to the flash at
// edge e+14; each stage therefore takes one full period here (the real
// circuit uses two clock phases per stage, so a slot reaches stage i half a
// period per stage after the skip, which is the same schedule). The code of
// every stage is delayed so that all 14 stage codes and the flash code of
// one sample leave together, registered at edge e+FE_LAT (FE_LAT = 15).
//
// Calibration. The command presented with a sample, cmd, travels down the
// pipeline with it. If cmd.slot is set, the input sample of that period is
// skipped and stage cmd.stage takes the ladder voltage (V1 or V2) in place
// of the previous stage's residue, in 1.5-bit or multiply-by-two mode and
// with its DAC forced to +Vref/2 if cmd.force_dac is set. Later stages keep
// converting that stage's residue; the codes of earlier stages in that slot
// are meaningless.
//
// Error model (this model's choices, scaled from the design's figures): all
// stages share the closed-loop gain error of an amplifier with 38 dB open-loop
// gain at feedback factor 1/3, plus a per-stage capacitor mismatch of up to
// 0.1 %; stages 1 and 2 compress by A3_FRONT (0.005 Vref at full scale, about
// 10 LSB at 12 bits); the comparators have offsets of up to CMP_OFS_MAX and
// the ladder is off its nominal values by LADDER_ERR. Per-stage values come
// from a fixed integer hash of the stage number and SEED, so every run is
// repeatable.
//
// Interface: clk; vin (real, Vref units, full scale +/-Vref); cmd, the
// calibration command for the sample taken at this edge; codes and fcode,
// the aligned codes of the sample taken FE_LAT edges earlier.
module analog_frontend
  import adc_cal_pkg::*;
#(
  parameter real OPEN_LOOP_DB = 38.0,    // amplifier DC gain
  parameter real MISMATCH_MAX = 0.001,   // capacitor mismatch, relative
  parameter real A3_FRONT     = 0.005,   // cubic compression, stages 1..NCUBIC
  parameter real CMP_OFS_MAX  = 0.06,    // comparator offset bound, Vref units
  parameter real V1_NOM       = 0.28,    // ladder tap for V1, Vref units
  parameter real V2_NOM       = 0.47,    // ladder tap for V2, Vref units
  parameter real LADDER_ERR   = 0.01,    // relative ladder error
  parameter int  SEED         = 1
) (
  input  logic     clk,
  input  real      vin,
  input  cal_cmd_t cmd,
  output codes_t   codes,
  output fcode_t   fcode
);

  // Repeatable value in [-1, 1] for stage k
  function automatic real spread(int k, int salt);
    int h;
    h = ((k + 3) * 7919 + (SEED + salt) * 104729) % 201;
    return real'(h - 100) / 100.0;
  endfunction

  localparam real A0      = 10.0 ** (OPEN_LOOP_DB / 20.0);
  localparam real FIN_ERR = -1.0 / (1.0 + A0 / 3.0);
  localparam real V1      = V1_NOM * (1.0 + LADDER_ERR);
  localparam real V2      = V2_NOM * (1.0 - LADDER_ERR);

  cal_cmd_t  tok   [1:NSTAGES];
  real       vs_in [1:NSTAGES];
  real       vs_out[1:NSTAGES];
  cal_mode_e vs_mode [1:NSTAGES];
  logic      vs_force[1:NSTAGES];
  scode_t    d     [1:NSTAGES];
  fcode_t    fc;

  assign tok[1] = cmd;

  for (genvar k = 1; k <= NSTAGES; k++) begin : g_stage
    if (k > 1) begin : g_tok
      always_ff @(posedge clk) tok[k] <= tok[k-1];
    end

    always_comb begin
      if (tok[k].slot && tok[k].stage == stage_idx_t'(k)) begin
        vs_in[k]    = (tok[k].vsel == VSEL_V2) ? V2 : V1;
        vs_mode[k]  = tok[k].mode;
        vs_force[k] = tok[k].force_dac;
      end else begin
        vs_in[k]    = (k == 1) ? vin : vs_out[(k == 1) ? 1 : k-1];
        vs_mode[k]  = MODE_1P5;
        vs_force[k] = 1'b0;
      end
    end

    mdac_stage #(
      .GAIN_ERR  (FIN_ERR + MISMATCH_MAX * spread(k, 0)),
      .A3        ((k <= NCUBIC) ? A3_FRONT : 0.0),
      .CMP_OFFSET(CMP_OFS_MAX * spread(k, 7))
    ) u_stage (
      .clk      (clk),
      .vin      (vs_in[k]),
      .mode     (vs_mode[k]),
      .force_dac(vs_force[k]),
      .vout     (vs_out[k]),
      .d        (d[k])
    );
  end

  flash_adc_2b #(.CMP_OFFSET(CMP_OFS_MAX * 0.5 * spread(NSTAGES + 1, 7))) u_flash (
    .clk (clk),
    .vin (vs_out[NSTAGES]),
    .code(fc)
  );

  // Alignment: stage k's code leaves after NSTAGES+1-k more registers
  scode_t dly [1:NSTAGES][0:NSTAGES];

  always_ff @(posedge clk) begin
    for (int k = 1; k <= NSTAGES; k++) begin
      dly[k][0] <= d[k];
      for (int j = 1; j <= NSTAGES; j++) dly[k][j] <= dly[k][j-1];
    end
    fcode <= fc;
  end

  always_comb begin
    for (int k = 1; k <= NSTAGES; k++) codes[k-1] = dly[k][NSTAGES+1-k];
  end

endmodule
