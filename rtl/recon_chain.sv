// recon_chain: pipelined digital reconstruction of the converter output.
//
// Starting from the flash code, it applies the inverse function of each
// stage from stage 14 back to stage 1 (stage_recon), one stage per clock,
// so the word for a sample leaves CHAIN_LAT = 15 cycles after its codes
// enter. The codes and a tag (the calibration command of that sample) travel
// with the partial result.
//
// Calibration tap: for a sample whose tag marks a calibration slot for
// stage i, the partial result that enters stage i's unit is the digital
// value of stage i's residue, D_out,i, resolved by the already calibrated
// stages i+1..14 and the flash. It is captured together with stage i's own
// decision D_i and presented on tap_* for one cycle (tap_valid), one cycle
// after it is formed. At most one calibration sample may be in flight.
//
// The stage-by-stage order and eq. form follow the design; pipelining one
// stage per cycle is this implementation's choice.
//
// Interface: clk, rst_n (active-low synchronous reset of the valid and tag
// state); codes/fcode/tag_in, one sample per cycle; beta1 per stage, beta3
// for stages 1..NCUBIC; dout with tag_out; the tap outputs.
module recon_chain
  import adc_cal_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  codes_t   codes,
  input  fcode_t   fcode,
  input  cal_cmd_t tag_in,
  input  fx_t      beta1 [NSTAGES],
  input  fx_t      beta3 [NCUBIC],
  output fx_t      dout,
  output cal_cmd_t tag_out,
  output logic     tap_valid,
  output cal_cmd_t tap_tag,
  output fx_t      tap_dout,
  output scode_t   tap_d
);

  // Level k holds D_in of stage k (level NSTAGES+1: the flash value)
  fx_t      acc [1:NSTAGES+1];
  codes_t   cd  [1:NSTAGES+1];
  cal_cmd_t tg  [1:NSTAGES+1];
  fx_t      din [1:NSTAGES];

  for (genvar k = 1; k <= NSTAGES; k++) begin : g_unit
    stage_recon #(.HAS_B3(k <= NCUBIC)) u_recon (
      .d    (cd[k+1][k-1]),
      .dout (acc[k+1]),
      .beta1(beta1[k-1]),
      .beta3((k <= NCUBIC) ? beta3[(k <= NCUBIC) ? k-1 : 0] : '0),
      .din  (din[k])
    );
  end

  always_ff @(posedge clk) begin
    acc[NSTAGES+1] <= flash_value(fcode);
    cd[NSTAGES+1]  <= codes;
    for (int k = 1; k <= NSTAGES; k++) begin
      acc[k] <= din[k];
      cd[k]  <= cd[k+1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= NSTAGES + 1; k++) tg[k] <= '0;
    end else begin
      tg[NSTAGES+1] <= tag_in;
      for (int k = 1; k <= NSTAGES; k++) tg[k] <= tg[k+1];
    end
  end

  assign dout    = acc[1];
  assign tag_out = tg[1];

  // Tap D_out,i at level i+1 for a slot calibrating stage i
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tap_valid <= 1'b0;
      tap_tag   <= '0;
      tap_dout  <= '0;
      tap_d     <= '0;
    end else begin
      tap_valid <= 1'b0;
      for (int i = 1; i <= NSTAGES; i++) begin
        if (tg[i+1].slot && tg[i+1].stage == stage_idx_t'(i)) begin
          tap_valid <= 1'b1;
          tap_tag   <= tg[i+1];
          tap_dout  <= acc[i+1];
          tap_d     <= cd[i+1][i-1];
        end
      end
    end
  end

endmodule
