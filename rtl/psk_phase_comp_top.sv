// psk_phase_comp_top: MPSK demodulator and carrier phase compensation loop.
//
// A multiplier-light feedback loop that pulls a local NCO onto the phase of
// the received carrier. Per sample:
//   * sign_detector    : s = sign(xq*yi - xi*yq), the direction the NCO
//                        phase has to move (3 clocks);
//   * phase_detector   : C = xi - yi, large while the phases differ;
//   * phase_calc       : step = 4*s when C fell since the last sample, else 0
//                        (3 clocks);
//   * nco              : adds step to its estimated phase and produces
//                        yi = B cos, yq = B sin of carrier + estimated phase
//                        through a pipelined CORDIC;
//   * decision_threshold: slices step at zero into the output bit.
// The estimated phase converges to the received carrier phase in steps of
// 4 codes (2^16 codes per turn) and then dithers around it. The wiring
// follows the document's block diagram and hardware model; widths are the
// document's 16 bits.
//
// Interface: one received quadrature sample (xi, xq) per clock, 16-bit
// signed, amplitude about AMP for A = B. Outputs: the decision bit, the
// estimated phase, the NCO samples and the phase step for observation.
// Timing: the loop delay from a sample to the NCO phase change it causes is
// 1 + MULT_LAT (3) + 1 clocks; the NCO adds ITER + 1 more before its samples
// show the change. rst_n is synchronous and active low.
module psk_phase_comp_top
  import psk_pkg::*;
#(
  parameter int unsigned        ITER        = 14,        // CORDIC iterations
  parameter logic [PHASE_W-1:0] FREQ_WORD   = 16'd2048,  // carrier = fs/32
  parameter int                 AMP         = 16000,     // NCO amplitude B
  parameter int unsigned        SCALE_SHIFT = 2,         // step = 2^2 codes
  parameter int unsigned        MULT_LAT    = 3          // multiplier latency
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sample_t  xi,          // received in-phase sample
  input  sample_t  xq,          // received quadrature sample
  output logic     bit_o,       // decision output
  output phase_t   phase_est,   // estimated carrier phase theta_hat
  output sample_t  yi,          // NCO cosine
  output sample_t  yq,          // NCO sine
  output sample_t  phase_step,  // phase calculation output
  output sgn_t     phase_sign   // sign detector output
);

  logic signed [SAMPLE_W:0] err;

  sign_detector #(.MULT_LAT(MULT_LAT)) u_sign (
    .clk   (clk),
    .rst_n (rst_n),
    .xi    (xi),
    .xq    (xq),
    .yi    (yi),
    .yq    (yq),
    .sgn   (phase_sign)
  );

  phase_detector u_pd (
    .xi  (xi),
    .yi  (yi),
    .err (err)
  );

  phase_calc #(.SCALE_SHIFT(SCALE_SHIFT), .MULT_LAT(MULT_LAT)) u_calc (
    .clk   (clk),
    .rst_n (rst_n),
    .c     (err),
    .sgn   (phase_sign),
    .step  (phase_step)
  );

  nco #(.ITER(ITER), .FREQ_WORD(FREQ_WORD), .AMP(AMP)) u_nco (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_in  (phase_step),
    .sine      (yq),
    .cosine    (yi),
    .phase_out (phase_est)
  );

  decision_threshold u_dec (
    .din   (phase_step),
    .bit_o (bit_o)
  );

endmodule
