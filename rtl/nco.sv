// nco: numerically controlled oscillator of the phase compensation loop.
//
// Produces cos and sin of (carrier phase + estimated phase offset) at a fixed
// carrier frequency. A phase accumulator advances by FREQ_WORD every clock
// (one clock per sample). A second register, the estimated phase, adds the
// signed step on phase_in every clock; it is the loop's estimate of the
// received carrier phase and is brought out on phase_out. The sum of the two
// drives a pipelined CORDIC rotator that starts from (AMP / K, 0), so the
// outputs have amplitude AMP. The carrier accumulator is reset to
// (ITER + 1) * FREQ_WORD, one CORDIC latency ahead, so that the sample that
// leaves the CORDIC n clocks after reset has carrier phase n * FREQ_WORD:
// the NCO has zero phase with respect to the sample count, and the pipeline
// adds no phase error to the loop. The document names the block, its ports
// (phase_in, sine, cosine, phase_out) and says it is a CORDIC-based NCO of
// fixed frequency whose phase is raised or lowered by phase_in; the two
// registers, the frequency word, the amplitude and the phase format are this
// design's choices.
//
// Timing: phase_in changes phase_out one clock later and sine/cosine
// ITER + 2 clocks later. n clocks after reset, cosine = AMP*cos(2*pi*
// (n*FREQ_WORD + phase_out(n - ITER - 1)) / 2^16), and likewise for sine.
// rst_n (synchronous, active low) clears both registers.
module nco
  import psk_pkg::*;
#(
  parameter int unsigned      ITER      = 14,      // CORDIC iterations
  parameter logic [PHASE_W-1:0] FREQ_WORD = 16'd2048, // carrier = fs * FREQ_WORD / 2^16
  parameter int               AMP       = 16000    // output amplitude B
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sample_t       phase_in,    // signed phase step, in phase codes
  output sample_t       sine,        // y_q(n)
  output sample_t       cosine,      // y_i(n)
  output phase_t        phase_out    // estimated phase offset theta_hat
);

  // 1 / K for the CORDIC gain, K = 1.646760258...
  localparam real    INV_K = 0.607252935008881;
  localparam int     X0    = $rtoi(real'(AMP) * INV_K + 0.5);
  localparam phase_t CARRIER_RST = phase_t'((ITER + 1) * FREQ_WORD);

  phase_t carrier_ph;
  phase_t est_ph;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier_ph <= CARRIER_RST;
      est_ph     <= '0;
    end else begin
      carrier_ph <= carrier_ph + FREQ_WORD;
      est_ph     <= est_ph + phase_t'(phase_in);
    end
  end

  cordic_rotator #(
    .W       (SAMPLE_W),
    .PHASE_W (PHASE_W),
    .ITER    (ITER)
  ) u_cordic (
    .clk   (clk),
    .rst_n (rst_n),
    .x_in  (sample_t'(X0)),
    .y_in  ('0),
    .z_in  (carrier_ph + est_ph),
    .x_out (cosine),
    .y_out (sine)
  );

  assign phase_out = est_ph;

endmodule
