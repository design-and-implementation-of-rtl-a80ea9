// sign_detector: sign of the phase error between the received carrier and
// the NCO.
//
// With x = A e^{j(wn + theta)} and y = B e^{j(wn + theta_hat)} the cross
// product xq*yi - xi*yq = A*B*sin(theta - theta_hat) does not depend on the
// carrier, so its sign tells on every sample whether the NCO phase has to go
// up (+1) or down (-1); it is 0 when the product is exactly zero. As in the
// document there are two multipliers with three register stages each, a
// subtractor and a sign block. The document's equation and its block diagram
// disagree on the order of the subtraction; this module follows the equation,
// sign = sign(xq*yi - xi*yq), so that +1 means "raise the NCO phase".
//
// Interface: 16-bit signed samples in, a 2-bit signed sign out.
// Timing: fully pipelined, LATENCY = MULT_LAT (3) clocks from the samples to
// sgn. rst_n (synchronous, active low) clears the multiplier pipelines.
module sign_detector
  import psk_pkg::*;
#(
  parameter int unsigned MULT_LAT = 3   // multiplier latency (z^-3 in the document)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t xi,
  input  sample_t xq,
  input  sample_t yi,
  input  sample_t yq,
  output sgn_t    sgn
);

  typedef logic signed [2*SAMPLE_W-1:0] prod_t;

  prod_t xq_yi [MULT_LAT];   // "Mult3" pipeline
  prod_t xi_yq [MULT_LAT];   // "Mult4" pipeline

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < MULT_LAT; k++) begin
        xq_yi[k] <= '0;
        xi_yq[k] <= '0;
      end
    end else begin
      xq_yi[0] <= xq * yi;
      xi_yq[0] <= xi * yq;
      for (int k = 1; k < MULT_LAT; k++) begin
        xq_yi[k] <= xq_yi[k-1];
        xi_yq[k] <= xi_yq[k-1];
      end
    end
  end

  logic signed [2*SAMPLE_W:0] diff;   // one bit wider: the subtraction cannot overflow
  always_comb begin
    diff = (2*SAMPLE_W+1)'(xq_yi[MULT_LAT-1]) - (2*SAMPLE_W+1)'(xi_yq[MULT_LAT-1]);
    sgn  = sign_of(64'(diff));
  end

endmodule
