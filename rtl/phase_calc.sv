// phase_calc: phase step for the NCO.
//
// Compares the error sample C with the previous one (one register, "Delay1"),
// and when the previous one is larger (C has fallen) passes 2^SCALE_SHIFT
// (4 by default, "Scale1") times the phase sign to the NCO; otherwise the
// step is 0 and the NCO phase holds. The product of the scaled comparison and
// the sign ("Mult5") has MULT_LAT (3) register stages. Structure, the shift
// of 2 and the latencies follow the document's block diagram; the step is in
// NCO phase codes (2^16 per turn), which is this design's choice.
//
// Interface: c is the (SAMPLE_W+1)-bit error from the phase detector, sgn the
// sign detector output, step a signed SAMPLE_W-bit phase step in
// {-2^SCALE_SHIFT, 0, +2^SCALE_SHIFT}.
// Timing: step(n) = 2^SCALE_SHIFT * [c(n-1-L) > c(n-L)] * sgn(n-L), L = MULT_LAT.
// rst_n (synchronous, active low) clears the delay and the pipeline. An
// assertion checks that the step never takes any other value.
module phase_calc
  import psk_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 2,   // "Scale1": 2^2
  parameter int unsigned MULT_LAT    = 3    // "Mult5": z^-3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [SAMPLE_W:0]  c,
  input  sgn_t                      sgn,
  output sample_t                   step
);

  logic signed [SAMPLE_W:0] c_d;     // Delay1
  logic                     fell;    // comparator1: c_d > c
  sample_t                  scaled;  // Scale1
  sample_t                  prod [MULT_LAT];

  always_comb begin
    fell   = c_d > c;
    scaled = sample_t'({1'b0, fell}) <<< SCALE_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_d <= '0;
      for (int k = 0; k < MULT_LAT; k++) prod[k] <= '0;
    end else begin
      c_d     <= c;
      prod[0] <= sample_t'(scaled * sample_t'(sgn));
      for (int k = 1; k < MULT_LAT; k++) prod[k] <= prod[k-1];
    end
  end

  assign step = prod[MULT_LAT-1];

  // The step is only ever -2^SCALE_SHIFT, 0 or +2^SCALE_SHIFT.
  localparam sample_t STEP = sample_t'(1) <<< SCALE_SHIFT;
  a_step_values: assert property (@(posedge clk) disable iff (!rst_n)
    step == STEP || step == -STEP || step == '0);

endmodule
