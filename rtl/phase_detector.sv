// phase_detector: error sample e(n) = xi(n) - yi(n).
//
// The in-phase received sample minus the in-phase NCO sample. With equal
// amplitudes the result is a sinusoid whose amplitude grows with the phase
// difference between the received carrier and the NCO (C in the document),
// so it is small once the loop has locked. The result keeps one extra bit so
// that it never overflows. The document draws this subtractor with no delay;
// it is combinational here too.
module phase_detector
  import psk_pkg::*;
(
  input  sample_t                   xi,
  input  sample_t                   yi,
  output logic signed [SAMPLE_W:0]  err
);

  assign err = (SAMPLE_W+1)'(xi) - (SAMPLE_W+1)'(yi);

endmodule
