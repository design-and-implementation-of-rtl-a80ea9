// decision_threshold: hard decision on the phase calculation output.
//
// The document feeds the phase calculation output to a "Threshold" block
// whose result is the output bit stream. This module slices at zero: the bit
// is 1 when the input is zero or positive and 0 when it is negative (the
// +1 / -1 of a sign threshold coded as one bit). The slicing level and the
// bit coding are this design's choices. Combinational, no latency.
module decision_threshold
  import psk_pkg::*;
(
  input  sample_t din,
  output logic    bit_o
);

  assign bit_o = (din >= 0);

endmodule
