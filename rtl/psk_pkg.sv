// psk_pkg: types and constants shared by the MPSK phase compensation loop.
//
// All datapath samples are 16-bit two's complement fixed point, as in the
// published hardware model. Phases are 16-bit unsigned fractions of a full
// turn (2^16 codes = 2*pi), so they wrap naturally. The three-valued sign
// that runs from the sign detector to the phase calculation is a 2-bit signed
// number in {-1, 0, +1}. The phase and sign formats are this design's choice.
package psk_pkg;

  localparam int unsigned SAMPLE_W = 16;           // sample width (document)
  localparam int unsigned PHASE_W  = 16;           // phase width (chosen)

  typedef logic signed [SAMPLE_W-1:0] sample_t;    // received / NCO sample
  typedef logic        [PHASE_W-1:0]  phase_t;     // full-turn phase code
  typedef logic signed [1:0]          sgn_t;       // -1, 0 or +1

  localparam sgn_t SGN_NEG  = -2'sd1;
  localparam sgn_t SGN_ZERO =  2'sd0;
  localparam sgn_t SGN_POS  =  2'sd1;

  // Sign of a signed value of any width up to 64 bits.
  function automatic sgn_t sign_of(input logic signed [63:0] v);
    if (v > 0)      return SGN_POS;
    else if (v < 0) return SGN_NEG;
    else            return SGN_ZERO;
  endfunction

endpackage
