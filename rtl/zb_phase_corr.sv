// Carrier phase correction.
//
// With no carrier frequency error between transmitter and receiver (as the
// design assumes) the carrier phase is constant over a packet, and after
// hard-decision sign detection only its effect on the polarity of each rail
// matters. The timing synchroniser reports the sign of each rail's preamble
// correlation at the peak; this block multiplies each rail by -1 when its
// correlation was negative. Restricting the correction to per-rail polarity
// (a rotation by 0 or 180 degrees per rail, no I/Q swap) is a choice of
// this design.
//
// Timing: combinational.
module zb_phase_corr
  import zb_pkg::*;
(
  input  logic    neg_i,
  input  logic    neg_q,
  input  sample_t si,
  input  sample_t sq,
  output sample_t ci,
  output sample_t cq
);

  assign ci = neg_i ? sample_t'(-si) : si;
  assign cq = neg_q ? sample_t'(-sq) : sq;

endmodule
