// trng_pkg: constants shared by the blocks of the two-oscillator start-stop
// TRNG with phase detectors (WT2D).
//
// The raw-bit path from the phase detectors to the output is two f_L
// registers deep: one sampling flip-flop per phase detector, then the
// flip-flop after the XOR. The start-stop controller delays its "bit valid"
// marker by the same amount so that the marker lines up with the raw bit.
// The default sizes of the request counter and of the output buffer are
// this design's own choice; the document gives none.
package trng_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // f_L register stages between a phase detector output and the raw bit.
  localparam int unsigned PIPE_LATENCY = 2;

  // Width of the "number of bits on demand" field of a request.
  localparam int unsigned COUNT_W_DEFAULT = 16;

  // Output buffer: bits per word and words held.
  localparam int unsigned WORD_W_DEFAULT = 8;
  localparam int unsigned BUF_DEPTH_DEFAULT = 16;

endpackage
