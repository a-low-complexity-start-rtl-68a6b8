// phase_detector: start-stop phase detector (PD1 / PD2) between two ring
// oscillators.
//
// Each STOP edge is paired with one START edge. If START comes first, the
// output rises on the START edge and falls on the STOP edge that follows, so
// the output pulse is as wide as the phase lead of START over STOP. If STOP
// comes first, the detector is armed by it and the next START edge only
// disarms it, and the output stays low. Because it carries both oscillators'
// edges, the output carries the jitter of both on the START oscillator's
// carrier.
//
// Implementation: the usual two-flip-flop phase-frequency detector. One
// flip-flop is set by START, the other by STOP, and both are cleared
// asynchronously as soon as both are set. The output is the START flip-flop.
// In the cross-connected pair (PD1 started by RO1 and stopped by RO2, PD2 the
// other way round) at most one of the two outputs is high at a time, and
// their XOR is high while one oscillator's edge waits for the other's.
//
// Interface: rst_n (asynchronous, active low, clears both flip-flops),
// start, stop (oscillator outputs, used as clocks), pd_out (level output,
// sampled by the f_L flip-flop downstream, asynchronously to both inputs).
// Timing: pd_out rises one clock-to-output delay after START and falls one
// clock-to-output plus clear delay after the pairing STOP edge.
// The document gives the START/STOP inputs and the cross wiring of the two
// detectors. The flip-flop circuit inside is this design's choice, and so
// is the reset. The self-clearing feedback from both flip-flops to their
// asynchronous clears is intended: it is what makes this a
// phase-frequency detector.
module phase_detector (
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic pd_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic up_q;
  logic dn_q;
  logic clr;

  assign clr = ~rst_n | (up_q & dn_q);

  always_ff @(posedge start or posedge clr) begin
    if (clr) up_q <= 1'b0;
    else     up_q <= 1'b1;
  end

  always_ff @(posedge stop or posedge clr) begin
    if (clr) dn_q <= 1'b0;
    else     dn_q <= 1'b1;
  end

  assign pd_out = up_q;

endmodule
