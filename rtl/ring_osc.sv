// ring_osc: BEHAVIOURAL MODEL of one gated ring oscillator (RO1 or RO2) of
// the start-stop TRNG. It is not synthesizable; on an FPGA the same node is a
// combinational loop of one enable gate and two inverting stages placed in
// LUTs. A synthesis tool that reads this model anyway turns the feedback
// variable into a latch, which has nothing to do with the real loop.
//
// How it works: the loop is modelled by its feedback node `fb`. The loop
// output is the enable gate, ro_out = ~(en & fb), and the feedback node
// follows ro_out after one trip around the loop. While en = 1 the output
// therefore toggles every trip and forms a rectangular wave of period
// 2 * trip. While en = 0 the gate output is forced to 1, the feedback node
// settles to 1 after one trip, and the loop stops: the generator does not run.
//
// Jitter: every trip lasts HALF_PERIOD_PS plus a random, roughly Gaussian
// offset (sum of four uniform draws) of spread about +/- JITTER_PS, so the
// phase error accumulates from edge to edge as in a real free-running
// oscillator. SEED selects an independent random stream per instance.
//
// Interface: en (start-stop enable), ro_out (oscillator output, taken at the
// gate output as the document's figure shows). Timing is in picoseconds.
// The gated loop, the tap point and the behaviour at EN follow the document;
// the gate type (an AND-type enable, output held at 1 when stopped), the loop
// delay and the jitter size are this model's choices.
module ring_osc #(
  parameter int unsigned HALF_PERIOD_PS = 3000,
  parameter int unsigned JITTER_PS      = 60,
  parameter int unsigned SEED           = 1
) (
  input  logic en,
  output logic ro_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic fb;
  int unsigned rnd_state;

  assign ro_out = ~(en & fb);

  // One loop trip lasts the nominal delay plus a zero-mean random offset,
  // half the sum of four uniform draws in [-JITTER_PS/2, +JITTER_PS/2].
  // A xorshift32 generator per instance keeps the streams independent.
  initial begin
    fb = 1'b1;
    rnd_state = (SEED == 0) ? 32'h1234_5678 : SEED;  // xorshift needs a nonzero state
  end

  always begin
    if (en || !fb) begin
      int signed offs;
      int signed trip;
      offs = 0;
      for (int i = 0; i < 4; i++) begin
        rnd_state = rnd_state ^ (rnd_state << 13);
        rnd_state = rnd_state ^ (rnd_state >> 17);
        rnd_state = rnd_state ^ (rnd_state << 5);
        offs = offs + int'(rnd_state % (JITTER_PS + 1)) - int'(JITTER_PS / 2);
      end
      trip = int'(HALF_PERIOD_PS) + offs / 2;
      if (trip < 1) trip = 1;
      #(trip);
      fb = ~(en & fb);
    end else begin
      @(posedge en);
    end
  end

endmodule
