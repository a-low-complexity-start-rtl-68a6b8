// sample_combine: the f_L side of the start-stop TRNG. Both phase detector
// outputs are sampled by a D flip-flop clocked by the quartz clock f_L, the
// two sampled bit streams are combined by XOR, and the result is registered
// once more in the output D flip-flop, also clocked by f_L.
//
// Interface: clk_fl (sampling clock f_L), rst_n (asynchronous, active low,
// clears all three flip-flops), pd1 / pd2 (phase detector outputs,
// asynchronous to clk_fl), raw_bit (one raw random bit per f_L cycle).
// Timing: raw_bit after the edge n+1 is the XOR of the two detector levels
// present at edge n, i.e. trng_pkg::PIPE_LATENCY = 2 cycles.
// Sampling, XOR and the output register follow the document's block diagram;
// the reset is this design's addition. The sampling flip-flops capture
// asynchronous inputs on purpose: that is the entropy extraction, so no
// synchronizer is placed in front of them.
module sample_combine (
  input  logic clk_fl,
  input  logic rst_n,
  input  logic pd1,
  input  logic pd2,
  output logic raw_bit
);
  timeunit 1ns;
  timeprecision 1ps;

  logic d1_q;
  logic d2_q;

  always_ff @(posedge clk_fl or negedge rst_n) begin
    if (!rst_n) begin
      d1_q    <= 1'b0;
      d2_q    <= 1'b0;
      raw_bit <= 1'b0;
    end else begin
      d1_q    <= pd1;
      d2_q    <= pd2;
      raw_bit <= d1_q ^ d2_q;
    end
  end

endmodule
