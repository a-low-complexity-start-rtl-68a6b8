// start_stop_ctrl: bits-on-demand control of the start-stop TRNG.
//
// A request names how many random bits are wanted. The controller raises EN,
// which starts both ring oscillators, keeps it high for exactly that many
// cycles of the quartz clock f_L, and then drops it, which stops the
// oscillators again. Each f_L cycle with EN high yields one raw bit; the
// controller marks those bits with raw_valid, delayed by
// trng_pkg::PIPE_LATENCY cycles to line up with the sampling and output
// flip-flops. EN is always low for at least one cycle between two requests,
// so every request is a fresh restart of the oscillators.
//
// Interface (all synchronous to clk_fl, rst_n asynchronous active low):
//   req_valid / req_ready / req_bits : request handshake; a request is taken
//     in a cycle with both valid and ready; req_bits = 0 is accepted and
//     produces no bits. req_ready is high while EN is low.
//   en        : start-stop enable of the ring oscillators (registered).
//   raw_valid : high for the cycles in which the raw bit belongs to a request.
//   busy      : high from acceptance until the last bit has left.
// Timing: a request accepted at edge k raises EN right after edge k and EN
// stays high after edges k .. k+N-1; the N bits appear with raw_valid after
// edges k+2 .. k+N+1, one per f_L cycle, which is the document's rate of one
// bit per sampling period.
// The EN signal and the counting of f_L pulses follow the document; the
// handshake, the counter width and the enforced idle cycle are this design's.
module start_stop_ctrl #(
  parameter int unsigned COUNT_W = trng_pkg::COUNT_W_DEFAULT
) (
  input  logic               clk_fl,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [COUNT_W-1:0] req_bits,
  output logic               en,
  output logic               raw_valid,
  output logic               busy
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LAT = trng_pkg::PIPE_LATENCY;

  logic [COUNT_W-1:0] remaining;
  logic [LAT-1:0]     valid_pipe;

  assign req_ready = ~en;

  always_ff @(posedge clk_fl or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      en        <= 1'b0;
    end else if (en) begin
      // en is high exactly while remaining != 0
      remaining <= remaining - 1'b1;
      en        <= (remaining != COUNT_W'(1));
    end else if (req_valid) begin
      remaining <= req_bits;
      en        <= (req_bits != '0);
    end
  end

  // Bit-valid marker travels with the raw bit through the two f_L stages.
  always_ff @(posedge clk_fl or negedge rst_n) begin
    if (!rst_n) valid_pipe <= '0;
    else        valid_pipe <= {valid_pipe[LAT-2:0], en};
  end

  assign raw_valid = valid_pipe[LAT-1];
  assign busy      = en | (|valid_pipe);

  // EN may only rise out of an idle cycle, through an accepted request.
  a_en_rise : assert property (@(posedge clk_fl) disable iff (!rst_n)
    $rose(en) |-> $past(req_valid && req_ready));

endmodule
