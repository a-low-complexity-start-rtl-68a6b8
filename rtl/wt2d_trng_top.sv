// wt2d_trng_top: start-stop true random number generator with two ring
// oscillators and two phase detectors (WT2D), with bits on demand and an
// output buffer.
//
// Structure: the enable EN from the start-stop controller gates two ring
// oscillators RO1 and RO2. Phase detector PD1 is started by RO1 and stopped
// by RO2; PD2 is started by RO2 and stopped by RO1, so each detector output
// carries the jitter of both oscillators on a different carrier. Both
// detector outputs are sampled on the quartz clock f_L, XORed and registered
// (sample_combine), giving one raw bit per f_L cycle. The controller counts
// f_L cycles so that a request for N bits runs the oscillators for exactly N
// cycles and marks those N raw bits valid. Valid bits go to the output buffer,
// which packs them into words for the host. Post-processing (SHA-1) is left
// to the host, which reads the buffer.
//
// Interface: clk_fl is the quartz sampling clock f_L (10 MHz in the
// document's main setting, one raw bit per cycle, 10 Mbit/s); rst_n is an
// asynchronous active-low reset. Requests: req_valid/req_ready/req_bits.
// Raw stream: raw_bit with raw_valid (also observable before the buffer),
// en shows the oscillators' enable. Buffer read: rd_en/rd_valid/rd_data,
// with buf_full, buf_overflow and buf_level.
// Timing: a request for N bits accepted at edge k runs the oscillators after
// edges k .. k+N-1 and gives valid raw bits after edges k+2 .. k+N+1.
// The ring oscillators are behavioural models (ring_osc); for an FPGA they are
// replaced by the gated LUT loop they model. The RO* parameters only set the
// models' nominal loop delays, jitter and random seeds (one seed per
// oscillator, so that several instances of the generator differ).
// The cross wiring, the sampling, the XOR, the output register and EN follow
// the document; the phase detector circuit, the controller's handshake and
// the buffer's organisation are this design's.
module wt2d_trng_top #(
  parameter int unsigned COUNT_W            = trng_pkg::COUNT_W_DEFAULT,
  parameter int unsigned WORD_W             = trng_pkg::WORD_W_DEFAULT,
  parameter int unsigned BUF_DEPTH          = trng_pkg::BUF_DEPTH_DEFAULT,
  parameter int unsigned RO1_HALF_PERIOD_PS = 3000,
  parameter int unsigned RO2_HALF_PERIOD_PS = 3170,
  parameter int unsigned RO_JITTER_PS       = 60,
  parameter int unsigned RO1_SEED           = 1,
  parameter int unsigned RO2_SEED           = 2
) (
  input  logic                           clk_fl,
  input  logic                           rst_n,
  input  logic                           req_valid,
  output logic                           req_ready,
  input  logic [COUNT_W-1:0]             req_bits,
  output logic                           busy,
  output logic                           en,
  output logic                           raw_bit,
  output logic                           raw_valid,
  input  logic                           rd_en,
  output logic                           rd_valid,
  output logic [WORD_W-1:0]              rd_data,
  output logic                           buf_full,
  output logic                           buf_overflow,
  output logic [$clog2(BUF_DEPTH+1)-1:0] buf_level
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ro1, ro2;
  logic pd1, pd2;

  start_stop_ctrl #(.COUNT_W(COUNT_W)) u_ctrl (
    .clk_fl    (clk_fl),
    .rst_n     (rst_n),
    .req_valid (req_valid),
    .req_ready (req_ready),
    .req_bits  (req_bits),
    .en        (en),
    .raw_valid (raw_valid),
    .busy      (busy)
  );

  ring_osc #(.HALF_PERIOD_PS(RO1_HALF_PERIOD_PS), .JITTER_PS(RO_JITTER_PS), .SEED(RO1_SEED))
    u_ro1 (.en(en), .ro_out(ro1));

  ring_osc #(.HALF_PERIOD_PS(RO2_HALF_PERIOD_PS), .JITTER_PS(RO_JITTER_PS), .SEED(RO2_SEED))
    u_ro2 (.en(en), .ro_out(ro2));

  phase_detector u_pd1 (.rst_n(rst_n), .start(ro1), .stop(ro2), .pd_out(pd1));
  phase_detector u_pd2 (.rst_n(rst_n), .start(ro2), .stop(ro1), .pd_out(pd2));

  sample_combine u_sample (
    .clk_fl  (clk_fl),
    .rst_n   (rst_n),
    .pd1     (pd1),
    .pd2     (pd2),
    .raw_bit (raw_bit)
  );

  output_buffer #(.WORD_W(WORD_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk_fl    (clk_fl),
    .rst_n     (rst_n),
    .bit_in    (raw_bit),
    .bit_valid (raw_valid),
    .rd_en     (rd_en),
    .rd_valid  (rd_valid),
    .rd_data   (rd_data),
    .full      (buf_full),
    .overflow  (buf_overflow),
    .level     (buf_level)
  );

endmodule
