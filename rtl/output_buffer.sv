// output_buffer: the BUFFER between the TRNG's raw-bit output and the host.
//
// Raw bits marked valid are shifted into a word register, first bit in the
// most significant position. When WORD_W bits have been collected the word is
// written into a first-in first-out memory of DEPTH words, from which the host
// side reads. A request whose bit count is not a multiple of WORD_W leaves its
// last bits in the word register; the next request completes that word, so no
// bit is lost or padded. If a word completes while the memory is full the word
// is dropped and the sticky overflow flag is set (cleared only by reset).
//
// Interface (synchronous to clk_fl, rst_n asynchronous active low):
//   bit_in / bit_valid : raw bit stream in.
//   rd_valid / rd_en / rd_data : show-ahead read port; rd_data is the oldest
//     word while rd_valid is high, and a cycle with rd_en and rd_valid both
//     high removes it.
//   full, overflow, level : status.
// Timing: a word is readable the cycle after its last bit was taken; a write
// and a read in the same cycle are both performed.
// The document only names this buffer (it feeds a host computer); word size,
// depth, bit order and the overflow policy are this design's choices.
module output_buffer #(
  parameter int unsigned WORD_W = trng_pkg::WORD_W_DEFAULT,
  parameter int unsigned DEPTH  = trng_pkg::BUF_DEPTH_DEFAULT
) (
  input  logic                       clk_fl,
  input  logic                       rst_n,
  input  logic                       bit_in,
  input  logic                       bit_valid,
  input  logic                       rd_en,
  output logic                       rd_valid,
  output logic [WORD_W-1:0]          rd_data,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned BW = (WORD_W > 1) ? $clog2(WORD_W) : 1;

  logic [WORD_W-1:0] mem [DEPTH];
  logic [WORD_W-1:0] shreg;
  logic [BW-1:0]     nbits;
  logic [AW-1:0]     wr_ptr;
  logic [AW-1:0]     rd_ptr;

  logic [WORD_W-1:0] word_next;
  logic              word_done;
  logic              push;
  logic              pop;

  always_comb begin
    word_next = (shreg << 1) | WORD_W'(bit_in);
    word_done = bit_valid && (nbits == BW'(WORD_W - 1));
    push      = word_done && !full;
    pop       = rd_en && rd_valid;
  end

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Bit packing
  always_ff @(posedge clk_fl or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      nbits <= '0;
    end else if (bit_valid) begin
      shreg <= word_next;
      nbits <= word_done ? '0 : nbits + 1'b1;
    end
  end

  // Word memory
  always_ff @(posedge clk_fl) begin
    if (push) mem[wr_ptr] <= word_next;
  end

  always_ff @(posedge clk_fl or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      if (pop)  rd_ptr <= ptr_inc(rd_ptr);
      if (push && !pop)      level <= level + 1'b1;
      else if (pop && !push) level <= level - 1'b1;
      if (word_done && full) overflow <= 1'b1;
    end
  end

  assign full     = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rd_ptr];

  a_no_overfill : assert property (@(posedge clk_fl) disable iff (!rst_n)
    level <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
