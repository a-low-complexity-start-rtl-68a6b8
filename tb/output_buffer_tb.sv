// output_buffer_tb: random raw bits with random valid and random reads,
// compared with a reference queue that packs the bits MSB first into 8-bit
// words. Phase 1 reads often (no loss), phase 2 stops reading until the buffer
// is full and a further word arrives, which must be dropped and must set the
// overflow flag; the words already held must read back intact.
module output_buffer_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 8;
  localparam int unsigned D = 16;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic bit_in = 1'b0;
  logic bit_valid = 1'b0;
  logic rd_en = 1'b0;
  logic rd_valid;
  logic [W-1:0] rd_data;
  logic full, overflow;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0;
  int failures = 0;

  output_buffer #(.WORD_W(W), .DEPTH(D)) dut (
    .clk_fl(clk_fl), .rst_n(rst_n), .bit_in(bit_in), .bit_valid(bit_valid),
    .rd_en(rd_en), .rd_valid(rd_valid), .rd_data(rd_data), .full(full),
    .overflow(overflow), .level(level));

  always #50 clk_fl = ~clk_fl;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [W-1:0] words [$];
  logic [W-1:0] acc = '0;
  int nacc = 0;
  int dropped = 0;
  int reads = 0;
  bit read_phase = 1'b1;

  // reference model, evaluated at each edge with the values the DUT sees
  always @(posedge clk_fl) begin
    if (rst_n) begin
      bit ref_full;
      ref_full = (words.size() == D);
      if (rd_en && rd_valid) begin
        check(words.size() > 0, "read from non-empty reference");
        if (words.size() > 0) begin
          check(rd_data == words[0], $sformatf("read data %02h want %02h", rd_data, words[0]));
          void'(words.pop_front());
        end
        reads++;
      end
      if (bit_valid) begin
        acc = {acc[W-2:0], bit_in};
        nacc++;
        if (nacc == W) begin
          nacc = 0;
          if (ref_full) dropped++;
          else words.push_back(acc);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #120;
    check(!rd_valid && !overflow && level == 0, "empty after reset");
    @(negedge clk_fl);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk_fl);
      bit_valid = ($urandom_range(3, 0) != 0);
      bit_in = 1'($urandom);
      rd_en = ($urandom_range(1, 0) == 1);
    end
    check(!overflow && dropped == 0, "no overflow while reading");
    // fill without reading
    rd_en = 1'b0;
    repeat (8 * (D + 3)) begin
      @(negedge clk_fl);
      bit_valid = 1'b1;
      bit_in = 1'($urandom);
      check(int'(level) == words.size(), "level matches reference");
    end
    @(negedge clk_fl);
    bit_valid = 1'b0;
    check(full && overflow && dropped > 0, "full, overflow flagged, word dropped");
    // drain
    rd_en = 1'b1;
    repeat (D + 4) @(negedge clk_fl);
    check(!rd_valid && words.size() == 0, "drained");
    $display("reads=%0d dropped=%0d", reads, dropped);
    check(reads > 200, "enough reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
