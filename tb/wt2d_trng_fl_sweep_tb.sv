// wt2d_trng_fl_sweep_tb: runs the generator at the five sampling frequencies
// f_L = 25, 15, 10, 5 and 1 MHz. At each frequency it requests 1024 bits and
// checks that exactly 1024 valid bits arrive in 1024 consecutive f_L cycles
// (one bit per cycle, so the bit rate equals f_L), and that the stream is
// neither stuck nor strongly biased (35 % to 65 % ones). It prints, per
// frequency, the share of ones and a Shannon entropy estimate per bit over
// 4-bit blocks, as a rough indication of the behaviour of the oscillator
// models; the real figures depend on the silicon.
module wt2d_trng_fl_sweep_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NBITS = 1024;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic req_valid = 1'b0;
  logic req_ready;
  logic [15:0] req_bits = '0;
  logic busy, en, raw_bit, raw_valid;
  logic rd_valid;
  logic [7:0] rd_data;
  logic buf_full, buf_overflow;
  logic [4:0] buf_level;

  wt2d_trng_top dut (
    .clk_fl(clk_fl), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_bits(req_bits), .busy(busy), .en(en), .raw_bit(raw_bit), .raw_valid(raw_valid),
    .rd_en(1'b1), .rd_valid(rd_valid), .rd_data(rd_data), .buf_full(buf_full),
    .buf_overflow(buf_overflow), .buf_level(buf_level));

  realtime half_ns = 50.0;
  always #(half_ns) clk_fl = ~clk_fl;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  bit bits [$];
  int first_cyc = -1;
  int last_cyc = -1;
  int cyc = 0;
  always @(posedge clk_fl) begin
    cyc++;
    if (raw_valid) begin
      bits.push_back(raw_bit);
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
    end
  end

  function automatic real block_entropy(input int n);
    int cnt [16];
    real h, p;
    int blocks;
    foreach (cnt[i]) cnt[i] = 0;
    blocks = n / 4;
    for (int b = 0; b < blocks; b++)
      cnt[{bits[4*b], bits[4*b+1], bits[4*b+2], bits[4*b+3]}]++;
    h = 0.0;
    foreach (cnt[i]) if (cnt[i] > 0) begin
      p = real'(cnt[i]) / real'(blocks);
      h -= p * $ln(p) / $ln(2.0);
    end
    return h / 4.0;
  endfunction

  initial begin
    int fl_mhz [5] = '{25, 15, 10, 5, 1};
    #1 rst_n = 1'b0;
    #200;
    @(negedge clk_fl);
    rst_n = 1'b1;
    foreach (fl_mhz[i]) begin
      int ones;
      half_ns = 500.0 / fl_mhz[i];
      repeat (3) @(negedge clk_fl);
      bits.delete();
      first_cyc = -1;
      @(negedge clk_fl);
      req_valid = 1'b1;
      req_bits = 16'(NBITS);
      @(negedge clk_fl);
      req_valid = 1'b0;
      do @(negedge clk_fl); while (busy);
      ones = 0;
      foreach (bits[k]) ones += bits[k];
      $display("f_L = %0d MHz: %0d bits in %0d cycles (%0d Mbit/s), ones %0d, 4-bit block entropy %0.3f bit/bit",
               fl_mhz[i], bits.size(), last_cyc - first_cyc + 1, fl_mhz[i], ones, block_entropy(bits.size()));
      check(bits.size() == NBITS, $sformatf("f_L = %0d MHz: bit count", fl_mhz[i]));
      check(last_cyc - first_cyc + 1 == NBITS, $sformatf("f_L = %0d MHz: one bit per cycle", fl_mhz[i]));
      check(ones * 100 > 35 * NBITS && ones * 100 < 65 * NBITS, $sformatf("f_L = %0d MHz: share of ones", fl_mhz[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
