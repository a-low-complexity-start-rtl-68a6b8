// wt2d_trng_array_tb: 32 generators side by side, as in the scaling example
// (32 x 10 Mbit/s = 320 Mbit/s at f_L = 10 MHz). Each instance has its own
// oscillator seeds and slightly different loop delays, as separately placed
// rings would. All 32 get the same 256-bit request at once; the test checks
// that every instance delivers 256 bits in 256 consecutive cycles (32 bits per
// 100 ns cycle in total), and that the 32 streams are pairwise different.
module wt2d_trng_array_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int unsigned NBITS = 256;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic req_valid = 1'b0;
  logic [15:0] req_bits = '0;
  logic [N-1:0] req_ready, busy, en, raw_bit, raw_valid;

  always #50 clk_fl = ~clk_fl;   // f_L = 10 MHz

  for (genvar i = 0; i < N; i++) begin : g_inst
    logic rd_valid, buf_full, buf_overflow;
    logic [7:0] rd_data;
    logic [4:0] buf_level;
    wt2d_trng_top #(
      .RO1_HALF_PERIOD_PS(3000 + 7 * i), .RO2_HALF_PERIOD_PS(3170 + 5 * i),
      .RO1_SEED(2 * i + 11), .RO2_SEED(2 * i + 12)
    ) dut (
      .clk_fl(clk_fl), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready[i]),
      .req_bits(req_bits), .busy(busy[i]), .en(en[i]), .raw_bit(raw_bit[i]),
      .raw_valid(raw_valid[i]), .rd_en(1'b1), .rd_valid(rd_valid), .rd_data(rd_data),
      .buf_full(buf_full), .buf_overflow(buf_overflow), .buf_level(buf_level));
  end

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [NBITS-1:0] streams [N];
  int nbits [N];
  int cycles_valid = 0;
  int total_bits = 0;
  always @(posedge clk_fl) begin
    if (|raw_valid) cycles_valid++;
    for (int i = 0; i < N; i++) begin
      if (raw_valid[i]) begin
        if (nbits[i] < NBITS) streams[i][nbits[i]] <= raw_bit[i];
        nbits[i]++;
        total_bits++;
      end
    end
  end

  initial begin
    foreach (nbits[i]) nbits[i] = 0;
    #1 rst_n = 1'b0;
    #200;
    @(negedge clk_fl);
    rst_n = 1'b1;
    repeat (2) @(negedge clk_fl);
    check(&req_ready, "all instances ready");
    req_valid = 1'b1;
    req_bits = 16'(NBITS);
    @(negedge clk_fl);
    req_valid = 1'b0;
    do @(negedge clk_fl); while (|busy);
    foreach (nbits[i]) check(nbits[i] == NBITS, $sformatf("instance %0d: %0d bits", i, nbits[i]));
    check(cycles_valid == NBITS, $sformatf("%0d cycles carried bits, want %0d", cycles_valid, NBITS));
    check(total_bits == N * NBITS, "32 bits per cycle in total");
    $display("%0d bits in %0d cycles of 100 ns: %0d Mbit/s", total_bits, cycles_valid,
             total_bits * 10 / cycles_valid);
    begin
      int same = 0;
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          if (streams[a] == streams[b]) same++;
      check(same == 0, $sformatf("%0d pairs of identical streams", same));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
