// sample_combine_tb: random levels on the two detector inputs, changed away
// from the clock edges. The expected raw bit after edge n+1 is the XOR of the
// two input levels seen at edge n (two-cycle latency); the test checks every
// cycle, plus the reset value.
module sample_combine_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic pd1 = 1'b0;
  logic pd2 = 1'b0;
  logic raw_bit;
  int checks = 0;
  int failures = 0;
  int cycles = 0;

  sample_combine dut (.clk_fl(clk_fl), .rst_n(rst_n), .pd1(pd1), .pd2(pd2), .raw_bit(raw_bit));

  always #50 clk_fl = ~clk_fl;   // f_L = 10 MHz

  logic [1:0] hist;  // hist[0]: XOR at the latest edge, hist[1]: one edge earlier

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #120;
    check(raw_bit == 1'b0, "reset value");
    @(negedge clk_fl);
    rst_n = 1'b1;
    hist = '0;
    repeat (500) begin
      @(posedge clk_fl);
      hist = {hist[0], pd1 ^ pd2};
      cycles++;
      #10;
      if (cycles >= 2) check(raw_bit == hist[1], "raw bit = XOR of samples one cycle earlier");
      #($urandom_range(60, 10));
      pd1 = 1'($urandom);
      pd2 = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
