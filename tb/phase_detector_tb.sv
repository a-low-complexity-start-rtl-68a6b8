// phase_detector_tb: drives START and STOP with random single edges (never
// together) and compares the detector output with a reference model of the
// start-stop pairing: a START edge raises the output unless a STOP edge is
// waiting, in which case both are consumed; a STOP edge lowers a raised output
// or, if it is low, waits for the next START edge. Also checks the
// asynchronous reset, and two runs with free-running inputs: START leading
// STOP by 3 ns of a 10 ns period must give a 30 % duty cycle, STOP leading
// START must keep the output low.
module phase_detector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic stop = 1'b0;
  logic pd_out;
  logic ref_q = 1'b0;
  logic ref_dn = 1'b0;
  int checks = 0;
  int failures = 0;

  phase_detector dut (.rst_n(rst_n), .start(start), .stop(stop), .pd_out(pd_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #5;
    check(pd_out == 1'b0, "reset clears output");
    rst_n = 1'b1;
    #5;
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(1, 0) == 1) begin
        start = 1'b1;
        if (ref_dn) ref_dn = 1'b0;
        else        ref_q = 1'b1;
      end else begin
        stop = 1'b1;
        if (ref_q) ref_q = 1'b0;
        else       ref_dn = 1'b1;
      end
      #2;
      check(pd_out == ref_q, "level after edge");
      start = 1'b0;
      stop = 1'b0;
      #2;
      check(pd_out == ref_q, "level held after edge falls");
    end
    // reset in the middle of a high phase
    if (ref_dn) begin start = 1'b1; #1; start = 1'b0; #1; end
    start = 1'b1; #1; start = 1'b0; #1;
    check(pd_out == 1'b1, "high before reset");
    rst_n = 1'b0; #1;
    check(pd_out == 1'b0, "asynchronous reset");
    rst_n = 1'b1; #1;
    // free-running: period 10 ns, STOP 3 ns after START -> duty 30 %
    begin
      int high = 0;
      fork
        for (int k = 0; k < 100; k++) begin start = 1'b1; #5; start = 1'b0; #5; end
        begin #3; for (int k = 0; k < 100; k++) begin stop = 1'b1; #5; stop = 1'b0; #5; end end
        begin #0.5; for (int k = 0; k < 1000; k++) begin if (pd_out) high++; #1; end end
      join
      $display("duty: %0d of 1000 samples high", high);
      check(high >= 290 && high <= 310, "duty cycle follows phase offset");
    end
    rst_n = 1'b0; #1; rst_n = 1'b1; #1;
    begin
      int high = 0;
      fork
        begin #3; for (int k = 0; k < 100; k++) begin start = 1'b1; #5; start = 1'b0; #5; end end
        for (int k = 0; k < 100; k++) begin stop = 1'b1; #5; stop = 1'b0; #5; end
        begin #0.5; for (int k = 0; k < 1000; k++) begin if (pd_out) high++; #1; end end
      join
      $display("lagging START: %0d of 1000 samples high", high);
      check(high == 0, "output stays low when STOP leads");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
