// ring_osc_tb: self-checking test of the ring oscillator model.
// Checks that the output is held at 1 and never toggles while en = 0, that
// with en = 1 the mean period is 2 * HALF_PERIOD_PS within 2 %, that the
// periods vary (jitter is present) but stay within the jitter bound, that
// stopping forces the output to 1 at once, and that a restart oscillates again.
module ring_osc_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HALF = 3000;
  localparam int unsigned JIT  = 60;

  logic en = 1'b0;
  logic ro_out;
  int checks = 0;
  int failures = 0;

  ring_osc #(.HALF_PERIOD_PS(HALF), .JITTER_PS(JIT), .SEED(7)) dut (.en(en), .ro_out(ro_out));

  int unsigned rises = 0;
  int unsigned toggles = 0;
  time last_rise = 0;
  time pmin = '1;
  time pmax = 0;
  time first_rise = 0;

  always @(ro_out) toggles++;
  // rising edges while enabled (the forced rise at stop is not a period)
  always @(posedge ro_out) if (en) begin
    if (rises > 0) begin
      if ($time - last_rise < pmin) pmin = $time - last_rise;
      if ($time - last_rise > pmax) pmax = $time - last_rise;
    end else begin
      first_rise = $time;
    end
    last_rise = $time;
    rises++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20ns;
    check(ro_out == 1'b1, "output is 1 while disabled");
    toggles = 0;
    #1us;
    check(toggles == 0, "no toggles while disabled");
    for (int run = 0; run < 2; run++) begin
      rises = 0;
      pmin = '1;
      pmax = 0;
      en = 1'b1;
      #2us;
      begin
        real mean;
        mean = real'(last_rise - first_rise) / real'(rises - 1);
        $display("run %0d: %0d rises, mean period %0.1f ps, min %0t max %0t", run, rises, mean, pmin, pmax);
        check(mean > 0.98 * 2 * HALF && mean < 1.02 * 2 * HALF, "mean period");
        check(pmax > pmin, "period jitter present");
        check(pmin >= 2 * HALF - 2 * JIT && pmax <= 2 * HALF + 2 * JIT, "jitter bound");
      end
      en = 1'b0;
      #1;
      check(ro_out == 1'b1, "stop forces output to 1");
      #20ns;
      toggles = 0;
      #1us;
      check(toggles == 0 && ro_out == 1'b1, "stays stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
