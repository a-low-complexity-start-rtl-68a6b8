// start_stop_ctrl_tb: issues random requests (0 to 40 bits, random gaps) and
// checks for each one that EN is high for exactly the requested number of
// f_L cycles, that it rises right after the accepting edge, that the bits
// are marked valid in one unbroken run of exactly that length starting two
// cycles after EN rose (one bit per cycle), that req_ready is the inverse
// of EN, and that EN is low for at least one cycle between requests.
module start_stop_ctrl_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = 16;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic req_valid = 1'b0;
  logic req_ready;
  logic [CW-1:0] req_bits = '0;
  logic en, raw_valid, busy;
  int checks = 0;
  int failures = 0;

  start_stop_ctrl #(.COUNT_W(CW)) dut (
    .clk_fl(clk_fl), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_bits(req_bits), .en(en), .raw_valid(raw_valid), .busy(busy));

  always #50 clk_fl = ~clk_fl;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // cycle counter and logs of EN / valid per cycle
  int cyc = 0;
  logic en_log [0:19999];
  logic val_log [0:19999];
  always @(posedge clk_fl) begin
    if (cyc < 20000) begin
      en_log[cyc] <= en;
      val_log[cyc] <= raw_valid;
    end
    cyc <= cyc + 1;
    checks++;
    if (req_ready !== ~en) begin
      failures++;
      $display("FAIL @%0t: req_ready != ~en", $time);
    end
  end

  int acc_cycle [$];
  int acc_bits [$];

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    #120;
    @(negedge clk_fl);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int n;
      n = (r % 10 == 3) ? 0 : $urandom_range(40, 1);
      @(negedge clk_fl);
      req_valid = 1'b1;
      req_bits = CW'(n);
      do @(posedge clk_fl); while (!req_ready);
      acc_cycle.push_back(cyc);  // log index of the accepting edge
      acc_bits.push_back(n);
      @(negedge clk_fl);
      req_valid = 1'b0;
      repeat ($urandom_range(3, 0)) @(negedge clk_fl);
    end
    repeat (50) @(posedge clk_fl);
    // offline evaluation of the logs
    for (int r = 0; r < acc_cycle.size(); r++) begin
      int k, n, en_cnt, v_cnt, nxt;
      k = acc_cycle[r];
      n = acc_bits[r];
      nxt = (r + 1 < acc_cycle.size()) ? acc_cycle[r + 1] : cyc - 1;
      // en_log[c] is EN just before edge c; EN set at edge k is seen at log k+1
      en_cnt = 0;
      for (int c = k + 1; c <= nxt; c++) if (en_log[c]) en_cnt++;
      check(en_cnt == n, $sformatf("request %0d: EN high %0d cycles, want %0d", r, en_cnt, n));
      if (n > 0) begin
        check(en_log[k + 1] && en_log[k + n] && !en_log[k + n + 1], $sformatf("request %0d: EN window", r));
        v_cnt = 0;
        for (int c = k + 3; c <= nxt + 2 && c < cyc; c++) if (val_log[c]) v_cnt++;
        check(v_cnt == n, $sformatf("request %0d: %0d valid bits, want %0d", r, v_cnt, n));
        check(val_log[k + 3] && val_log[k + n + 2] && !val_log[k + 2] && !val_log[k + n + 3],
              $sformatf("request %0d: valid window latency", r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
