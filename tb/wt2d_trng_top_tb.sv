// wt2d_trng_top_tb: end-to-end test of the start-stop TRNG at its default
// parameters (f_L = 10 MHz clock, 16-bit request counter, 8-bit x 16-word
// buffer, ring oscillator models with 6.00 ns and 6.34 ns periods).
//
// Checked against models kept in the testbench:
//  * every raw bit equals the XOR of the two phase detector levels seen at
//    the sampling edge one cycle earlier (edges where a detector switched in
//    the same instant as the clock are skipped);
//  * a request for N bits yields exactly N valid bits in N consecutive
//    cycles (10 Mbit/s at 10 MHz), and EN is high for exactly N cycles;
//  * both oscillators toggle while EN = 1 and are silent at 1 while EN = 0;
//  * the words read from the buffer are the valid bits packed MSB first,
//    including words that span two requests; with the reader stalled, the
//    buffer fills, drops words and flags overflow;
//  * the bit stream is not stuck: the share of ones lies between 35 % and
//    65 %, and 20 short restarts do not all give the same 16 bits.
// Each mechanism (restart, zero-length request, back-to-back request, word
// spanning requests, buffer full, overflow, stopped oscillators) is counted
// and must happen at least once.
module wt2d_trng_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = trng_pkg::WORD_W_DEFAULT;
  localparam int unsigned D = trng_pkg::BUF_DEPTH_DEFAULT;
  localparam int unsigned CW = trng_pkg::COUNT_W_DEFAULT;

  logic clk_fl = 1'b0;
  logic rst_n = 1'b1;
  logic req_valid = 1'b0;
  logic req_ready;
  logic [CW-1:0] req_bits = '0;
  logic busy, en, raw_bit, raw_valid;
  logic rd_en = 1'b0;
  logic rd_valid;
  logic [W-1:0] rd_data;
  logic buf_full, buf_overflow;
  logic [$clog2(D+1)-1:0] buf_level;

  wt2d_trng_top dut (
    .clk_fl(clk_fl), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_bits(req_bits), .busy(busy), .en(en), .raw_bit(raw_bit), .raw_valid(raw_valid),
    .rd_en(rd_en), .rd_valid(rd_valid), .rd_data(rd_data), .buf_full(buf_full),
    .buf_overflow(buf_overflow), .buf_level(buf_level));

  always #50 clk_fl = ~clk_fl;   // f_L = 10 MHz

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- raw bit vs. phase detector model ----------------
  time pd_change = 0;
  always @(dut.pd1 or dut.pd2) pd_change = $time;

  logic [1:0] xor_hist = '0;
  bit [1:0]   amb_hist = '0;
  int cyc = 0;
  int raw_checked = 0;
  always @(posedge clk_fl) begin
    if (rst_n) begin
      xor_hist = {xor_hist[0], dut.pd1 ^ dut.pd2};
      amb_hist = {amb_hist[0], (pd_change == $time)};
      cyc++;
    end
  end
  always @(negedge clk_fl) begin
    if (rst_n && cyc >= 2 && !amb_hist[1]) begin
      raw_checked++;
      check(raw_bit == xor_hist[1], "raw bit = XOR of detector levels one cycle earlier");
    end
  end

  // ---------------- oscillators run only while enabled ----------------
  int ro_edges_on = 0;
  int ro_edges_off = 0;
  int idle_checks = 0;
  time en_fall = 0;
  always @(negedge en) en_fall = $time;
  always @(dut.ro1 or dut.ro2) begin
    if (en) ro_edges_on++;
    else if (rst_n && $time > en_fall + 20) ro_edges_off++;
  end
  always @(negedge clk_fl) begin
    if (rst_n && !en && $time > en_fall + 20) begin
      idle_checks++;
      check(dut.ro1 && dut.ro2, "stopped oscillators rest at 1");
    end
  end

  // ---------------- valid bits, runs and buffer model ----------------
  bit bits_all [$];
  int ones = 0;
  int run_len = 0;
  int runs [$];
  logic [W-1:0] acc = '0;
  int nacc = 0;
  logic [W-1:0] words [$];
  int dropped = 0;
  int reads = 0;
  int full_seen = 0;
  int spans = 0;
  int req_seq = 0;
  int word_req_first = -1;

  always @(posedge clk_fl) begin
    if (rst_n) begin
      bit ref_full;
      ref_full = (words.size() == D);
      if (buf_full) full_seen++;
      if (rd_en && rd_valid) begin
        reads++;
        check(words.size() > 0 && rd_data == words[0],
              $sformatf("buffer word %02h, want %02h", rd_data, (words.size() > 0) ? words[0] : '0));
        if (words.size() > 0) void'(words.pop_front());
      end
      if (raw_valid) begin
        bits_all.push_back(raw_bit);
        if (raw_bit) ones++;
        run_len++;
        if (nacc == 0) word_req_first = req_seq;
        acc = {acc[W-2:0], raw_bit};
        nacc++;
        if (nacc == W) begin
          nacc = 0;
          if (word_req_first != req_seq) spans++;
          if (ref_full) dropped++;
          else words.push_back(acc);
        end
      end else if (run_len > 0) begin
        runs.push_back(run_len);
        run_len = 0;
      end
    end
  end

  // ---------------- request driver ----------------
  int restarts = 0;
  int zero_reqs = 0;
  int back_to_back = 0;
  int en_cycles = 0;
  int last_idle_len = 0;
  int idle_len = 0;
  always @(posedge clk_fl) begin
    if (en) en_cycles++;
    if (!en) idle_len++;
    else begin
      if (idle_len > 0) last_idle_len = idle_len;
      idle_len = 0;
    end
  end
  always @(posedge en) restarts++;

  int req_list [$];

  task automatic request(input int n);
    @(negedge clk_fl);
    req_valid = 1'b1;
    req_bits = CW'(n);
    do @(posedge clk_fl); while (!req_ready);
    @(negedge clk_fl);
    req_valid = 1'b0;
    if (n == 0) zero_reqs++;
    req_list.push_back(n);
    req_seq++;
  endtask

  task automatic wait_idle();
    do @(negedge clk_fl); while (busy);
  endtask

  // reader: drains the buffer while read_on is set
  bit read_on = 1'b1;
  always @(negedge clk_fl) rd_en = read_on && ($urandom_range(3, 0) != 0);

  initial begin
    int sizes [10] = '{1, 8, 13, 0, 64, 200, 3, 1000, 37, 2000};
    int total;
    #1 rst_n = 1'b0;
    #200;
    @(negedge clk_fl);
    rst_n = 1'b1;
    repeat (10) @(negedge clk_fl);
    check(!en && dut.ro1 && dut.ro2, "idle after reset: EN low, oscillators stopped");

    // requests with gaps, then back-to-back requests
    foreach (sizes[i]) begin
      request(sizes[i]);
      wait_idle();
      repeat ($urandom_range(5, 1)) @(negedge clk_fl);
    end
    for (int i = 0; i < 4; i++) begin
      request(5 + i);
      if (i > 0) back_to_back++;
    end
    wait_idle();
    check(last_idle_len >= 1, "EN drops between back-to-back requests");

    // restart sequences: 20 requests of 16 bits
    begin
      int first_run;
      logic [63:0] seqs [$];
      bit all_same;
      first_run = bits_all.size();
      for (int r = 0; r < 20; r++) begin
        request(64);
        wait_idle();
        repeat (3) @(negedge clk_fl);
      end
      for (int r = 0; r < 20; r++) begin
        logic [63:0] s;
        for (int b = 0; b < 64; b++) s[b] = bits_all[first_run + 64 * r + b];
        seqs.push_back(s);
      end
      all_same = 1'b1;
      foreach (seqs[r]) if (seqs[r] != seqs[0]) all_same = 1'b0;
      foreach (seqs[r]) $display("restart %0d: %016h", r, seqs[r]);
      check(!all_same, "restart sequences differ");
    end

    // stall the reader: fill the buffer and overflow it
    read_on = 1'b0;
    repeat (2) @(negedge clk_fl);
    request(8 * (D + 4) + 5);
    wait_idle();
    check(buf_full && buf_overflow && dropped > 0, "buffer full and overflow flagged when not read");
    read_on = 1'b1;
    repeat (4 * D + 10) @(negedge clk_fl);
    check(!rd_valid && words.size() == 0, "buffer drained");

    // totals, rate
    total = 0;
    foreach (req_list[i]) total += req_list[i];
    check(bits_all.size() == total, $sformatf("%0d valid bits, requested %0d", bits_all.size(), total));
    check(en_cycles == total, $sformatf("EN high %0d cycles for %0d bits", en_cycles, total));
    begin
      int nz [$];
      foreach (req_list[i]) if (req_list[i] != 0) nz.push_back(req_list[i]);
      check(runs.size() == nz.size(), $sformatf("%0d valid runs for %0d requests", runs.size(), nz.size()));
      for (int i = 0; i < runs.size() && i < nz.size(); i++)
        check(runs[i] == nz[i], $sformatf("request %0d: %0d bits in a run, want %0d in as many cycles", i, runs[i], nz[i]));
    end
    check(ones * 100 > 35 * total && ones * 100 < 65 * total,
          $sformatf("share of ones %0d of %0d", ones, total));
    check(ro_edges_off == 0, "no oscillator edge while stopped");

    $display("mechanisms: restarts=%0d zero_len=%0d back_to_back=%0d spanning_words=%0d full_cycles=%0d dropped_words=%0d idle_checks=%0d",
             restarts, zero_reqs, back_to_back, spans, full_seen, dropped, idle_checks);
    $display("bits=%0d ones=%0d raw_checked=%0d ro_edges_on=%0d reads=%0d", total, ones, raw_checked, ro_edges_on, reads);
    check(restarts >= 20, "restarts happened");
    check(zero_reqs > 0, "zero-length request happened");
    check(back_to_back > 0, "back-to-back requests happened");
    check(spans > 0, "word spanning two requests happened");
    check(full_seen > 0, "buffer full happened");
    check(dropped > 0 && buf_overflow, "overflow happened");
    check(idle_checks > 0, "stopped oscillators observed");
    check(ro_edges_on > 1000, "oscillators ran while enabled");
    check(raw_checked > total, "raw bits compared with the model");
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
