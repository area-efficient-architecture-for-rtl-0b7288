// tb_vedic_conv_top: end-to-end test of the three architectures side by side, at the
// default parameters (decimal place value, 3-digit sequences of 4-bit digits).
//
// Every operation applies one pair (a, b) to the shared inputs, checks Type I at once,
// clocks it into Type II and checks it one cycle later, then starts Type III and checks it
// nine cycles after start. Expected values come from integer arithmetic. Between
// operations Type II is also fed back-to-back pairs. The test counts how often each
// mechanism of the design was exercised and fails if one never was:
//   a column carry of two or more digits, a carry rippling through the final adder,
//   a non-zero RD6, Type II accepting pairs on consecutive cycles and skipping a cycle,
//   a completed Type III operation and a start ignored while Type III is busy.
module tb_vedic_conv_top;
  import vedic_pkg::*;
  logic   clk = 0, rst_n = 0;
  digit_t a [NTAP];
  digit_t b [NTAP];
  col_t   t1_y [NCOL], t2_y [NCOL], t3_y [NCOL];
  digit_t t1_rd [NDIG], t2_rd [NDIG], t3_rd [NDIG];
  logic   t1_ovf, t2_ovf, t3_ovf;
  logic   t2_in_valid = 0, t2_out_valid;
  logic   t3_start = 0, t3_busy, t3_valid;
  int checks = 0, failures = 0;

  vedic_conv_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b),
    .t1_y(t1_y), .t1_rd(t1_rd), .t1_ovf(t1_ovf),
    .t2_in_valid(t2_in_valid), .t2_out_valid(t2_out_valid),
    .t2_y(t2_y), .t2_rd(t2_rd), .t2_ovf(t2_ovf),
    .t3_start(t3_start), .t3_busy(t3_busy), .t3_valid(t3_valid),
    .t3_y(t3_y), .t3_rd(t3_rd), .t3_ovf(t3_ovf)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_wide_carry = 0, n_ripple = 0, n_rd6 = 0;
  int n_t2_back2back = 0, n_t2_gap = 0, n_t3_done = 0, n_t3_ignored = 0;

  int     ey [NCOL];
  longint ev;

  function automatic void model();
    longint w, v;
    int     cr [NCOL];
    int     carry, t;
    for (int k = 0; k < NCOL; k++) ey[k] = 0;
    for (int i = 0; i < NTAP; i++)
      for (int j = 0; j < NTAP; j++)
        ey[i+j] += int'(a[j]) * int'(b[i]);
    ev = 0;
    w  = 1;
    for (int k = 0; k < NCOL; k++) begin
      ev += longint'(ey[k]) * w;
      w  *= 10;
      cr[k] = ey[k] / 10;
      if (cr[k] >= 10) n_wide_carry++;
    end
    // does any position of the R + shifted C addition produce a carry?
    carry = 0;
    for (int n = 0; n < NDIG; n++) begin
      t = carry + ((n < NCOL) ? ey[n] % 10 : 0) + ((n >= 1 && n <= NCOL) ? cr[n-1] : 0);
      carry = t / 10;
      if (carry != 0) begin
        n_ripple++;
        break;
      end
    end
    v = ev;
    for (int n = 0; n < 6; n++) v /= 10;
    if (v != 0) n_rd6++;
  endfunction

  task automatic compare(string tag, const ref col_t y [NCOL], const ref digit_t rd [NDIG],
                         input logic ovf);
    longint v;
    v = ev;
    for (int k = 0; k < NCOL; k++) begin
      checks++;
      if (int'(y[k]) != ey[k]) begin
        failures++;
        $display("FAIL %s y%0d = %0d, expected %0d", tag, k + 1, y[k], ey[k]);
      end
    end
    for (int n = 0; n < NDIG; n++) begin
      checks++;
      if (longint'(rd[n]) != v % 10) begin
        failures++;
        $display("FAIL %s RD%0d = %0d, expected %0d", tag, n, rd[n], v % 10);
      end
      v /= 10;
    end
    checks++;
    if (ovf) begin
      failures++;
      $display("FAIL %s ovf", tag);
    end
  endtask

  task automatic one_operation(bit ignore_start);
    int lat;
    model();
    #1 compare("type1", t1_y, t1_rd, t1_ovf);
    // Type II: present with in_valid, result one edge later
    t2_in_valid = 1;
    @(posedge clk);
    #1 t2_in_valid = 0;
    checks++;
    if (!t2_out_valid) begin
      failures++;
      $display("FAIL type2 out_valid missing");
    end
    compare("type2", t2_y, t2_rd, t2_ovf);
    // Type III: nine cycles
    t3_start = 1;
    @(posedge clk);
    #1 t3_start = 0;
    lat = 0;
    while (!t3_valid && lat < 20) begin
      if (ignore_start && lat == 4) begin
        t3_start = 1;
        n_t3_ignored++;
      end
      @(posedge clk);
      #1 t3_start = 0;
      lat++;
    end
    checks++;
    if (lat != 9) begin
      failures++;
      $display("FAIL type3 latency %0d, expected 9", lat);
    end
    compare("type3", t3_y, t3_rd, t3_ovf);
    n_t3_done++;
    // the ignored start must not have restarted the operation
    @(posedge clk);
    #1;
    checks++;
    if (t3_busy || !t3_valid) begin
      failures++;
      $display("FAIL type3 restarted by a start while busy");
    end
  endtask

  task automatic set_random(int maxd);
    for (int n = 0; n < NTAP; n++) begin
      a[n] = digit_t'($urandom_range(maxd));
      b[n] = digit_t'($urandom_range(maxd));
    end
  endtask

  initial begin
    set_random(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // worked example 234 x 316 = 73944
    a = '{4'd4, 4'd3, 4'd2};
    b = '{4'd6, 4'd1, 4'd3};
    one_operation(0);
    checks++;
    if ({t3_rd[4], t3_rd[3], t3_rd[2], t3_rd[1], t3_rd[0]} != 20'h73944) begin
      failures++;
      $display("FAIL 234 x 316 does not give 73944");
    end

    // largest digits: 2 772 225 uses RD6
    a = '{4'd15, 4'd15, 4'd15};
    b = '{4'd15, 4'd15, 4'd15};
    one_operation(1);

    for (int t = 0; t < 200; t++) begin
      set_random((t % 2 != 0) ? 9 : 15);
      one_operation(t % 7 == 3);
      // Type II streaming: a burst of pairs, one per cycle, with occasional gaps
      for (int s = 0; s < 8; s++) begin
        logic prev_valid;
        set_random(15);
        prev_valid  = t2_in_valid;
        t2_in_valid = (s % 5 != 4);
        if (t2_in_valid && prev_valid) n_t2_back2back++;
        if (!t2_in_valid) n_t2_gap++;
        model();
        @(posedge clk);
        #1;
        checks++;
        if (t2_out_valid != (s % 5 != 4)) begin
          failures++;
          $display("FAIL type2 out_valid in burst");
        end
        compare("type2 burst", t2_y, t2_rd, t2_ovf);
      end
      t2_in_valid = 0;
    end

    $display("mechanisms: wide_carry=%0d ripple=%0d rd6=%0d t2_back2back=%0d t2_gap=%0d t3_done=%0d t3_ignored_start=%0d",
             n_wide_carry, n_ripple, n_rd6, n_t2_back2back, n_t2_gap, n_t3_done, n_t3_ignored);
    checks += 7;
    if (n_wide_carry == 0)   begin failures++; $display("FAIL no wide column carry"); end
    if (n_ripple == 0)       begin failures++; $display("FAIL no final-adder carry"); end
    if (n_rd6 == 0)          begin failures++; $display("FAIL RD6 never used"); end
    if (n_t2_back2back == 0) begin failures++; $display("FAIL no back-to-back Type II pairs"); end
    if (n_t2_gap == 0)       begin failures++; $display("FAIL no Type II gap"); end
    if (n_t3_done == 0)      begin failures++; $display("FAIL no Type III operation"); end
    if (n_t3_ignored == 0)   begin failures++; $display("FAIL no start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
