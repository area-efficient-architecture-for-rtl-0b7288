// tb_conv_type3: runs the single-multiplier Type III convolver on the worked example
// 234 x 316, the all-15 corner and random digits. For each operation it checks the
// convolution sums and the decimal digits against integer arithmetic, that valid rises
// exactly nine clock cycles after the edge that samples start, that busy is high for
// those nine cycles, and that the result stays put until the next start.
module tb_conv_type3;
  import vedic_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0;
  digit_t a  [NTAP];
  digit_t b  [NTAP];
  logic   busy, valid;
  col_t   y  [NCOL];
  digit_t rd [NDIG];
  logic   ovf;
  int checks = 0, failures = 0;

  conv_type3 dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                  .busy(busy), .valid(valid), .y(y), .rd(rd), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_result();
    int     ey [NCOL];
    longint v, w;
    for (int k = 0; k < NCOL; k++) ey[k] = 0;
    for (int i = 0; i < NTAP; i++)
      for (int j = 0; j < NTAP; j++)
        ey[i+j] += int'(a[j]) * int'(b[i]);
    v = 0;
    w = 1;
    for (int k = 0; k < NCOL; k++) begin
      v += longint'(ey[k]) * w;
      w *= 10;
    end
    for (int k = 0; k < NCOL; k++) begin
      checks++;
      if (int'(y[k]) != ey[k]) begin
        failures++;
        $display("FAIL y%0d = %0d, expected %0d", k + 1, y[k], ey[k]);
      end
    end
    for (int n = 0; n < NDIG; n++) begin
      checks++;
      if (longint'(rd[n]) != v % 10) begin
        failures++;
        $display("FAIL RD%0d = %0d, expected %0d", n, rd[n], v % 10);
      end
      v /= 10;
    end
  endtask

  task automatic run_one();
    int lat;
    @(posedge clk);
    #1 start = 1;
    @(posedge clk);                  // start sampled here
    #1 start = 0;
    lat = 0;
    while (!valid && lat < 20) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low before valid, cycle %0d", lat);
      end
      @(posedge clk);
      #1 lat++;
    end
    checks++;
    if (lat != 9) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 9", lat);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy still high with valid");
    end
    check_result();
    repeat (3) @(posedge clk);
    #1 check_result();               // result holds
  endtask

  initial begin
    for (int n = 0; n < NTAP; n++) begin
      a[n] = '0;
      b[n] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (valid || busy) begin
      failures++;
      $display("FAIL valid/busy after reset");
    end
    a = '{4'd4, 4'd3, 4'd2};         // 234
    b = '{4'd6, 4'd1, 4'd3};         // 316
    run_one();
    checks++;
    if ({rd[6], rd[5], rd[4], rd[3], rd[2], rd[1], rd[0]} != 28'h0073944) begin
      failures++;
      $display("FAIL 234 x 316 does not give 73944");
    end
    a = '{4'd15, 4'd15, 4'd15};
    b = '{4'd15, 4'd15, 4'd15};
    run_one();
    for (int t = 0; t < 300; t++) begin
      for (int n = 0; n < NTAP; n++) begin
        a[n] = digit_t'($urandom_range(15));
        b[n] = digit_t'($urandom_range(15));
      end
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
