// tb_conv_type1: checks the combinational Type I convolver. The worked example
// 234 x 316 = 73944 (digits a = 2,3,4 and b = 3,1,6), the all-15 corner (2 772 225, which
// needs all seven output digits), and random 4-bit digits. Expected values are the
// convolution sums y_k = sum over i+j=k+1 of a_i * b_j and the decimal digits of
// sum_k y_k * 10^(k-1), both worked out in integers. A second instance with RADIX = 16 must
// give the hexadecimal digits of the product of the two 12-bit numbers {a3,a2,a1} x {b3,b2,b1}.
module tb_conv_type1;
  import vedic_pkg::*;
  digit_t a  [NTAP];
  digit_t b  [NTAP];
  col_t   y  [NCOL];
  digit_t rd [NDIG];
  logic   ovf;
  int checks = 0, failures = 0;

  conv_type1 dut (.a(a), .b(b), .y(y), .rd(rd), .ovf(ovf));

  // the same circuit in radix 16 gives the hex digits of the product of the 12-bit numbers
  col_t   y16  [NCOL];
  digit_t rd16 [NDIG];
  logic   ovf16;
  conv_type1 #(.RADIX(16)) dut16 (.a(a), .b(b), .y(y16), .rd(rd16), .ovf(ovf16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int  ey [NCOL];
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
    #1;
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
    checks++;
    if (ovf) begin
      failures++;
      $display("FAIL ovf set");
    end
    v = longint'({a[2], a[1], a[0]}) * longint'({b[2], b[1], b[0]});
    for (int n = 0; n < NDIG; n++) begin
      checks++;
      if (longint'(rd16[n]) != v % 16) begin
        failures++;
        $display("FAIL radix 16 RD%0d = %0h, expected %0h", n, rd16[n], v % 16);
      end
      v /= 16;
    end
    checks++;
    if (ovf16) begin
      failures++;
      $display("FAIL radix 16 ovf set");
    end
  endtask

  initial begin
    // 234 x 316: a3 a2 a1 = 2 3 4, b3 b2 b1 = 3 1 6
    a = '{4'd4, 4'd3, 4'd2};
    b = '{4'd6, 4'd1, 4'd3};
    check_now();
    checks++;
    if ({rd[6], rd[5], rd[4], rd[3], rd[2], rd[1], rd[0]} != 28'h0073944) begin
      failures++;
      $display("FAIL 234 x 316 gives %0d%0d%0d%0d%0d%0d%0d",
               rd[6], rd[5], rd[4], rd[3], rd[2], rd[1], rd[0]);
    end
    a = '{4'd15, 4'd15, 4'd15};
    b = '{4'd15, 4'd15, 4'd15};
    check_now();
    for (int t = 0; t < 3000; t++) begin
      for (int n = 0; n < NTAP; n++) begin
        a[n] = digit_t'((t % 2 != 0) ? $urandom_range(9) : $urandom_range(15));
        b[n] = digit_t'((t % 2 != 0) ? $urandom_range(9) : $urandom_range(15));
      end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
