// tb_cr_adder: random R digits (0..9) and carries (0..67) into the final adder; the
// expected digits are those of sum_k R_k * 10^(k-1) + C_k * 10^k worked out in integers.
// Includes the worked example rows 6 1 7 2 4 and carries 1 2 2 2 (result 73944).
module tb_cr_adder;
  import vedic_pkg::*;
  digit_t r  [NCOL];
  col_t   c  [NCOL];
  digit_t rd [NDIG];
  logic   ovf;
  int checks = 0, failures = 0;

  cr_adder #(.RADIX(10)) dut (.r(r), .c(c), .rd(rd), .ovf(ovf));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    longint v, w;
    v = 0;
    w = 1;
    for (int k = 0; k < NCOL; k++) begin
      v += longint'(r[k]) * w + longint'(c[k]) * w * 10;
      w *= 10;
    end
    #1;
    for (int n = 0; n < NDIG; n++) begin
      checks++;
      if (longint'(rd[n]) != v % 10) begin
        failures++;
        $display("FAIL digit %0d = %0d, expected %0d", n, rd[n], v % 10);
      end
      v /= 10;
    end
    checks++;
    if (ovf != (v != 0)) begin
      failures++;
      $display("FAIL ovf = %0b", ovf);
    end
  endtask

  initial begin
    // worked example: R row 6 1 7 2 4, carries 0 1 2 2 2 for columns 5..1
    r = '{4'd4, 4'd2, 4'd7, 4'd1, 4'd6};
    c = '{10'd2, 10'd2, 10'd2, 10'd1, 10'd0};
    check_now();
    checks++;
    if ({rd[4], rd[3], rd[2], rd[1], rd[0]} != 20'h73944 || rd[5] != 0 || rd[6] != 0) begin
      failures++;
      $display("FAIL worked example gives %0d%0d%0d%0d%0d", rd[4], rd[3], rd[2], rd[1], rd[0]);
    end
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < NCOL; k++) begin
        r[k] = digit_t'($urandom_range(9));
        c[k] = col_t'($urandom_range((t % 2 != 0) ? 67 : 24));
      end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
