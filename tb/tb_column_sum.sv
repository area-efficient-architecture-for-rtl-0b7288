// tb_column_sum: drives random products into the column adders and compares each
// column with the sum of the products b_i * a_j whose indices add up to that column.
module tb_column_sum;
  import vedic_pkg::*;
  prod_t p [NPROD];
  col_t  y [NCOL];
  int checks = 0, failures = 0;

  column_sum dut (.p(p), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_y [5];
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < 9; n++) p[n] = (t == 0) ? 8'hFF : 8'($urandom);
      #1;
      // p[3*i+j] = b(i+1) * a(j+1)
      exp_y[0] = int'(p[0]);                          // b1a1
      exp_y[1] = int'(p[1]) + int'(p[3]);             // b1a2 + b2a1
      exp_y[2] = int'(p[6]) + int'(p[4]) + int'(p[2]); // b3a1 + b2a2 + b1a3
      exp_y[3] = int'(p[7]) + int'(p[5]);             // b3a2 + b2a3
      exp_y[4] = int'(p[8]);                          // b3a3
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (int'(y[k]) != exp_y[k]) begin
          failures++;
          $display("FAIL t=%0d column %0d = %0d, expected %0d", t, k + 1, y[k], exp_y[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
