// tb_cr_split: every column value 0..1023 through a decimal and a hexadecimal C|R
// split, checked against integer division and remainder.
module tb_cr_split;
  import vedic_pkg::*;
  col_t   y;
  digit_t r10, r16;
  col_t   c10, c16;
  int checks = 0, failures = 0;

  cr_split #(.RADIX(10)) dut10 (.y(y), .r(r10), .c(c10));
  cr_split #(.RADIX(16)) dut16 (.y(y), .r(r16), .c(c16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      y = col_t'(v);
      #1;
      checks += 2;
      if (int'(r10) != v % 10 || int'(c10) != v / 10) begin
        failures++;
        $display("FAIL radix 10 y=%0d -> R %0d C %0d", v, r10, c10);
      end
      if (int'(r16) != v % 16 || int'(c16) != v / 16) begin
        failures++;
        $display("FAIL radix 16 y=%0d -> R %0d C %0d", v, r16, c16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
