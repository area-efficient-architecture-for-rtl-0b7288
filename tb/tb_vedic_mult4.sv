// tb_vedic_mult4: exhaustive check of the 4 x 4-bit Urdhva multiplier against the
// integer product, all 256 operand pairs.
module tb_vedic_mult4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mult4 #(.W(4)) dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
