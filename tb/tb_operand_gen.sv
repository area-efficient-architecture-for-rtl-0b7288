// tb_operand_gen: starts the generators several times and checks that busy lasts exactly
// nine cycles, that last marks the ninth, that start while busy is ignored, and that the
// pairs come out in the order b3a3, b3a2, b2a3, b3a1, b2a2, b1a3, b1a2, b2a1, b1a1.
module tb_operand_gen;
  logic       clk = 0, rst_n = 0, start = 0;
  logic       busy, last;
  logic [1:0] bsel, asel;
  int checks = 0, failures = 0;

  operand_gen dut (.clk(clk), .rst_n(rst_n), .start(start),
                   .busy(busy), .bsel(bsel), .asel(asel), .last(last));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected (b, a) per step, 1-based digit numbers
  int exp_b [9] = '{3, 3, 2, 3, 2, 1, 1, 2, 1};
  int exp_a [9] = '{3, 2, 3, 1, 2, 3, 2, 1, 1};

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %0b, expected %0b", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    expect_bit("busy after reset", busy, 1'b0);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      repeat ($urandom_range(3)) @(posedge clk);
      #1 start = 1;
      @(posedge clk);
      #1 start = 0;
      for (int s = 0; s < 9; s++) begin
        expect_bit("busy", busy, 1'b1);
        expect_bit("last", last, s == 8);
        checks++;
        if (int'(bsel) + 1 != exp_b[s] || int'(asel) + 1 != exp_a[s]) begin
          failures++;
          $display("FAIL step %0d selects b%0d a%0d, expected b%0d a%0d",
                   s, bsel + 1, asel + 1, exp_b[s], exp_a[s]);
        end
        // a start in the middle of a run must not restart it
        start = (run % 4 == 1 && s == 4);
        @(posedge clk);
        #1 start = 0;
      end
      expect_bit("busy after nine steps", busy, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
