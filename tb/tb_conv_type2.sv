// tb_conv_type2: streams a new operand pair into the Type II convolver on every clock
// cycle, with random gaps in in_valid, and checks that each result appears exactly one
// cycle later with out_valid, against convolution sums and decimal digits computed in
// integers. Also checks that reset clears the outputs to zero.
module tb_conv_type2;
  import vedic_pkg::*;
  logic   clk = 0, rst_n = 0, in_valid = 0;
  digit_t a  [NTAP];
  digit_t b  [NTAP];
  logic   out_valid;
  col_t   y  [NCOL];
  digit_t rd [NDIG];
  logic   ovf;
  int checks = 0, failures = 0;
  int cycle = 0;

  conv_type2 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                  .out_valid(out_valid), .y(y), .rd(rd), .ovf(ovf));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results of the pair sampled at the last edge
  int     ey [NCOL];
  longint ev;
  logic   evalid;

  function automatic void model(output int oy [NCOL], output longint ov);
    longint w;
    for (int k = 0; k < NCOL; k++) oy[k] = 0;
    for (int i = 0; i < NTAP; i++)
      for (int j = 0; j < NTAP; j++)
        oy[i+j] += int'(a[j]) * int'(b[i]);
    ov = 0;
    w  = 1;
    for (int k = 0; k < NCOL; k++) begin
      ov += longint'(oy[k]) * w;
      w  *= 10;
    end
  endfunction

  task automatic compare();
    longint v;
    v = ev;
    checks++;
    if (out_valid !== evalid) begin
      failures++;
      $display("FAIL cycle %0d out_valid = %0b, expected %0b", cycle, out_valid, evalid);
    end
    for (int k = 0; k < NCOL; k++) begin
      checks++;
      if (int'(y[k]) != ey[k]) begin
        failures++;
        $display("FAIL cycle %0d y%0d = %0d, expected %0d", cycle, k + 1, y[k], ey[k]);
      end
    end
    for (int n = 0; n < NDIG; n++) begin
      checks++;
      if (longint'(rd[n]) != v % 10) begin
        failures++;
        $display("FAIL cycle %0d RD%0d = %0d, expected %0d", cycle, n, rd[n], v % 10);
      end
      v /= 10;
    end
  endtask

  initial begin
    for (int n = 0; n < NTAP; n++) begin
      a[n] = 4'd9;
      b[n] = 4'd9;
    end
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < NCOL; k++) ey[k] = 0;
    ev = 0;
    evalid = 0;
    compare();                       // reset state: all zero
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // new inputs, away from the clock edge
      for (int n = 0; n < NTAP; n++) begin
        a[n] = digit_t'($urandom_range(15));
        b[n] = digit_t'($urandom_range(15));
      end
      in_valid = ($urandom_range(3) != 0);
      @(posedge clk);
      // registered at this edge: work out what must show after it
      model(ey, ev);
      evalid = in_valid;
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
