// vedic_conv_top: the three convolution architectures side by side on one pair of inputs.
//
// All three compute the same thing: the linear convolution y1..y5 of the 3-digit sequences
// a and b, and the place-value number sum_k y_k * RADIX^(k-1) as seven digits RD0..RD6.
//   Type I   (t1_*)  nine multipliers, combinational
//   Type II  (t2_*)  nine multipliers, one register stage after them, latency 1 cycle
//   Type III (t3_*)  one multiplier, operand generators and a nine-register chain,
//                    nine cycles per result
// The three share a, b, clk and rst_n; each brings out its own results and handshake.
// See the module headers of conv_type1/2/3 for the timing of each.
module vedic_conv_top
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  digit_t a     [NTAP],
  input  digit_t b     [NTAP],
  // Type I
  output col_t   t1_y  [NCOL],
  output digit_t t1_rd [NDIG],
  output logic   t1_ovf,
  // Type II
  input  logic   t2_in_valid,
  output logic   t2_out_valid,
  output col_t   t2_y  [NCOL],
  output digit_t t2_rd [NDIG],
  output logic   t2_ovf,
  // Type III
  input  logic   t3_start,
  output logic   t3_busy,
  output logic   t3_valid,
  output col_t   t3_y  [NCOL],
  output digit_t t3_rd [NDIG],
  output logic   t3_ovf
);

  conv_type1 #(.RADIX(RADIX)) u_type1 (
    .a(a), .b(b), .y(t1_y), .rd(t1_rd), .ovf(t1_ovf)
  );

  conv_type2 #(.RADIX(RADIX)) u_type2 (
    .clk(clk), .rst_n(rst_n), .in_valid(t2_in_valid), .a(a), .b(b),
    .out_valid(t2_out_valid), .y(t2_y), .rd(t2_rd), .ovf(t2_ovf)
  );

  conv_type3 #(.RADIX(RADIX)) u_type3 (
    .clk(clk), .rst_n(rst_n), .start(t3_start), .a(a), .b(b),
    .busy(t3_busy), .valid(t3_valid), .y(t3_y), .rd(t3_rd), .ovf(t3_ovf)
  );

endmodule
