// conv_type1: fully parallel linear convolution of two 3-digit sequences (Type I).
//
// Nine 4-bit Vedic multipliers form every product b_i * a_j at once, four adders gather them
// into the five convolution columns y1..y5, five C|R boxes split each column into a result
// digit and a carry, and the final adder adds the R row to the C row shifted one digit left.
// The result is both the convolution (y) and the place-value number sum_k y_k * RADIX^(k-1)
// as seven digits rd[0..6] = RD0..RD6; with RADIX = 10 and decimal digits this is the
// product of the two 3-digit numbers, e.g. 234 x 316 = 73944.
// Interface: a[0..2] = a1..a3 and b[0..2] = b1..b3 (a1, b1 the lowest-weight digits).
// Timing: purely combinational, no clock.
// The structure (9 multipliers, the adder grouping, C|R and final adder) is the source's;
// the digit ordering of the ports and the ovf flag are this design's.
module conv_type1
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  digit_t a  [NTAP],
  input  digit_t b  [NTAP],
  output col_t   y  [NCOL],
  output digit_t rd [NDIG],
  output logic   ovf
);

  prod_t  p  [NPROD];
  digit_t r  [NCOL];
  col_t   c  [NCOL];

  for (genvar i = 0; i < NTAP; i++) begin : g_b
    for (genvar j = 0; j < NTAP; j++) begin : g_a
      vedic_mult4 #(.W(DIGIT_W)) u_mul (.a(a[j]), .b(b[i]), .p(p[pidx(i, j)]));
    end
  end

  column_sum u_cols (.p(p), .y(y));

  for (genvar k = 0; k < NCOL; k++) begin : g_cr
    cr_split #(.RADIX(RADIX)) u_cr (.y(y[k]), .r(r[k]), .c(c[k]));
  end

  cr_adder #(.RADIX(RADIX)) u_fin (.r(r), .c(c), .rd(rd), .ovf(ovf));

endmodule
