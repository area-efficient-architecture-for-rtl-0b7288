// column_sum: the adder network that turns the nine digit products into the five
// convolution outputs y1..y5 (the "crosswise" columns).
//
// Column k (k = 1..5) adds every product b_i * a_j with i + j = k + 1:
//   y1 = b1a1
//   y2 = b1a2 + b2a1                 (one adder, 8-bit operands)
//   y3 = (b3a1 + b2a2) + b1a3        (two adders, 8-bit then 9-bit)
//   y4 = b3a2 + b2a3                 (one adder, 8-bit operands)
//   y5 = b3a3
// which are the four adders and the grouping drawn in the source architecture.
// Interface: p[pidx(i,j)] holds b_(i+1) * a_(j+1); y[k-1] holds column k. Combinational.
module column_sum
  import vedic_pkg::*;
(
  input  prod_t p [NPROD],
  output col_t  y [NCOL]
);

  always_comb begin
    for (int k = 0; k < NCOL; k++) begin
      y[k] = '0;
      // b index from high to low, so that column 3 adds b3a1 + b2a2 first and then b1a3
      for (int i = NTAP - 1; i >= 0; i--) begin
        if (k - i >= 0 && k - i < NTAP)
          y[k] = y[k] + col_t'(p[pidx(i, k - i)]);
      end
    end
  end

endmodule
