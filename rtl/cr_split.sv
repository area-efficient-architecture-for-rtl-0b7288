// cr_split: the "C|R" box of the architecture. Splits one column sum y into its result
// digit R = y mod RADIX and its carry C = y div RADIX, the carry being the part that moves
// one digit position to the left, as in the worked example 3*6 + 4*1 = 22 -> R 2, C 2.
// The carry is not limited to one digit: a column of three products may reach 675, C 67.
// RADIX = 10 follows the decimal worked example; any radix from 2 to 16 may be set.
// Interface: y (COL_W bits) in; r (one digit), c (COL_W bits) out. Combinational.
module cr_split
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  col_t   y,
  output digit_t r,
  output col_t   c
);

  initial assert (RADIX >= 2 && RADIX <= 16) else $error("cr_split: RADIX must be 2..16");

  always_comb begin
    col_t rem;
    rem = y % col_t'(RADIX);
    r   = digit_t'(rem);
    c   = y / col_t'(RADIX);
  end

endmodule
