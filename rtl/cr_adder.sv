// cr_adder: the final adder of the architecture. It adds the row of result digits
// R5 R4 R3 R2 R1 to the row of carries C5 C4 C3 C2 C1 written one place to the left
// (the "X" fills the lowest carry position) and returns NDIG = 7 digits RD0..RD6 in RADIX.
//
// Digit position 0 takes R1, position k (1..4) takes R(k+1) + Ck, position 5 takes C5 and
// position 6 only the running carry. It is a ripple adder on digits whose carry, like the
// column carries, may be larger than one: at each position t = R + C + carry_in,
// RD = t mod RADIX and carry_out = t div RADIX.
// ovf is set when the result does not fit in NDIG digits (it cannot happen for RADIX = 10
// with 4-bit input digits: the largest result, 2 772 225, has seven digits).
// Interface: r[k-1] = Rk, c[k-1] = Ck, rd[n] = RDn. Combinational.
module cr_adder
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  digit_t r  [NCOL],
  input  col_t   c  [NCOL],
  output digit_t rd [NDIG],
  output logic   ovf
);

  always_comb begin
    col_t t;
    col_t carry;
    carry = '0;
    for (int n = 0; n < NDIG; n++) begin
      t = carry;
      if (n < NCOL) t = t + col_t'(r[n]);
      if (n >= 1 && n <= NCOL) t = t + c[n-1];
      rd[n] = digit_t'(t % col_t'(RADIX));
      carry = t / col_t'(RADIX);
    end
    ovf = (carry != '0);
  end

endmodule
