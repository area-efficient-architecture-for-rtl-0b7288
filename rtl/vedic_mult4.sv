// vedic_mult4: 4 x 4-bit unsigned multiplier built with the Urdhva-Tiryagbhyam
// ("vertically and crosswise") method applied to binary digits.
//
// Column k of the product (k = 0..2W-2) collects the bit products a[i] & b[k-i], as in the
// decimal worked example where column 1 is C*F, column 2 is B*F + C*E, and so on. The column
// total plus the carry coming from column k-1 gives product bit k; the rest of the total is
// the carry into column k+1. The last carry forms the top product bit(s).
// Interface: a, b (W bits each), p (2W bits). Purely combinational.
// The source uses 4-bit "Vedic" multipliers and explains the method on decimal digits; doing
// it on bits with a rippling column carry is this design's reading of it.
module vedic_mult4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // a column can hold up to W bit products plus the incoming carry
  localparam int unsigned CW = $clog2(2 * W + 1) + 1;

  always_comb begin
    logic [CW-1:0] carry;
    logic [CW-1:0] col;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * W - 1; k++) begin
      col = carry;
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W)
          col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*W-1] = carry[0];
  end

endmodule
