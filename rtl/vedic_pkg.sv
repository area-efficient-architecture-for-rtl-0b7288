// vedic_pkg: sizes and types shared by the Vedic (Urdhva-Tiryagbhyam) convolution units.
//
// The convolution takes two sequences of NTAP = 3 digits, a = {a3,a2,a1} and b = {b3,b2,b1},
// each digit DIGIT_W = 4 bits wide, and forms the NCOL = 2*NTAP-1 = 5 "vertically and
// crosswise" column sums y1..y5 (y1 = a1*b1, y2 = a1*b2 + a2*b1, ... y5 = a3*b3).
// Each column sum is split into a result digit R and a carry C in the chosen radix, and the
// R row plus the C row shifted by one digit gives NDIG = 7 output digits RD0..RD6.
// Three digits, 4-bit digits, nine products, five columns and seven output digits are the
// numbers of the source architecture; the type names and widths of the sums are this design's.
package vedic_pkg;

  localparam int unsigned NTAP    = 3;              // digits per input sequence
  localparam int unsigned DIGIT_W = 4;              // bits per input digit
  localparam int unsigned NPROD   = NTAP * NTAP;    // partial products (9)
  localparam int unsigned NCOL    = 2 * NTAP - 1;   // convolution outputs (5)
  localparam int unsigned NDIG    = 7;              // output digits RD0..RD6
  localparam int unsigned PROD_W  = 2 * DIGIT_W;    // 8-bit product
  localparam int unsigned COL_W   = PROD_W + 2;     // up to three products per column: 10 bits
  localparam int unsigned RADIX_DEFAULT = 10;       // decimal place value, as in 234 x 316

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [PROD_W-1:0]  prod_t;
  typedef logic [COL_W-1:0]   col_t;

  // index of a digit pair (bi, aj) in the product vector: pair_idx = (i-1)*NTAP + (j-1),
  // 0-based here: pidx(i, j) with i = b index, j = a index, both 0..NTAP-1.
  function automatic int unsigned pidx(int unsigned i, int unsigned j);
    return i * NTAP + j;
  endfunction

  // A digit pair (b_i, a_j) as 0-based indices.
  typedef struct packed {
    logic [1:0] b;
    logic [1:0] a;
  } pair_t;

  // The nine pairs of the single-multiplier architecture in product-chain order, entry 0 at
  // the C1 end of the chain (the column-1 product) and entry 8 at the C5 end. Entries 1-2
  // feed the column-2 adder, 3-5 the column-3 adders and 6-7 the column-4 adder.
  localparam pair_t CHAIN_PAIRS [NPROD] = '{
    '{b: 2'd0, a: 2'd0},   // b1a1
    '{b: 2'd1, a: 2'd0},   // b2a1
    '{b: 2'd0, a: 2'd1},   // b1a2
    '{b: 2'd0, a: 2'd2},   // b1a3
    '{b: 2'd1, a: 2'd1},   // b2a2
    '{b: 2'd2, a: 2'd0},   // b3a1
    '{b: 2'd1, a: 2'd2},   // b2a3
    '{b: 2'd2, a: 2'd1},   // b3a2
    '{b: 2'd2, a: 2'd2}    // b3a3
  };

endpackage
