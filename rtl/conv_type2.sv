// conv_type2: Type I with a pipeline stage after the multipliers (Type II).
//
// The nine products are held in nine registers ("L" in the architecture) before the column
// adders, cutting the multiplier-to-adder path in two. Everything after the registers is the
// same combinational adder, C|R and final-adder network as in Type I.
// Interface: in_valid qualifies a, b; out_valid marks the cycle whose y/rd belong to them.
// Timing: a and b sampled at a rising clk edge appear on y/rd/ovf right after that edge
// (latency one cycle, one new pair accepted every cycle). rst_n (active low, synchronous)
// clears the product registers and out_valid, so the outputs start at a defined zero.
// The source calls these stages latches; here they are edge-triggered registers, and the
// valid signals and the reset are this design's.
module conv_type2
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  digit_t a  [NTAP],
  input  digit_t b  [NTAP],
  output logic   out_valid,
  output col_t   y  [NCOL],
  output digit_t rd [NDIG],
  output logic   ovf
);

  prod_t  p   [NPROD];
  prod_t  p_q [NPROD];
  digit_t r   [NCOL];
  col_t   c   [NCOL];

  for (genvar i = 0; i < NTAP; i++) begin : g_b
    for (genvar j = 0; j < NTAP; j++) begin : g_a
      vedic_mult4 #(.W(DIGIT_W)) u_mul (.a(a[j]), .b(b[i]), .p(p[pidx(i, j)]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NPROD; n++) p_q[n] <= '0;
      out_valid <= 1'b0;
    end else begin
      for (int n = 0; n < NPROD; n++) p_q[n] <= p[n];
      out_valid <= in_valid;
    end
  end

  column_sum u_cols (.p(p_q), .y(y));

  for (genvar k = 0; k < NCOL; k++) begin : g_cr
    cr_split #(.RADIX(RADIX)) u_cr (.y(y[k]), .r(r[k]), .c(c[k]));
  end

  cr_adder #(.RADIX(RADIX)) u_fin (.r(r), .c(c), .rd(rd), .ovf(ovf));

endmodule
