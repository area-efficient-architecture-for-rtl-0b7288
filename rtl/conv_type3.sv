// conv_type3: linear convolution of two 3-digit sequences with a single multiplier
// (Type III, the area-efficient architecture).
//
// Two multiplexers, steered by the operand generators (operand_gen), present one digit pair
// per clock cycle to one 4-bit Vedic multiplier. Its product enters a chain of nine
// registers at the C1 end and every register passes its value one place on towards the C5
// end. After nine products the chain holds, in place, the operands of the column adders of
// Type I, and the same column adders, C|R boxes and final adder give y1..y5 and RD0..RD6.
//
// Interface: start (one-cycle pulse) begins an operation; a and b are read through the
// multiplexers during the nine busy cycles and must stay stable while busy is high.
// valid rises nine clock cycles after the edge that samples start and stays high, with
// y/rd/ovf stable, until the next start. rst_n is active low and synchronous.
// Timing: one product per cycle, nine cycles per convolution.
// The single multiplier, the generators, the multiplexers, the nine-register chain and the
// adder network are the source's; the shift direction, the issue order, the handshake and
// the reset are this design's.
module conv_type3
  import vedic_pkg::*;
#(
  parameter int unsigned RADIX = RADIX_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  digit_t a  [NTAP],
  input  digit_t b  [NTAP],
  output logic   busy,
  output logic   valid,
  output col_t   y  [NCOL],
  output digit_t rd [NDIG],
  output logic   ovf
);

  logic [1:0] bsel, asel;
  logic       last;
  digit_t     mux_b, mux_a;
  prod_t      prod;
  prod_t      chain [NPROD];   // chain[0] at the C1 end, chain[8] at the C5 end
  prod_t      p     [NPROD];
  digit_t     r     [NCOL];
  col_t       c     [NCOL];

  operand_gen u_gen (
    .clk(clk), .rst_n(rst_n), .start(start),
    .busy(busy), .bsel(bsel), .asel(asel), .last(last)
  );

  assign mux_b = b[bsel];
  assign mux_a = a[asel];

  vedic_mult4 #(.W(DIGIT_W)) u_mul (.a(mux_a), .b(mux_b), .p(prod));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < NPROD; m++) chain[m] <= '0;
      valid <= 1'b0;
    end else begin
      if (busy) begin
        chain[0] <= prod;
        for (int m = 1; m < NPROD; m++) chain[m] <= chain[m-1];
      end
      if (last)
        valid <= 1'b1;
      else if (start && !busy)
        valid <= 1'b0;
    end
  end

  // each chain register is wired to the column adder input of its digit pair
  always_comb begin
    for (int m = 0; m < NPROD; m++)
      p[pidx(32'(CHAIN_PAIRS[m].b), 32'(CHAIN_PAIRS[m].a))] = chain[m];
  end

  column_sum u_cols (.p(p), .y(y));

  for (genvar k = 0; k < NCOL; k++) begin : g_cr
    cr_split #(.RADIX(RADIX)) u_cr (.y(y[k]), .r(r[k]), .c(c[k]));
  end

  cr_adder #(.RADIX(RADIX)) u_fin (.r(r), .c(c), .rd(rd), .ovf(ovf));

  // the operands are read through the multiplexers while busy and must not change then
  logic [2*NTAP*DIGIT_W-1:0] operands;
  assign operands = {a[2], a[1], a[0], b[2], b[1], b[0]};

  property p_operands_stable;
    @(posedge clk) disable iff (!rst_n) (busy && !last) |=> $stable(operands);
  endproperty
  a_operands_stable: assert property (p_operands_stable)
    else $error("conv_type3: a or b changed while busy");

endmodule
