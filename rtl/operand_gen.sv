// operand_gen: the two operand generators (GEN1 for the b digits, GEN2 for the a digits)
// that drive the multiplexers of the single-multiplier architecture (Type III).
//
// After start it counts nine steps. In step s it selects the digit pair that belongs in
// chain position 8-s of the product chain, so that after nine shifts each product sits in
// front of its column adder. The nine pairs, listed from the C1 end of the chain to the
// C5 end, are
//   b1a1, b2a1, b1a2, b1a3, b2a2, b3a1, b2a3, b3a2, b3a3
// and are issued from the last of the list to the first (b3a3 first, b1a1 last).
// Interface: start (one-cycle pulse, ignored while busy); busy is high for exactly the nine
// cycles in which a pair is selected; bsel/asel are 0-based digit indices (0 = b1 / a1);
// last marks the ninth step. rst_n is active low and synchronous.
// The list of pairs is the source's; the issue order, counter and handshake are this design's.
module operand_gen
  import vedic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic [1:0] bsel,
  output logic [1:0] asel,
  output logic       last
);

  logic [3:0] step;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        step <= '0;
      end
    end else if (last) begin
      busy <= 1'b0;
      step <= '0;
    end else begin
      step <= step + 4'd1;
    end
  end

  always_comb begin
    pair_t sel;
    sel  = CHAIN_PAIRS[NPROD - 1 - 32'(step)];
    bsel = sel.b;
    asel = sel.a;
    last = busy && (step == 4'(NPROD - 1));
  end

endmodule
