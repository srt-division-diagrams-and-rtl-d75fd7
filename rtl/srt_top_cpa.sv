// Short carry-propagate adder for the top bits of the doubled remainder.
//
// Inputs are the four most significant bits of the doubled carry-save sum and
// carry vectors (weights -8, 4, 2, 1 of 2R). The adder resolves them with a
// propagate/generate/kill carry chain; there is no carry-in from the bits
// below, whose unresolved value stays in [0, 2). The three low result bits are
// the irredundant integer part of 2R passed on to the next stage and to its
// quotient selection. The fourth bit is not shipped: it only detects the one
// out-of-range case, a resolved integer part of -5 (2R below -4 by less than
// the unpropagated carry), whose three bits wrap to +3. `below_m4` then forces
// the quotient selection to -1. Modulo 16 this resolved value is always exact,
// even when the input integer bits had wrapped. The three-bit resolution and
// the forced digit follow the original circuit; detecting the case with this
// extra, unshipped bit is this design's own choice, as is the single-rail
// carry chain (the original used a dual-rail precharged Manchester chain).
//
// Combinational.
module srt_top_cpa
  import srt_pkg::*;
(
  input  logic [INT_BITS:0]   s,
  input  logic [INT_BITS:0]   c,
  output logic [INT_BITS-1:0] top,
  output logic                below_m4
);

  logic [INT_BITS:0]   p, g, k, r;
  logic [INT_BITS+1:0] cy;

  always_comb begin
    p  = s ^ c;
    g  = s & c;
    k  = ~s & ~c;
    cy = '0;
    for (int i = 0; i <= INT_BITS; i++) begin
      // a carry leaves bit i if it is generated there, or propagated and not killed
      cy[i+1] = g[i] | (cy[i] & ~k[i]);
      r[i]    = p[i] ^ cy[i];
    end
    top      = r[INT_BITS-1:0];
    below_m4 = r[INT_BITS] & ~r[INT_BITS-1];
  end

endmodule
