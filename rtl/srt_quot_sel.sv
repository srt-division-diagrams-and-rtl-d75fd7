// Radix-2 SRT quotient digit selection, digit set {-1, 0, +1}.
//
// The selection looks only at the three carry-propagated integer bits of the
// shifted partial remainder 2R_i (two's complement, weights -4, 2, 1). The
// divisor is not examined at all. Because the fraction bits below are still
// in carry-save form, the true value lies in [top, top + 2), and the table is
//   top in { 0 .. 3}  -> +1   (2R_i >= 0)
//   top = -1          ->  0   (-1 <= 2R_i < 1)
//   top in {-4 .. -2} -> -1   (2R_i < 0)
// which is the radix-2 coloring with a brush two units wide on a grid one
// unit wide. force_neg overrides the table with -1: it is raised when the
// top-bit adder found 2R_i below -4 (its three bits then wrap to a positive
// code) and, as a precaution, in the stage after that one.
//
// Purely combinational; the digit also selects the divisor multiple of the
// column it sits in and is shifted into that column's quotient register.
module srt_quot_sel
  import srt_pkg::*;
(
  input  logic [INT_BITS-1:0] top,
  input  logic                force_neg,
  output digit_t              q
);

  always_comb begin
    if (force_neg)                 q = DIG_NEG;
    else if (!top[INT_BITS-1])     q = DIG_POS;
    else if (top == '1)            q = DIG_ZERO;
    else                           q = DIG_NEG;
  end

endmodule
