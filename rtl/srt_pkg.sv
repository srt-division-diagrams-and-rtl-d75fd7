// Shared types and constants of the radix-2 SRT divider.
//
// A quotient digit q in {-1, 0, +1} travels as a two-rail pair {neg, pos}:
// {0,1} = +1, {0,0} = 0, {1,0} = -1; {1,1} never occurs. Keeping the two
// rails apart lets the positive and negative digit weights be collected in
// separate shift registers and subtracted once at the end of the division.
//
// The shifted partial remainder 2R_i is kept with INT_BITS = 3 bits to the
// left of the binary point (sign included): its magnitude stays below 4, so
// three integer bits are enough. This count follows from the radix-2 digit
// set; it is not a free parameter.
package srt_pkg;

  localparam int INT_BITS = 3;

  typedef struct packed {
    logic neg;
    logic pos;
  } digit_t;

  localparam digit_t DIG_POS  = '{neg: 1'b0, pos: 1'b1};
  localparam digit_t DIG_ZERO = '{neg: 1'b0, pos: 1'b0};
  localparam digit_t DIG_NEG  = '{neg: 1'b1, pos: 1'b0};

  // Integer value of a digit, for checks and testbenches.
  function automatic int digit_value(digit_t d);
    return int'(d.pos) - int'(d.neg);
  endfunction

endpackage
