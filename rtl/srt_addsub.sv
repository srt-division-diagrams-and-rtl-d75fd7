// Divisor-multiple selection and carry-save adder/subtractor of one column.
//
// Computes Z = Y - q*D in carry-save form, where Y = top + fs + fc is the
// column's input remainder (3 irredundant integer bits `top`, and FRAC
// fraction bits held as a sum vector fs and a carry vector fc) and D is the
// normalised divisor 1.f in [1, 2). The multiple is chosen by the digit:
//   q = +1 : add ~D and inject +1 ulp as the carry-in of the carry vector
//   q =  0 : add 0
//   q = -1 : add D
// One row of full adders (3:2 counters) over FRAC+3 bits reduces the three
// operands to a sum and a carry vector; no carry propagates, so the delay is
// one full adder whatever the word width. Both vectors are modulo 2^3 in
// their integer part, which is enough because |Z| < 2. The carry-save adder
// and the digit-driven multiple follow the original circuit; negating by
// inversion plus carry-in and the 47-bit fraction are this design's choices.
//
// Combinational. Outputs are unshifted; the column doubles them.
module srt_addsub
  import srt_pkg::*;
#(
  parameter int FRAC = 47   // fraction bits of divisor and remainder
) (
  input  logic [INT_BITS-1:0]      top,
  input  logic [FRAC-1:0]          fs,
  input  logic [FRAC-1:0]          fc,
  input  logic [FRAC:0]            divisor,
  input  digit_t                   q,
  output logic [FRAC+INT_BITS-1:0] sum,
  output logic [FRAC+INT_BITS-1:0] carry
);

  localparam int W = FRAC + INT_BITS;

  logic [W-1:0] a, b, m;
  logic         cin;

  always_comb begin
    a = {top, fs};
    b = {{INT_BITS{1'b0}}, fc};
    unique case (1'b1)
      q.pos:   begin m = ~{{(INT_BITS-1){1'b0}}, divisor}; cin = 1'b1; end
      q.neg:   begin m =  {{(INT_BITS-1){1'b0}}, divisor}; cin = 1'b0; end
      default: begin m = '0;                               cin = 1'b0; end
    endcase
    sum   = a ^ b ^ m;
    carry = {(a[W-2:0] & b[W-2:0]) | (a[W-2:0] & m[W-2:0]) | (b[W-2:0] & m[W-2:0]), cin};
  end

endmodule
