// Quotient assembly and signed-digit to two's complement conversion.
//
// Digit q_i (i = 0 first, weight 2^-i) was produced by column i mod NCOL and
// is found in that column's shift register at position NDIG_COL-1-(i div NCOL).
// The digits are interleaved back into order as two rails, qpos (the +1
// digits) and qneg (the -1 digits), bit NDIG-1-i holding digit i. The
// quotient is then qpos - qneg: the one full carry-propagate operation of the
// division, done once rather than per digit. `quotient` is a two's
// complement number with two integer bits and NDIG-1 fraction bits.
// Converting inside the divider is this design's choice; the conversion
// could equally be left to the floating-point adder next to it.
// Combinational.
module srt_quot_convert #(
  parameter int NDIG = 48,
  parameter int NCOL = 3,
  localparam int NDIG_COL = NDIG / NCOL
) (
  input  logic [NDIG_COL-1:0] col_pos [NCOL],
  input  logic [NDIG_COL-1:0] col_neg [NCOL],
  output logic [NDIG-1:0]     qpos,
  output logic [NDIG-1:0]     qneg,
  output logic [NDIG:0]       quotient
);

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      qpos[NDIG-1-i] = col_pos[i % NCOL][NDIG_COL-1-(i / NCOL)];
      qneg[NDIG-1-i] = col_neg[i % NCOL][NDIG_COL-1-(i / NCOL)];
    end
    quotient = {1'b0, qpos} - {1'b0, qneg};
  end

endmodule
