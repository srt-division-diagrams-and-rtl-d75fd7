// Quotient shift register of one column, with completion detection.
//
// Each time its column evaluates (`shift` high) the selected digit is shifted
// in at the least significant end of two registers, one per digit rail
// (positive and negative digits). After a division the column's first digit
// is at the most significant end. A marker bit, set at the bottom by `clear`,
// moves up one place per shift; when it reaches position NDIG_COL the
// register holds all its digits and `full` rises. The AND of the `full`
// signals of all columns is the completion signal that stops the array.
// Completion coming from the quotient registers follows the original
// circuit; the marker bit is this design's way of producing it.
//
// `clear` starts a division (synchronous, one cycle). Shifts while `full` is
// high are a protocol error, checked by an assertion.
module srt_quot_shift_reg
  import srt_pkg::*;
#(
  parameter int NDIG_COL = 16   // digits collected by this column per division
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                shift,
  input  digit_t              d,
  output logic [NDIG_COL-1:0] pos,
  output logic [NDIG_COL-1:0] neg,
  output logic                full
);

  logic [NDIG_COL:0] marker;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos    <= '0;
      neg    <= '0;
      marker <= (NDIG_COL+1)'(1);
    end else if (clear) begin
      pos    <= '0;
      neg    <= '0;
      marker <= (NDIG_COL+1)'(1);
    end else if (shift) begin
      pos    <= {pos[NDIG_COL-2:0], d.pos};
      neg    <= {neg[NDIG_COL-2:0], d.neg};
      marker <= {marker[NDIG_COL-1:0], 1'b0};
    end
  end

  assign full = marker[NDIG_COL];

  a_no_shift_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(shift && full))
    else $error("quotient shift register shifted after completion");

endmodule
