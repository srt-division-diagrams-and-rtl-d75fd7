// Evaluate/precharge sequencing of the ring of columns.
//
// The original array is self-timed: each column is precharged logic whose
// evaluate and precharge phases are started by the columns around it, so an
// evaluation wavefront runs around the ring like a ring oscillator until the
// completion signal stops it. This module keeps the same rules in a clocked
// form, one column step per clock:
//   * column k evaluates when its input is valid (column k-1 holds a result,
//     or, for column 0 at the start, the dividend is selected) and column k
//     itself is precharged;
//   * column k is precharged once column k+1 holds a result, i.e. once its
//     own result has been consumed.
// valid[k] records whether column k holds a result. With NCOL >= 3 there is
// always one column evaluating, one holding the result being read, and one
// precharging; with two columns a result would be destroyed before it is
// read, so NCOL >= 3 is required.
//
// Interface: `start` (accepted when not busy) clears the columns and the
// quotient registers for one cycle (`clear`) and selects the dividend for the
// first evaluation (`first`). `complete`, from the quotient registers, stops
// evaluation; `busy` is high from the cycle after `start` until then.
module srt_self_timing_ctrl #(
  parameter int NCOL = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            complete,
  output logic            busy,
  output logic            clear,
  output logic            first,
  output logic [NCOL-1:0] eval,
  output logic [NCOL-1:0] prech
);

  logic [NCOL-1:0] valid;
  logic            running;

  assign busy  = running;
  assign clear = start && !running;

  always_comb begin
    // column k reads column k-1 (column 0 reads the last one, or the dividend)
    for (int k = 0; k < NCOL; k++) begin
      eval[k]  = running && !complete && !valid[k] &&
                 ((k == 0) ? (first || valid[NCOL-1]) : valid[(k+NCOL-1) % NCOL]);
      prech[k] = running && valid[k] && valid[(k+1) % NCOL];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      first   <= 1'b0;
      valid   <= '0;
    end else if (clear) begin
      running <= 1'b1;
      first   <= 1'b1;
      valid   <= '0;
    end else if (running) begin
      if (complete) running <= 1'b0;
      if (eval[0])  first   <= 1'b0;
      valid <= (valid | eval) & ~prech;
    end
  end

  initial assert (NCOL >= 3) else $fatal(1, "the ring needs at least three columns");

  a_one_eval: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(eval))
    else $error("more than one column evaluating");

endmodule
