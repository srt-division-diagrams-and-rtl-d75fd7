// Radix-2 SRT mantissa divider built as a small ring of division columns.
//
// Divides two normalised mantissas (1.f in [1, 2)) and returns a quotient of
// NDIG signed binary digits q_i in {-1, 0, +1}, one per column evaluation.
// Instead of one stage reused every clock, or a full array of NDIG stages,
// NCOL columns are connected in a ring: the input mux feeds the dividend to
// the first column at the start and afterwards the remainder coming back from
// the last column. Each column selects a digit from three carry-propagated
// top bits of the remainder, subtracts the selected divisor multiple with a
// carry-save adder (so no carry runs along the word), and hands the new
// remainder to the next column. Each column's digits go into its own
// quotient shift register; when all are full the completion signal stops the
// ring and `done` rises. The digits are interleaved and converted to two's
// complement (qpos - qneg).
//
// The original circuit is self-timed, with precharged columns that evaluate
// as the wavefront passes. Here a clock paces it: one column evaluates per
// cycle, under srt_self_timing_ctrl, which applies the same precharge and
// evaluate ordering.
//
// Interface and timing: pulse `start` for one cycle with `dividend` and
// `divisor` valid (both must have their top bit set); they are captured
// then. `busy` is high during the NDIG evaluation cycles; `done` rises
// NDIG+1 cycles after the start cycle and stays high with `quotient`, `qpos`
// and `qneg` valid until the next start. quotient = sum q_i 2^-i (i = 0 ..
// NDIG-1), as a two's complement number with NDIG-1 fraction bits, and
// |dividend/divisor - quotient| <= 2^-(NDIG-1). Starts while busy are ignored.
module srt_divider
  import srt_pkg::*;
#(
  parameter int OPW  = 48,   // operand (mantissa) width, hidden bit included
  parameter int NDIG = 48,   // quotient digits per division
  parameter int NCOL = 3     // columns in the ring
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [OPW-1:0]  dividend,
  input  logic [OPW-1:0]  divisor,
  output logic            busy,
  output logic            done,
  output logic [NDIG-1:0] qpos,
  output logic [NDIG-1:0] qneg,
  output logic [NDIG:0]   quotient
);

  localparam int FRAC     = OPW - 1;
  localparam int NDIG_COL = NDIG / NCOL;

  logic [OPW-1:0] dividend_q, divisor_q;
  logic           clear, first;
  logic [NCOL-1:0] eval, prech, full;

  // column inputs and outputs
  logic [INT_BITS-1:0] c_in_top  [NCOL];
  logic [FRAC-1:0]     c_in_fs   [NCOL];
  logic [FRAC-1:0]     c_in_fc   [NCOL];
  logic                c_in_ovf  [NCOL];
  logic                c_in_ovp  [NCOL];
  logic [INT_BITS-1:0] c_out_top [NCOL];
  logic [FRAC-1:0]     c_out_fs  [NCOL];
  logic [FRAC-1:0]     c_out_fc  [NCOL];
  logic                c_out_ovf [NCOL];
  logic                c_out_ovp [NCOL];
  digit_t              c_q       [NCOL];
  logic [NDIG_COL-1:0] c_pos     [NCOL];
  logic [NDIG_COL-1:0] c_neg     [NCOL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend_q <= '0;
      divisor_q  <= '0;
    end else if (clear) begin
      dividend_q <= dividend;
      divisor_q  <= divisor;
    end
  end

  srt_self_timing_ctrl #(.NCOL(NCOL)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .complete (&full),
    .busy     (busy),
    .clear    (clear),
    .first    (first),
    .eval     (eval),
    .prech    (prech)
  );

  srt_init_mux #(.FRAC(FRAC)) u_mux (
    .first        (first),
    .dividend     (dividend_q),
    .fb_top       (c_out_top[NCOL-1]),
    .fb_fs        (c_out_fs[NCOL-1]),
    .fb_fc        (c_out_fc[NCOL-1]),
    .fb_ovf       (c_out_ovf[NCOL-1]),
    .fb_ovf_prev  (c_out_ovp[NCOL-1]),
    .out_top      (c_in_top[0]),
    .out_fs       (c_in_fs[0]),
    .out_fc       (c_in_fc[0]),
    .out_ovf      (c_in_ovf[0]),
    .out_ovf_prev (c_in_ovp[0])
  );

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    if (k > 0) begin : g_link
      assign c_in_top[k] = c_out_top[k-1];
      assign c_in_fs[k]  = c_out_fs[k-1];
      assign c_in_fc[k]  = c_out_fc[k-1];
      assign c_in_ovf[k] = c_out_ovf[k-1];
      assign c_in_ovp[k] = c_out_ovp[k-1];
    end

    srt_column #(.FRAC(FRAC)) u_column (
      .clk          (clk),
      .rst_n        (rst_n),
      .clear        (clear),
      .eval         (eval[k]),
      .prech        (prech[k]),
      .divisor      (divisor_q),
      .in_top       (c_in_top[k]),
      .in_fs        (c_in_fs[k]),
      .in_fc        (c_in_fc[k]),
      .in_ovf       (c_in_ovf[k]),
      .in_ovf_prev  (c_in_ovp[k]),
      .q            (c_q[k]),
      .out_top      (c_out_top[k]),
      .out_fs       (c_out_fs[k]),
      .out_fc       (c_out_fc[k]),
      .out_ovf      (c_out_ovf[k]),
      .out_ovf_prev (c_out_ovp[k])
    );

    srt_quot_shift_reg #(.NDIG_COL(NDIG_COL)) u_qreg (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .shift (eval[k]),
      .d     (c_q[k]),
      .pos   (c_pos[k]),
      .neg   (c_neg[k]),
      .full  (full[k])
    );
  end

  srt_quot_convert #(.NDIG(NDIG), .NCOL(NCOL)) u_conv (
    .col_pos  (c_pos),
    .col_neg  (c_neg),
    .qpos     (qpos),
    .qneg     (qneg),
    .quotient (quotient)
  );

  assign done = &full;

  initial assert (NDIG % NCOL == 0) else $fatal(1, "NDIG must be a multiple of NCOL");

  a_normalised: assert property (@(posedge clk) disable iff (!rst_n)
                                 (start && !busy) |-> (dividend[OPW-1] && divisor[OPW-1]))
    else $error("operands must be normalised to [1, 2)");

endmodule
