// One column (stage) of the cyclic SRT division array.
//
// A column takes the partial remainder 2R_i produced by the previous column,
// selects the quotient digit q_i from its top bits (srt_quot_sel), forms
// 2R_i - q_i*D with a carry-save adder (srt_addsub), doubles the result and
// resolves its top bits with the short carry-propagate adder (srt_top_cpa).
// The resolved bits, not the carry-save ones, are passed on as the integer
// part of the next remainder; the fraction stays in carry-save form.
//
// Remainder format on both sides: `top` (3 irredundant integer bits, two's
// complement), `fs`/`fc` (FRAC fraction bits, sum and carry vectors),
// `ovf` (this remainder was found below -4) and `ovf_prev` (the remainder
// before it was). Either flag forces the digit to -1.
//
// The output is held in a register that stands for the precharged output
// nodes of the original circuit: `prech` (or `clear`) returns it to the
// precharged, all-zero state; `eval` loads the new remainder. The self-timing
// controller never asserts both. The digit output `q` is combinational from
// the input remainder and is valid in the cycle `eval` is high.
module srt_column
  import srt_pkg::*;
#(
  parameter int FRAC = 47
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                eval,
  input  logic                prech,
  input  logic [FRAC:0]       divisor,
  input  logic [INT_BITS-1:0] in_top,
  input  logic [FRAC-1:0]     in_fs,
  input  logic [FRAC-1:0]     in_fc,
  input  logic                in_ovf,
  input  logic                in_ovf_prev,
  output digit_t              q,
  output logic [INT_BITS-1:0] out_top,
  output logic [FRAC-1:0]     out_fs,
  output logic [FRAC-1:0]     out_fc,
  output logic                out_ovf,
  output logic                out_ovf_prev
);

  localparam int W = FRAC + INT_BITS;

  logic [W-1:0]          zs, zc;       // carry-save 2R_i - q*D
  logic [FRAC-1:0]       ys, yc;       // fraction of 2(2R_i - q*D)
  logic [INT_BITS-1:0]   nxt_top;
  logic                  nxt_ovf;

  srt_quot_sel u_sel (
    .top       (in_top),
    .force_neg (in_ovf | in_ovf_prev),
    .q         (q)
  );

  srt_addsub #(.FRAC(FRAC)) u_add (
    .top     (in_top),
    .fs      (in_fs),
    .fc      (in_fc),
    .divisor (divisor),
    .q       (q),
    .sum     (zs),
    .carry   (zc)
  );

  assign ys = {zs[FRAC-2:0], 1'b0};
  assign yc = {zc[FRAC-2:0], 1'b0};

  srt_top_cpa u_cpa (
    .s        (zs[W-1:FRAC-1]),
    .c        (zc[W-1:FRAC-1]),
    .top      (nxt_top),
    .below_m4 (nxt_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_top      <= '0;
      out_fs       <= '0;
      out_fc       <= '0;
      out_ovf      <= 1'b0;
      out_ovf_prev <= 1'b0;
    end else if (clear || prech) begin
      out_top      <= '0;
      out_fs       <= '0;
      out_fc       <= '0;
      out_ovf      <= 1'b0;
      out_ovf_prev <= 1'b0;
    end else if (eval) begin
      out_top      <= nxt_top;
      out_fs       <= ys;
      out_fc       <= yc;
      out_ovf      <= nxt_ovf;
      out_ovf_prev <= in_ovf;
    end
  end

  a_eval_xor_prech: assert property (@(posedge clk) disable iff (!rst_n) !(eval && prech))
    else $error("column evaluated and precharged in the same cycle");

endmodule
