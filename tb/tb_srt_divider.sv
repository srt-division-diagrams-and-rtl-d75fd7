// End-to-end test of srt_divider at its default size (48-bit mantissas,
// 48 quotient digits, three columns).
//
// Each division is checked against exact integer arithmetic done here:
// with X, D the operands and Q the quotient, all scaled by 2^(OPW-1), the
// SRT bound |X/D - Q| <= 2^-(NDIG-1) becomes |X * 2^(NDIG-1) - D * Q| <= D.
// The latency from the start cycle to `done` must be NDIG+1 cycles, and the
// digit rails must never both be set. Directed operands (extremes of the
// range, equal operands) are followed by random ones.
//
// The test also counts how often each mechanism of the design occurred and
// fails if one never did: digits -1, 0 and +1, column precharge, the
// remainder-below-minus-four override of the digit selection, a start
// ignored while busy, and completion stopping the ring.
module tb_srt_divider;
  import srt_pkg::*;

  localparam int OPW  = 48;
  localparam int NDIG = 48;
  localparam int NCOL = 3;
  localparam int NRAND = 3000;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            start = 1'b0;
  logic [OPW-1:0]  dividend = '0, divisor = '0;
  logic            busy, done;
  logic [NDIG-1:0] qpos, qneg;
  logic [NDIG:0]   quotient;

  int checks = 0, failures = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0, n_prech = 0, n_force = 0, n_ignored = 0, n_stop = 0;
  longint cycle = 0;

  srt_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters, sampled from the ring
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NCOL; k++) begin
      if (dut.eval[k]) begin
        case (digit_value(dut.c_q[k]))
          1:  n_pos++;
          0:  n_zero++;
          default: n_neg++;
        endcase
        if (dut.c_in_ovf[k]) n_force++;
      end
      if (dut.prech[k]) n_prech++;
    end
    if (dut.busy && dut.done) n_stop++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [OPW-1:0] x, input logic [OPW-1:0] d);
    longint t0;
    logic signed [159:0] lhs, rhs, diff;
    @(negedge clk);
    dividend = x; divisor = d; start = 1'b1;
    @(posedge clk); t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    // a second start while busy must be ignored
    if ($urandom_range(0, 7) == 0) begin
      dividend = ~x; divisor = {1'b1, ~d[OPW-2:0]}; start = 1'b1;
      @(negedge clk); start = 1'b0; n_ignored++;
    end
    while (!done && cycle - t0 < longint'(4 * NDIG)) @(negedge clk);
    check(cycle - t0 == longint'(NDIG + 1), $sformatf("latency %0d, expected %0d", cycle - t0, NDIG + 1));
    check((qpos & qneg) == '0, "digit with both rails set");
    lhs  = 160'(x) <<< (NDIG - 1);
    rhs  = 160'(d) * 160'($signed(quotient));
    diff = lhs - rhs;
    if (diff < 0) diff = -diff;
    check(diff <= 160'(d),
          $sformatf("%h / %h -> quotient %h out of bound", x, d, quotient));
  endtask

  initial begin
    logic [OPW-1:0] x, d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!done && !busy, "idle after reset");
    divide({1'b1, {(OPW-1){1'b0}}}, {1'b1, {(OPW-1){1'b0}}});
    divide({1'b1, {(OPW-1){1'b0}}}, '1);
    divide('1, {1'b1, {(OPW-1){1'b0}}});
    divide('1, '1);
    divide({2'b11, {(OPW-2){1'b0}}}, {2'b10, {(OPW-2){1'b1}}});
    for (int n = 0; n < NRAND; n++) begin
      x = {1'b1, (OPW-1)'({$urandom, $urandom})};
      d = {1'b1, (OPW-1)'({$urandom, $urandom})};
      divide(x, d);
    end
    $display("mechanisms: +1 %0d, 0 %0d, -1 %0d, precharge %0d, below -4 override %0d, ignored start %0d, completion stop %0d",
             n_pos, n_zero, n_neg, n_prech, n_force, n_ignored, n_stop);
    check(n_pos > 0,     "digit +1 never selected");
    check(n_zero > 0,    "digit 0 never selected");
    check(n_neg > 0,     "digit -1 never selected");
    check(n_prech > 0,   "no column was precharged");
    check(n_force > 0,   "below -4 override never happened");
    check(n_ignored > 0, "no start was issued while busy");
    check(n_stop > 0,    "completion never stopped the ring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
