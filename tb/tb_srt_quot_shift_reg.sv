// Test of a column's quotient shift register (16 digits). Random digits are
// shifted in with random gaps; after each shift the two rails must match a
// reference queue, `full` must rise exactly with the 16th digit, and `clear`
// must empty the register and restart the count.
module tb_srt_quot_shift_reg;
  import srt_pkg::*;

  localparam int N = 16;

  logic         clk = 1'b0, rst_n = 1'b0, clear = 1'b0, shift = 1'b0;
  digit_t       d = DIG_ZERO;
  logic [N-1:0] pos, neg;
  logic         full;
  int checks = 0, failures = 0;

  srt_quot_shift_reg #(.NDIG_COL(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] ep, en;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rnd = 0; rnd < 20; rnd++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      ep = '0; en = '0;
      chk(pos == '0 && neg == '0 && !full, "clear");
      for (int i = 0; i < N; i++) begin
        automatic int v = $urandom_range(0, 2);
        repeat ($urandom_range(0, 2)) @(negedge clk);   // idle cycles
        d = (v == 0) ? DIG_NEG : (v == 1) ? DIG_ZERO : DIG_POS;
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        ep = {ep[N-2:0], d.pos};
        en = {en[N-2:0], d.neg};
        chk(pos == ep && neg == en, $sformatf("contents after digit %0d", i));
        chk(full == (i == N - 1), $sformatf("full after digit %0d", i));
      end
      repeat (2) @(negedge clk);
      chk(full && pos == ep && neg == en, "holds when full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
