// Test of one division column at its default width (FRAC = 47).
//
// Each vector is a remainder 2R in the legal range [-2D, 2D], split at random
// into a carry vector and an irredundant integer part plus sum fraction (an
// integer part of -5 is sent wrapped, with the out-of-range flag set, as the
// previous column would send it). After an evaluate cycle the column must
// hold exactly 2(2R - q*D), with q a digit that keeps |2R - q*D| <= D. All
// values are integers scaled by 2^FRAC and computed here independently of
// the design. Precharge must return the outputs to zero, and without
// evaluate the outputs must hold.
module tb_srt_column;
  import srt_pkg::*;

  localparam int FRAC = 47;
  localparam longint S = longint'(1) << FRAC;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            clear = 1'b0, eval = 1'b0, prech = 1'b0;
  logic [FRAC:0]   divisor;
  logic [2:0]      in_top, out_top;
  logic [FRAC-1:0] in_fs, in_fc, out_fs, out_fc;
  logic            in_ovf, in_ovf_prev, out_ovf, out_ovf_prev;
  digit_t          q;
  int checks = 0, failures = 0, n_wrapped = 0, n_below = 0;

  srt_column #(.FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint out_value();
    longint t = longint'($signed(out_top));
    if (out_ovf) t -= 8;
    return t * S + longint'(out_fs) + longint'(out_fc);
  endfunction

  initial begin
    longint d, y, w, t, expv;
    int dv;
    divisor = '0; in_top = '0; in_fs = '0; in_fc = '0; in_ovf = 0; in_ovf_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      divisor = {1'b1, FRAC'({$urandom, $urandom})};
      d = longint'(divisor);
      // 2R uniform in [-2D, 2D], biased towards the negative end every 4th vector
      y = longint'({$urandom, $urandom} % (4 * d + 1)) - 2 * d;
      if (n % 4 == 0) y = -2 * d + longint'({$urandom, $urandom} % (d / 2));
      in_fc = (n % 3 == 0) ? '1 : FRAC'({$urandom, $urandom});
      w = y - longint'(in_fc);
      t = w >>> FRAC;                  // floor
      in_fs = FRAC'(w - t * S);
      in_top = 3'(t);
      in_ovf = (t < -4);
      in_ovf_prev = (y < -2 * S) && $urandom_range(0, 1) == 1;
      if (in_ovf) n_wrapped++;
      eval = 1'b1;
      #1;
      dv = digit_value(q);
      chk(!(q.pos && q.neg), "both digit rails set");
      chk(y - dv * d <= d && y - dv * d >= -d, $sformatf("digit %0d invalid for 2R=%0d D=%0d", dv, y, d));
      expv = 2 * (y - dv * d);
      @(negedge clk);
      eval = 1'b0;
      chk(out_value() == expv, $sformatf("remainder %0d expected %0d", out_value(), expv));
      chk(out_ovf_prev == in_ovf, "previous-stage flag not passed on");
      if (out_ovf) n_below++;
      // hold without eval
      in_top = ~in_top;
      @(negedge clk);
      chk(out_value() == expv, "output changed without evaluate");
      if (n % 8 == 0) begin
        prech = 1'b1;
        @(negedge clk);
        prech = 1'b0;
        chk(out_top == '0 && out_fs == '0 && out_fc == '0 && !out_ovf && !out_ovf_prev,
            "precharge did not clear the column");
      end
    end
    $display("wrapped inputs %0d, outputs below -4: %0d", n_wrapped, n_below);
    chk(n_wrapped > 0 && n_below > 0, "out-of-range case never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
