// Random test of the carry-save adder/subtractor at its default width.
// The sum and carry outputs must add up (modulo 2^(FRAC+3)) to
// {top, fs} + fc - q*D, computed here with ordinary integer arithmetic, for
// each digit value. A quarter of the vectors use all-ones fractions to
// exercise the longest carry-save patterns.
module tb_srt_addsub;
  import srt_pkg::*;

  localparam int FRAC = 47;
  localparam int W    = FRAC + 3;

  logic [2:0]      top;
  logic [FRAC-1:0] fs, fc;
  logic [FRAC:0]   divisor;
  digit_t          q;
  logic [W-1:0]    sum, carry;
  int checks = 0, failures = 0;

  srt_addsub #(.FRAC(FRAC)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint y, d, expv, got, mask;
      int dv;
      top     = 3'($urandom);
      fs      = (n % 4 == 0) ? '1 : FRAC'({$urandom, $urandom});
      fc      = (n % 4 == 0) ? '1 : FRAC'({$urandom, $urandom});
      divisor = {1'b1, FRAC'({$urandom, $urandom})};
      dv      = $urandom_range(0, 2) - 1;
      q       = (dv > 0) ? DIG_POS : (dv < 0) ? DIG_NEG : DIG_ZERO;
      #1;
      mask = (longint'(1) << W) - 1;
      y    = longint'({top, fs}) + longint'(fc);
      d    = longint'(divisor);
      expv = (y - longint'(dv) * d) & mask;
      got  = (longint'(sum) + longint'(carry)) & mask;
      checks++;
      if (got != expv) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d: got %h expected %h", dv, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
