// Exhaustive test of the radix-2 quotient selection.
//
// For every 3-bit integer part and both values of force_neg the digit is
// compared with the selection table, and also checked for correctness in the
// SRT sense: for remainders anywhere in [top, top + 2) (the carry-save
// uncertainty) and divisors in [1, 2), |2R - q*D| <= D must hold, sampled on
// a grid of quarter steps in 2R and eighth steps in D.
module tb_srt_quot_sel;
  import srt_pkg::*;

  logic [2:0] top;
  logic       force_neg;
  digit_t     q;
  int checks = 0, failures = 0;

  srt_quot_sel dut (.*);

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int t = -4; t <= 3; t++) begin
        int exp_q;
        top = 3'(t); force_neg = f[0];
        #1;
        if (f == 1)       exp_q = -1;
        else if (t >= 0)  exp_q = 1;
        else if (t == -1) exp_q = 0;
        else              exp_q = -1;
        checks++;
        if (digit_value(q) != exp_q || (q.pos && q.neg)) begin
          failures++;
          $display("FAIL top=%0d force=%0d q=%0d expected %0d", t, f, digit_value(q), exp_q);
        end
        // SRT validity: remainder in [t, t+2), inside the range |2R| <= 2D
        if (f == 0) begin
          for (int ds = 8; ds < 16; ds++) begin          // D = ds/8
            for (int ys = 4 * t; ys < 4 * t + 8; ys++) begin   // 2R = ys/4
              if (ys * 8 >= -2 * ds * 4 && ys * 8 <= 2 * ds * 4) begin
                int z8;  // (2R - qD) * 32
                z8 = ys * 8 - digit_value(q) * ds * 4;
                checks++;
                if (z8 > ds * 4 || z8 < -ds * 4) begin
                  failures++;
                  $display("FAIL 2R=%0d/4 D=%0d/8 q=%0d leaves the bound", ys, ds, digit_value(q));
                end
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
