// Exhaustive test of the top-bit carry-propagate adder: all 256 pairs of
// 4-bit sum and carry inputs. The resolved value r = s + c (mod 16) must
// appear in `top` (low three bits) and `below_m4` must be set exactly when r,
// read as a 4-bit two's complement number, is below -4.
module tb_srt_top_cpa;

  logic [3:0] s, c;
  logic [2:0] top;
  logic       below_m4;
  int checks = 0, failures = 0;

  srt_top_cpa dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int r;
        s = 4'(i); c = 4'(j);
        #1;
        r = (i + j) % 16;
        if (r >= 8) r -= 16;
        checks++;
        if (top != 3'(r) || below_m4 != (r < -4)) begin
          failures++;
          $display("FAIL s=%0d c=%0d: top=%0d below_m4=%0d, expected %0d / %0d",
                   i, j, top, below_m4, 3'(r), r < -4);
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
