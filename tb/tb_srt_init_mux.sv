// Test of the first column's input multiplexer: with `first` high the output
// must be the dividend in remainder format (integer bits 001, fraction in the
// sum vector, zero carry vector, flags clear); with `first` low it must be
// the fed-back remainder, flags included.
module tb_srt_init_mux;

  localparam int FRAC = 47;

  logic            first;
  logic [FRAC:0]   dividend;
  logic [2:0]      fb_top, out_top;
  logic [FRAC-1:0] fb_fs, fb_fc, out_fs, out_fc;
  logic            fb_ovf, fb_ovf_prev, out_ovf, out_ovf_prev;
  int checks = 0, failures = 0;

  srt_init_mux #(.FRAC(FRAC)) dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      first       = n[0];
      dividend    = {1'b1, FRAC'({$urandom, $urandom})};
      fb_top      = 3'($urandom);
      fb_fs       = FRAC'({$urandom, $urandom});
      fb_fc       = FRAC'({$urandom, $urandom});
      fb_ovf      = 1'($urandom);
      fb_ovf_prev = 1'($urandom);
      #1;
      checks++;
      if (first) begin
        if (out_top != 3'b001 || out_fs != dividend[FRAC-1:0] || out_fc != '0 ||
            out_ovf || out_ovf_prev) begin
          failures++;
          $display("FAIL dividend path");
        end
      end else begin
        if (out_top != fb_top || out_fs != fb_fs || out_fc != fb_fc ||
            out_ovf != fb_ovf || out_ovf_prev != fb_ovf_prev) begin
          failures++;
          $display("FAIL feedback path");
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
