// Test of the evaluate/precharge sequencer of a three-column ring.
//
// The testbench plays the quotient registers: it counts evaluations and
// raises `complete` after NEV of them. Every cycle it checks, against its own
// model of which columns hold results, that
//   * at most one column evaluates, and the evaluations go round the ring in
//     order starting at column 0;
//   * a column evaluates only when it is precharged and its input holds a
//     result (the dividend, for the first evaluation);
//   * a column is precharged only after its successor has read its result;
//   * after start one column evaluates every cycle, so complete arrives NEV+1
//     cycles after the start cycle, then evaluation stops and busy falls;
//   * a start while busy is ignored.
module tb_srt_self_timing_ctrl;

  localparam int NCOL = 3;
  localparam int NEV  = 48;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0, complete;
  logic            busy, clear, first;
  logic [NCOL-1:0] eval, prech;
  int checks = 0, failures = 0, nev = 0, expect_col = 0;
  bit holds [NCOL];     // model: column holds a result
  bit read  [NCOL];     // model: that result has been read by the successor
  bit dividend_ready = 0;

  srt_self_timing_ctrl #(.NCOL(NCOL)) dut (.*);

  assign complete = (nev == NEV);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // per-cycle protocol checks and model update
  always @(posedge clk) if (rst_n) begin
    chk($countones(eval) <= 1, "two columns evaluate at once");
    for (int k = 0; k < NCOL; k++) begin
      automatic int pred = (k + NCOL - 1) % NCOL;
      if (eval[k]) begin
        chk(k == expect_col, $sformatf("column %0d evaluated, expected %0d", k, expect_col));
        chk(!holds[k], "column evaluated without being precharged");
        chk((k == 0 && dividend_ready) || (holds[pred] && !read[pred]), "column evaluated without valid input");
        chk(!complete, "evaluation after completion");
      end
      if (prech[k]) chk(holds[k] && read[k], $sformatf("column %0d precharged before its result was read", k));
      if (eval[k]) begin
        if (k == 0 && dividend_ready) dividend_ready = 0;
        else read[pred] = 1;
      end
    end
    for (int k = 0; k < NCOL; k++) begin
      if (prech[k]) begin holds[k] = 0; read[k] = 0; end
      if (eval[k])  begin holds[k] = 1; read[k] = 0; nev++; expect_col = (k + 1) % NCOL; end
    end
  end

  initial begin
    longint t0, t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && eval == '0, "idle after reset");
    for (int rnd = 0; rnd < 5; rnd++) begin
      start = 1'b1;
      #1 chk(clear, "start not accepted");
      @(posedge clk);
      for (int k = 0; k < NCOL; k++) begin holds[k] = 0; read[k] = 0; end
      dividend_ready = 1; nev = 0; expect_col = 0;
      @(negedge clk);
      start = 1'b1;   // ignored while busy
      #1 chk(!clear && first, "start while busy was accepted");
      @(negedge clk);
      start = 1'b0;
      t = 2;
      while (!complete && t < 1000) begin @(negedge clk); t++; end
      chk(t == NEV + 1, $sformatf("completion after %0d cycles, expected %0d", t, NEV + 1));
      @(negedge clk);
      chk(!busy && eval == '0, "ring did not stop at completion");
      repeat (3) @(negedge clk);
      chk(nev == NEV, "evaluations after completion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
