// Test of quotient assembly and conversion (48 digits from 3 columns).
// Random digit strings are loaded into the per-column registers in the
// order the columns produce them; the result must equal sum q_i 2^(47-i),
// accumulated here digit by digit, and the rails must come out in order.
module tb_srt_quot_convert;

  localparam int NDIG = 48;
  localparam int NCOL = 3;
  localparam int NDC  = NDIG / NCOL;

  logic [NDC-1:0]  col_pos [NCOL];
  logic [NDC-1:0]  col_neg [NCOL];
  logic [NDIG-1:0] qpos, qneg;
  logic [NDIG:0]   quotient;
  int checks = 0, failures = 0;

  srt_quot_convert #(.NDIG(NDIG), .NCOL(NCOL)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int     dig [NDIG];
      longint expv;
      logic [NDIG-1:0] ep, en;
      expv = 0; ep = '0; en = '0;
      for (int k = 0; k < NCOL; k++) begin col_pos[k] = '0; col_neg[k] = '0; end
      for (int i = 0; i < NDIG; i++) begin
        dig[i] = (n < 3) ? n - 1 : int'($urandom_range(0, 2)) - 1;   // first vectors: all -1, all 0, all +1
        // column i mod NCOL shifts its digits in at the bottom
        col_pos[i % NCOL] = {col_pos[i % NCOL][NDC-2:0], dig[i] > 0};
        col_neg[i % NCOL] = {col_neg[i % NCOL][NDC-2:0], dig[i] < 0};
        expv = expv * 2 + dig[i];
        ep[NDIG-1-i] = dig[i] > 0;
        en[NDIG-1-i] = dig[i] < 0;
      end
      #1;
      checks++;
      if (longint'($signed(quotient)) != expv || qpos != ep || qneg != en) begin
        failures++;
        if (failures < 10) $display("FAIL: quotient %0d expected %0d", $signed(quotient), expv);
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
