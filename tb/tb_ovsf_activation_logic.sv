// tb_ovsf_activation_logic: exhaustive test of the wake-up decision.
//
// Applies every value of the enable, the 2-bit threshold offset T and the 3-bit error
// count with L = 16, and also with L = 8 where only T = 0 is legal. Expected, worked
// out with signed arithmetic: q = en && (ne <= L/4 - 1 - T) && (T <= L/4 - 2). For
// L = 16 this accepts 3, 2, 1 and 0 errors for T = 0, 1, 2 and none for T = 3.
module tb_ovsf_activation_logic;
  logic       en;
  logic [1:0] t;
  logic [2:0] ne;
  logic       q16;
  logic       q8;
  int         checks = 0;
  int         failures = 0;
  int         accepted [4] = '{default: 0};

  ovsf_activation_logic #(.L(16), .T_W(2), .NE_W(3)) dut16 (.en, .t, .ne, .q(q16));
  ovsf_activation_logic #(.L(8),  .T_W(2), .NE_W(3)) dut8  (.en, .t, .ne, .q(q8));

  function automatic bit expect_q(int l, int e, int tt, int n);
    return (e != 0) && (n <= l / 4 - 1 - tt) && (tt <= l / 4 - 2);
  endfunction

  initial begin
    for (int e = 0; e < 2; e++)
      for (int tt = 0; tt < 4; tt++)
        for (int n = 0; n < 8; n++) begin
          en = 1'(e);
          t  = 2'(tt);
          ne = 3'(n);
          #1;
          checks += 2;
          if (q16 !== expect_q(16, e, tt, n)) begin
            failures++;
            $display("FAIL L=16 en=%0d T=%0d ne=%0d q=%0d", e, tt, n, q16);
          end
          if (q8 !== expect_q(8, e, tt, n)) begin
            failures++;
            $display("FAIL L=8 en=%0d T=%0d ne=%0d q=%0d", e, tt, n, q8);
          end
          if (e == 1 && q16) accepted[tt]++;
        end
    // Number of accepted error counts per T, as in the decoder's post-layout sweep.
    for (int tt = 0; tt < 4; tt++) begin
      checks++;
      if (accepted[tt] != ((tt <= 2) ? 4 - 1 - tt + 1 : 0)) begin
        failures++;
        $display("FAIL T=%0d accepts %0d error counts", tt, accepted[tt]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
