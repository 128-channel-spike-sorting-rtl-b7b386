// Testbench of noise_shaping_fir: random samples and coefficients, plus the
// saturating extremes, compared with the integer reference sum.
module tb_noise_shaping_fir;
  import ssp_pkg::*;
  import tb_ref_pkg::*;

  sample_t x    [TAPS];
  coef_t   coef [TAPS];
  feat_t   y;
  int checks = 0, failures = 0;

  noise_shaping_fir dut (.x, .coef, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int xv[32], int cv[32]);
    for (int k = 0; k < 32; k++) begin
      x[k] = sample_t'(xv[k]);
      coef[k] = coef_t'(cv[k]);
    end
    #1;
    checks++;
    if (int'(y) != fir(xv, cv)) begin
      failures++;
      $display("mismatch y=%0d expected %0d", y, fir(xv, cv));
    end
  endtask

  initial begin
    int xv[32], cv[32];
    foreach (xv[k]) begin xv[k] = -256; cv[k] = -256; end
    check_one(xv, cv);                                 // +2^21 saturates
    foreach (xv[k]) begin xv[k] = -256; cv[k] = 255; end
    check_one(xv, cv);                                 // large negative
    foreach (xv[k]) begin xv[k] = k; cv[k] = (k == 5) ? 1 : 0; end
    check_one(xv, cv);                                 // single tap picks x[5]
    for (int i = 0; i < 5000; i++) begin
      foreach (xv[k]) begin
        xv[k] = int'($urandom_range(0, 511)) - 256;
        cv[k] = int'($urandom_range(0, 511)) - 256;
      end
      check_one(xv, cv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
