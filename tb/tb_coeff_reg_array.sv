// Testbench of coeff_reg_array: reset values, random writes to the 32
// coefficients, threshold and spike length (with its 1..32 clamp), unmapped
// addresses and writes with we low must change nothing.
module tb_coeff_reg_array;
  import ssp_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  coef_t coef [TAPS];
  logic [THR_W-1:0] thr;
  logic [LEN_W-1:0] spk_len;
  int checks = 0, failures = 0;

  coeff_reg_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int mc[32], int mt, int ml);
    checks++;
    for (int k = 0; k < 32; k++)
      if (int'(coef[k]) != mc[k]) begin failures++; $display("coef[%0d]=%0d exp %0d", k, coef[k], mc[k]); return; end
    if (int'(thr) != mt || int'(spk_len) != ml) begin
      failures++; $display("thr=%0d/%0d len=%0d/%0d", thr, mt, spk_len, ml);
    end
  endtask

  initial begin
    int mc[32], mt = 65535, ml = 32;
    int a, d;
    foreach (mc[k]) mc[k] = 0;
    cfg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare(mc, mt, ml);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = int'($urandom_range(0, 40));
      d = int'($urandom_range(0, 65535));
      if (i % 5 == 0) d = int'($urandom_range(0, 40));
      cfg.we = ($urandom_range(0, 4) != 0);
      cfg.addr = 6'(a); cfg.data = 16'(d);
      if (cfg.we) begin
        if (a < 32) mc[a] = int'(9'(d) ^ 9'h100) - 256;
        else if (a == 32) mt = d;
        else if (a == 33) ml = ((d % 64) == 0) ? 1 : ((d % 64) > 32 ? 32 : d % 64);
      end
      @(negedge clk);
      cfg.we = 0;
      compare(mc, mt, ml);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
