// Scaling testbench: the full end-to-end flow of tb_ssp128_top run side by
// side on four other sizes of the same design:
//   * 64 channels  = 4 processors x 16 channels,
//   * 256 channels = 16 processors x 16 channels,
//   * fully parallel: 128 processors x 1 channel,
//   * fully folded:   1 processor x 128 channels.
module tb_ssp_scaling;
  localparam int NRUN = 4;
  logic [NRUN-1:0] done;
  int   c [NRUN], f [NRUN];
  int   checks, failures;
  logic clk = 0;

  tb_ssp_sys #(.N_SSP(4),   .N_CH(16))  u64  (.finished(done[0]), .checks(c[0]), .failures(f[0]));
  tb_ssp_sys #(.N_SSP(16),  .N_CH(16))  u256 (.finished(done[1]), .checks(c[1]), .failures(f[1]));
  tb_ssp_sys #(.N_SSP(128), .N_CH(1))   upar (.finished(done[2]), .checks(c[2]), .failures(f[2]));
  tb_ssp_sys #(.N_SSP(1),   .N_CH(128)) ufld (.finished(done[3]), .checks(c[3]), .failures(f[3]));

  always #5 clk = ~clk;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NRUN; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    fork
      begin
        wait (done === '1);
        total();
      end
      begin
        repeat (1000000) @(posedge clk);
        total();
        failures++;
        $display("watchdog expired, finished runs %b", done);
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
