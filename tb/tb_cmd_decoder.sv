// Testbench of cmd_decoder: random frames (targeted and broadcast, with and
// without idle gaps) are sent bit-serially; each must yield exactly one write
// with the right address, data and target mask on the cycle after its last bit.
module tb_cmd_decoder;
  import ssp_pkg::*;
  localparam int N_SSP = 8;
  logic clk = 0, rst_n = 0, prog_in = 0;
  cfg_wr_t cfg;
  logic [N_SSP-1:0] sel;
  int checks = 0, failures = 0;

  cmd_decoder #(.N_SSP(N_SSP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int writes = 0;
  always @(posedge clk) if (rst_n && cfg.we) writes++;

  initial begin
    logic [25:0] body;
    int bc, id, a, d, w0, bcasts = 0;
    logic [N_SSP-1:0] exp_sel;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      bc = ($urandom_range(0, 3) == 0); id = int'($urandom_range(0, 7));
      a = int'($urandom_range(0, 63)); d = int'($urandom_range(0, 65535));
      bcasts += bc;
      body = {1'(bc), 3'(id), 6'(a), 16'(d)};
      exp_sel = bc ? '1 : N_SSP'(1) << id;
      repeat ($urandom_range(0, 2)) @(negedge clk);   // idle gap (may be none)
      w0 = writes;
      prog_in = 1;                                     // start bit
      for (int b = 25; b >= 0; b--) begin
        @(negedge clk) prog_in = body[b];
      end
      @(negedge clk) prog_in = 0;                      // cycle after the last bit
      checks++;
      if (!(cfg.we && cfg.addr == 6'(a) && cfg.data == 16'(d) && sel == exp_sel)) begin
        failures++;
        $display("frame %0d: we=%b addr=%0d/%0d data=%h/%h sel=%b/%b", f, cfg.we, cfg.addr, a,
                 cfg.data, 16'(d), sel, exp_sel);
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (writes != 400 || bcasts == 0) begin failures++; $display("writes=%0d", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
