// Testbench of sys_ctrl: with a random enable, the channel counter must step
// 0..N_CH-1 on every enabled cycle and the timestamp must count completed
// rounds, wrapping at 16 bits (checked with a small TS_W).
module tb_sys_ctrl;
  localparam int N_CH = 16, TS_W = 6;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] ch;
  logic [TS_W-1:0] ts;
  int checks = 0, failures = 0;

  sys_ctrl #(.N_CH(N_CH), .TS_W(TS_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;   // enabled cycles so far
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(ch) != n % N_CH || int'(ts) != (n / N_CH) % (1 << TS_W)) begin
        failures++;
        $display("cycle %0d ch=%0d ts=%0d n=%0d", i, ch, ts, n);
      end
      en = ($urandom_range(0, 3) != 0);
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
