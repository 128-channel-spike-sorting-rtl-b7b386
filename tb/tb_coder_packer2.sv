// Testbench of coder_packer2: records from all inputs are collected from the
// 9-bit word stream (8 words per record, sop on the first) and matched against
// what was sent. A light phase must deliver every record with no drop and
// back-to-back records without gaps; a burst phase overloads the buffer and
// requires sent = received + drop_count.
module tb_coder_packer2;
  import ssp_pkg::*;
  localparam int N_SSP = 8;
  logic clk = 0, rst_n = 0;
  logic [N_SSP-1:0] rec_valid = '0;
  spike_rec_t rec [N_SSP];
  logic [WORD_W-1:0] word;
  logic word_valid, word_sop;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  coder_packer2 #(.N_SSP(N_SSP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  logic [71:0] sent[$];
  int received = 0, nwords = 0, busy_cycles = 0, idle_between = 0;
  logic [71:0] acc;
  always @(posedge clk) if (rst_n) begin
    if (word_valid) begin
      if (word_sop != (nwords == 0)) begin failures++; $display("sop misplaced"); end
      acc = {acc[62:0], word};
      nwords++;
      if (nwords == 8) begin
        int idx[$];
        nwords = 0;
        received++;
        idx = sent.find_first_index(r) with (r == acc);
        checks++;
        if (idx.size() == 0) begin failures++; $display("unknown record %h", acc); end
        else sent.delete(idx[0]);
      end
    end
  end

  task automatic send(int i);
    spike_rec_t r;
    r = 72'({$urandom, $urandom, $urandom});
    r.ch = 8'(i * 16 + int'($urandom_range(0, 15)));
    r.ts = 16'($urandom);     // makes records unique enough
    rec[i] = r;
    rec_valid[i] = 1'b1;
    sent.push_back(r);
  endtask

  initial begin
    int total = 0, t0, t1;
    foreach (rec[i]) rec[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // light phase: at most one record per 10 cycles
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      rec_valid = '0;
      if (c % 10 == 0) begin send(int'($urandom_range(0, N_SSP-1))); total++; end
    end
    @(negedge clk) rec_valid = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (received != total || drop_count != 0 || sent.size() != 0) begin
      failures++; $display("light phase: sent %0d received %0d drops %0d", total, received, drop_count);
    end
    // throughput: 8 simultaneous records drain in 64 cycles
    t0 = received;
    @(negedge clk);
    for (int i = 0; i < N_SSP; i++) send(i);
    total += N_SSP;
    @(negedge clk) rec_valid = '0;
    repeat (8 * N_SSP + 2) @(negedge clk);
    checks++;
    if (received - t0 != N_SSP) begin failures++; $display("throughput: %0d of %0d in 8 cycles each", received - t0, N_SSP); end
    // burst phase: every input every cycle
    t1 = received;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      for (int i = 0; i < N_SSP; i++) send(i);
    end
    @(negedge clk) rec_valid = '0;
    repeat (16 * 8 + 8 * 8 + 20) @(negedge clk);
    checks++;
    if ((received - t1) + int'(drop_count) != 200 * N_SSP || drop_count == 0) begin
      failures++; $display("burst: received %0d drops %0d", received - t1, drop_count);
    end
    $display("records received %0d, dropped %0d", received, drop_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
