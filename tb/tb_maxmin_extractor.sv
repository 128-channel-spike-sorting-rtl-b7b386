// Testbench of maxmin_extractor: the feature row is looped through a register
// (one channel), random filtered/raw samples and spike pulses are applied, and
// start, re-trigger, running max/min and completion after spk_len samples are
// compared with the reference model.
module tb_maxmin_extractor;
  import ssp_pkg::*;

  logic clk = 0;
  feat_row_t st, st_next;
  logic start, accepted, done;
  feat_t filt;
  sample_t raw;
  logic [LEN_W-1:0] spk_len;
  logic [TS_W-1:0] ts;
  int checks = 0, failures = 0;

  maxmin_extractor dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) st <= st_next;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   m_active = 0;
    int   m_cnt = 0, m_fmax, m_fmin, m_rmax, m_ts, len;
    int   dones = 0, ignored = 0, starts = 0;
    int   fv, rv;
    bit   exp_done, exp_acc;
    st = '0; start = 0; filt = '0; raw = '0; ts = '0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 2000 == 0) len = (i == 0) ? 32 : int'($urandom_range(1, 32));
      spk_len = LEN_W'(len);
      fv = int'($urandom_range(0, 4194303)) - 2097152;
      if (i % 7 == 0) fv = fv >>> 8;
      rv = int'($urandom_range(0, 511)) - 256;
      start = ($urandom_range(0, 19) == 0);
      filt = feat_t'(fv); raw = sample_t'(rv); ts = TS_W'(i);
      // reference
      exp_acc = start && !m_active;
      if (start && m_active) ignored++;
      if (exp_acc) begin
        m_active = 1; m_cnt = 0; m_fmax = -2097152; m_fmin = 2097151; m_rmax = -255; m_ts = i;
        starts++;
      end
      exp_done = 0;
      if (m_active) begin
        if (fv > m_fmax) m_fmax = fv;
        if (fv < m_fmin) m_fmin = fv;
        if (rv > m_rmax) m_rmax = rv;
        m_cnt++;
        if (m_cnt >= len) begin exp_done = 1; m_active = 0; end
      end
      #1;
      checks++;
      if (accepted != exp_acc || done != exp_done || st_next.active != m_active) begin
        failures++;
        $display("cycle %0d ctrl mismatch acc=%b/%b done=%b/%b", i, accepted, exp_acc, done, exp_done);
      end
      if (exp_done) begin
        dones++;
        checks++;
        if (int'(st_next.fmax) != m_fmax || int'(st_next.fmin) != m_fmin ||
            int'(st_next.rmax) != m_rmax || int'(st_next.ts) != m_ts) begin
          failures++;
          $display("cycle %0d feature mismatch %0d/%0d %0d/%0d %0d/%0d", i, st_next.fmax, m_fmax,
                   st_next.fmin, m_fmin, st_next.rmax, m_rmax);
        end
      end
    end
    checks++;
    if (dones < 20 || ignored < 20) begin failures++; $display("coverage dones=%0d ignored=%0d", dones, ignored); end
    $display("starts=%0d dones=%0d ignored retriggers=%0d", starts, dones, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
