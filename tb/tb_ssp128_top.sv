// End-to-end testbench of ssp128_top at its default size (8 folded processors
// x 16 channels = 128 channels). Runs one complete operation:
//   1. configuration over the serial line: filter coefficients broadcast to all
//      processors, a threshold and spike length per processor (targeted);
//   2. a light phase: 128 interleaved channels of noise and spikes at random
//      times, with idle cycles on in_valid; every output record is decoded
//      from the 9-bit word stream and must match a record of the reference
//      model; at the end none may be missing and none dropped;
//   3. a burst phase: all channels spike together several times, overloading
//      the output buffer; records received plus drop_count must equal the
//      records produced.
// Counted mechanisms (each must occur): targeted and broadcast register
// writes, spike detections, ignored re-triggers, completed extractions,
// idle input cycles, several processors finishing in the same cycle
// (arbitration), back-to-back output records and dropped records.
module tb_ssp128_top;
  import ssp_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_CH = 16, N_SSP = 8, NC = N_CH * N_SSP;

  logic clk = 0, rst_n = 0, in_valid = 0, prog_in = 0;
  sample_t sample_in [N_SSP];
  logic [WORD_W-1:0] spike_word;
  logic spike_word_valid, spike_word_sop;
  logic [N_SSP-1:0] spike_event;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  ssp128_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  chan_model   m [NC];
  int          coefs [32];
  int          thr [N_SSP], len [N_SSP];
  logic [71:0] expected [$];
  int n_bcast = 0, n_target = 0, n_spk = 0, n_ign = 0, n_done = 0, n_idle = 0;
  int n_multi = 0, n_b2b = 0, received = 0, unknown = 0;

  // ---- output stream decoder ----
  logic [71:0] acc;
  int nw = 0, last_end = -10, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if ($countones(dut.rec_valid) > 1) n_multi++;
    if (spike_word_valid) begin
      if (spike_word_sop != (nw == 0)) begin failures++; $display("sop misplaced"); end
      if (spike_word_sop && last_end == cyc - 1) n_b2b++;
      acc = {acc[62:0], spike_word};
      nw++;
      if (nw == 8) begin
        int idx[$];
        nw = 0; last_end = cyc; received++;
        idx = expected.find_first_index(r) with (r == acc);
        checks++;
        if (idx.size() == 0) begin unknown++; failures++; $display("unexpected record %h", acc); end
        else expected.delete(idx[0]);
      end
    end
  end

  task automatic prog(bit bc, int id, int a, int d);
    logic [25:0] body = {1'(bc), 3'(id), 6'(a), 16'(d)};
    @(negedge clk) prog_in = 1;
    for (int b = 25; b >= 0; b--) @(negedge clk) prog_in = body[b];
    @(negedge clk) prog_in = 0;
    if (bc) n_bcast++; else n_target++;
  endtask

  // one interleaved cycle for channel slot c of every processor
  int next_spk [NC], t_spk [NC], amp [NC];
  task automatic cycle(int frame, int c, bit burst);
    bit d;
    int s, g;
    @(negedge clk);
    while (!burst && $urandom_range(0, 15) == 0) begin
      in_valid = 0; n_idle++;
      @(negedge clk);
    end
    in_valid = 1;
    for (int p = 0; p < N_SSP; p++) begin
      g = p * N_CH + c;
      if (burst ? (frame % 40 == 5) : (frame == next_spk[g])) begin
        t_spk[g] = 0; amp[g] = 120 + int'($urandom_range(0, 130));
        next_spk[g] = frame + (($urandom_range(0, 3) == 0) ? 14 : 40 + int'($urandom_range(0, 150)));
      end
      s = spike_shape(t_spk[g], amp[g]) + int'($urandom_range(0, 12)) - 6;
      t_spk[g]++;
      if (s > 255) s = 255;
      if (s < -256) s = -256;
      sample_in[p] = sample_t'(s);
      d = m[g].step(s, coefs, thr[p], len[p], g);
      if (d) begin expected.push_back(m[g].last_rec); n_done++; end
      n_spk += m[g].last_spike;
      n_ign += m[g].last_ignored;
    end
    #1;
    for (int p = 0; p < N_SSP; p++) begin
      checks++;
      if (spike_event[p] != m[p * N_CH + c].last_spike) begin
        failures++; $display("frame %0d ch %0d/%0d spike_event mismatch", frame, p, c);
      end
    end
  endtask

  initial begin
    int frame = 0, exp_light, burst_done0, recv0;
    foreach (sample_in[p]) sample_in[p] = '0;
    for (int g = 0; g < NC; g++) begin
      m[g] = new();
      next_spk[g] = 40 + int'($urandom_range(0, 100));
      t_spk[g] = 100; amp[g] = 0;
    end
    for (int k = 0; k < 32; k++) coefs[k] = (k < 16) ? int'(60.0 * $sin(6.2831853 * k / 16.0)) : 0;
    for (int p = 0; p < N_SSP; p++) begin thr[p] = 2000 + 500 * p; len[p] = 16 + 2 * p; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. configuration
    for (int k = 0; k < 32; k++) prog(1, 0, k, coefs[k] & 16'h1ff);
    for (int p = 0; p < N_SSP; p++) begin
      prog(0, p, 32, thr[p]);
      prog(0, p, 33, len[p]);
    end
    // 2. light phase
    for (; frame < 500; frame++)
      for (int c = 0; c < N_CH; c++) cycle(frame, c, 0);
    @(negedge clk) in_valid = 0;
    repeat (16 * 8 + 20) @(negedge clk);
    exp_light = n_done;
    checks++;
    if (expected.size() != 0 || drop_count != 0 || received != exp_light) begin
      failures++;
      $display("light phase: produced %0d received %0d missing %0d drops %0d", exp_light, received,
               expected.size(), drop_count);
    end
    $display("light phase: %0d records from %0d detections", received, n_spk);
    // 3. burst phase
    recv0 = received; burst_done0 = n_done;
    for (int f = 0; f < 120; f++, frame++)
      for (int c = 0; c < N_CH; c++) cycle(frame, c, 1);
    @(negedge clk) in_valid = 0;
    repeat (16 * 8 + 8 * 8 + 50) @(negedge clk);
    checks++;
    if ((received - recv0) + int'(drop_count) != n_done - burst_done0 || unknown != 0) begin
      failures++;
      $display("burst phase: produced %0d received %0d dropped %0d", n_done - burst_done0,
               received - recv0, drop_count);
    end
    $display("broadcast writes=%0d targeted writes=%0d detections=%0d ignored re-triggers=%0d",
             n_bcast, n_target, n_spk, n_ign);
    $display("records produced=%0d received=%0d dropped=%0d idle cycles=%0d multi-finish cycles=%0d back-to-back=%0d",
             n_done, received, drop_count, n_idle, n_multi, n_b2b);
    // every mechanism must have happened
    checks++;
    if (n_bcast == 0 || n_target == 0 || n_spk == 0 || n_ign == 0 || n_done == 0 || n_idle == 0 ||
        n_multi == 0 || n_b2b == 0 || drop_count == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
