// Testbench of nfssp: one folded processor (16 channels) is configured through
// its register port, fed with interleaved spike-like waveforms (noise plus
// biphasic pulses, some close enough to re-trigger), with random idle cycles on
// in_valid. Every cycle the detection strobe is compared with the reference
// model, and every record (expected one cycle after its last sample) is
// compared field by field.
module tb_nfssp;
  import ssp_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_CH = 16, SSP_ID = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t sample_in;
  cfg_wr_t cfg;
  logic spike_event, rec_valid;
  spike_rec_t rec;
  int checks = 0, failures = 0;

  nfssp #(.N_CH(N_CH), .SSP_ID(SSP_ID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  chan_model   m [N_CH];
  int          coefs [32];
  logic [71:0] expq [$];
  int          n_rec = 0, n_spk = 0, n_ign = 0, n_stall = 0;

  // record checker: records appear one cycle after the completing sample
  always @(posedge clk) if (rst_n) begin
    if (rec_valid) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected record %h", rec); end
      else begin
        logic [71:0] e;
        e = expq.pop_front();
        if (rec != e) begin failures++; $display("record %h expected %h", rec, e); end
        n_rec++;
      end
    end
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    cfg.we = 1; cfg.addr = 6'(a); cfg.data = 16'(d);
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    int thr = 3000, len = 24;
    int next_spk [N_CH], t_spk [N_CH], amp [N_CH];
    int s, frame = 0;
    bit d;
    cfg = '0; sample_in = '0;
    for (int c = 0; c < N_CH; c++) begin
      m[c] = new();
      next_spk[c] = 40 + int'($urandom_range(0, 60));
      t_spk[c] = 100;
    end
    for (int k = 0; k < 32; k++) coefs[k] = (k < 16) ? int'(60.0 * $sin(6.2831853 * k / 16.0)) : 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 32; k++) wr(k, coefs[k] & 16'h1ff);
    wr(32, thr);
    wr(33, len);
    // stream
    while (frame < 600) begin
      for (int c = 0; c < N_CH; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 9) == 0) begin   // idle cycle
          in_valid = 0; n_stall++;
          #1;
          checks++;
          if (spike_event) begin failures++; $display("event while idle"); end
          @(negedge clk);
        end
        if (frame == next_spk[c]) begin
          t_spk[c] = 0; amp[c] = 120 + int'($urandom_range(0, 130));
          next_spk[c] = frame + (($urandom_range(0, 3) == 0) ? 14 : 30 + int'($urandom_range(0, 80)));
        end
        s = spike_shape(t_spk[c], amp[c]) + int'($urandom_range(0, 12)) - 6;
        t_spk[c]++;
        if (s > 255) s = 255;
        if (s < -256) s = -256;
        in_valid = 1; sample_in = sample_t'(s);
        d = m[c].step(s, coefs, thr, len, SSP_ID * N_CH + c);
        if (d) expq.push_back(m[c].last_rec);
        n_spk += m[c].last_spike;
        n_ign += m[c].last_ignored;
        #1;
        checks++;
        if (spike_event != m[c].last_spike) begin
          failures++; $display("frame %0d ch %0d spike_event=%b expected %b", frame, c, spike_event, m[c].last_spike);
        end
      end
      frame++;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_rec < 50 || n_ign == 0 || n_stall == 0) begin
      failures++; $display("left %0d records=%0d ignored=%0d stalls=%0d", expq.size(), n_rec, n_ign, n_stall);
    end
    $display("spikes=%0d records=%0d ignored re-triggers=%0d idle cycles=%0d", n_spk, n_rec, n_ign, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
