// Testbench of neo_spike_detector: random and hand-picked 7-sample windows,
// energy, peak and spike decision compared with the integer reference model.
module tb_neo_spike_detector;
  import ssp_pkg::*;
  import tb_ref_pkg::*;

  sample_t                    win [NEO_WIN];
  logic [THR_W-1:0]           thr;
  logic signed [ENERGY_W-1:0] energy;
  logic                       peak, spike;
  int checks = 0, failures = 0;

  neo_spike_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int w[7], int t);
    for (int k = 0; k < 7; k++) win[k] = sample_t'(w[k]);
    thr = 16'(t);
    #1;
    checks++;
    if (int'(energy) != neo_energy(w) || peak != neo_peak(w) ||
        spike != (neo_peak(w) && neo_energy(w) > t)) begin
      failures++;
      $display("mismatch w=%p thr=%0d energy=%0d/%0d peak=%b spike=%b", w, t, energy,
               neo_energy(w), peak, spike);
    end
  endtask

  initial begin
    int w[7];
    int spikes = 0;
    // extremes
    w = '{0, 0, -256, -256, 255, 0, 0};      check_one(w, 0);
    w = '{-256, -256, -256, -256, -256, -256, -256}; check_one(w, 100);
    w = '{0, 10, 50, 255, 40, 5, 0};          check_one(w, 65535);
    w = '{0, 10, 50, 255, 40, 5, 0};          check_one(w, 1000);
    w = '{0, 10, 255, 255, 40, 5, 0};         check_one(w, 10);   // plateau, newer equal
    w = '{0, 10, 40, 255, 255, 5, 0};         check_one(w, 10);   // plateau, older equal
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < 7; k++) w[k] = int'($urandom_range(0, 511)) - 256;
      if (i % 3 == 0) w[3] = 200 + int'($urandom_range(0, 55));
      check_one(w, int'($urandom_range(0, 65535)) >> $urandom_range(0, 12));
      spikes += spike;
    end
    checks++;
    if (spikes < 50) begin failures++; $display("too few spikes %0d", spikes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
