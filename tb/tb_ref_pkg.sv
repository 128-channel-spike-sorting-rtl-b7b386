// Reference model of the spike sorting datapath for the testbenches, written
// with plain integers: NEO energy and peak rule, the 32-tap filter with 22-bit
// saturation, the MaxMin extraction of one channel and the record coding.
package tb_ref_pkg;

  localparam int FMAX0 = -2097152;
  localparam int FMIN0 =  2097151;
  localparam int RMAX0 = -255;

  function automatic int neo_energy(int x[7]);
    return x[3] * x[3] - x[2] * x[4];
  endfunction

  function automatic bit neo_peak(int x[7]);
    for (int i = 0; i < 3; i++) if (x[i] > x[3]) return 1'b0;
    for (int i = 4; i < 7; i++) if (x[i] >= x[3]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int fir(int x[32], int c[32]);
    int s = 0;
    for (int k = 0; k < 32; k++) s += x[k] * c[k];
    if (s > FMIN0) s = FMIN0;
    if (s < FMAX0) s = FMAX0;
    return s;
  endfunction

  // 72-bit record {fmax16, fmin16, rmax16, ts16, ch8}
  function automatic logic [71:0] pack(int fmax, int fmin, int rmax, int ts, int ch);
    logic [15:0] a, b, r;
    a = 16'(fmax >>> 6);
    b = 16'(fmin >>> 6);
    r = 16'(rmax);
    return {a, b, r, 16'(ts), 8'(ch)};
  endfunction

  class chan_model;
    int hist[32];     // hist[0] newest
    bit active;
    int cnt, fmax, fmin, rmax, ts;
    int n;            // samples seen
    bit last_spike, last_ignored;
    logic [71:0] last_rec;  // record of the last completed extraction

    function new();
      foreach (hist[k]) hist[k] = 0;
      active = 0; cnt = 0; n = 0;
    endfunction

    // Feed one sample; returns 1 when an extraction ends, its record in last_rec.
    function automatic bit step(int s, int c[32], int thr, int len, int chidx);
      int w[7];
      int x[32];
      int f;
      bit spk;
      x[0] = s;
      for (int k = 1; k < 32; k++) x[k] = hist[k-1];
      for (int k = 0; k < 7; k++) w[k] = x[k];
      spk = neo_peak(w) && (neo_energy(w) > thr);
      f   = fir(x, c);
      last_spike   = spk && !active;
      last_ignored = spk && active;
      if (spk && !active) begin
        active = 1; cnt = 0; fmax = FMAX0; fmin = FMIN0; rmax = RMAX0; ts = n % 65536;
      end
      step = 0;
      if (active) begin
        if (f > fmax) fmax = f;
        if (f < fmin) fmin = f;
        if (x[3] > rmax) rmax = x[3];
        cnt++;
        if (cnt >= len) begin
          active = 0;
          last_rec = pack(fmax, fmin, rmax, ts, chidx);
          step = 1;
        end
      end
      for (int k = 0; k < 32; k++) hist[k] = x[k];
      n++;
    endfunction
  endclass

  // A spike-like test waveform: noise plus, at chosen times, a biphasic pulse.
  function automatic int spike_shape(int t, int amp);
    // t = samples since pulse start, 0..11
    int shape[12] = '{10, 35, 80, 100, 70, 20, -30, -55, -45, -25, -10, -3};
    if (t < 0 || t >= 12) return 0;
    return shape[t] * amp / 100;
  endfunction

endpackage
