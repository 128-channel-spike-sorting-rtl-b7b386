// Noise shaping filter: a fully parallel 32-tap FIR, y = sum_k coef[k]*x[k],
// where x[0] is the newest sample of the channel being processed and x[31] the
// oldest. The programmed coefficients make it a band-pass filter that also
// takes the first derivative of the signal. All 32 products are formed at once
// and summed by a balanced adder tree in the same cycle (combinational; the
// surrounding systolic buffer provides the registers). Tap count, 9-bit samples
// and coefficients and the 22-bit output follow the published design; the
// full-precision sum can need 23 bits, and this design saturates it to the
// 22-bit output range.
module noise_shaping_fir
  import ssp_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS
) (
  input  sample_t x    [N_TAPS],
  input  coef_t   coef [N_TAPS],
  output feat_t   y
);
  localparam int unsigned PROD_W = SAMPLE_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(N_TAPS);
  localparam int unsigned LEVELS = $clog2(N_TAPS);
  localparam int unsigned P2     = 1 << LEVELS;

  logic signed [SUM_W-1:0] tree [LEVELS+1][P2];
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    for (int k = 0; k < P2; k++)
      tree[0][k] = (k < N_TAPS) ? SUM_W'(x[k] * coef[k]) : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int k = 0; k < P2; k++)
        tree[l][k] = (k < (P2 >> l)) ? tree[l-1][2*k] + tree[l-1][2*k+1] : '0;
    sum = tree[LEVELS][0];
  end

  localparam logic signed [SUM_W-1:0] YMAX = SUM_W'(FMIN_INIT);  //  2^21-1
  localparam logic signed [SUM_W-1:0] YMIN = SUM_W'(FMAX_INIT);  // -2^21

  always_comb begin
    if (sum > YMAX)      y = FMIN_INIT;
    else if (sum < YMIN) y = FMAX_INIT;
    else                 y = feat_t'(sum);
  end

endmodule
