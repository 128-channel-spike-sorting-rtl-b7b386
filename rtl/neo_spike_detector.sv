// NEO-based spike detector (one channel per cycle, purely combinational).
//
// The window win[0..6] holds the seven newest samples of the channel being
// processed, win[0] the newest. Three parts work side by side on the window
// centre c = win[3]:
//   * non-linear energy filter: psi = c*c - win[2]*win[4] (Kaiser's operator);
//   * thresholding unit: psi > thr, the 16-bit threshold taken as unsigned;
//   * peak detector: c is >= each newer sample and > each older sample, so a
//     flat top of equal samples is reported once.
// The decision raises `spike` when both hold. The seven-sample window, the
// 16-bit threshold and the four parts follow the published block diagram; the
// exact peak rule and the centre of the energy operator are this design's
// choices. Result is valid in the same cycle as the window.
module neo_spike_detector
  import ssp_pkg::*;
(
  input  sample_t                     win [NEO_WIN],
  input  logic [THR_W-1:0]            thr,
  output logic signed [ENERGY_W-1:0]  energy,
  output logic                        peak,
  output logic                        spike
);
  localparam int unsigned C = NEO_WIN / 2;

  logic signed [2*SAMPLE_W-1:0] sq, nbr_prod;

  always_comb begin
    sq     = win[C] * win[C];
    nbr_prod  = win[C-1] * win[C+1];
    energy = ENERGY_W'(sq) - ENERGY_W'(nbr_prod);
  end

  always_comb begin
    peak = 1'b1;
    for (int i = 0; i < C; i++)
      if (win[C] < win[i]) peak = 1'b0;
    for (int i = C + 1; i < NEO_WIN; i++)
      if (win[C] <= win[i]) peak = 1'b0;
  end

  assign spike = peak && (energy > $signed({3'b000, thr}));

endmodule
