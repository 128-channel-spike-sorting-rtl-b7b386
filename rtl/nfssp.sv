// N-channel folded spike sorting processor (NFSSP).
//
// One set of processing units serves N_CH channels whose samples arrive
// interleaved, one sample per enabled cycle in channel order 0..N_CH-1.
// Two systolic cache buffers of N_CH rows hold the per-channel state:
//   * SCB1 row: the previous TAPS-1 = 31 samples of the channel;
//   * SCB2 row: the channel's feature buffer (active flag, sample count,
//     filtered max/min, raw max, event timestamp).
// In each cycle the row of the current channel leaves both buffers, is combined
// with the incoming sample, and re-enters them updated:
//   window x[0..31] = {sample_in, SCB1 row}   (x[0] newest)
//   NEO spike detector on x[0..6]  -> spike (for centre sample x[3])
//   noise shaping FIR on x[0..31]  -> filtered sample
//   MaxMin extractor, started by the spike, watches the filtered sample and
//   the raw centre sample x[3] for the programmed spike length
//   coder & packer turns a finished extraction into a 72-bit record.
// Everything from the buffers to the feature row is one clock cycle; the record
// appears one cycle after the last sample of its spike. The structure (two
// SCBs, three processing units, coefficient register array, system control
// unit, coder & packer) follows the published architecture; the sample taps
// used by each unit are this design's choice.
module nfssp
  import ssp_pkg::*;
#(
  parameter int unsigned N_CH   = 16,
  parameter int unsigned SSP_ID = 0,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    sample_in,
  input  cfg_wr_t    cfg,
  output logic       spike_event,
  output logic       rec_valid,
  output spike_rec_t rec
);
  localparam int unsigned HIST_W = (TAPS - 1) * SAMPLE_W;
  localparam int unsigned FROW_W = $bits(feat_row_t);

  // configuration and control
  coef_t            coef [TAPS];
  logic [THR_W-1:0] thr;
  logic [LEN_W-1:0] spk_len;
  logic [CH_W-1:0]  ch;
  logic [TS_W-1:0]  ts;

  coeff_reg_array u_coef (.clk, .rst_n, .cfg, .coef, .thr, .spk_len);
  sys_ctrl #(.N_CH(N_CH), .TS_W(TS_W)) u_ctrl (.clk, .rst_n, .en(in_valid), .ch, .ts);

  // SCB1: sample history
  logic [HIST_W-1:0] hist_out, hist_in;
  sample_t           x [TAPS];

  scb #(.W(HIST_W), .DEPTH(N_CH)) u_scb1 (
    .clk, .rst_n, .en(in_valid), .row_in(hist_in), .row_out(hist_out));

  always_comb begin
    x[0] = sample_in;
    for (int k = 1; k < TAPS; k++) x[k] = sample_t'(hist_out[(k-1)*SAMPLE_W +: SAMPLE_W]);
    for (int k = 0; k < TAPS - 1; k++) hist_in[k*SAMPLE_W +: SAMPLE_W] = x[k];
  end

  // processing units
  sample_t                    win [NEO_WIN];
  logic signed [ENERGY_W-1:0] energy;
  logic                       peak, spike;
  feat_t                      filt;

  always_comb for (int k = 0; k < NEO_WIN; k++) win[k] = x[k];

  neo_spike_detector u_neo (.win, .thr, .energy, .peak, .spike);
  noise_shaping_fir  u_fir (.x, .coef, .y(filt));

  // SCB2: feature buffer
  feat_row_t frow, frow_next;
  logic      accepted, done;

  scb #(.W(FROW_W), .DEPTH(N_CH)) u_scb2 (
    .clk, .rst_n, .en(in_valid), .row_in(frow_next), .row_out(frow));

  maxmin_extractor u_mm (
    .st(frow), .start(in_valid && spike), .filt, .raw(x[NEO_WIN/2]), .spk_len, .ts,
    .st_next(frow_next), .accepted, .done);

  assign spike_event = accepted;

  coder_packer #(.N_CH(N_CH), .SSP_ID(SSP_ID)) u_cp (
    .clk, .rst_n, .done(in_valid && done), .feat(frow_next), .ch, .rec_valid, .rec);

endmodule
