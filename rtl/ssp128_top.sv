// 128-channel spike sorting processor with a parallel-folding structure.
//
// N_SSP folded processors (NFSSPs) of N_CH channels each run side by side
// (8 x 16 = 128 channels by default). Each receives its own 9-bit stream of
// channel-interleaved samples; with 40 k samples/s per channel the clock is
// N_CH x 40 kHz = 640 kHz. A shared serial command decoder writes the filter
// coefficients, threshold and spike length of one processor or of all of them.
// Detected and characterised spikes of all processors are merged by the second
// coder & packer into a stream of 9-bit words, eight per 72-bit record
// {max filtered, min filtered, max raw (16 b each), timestamp 16 b, channel 8 b}.
// The partitioning, widths and default sizes follow the published design; the
// programming frame, the in_valid strobe and the observation outputs
// (spike_event, drop_count) are this design's own.
module ssp128_top
  import ssp_pkg::*;
#(
  parameter int unsigned N_CH  = 16,
  parameter int unsigned N_SSP = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  sample_t            sample_in [N_SSP],
  input  logic               prog_in,
  output logic [WORD_W-1:0]  spike_word,
  output logic               spike_word_valid,
  output logic               spike_word_sop,
  output logic [N_SSP-1:0]   spike_event,
  output logic [15:0]        drop_count
);
  cfg_wr_t          cfg;
  logic [N_SSP-1:0] sel;
  logic [N_SSP-1:0] rec_valid;
  spike_rec_t       rec [N_SSP];

  cmd_decoder #(.N_SSP(N_SSP)) u_cmd (.clk, .rst_n, .prog_in, .cfg, .sel);

  for (genvar i = 0; i < N_SSP; i++) begin : g_ssp
    cfg_wr_t cfg_i;
    always_comb begin
      cfg_i    = cfg;
      cfg_i.we = cfg.we && sel[i];
    end
    nfssp #(.N_CH(N_CH), .SSP_ID(i)) u_nfssp (
      .clk, .rst_n, .in_valid, .sample_in(sample_in[i]), .cfg(cfg_i),
      .spike_event(spike_event[i]), .rec_valid(rec_valid[i]), .rec(rec[i]));
  end

  coder_packer2 #(.N_SSP(N_SSP)) u_cp2 (
    .clk, .rst_n, .rec_valid, .rec,
    .word(spike_word), .word_valid(spike_word_valid), .word_sop(spike_word_sop), .drop_count);

  initial assert (N_SSP * N_CH <= 256) else $error("channel index is 8 bits");

endmodule
