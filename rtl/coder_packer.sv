// First coder & packer of a folded processor. When the MaxMin extractor reports
// a finished spike (`done`), the three feature scores are coded to 16 bits and
// packed with the 16-bit timing information and the 8-bit channel index into a
// 72-bit record, presented one cycle later on `rec` with a one-cycle
// `rec_valid`. Coding (this design's choice): the 22-bit filtered maximum and
// minimum keep their 16 most significant bits (arithmetic shift right by 6),
// the 9-bit raw maximum is sign-extended. Channel index = SSP_ID*N_CH + local
// channel, so channels of all processors are numbered 0..127.
module coder_packer
  import ssp_pkg::*;
#(
  parameter int unsigned N_CH   = 16,
  parameter int unsigned SSP_ID = 0,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            done,
  input  feat_row_t       feat,
  input  logic [CH_W-1:0] ch,
  output logic            rec_valid,
  output spike_rec_t      rec
);
  localparam int unsigned SHIFT = FEAT_W - FCODE_W;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid <= 1'b0;
      rec       <= '0;
    end else begin
      rec_valid <= done;
      if (done) begin
        rec.fmax <= FCODE_W'(feat.fmax >>> SHIFT);
        rec.fmin <= FCODE_W'(feat.fmin >>> SHIFT);
        rec.rmax <= FCODE_W'(feat.rmax);
        rec.ts   <= feat.ts;
        rec.ch   <= CHIDX_W'(SSP_ID * N_CH) + CHIDX_W'(ch);
      end
    end
  end

endmodule
