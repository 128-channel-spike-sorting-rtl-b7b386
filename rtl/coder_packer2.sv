// Second coder & packer with FIFO buffer. Merges the spike records of all
// N_SSP folded processors into one 9-bit output stream.
//   * Each processor has a one-record pending slot, filled by its one-cycle
//     rec_valid. A record that arrives while the slot is still occupied (and
//     not being emptied in that cycle) is dropped and counted in drop_count.
//   * A round-robin arbiter moves one pending record per cycle into the FIFO
//     (DEPTH records) when the FIFO is not full.
//   * The serializer sends the oldest FIFO record as WORDS_PER_REC = 8 words of
//     9 bits, most significant first, one word per cycle, `word_sop` marking
//     the first word. Records follow each other without gaps.
// A record thus needs 8 output cycles; at 640 kHz that is 80k records/s for the
// 128 channels. The 9-bit output and the 72-bit record follow the published
// design; pending slots, arbitration, FIFO depth and the drop policy are this
// design's own.
module coder_packer2
  import ssp_pkg::*;
#(
  parameter int unsigned N_SSP = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned SEL_W = (N_SSP > 1) ? $clog2(N_SSP) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_SSP-1:0]   rec_valid,
  input  spike_rec_t         rec [N_SSP],
  output logic [WORD_W-1:0]  word,
  output logic               word_valid,
  output logic               word_sop,
  output logic [15:0]        drop_count
);
  // ---------------- pending slots and round-robin arbiter ----------------
  logic [N_SSP-1:0] pend;
  spike_rec_t       slot [N_SSP];
  logic [SEL_W-1:0] rr;         // highest priority index
  logic [N_SSP-1:0] grant;
  logic [SEL_W-1:0] gidx;
  logic             gvalid;
  logic             fifo_full, fifo_empty, fifo_pop;
  spike_rec_t       fifo_out;
  logic [$clog2(N_SSP+1)-1:0] drops_now;

  always_comb begin
    grant  = '0;
    gidx   = '0;
    gvalid = 1'b0;
    if (!fifo_full) begin
      for (int k = 0; k < N_SSP; k++) begin
        automatic int unsigned i = (int'(rr) + k) % N_SSP;
        if (!gvalid && pend[i]) begin
          gvalid   = 1'b1;
          gidx     = SEL_W'(i);
          grant[i] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    drops_now = '0;
    for (int i = 0; i < N_SSP; i++)
      if (rec_valid[i] && pend[i] && !grant[i]) drops_now = drops_now + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      rr         <= '0;
      drop_count <= '0;
      for (int i = 0; i < N_SSP; i++) slot[i] <= '0;
    end else begin
      for (int i = 0; i < N_SSP; i++) begin
        if (rec_valid[i] && (!pend[i] || grant[i])) begin
          slot[i] <= rec[i];
          pend[i] <= 1'b1;
        end else if (grant[i]) begin
          pend[i] <= 1'b0;
        end
      end
      if (gvalid) rr <= (gidx == SEL_W'(N_SSP - 1)) ? '0 : gidx + 1'b1;
      drop_count <= drop_count + 16'(drops_now);
    end
  end

  sync_fifo #(.W(REC_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push    (gvalid),
    .wr_data (slot[gidx]),
    .pop     (fifo_pop),
    .rd_data (fifo_out),
    .empty   (fifo_empty),
    .full    (fifo_full)
  );

  // ---------------- serializer ----------------
  localparam int unsigned WCNT_W = $clog2(WORDS_PER_REC);
  logic [WCNT_W-1:0] wcnt;
  logic [REC_W-1:0]  rec_bits;

  assign rec_bits   = fifo_out;
  assign word_valid = !fifo_empty;
  assign word_sop   = !fifo_empty && (wcnt == '0);
  assign word       = rec_bits[REC_W-1 - WORD_W*int'(wcnt) -: WORD_W];
  assign fifo_pop   = !fifo_empty && (wcnt == WCNT_W'(WORDS_PER_REC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wcnt <= '0;
    else if (!fifo_empty) wcnt <= (wcnt == WCNT_W'(WORDS_PER_REC - 1)) ? '0 : wcnt + 1'b1;
  end

  // a granted record always finds room
  assert property (@(posedge clk) disable iff (!rst_n) gvalid |-> !fifo_full);

endmodule
