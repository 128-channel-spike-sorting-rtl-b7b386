// MaxMin feature extractor (event based, combinational update of one feature
// buffer row).
//
// The feature buffer row `st` of the channel being processed comes from the
// second systolic cache buffer and `st_next` goes back into it. When `start`
// (a detected spike) arrives on an idle row, the row is reset to the initial
// values -2097152 / 2097151 / -255 and the extractor becomes active; from that
// cycle on it keeps the maximum and the minimum of the filtered sample and the
// maximum of the raw sample. After `spk_len` samples of the channel (the
// detection cycle counts as the first) `done` is raised for one cycle with the
// final scores in `st_next` and the row turns idle. A spike on an active row is
// ignored. The three compare-and-select paths and their reset values follow the
// published design; counting the detection cycle and ignoring re-triggers are
// this design's choices. The timestamp of the event is kept in the row.
module maxmin_extractor
  import ssp_pkg::*;
(
  input  feat_row_t         st,
  input  logic              start,
  input  feat_t             filt,
  input  sample_t           raw,
  input  logic [LEN_W-1:0]  spk_len,
  input  logic [TS_W-1:0]   ts,
  output feat_row_t         st_next,
  output logic              accepted,
  output logic              done
);
  feat_row_t base;

  always_comb begin
    accepted = start && !st.active;
    base     = st;
    if (accepted) begin
      base.active = 1'b1;
      base.cnt    = '0;
      base.fmax   = FMAX_INIT;
      base.fmin   = FMIN_INIT;
      base.rmax   = RMAX_INIT;
      base.ts     = ts;
    end

    st_next = base;
    done    = 1'b0;
    if (base.active) begin
      if (filt > base.fmax) st_next.fmax = filt;   // check max
      if (filt < base.fmin) st_next.fmin = filt;   // check min
      if (raw  > base.rmax) st_next.rmax = raw;    // check max (raw)
      st_next.cnt = base.cnt + 1'b1;
      if (st_next.cnt >= spk_len) begin
        done           = 1'b1;
        st_next.active = 1'b0;
      end
    end
  end

endmodule
