// Shared widths, constants and record types of the 128-channel spike sorting
// processor. Sample width (9 b), filtered width (22 b), threshold width (16 b),
// the 32-tap filter, the 7-sample detection window, the MaxMin reset values and
// the 72-bit output record (three 16-bit features, 16-bit timing, 8-bit channel
// index) follow the published architecture. The register address map of the
// configuration interface and the internal struct layouts are this design's own.
package ssp_pkg;

  localparam int unsigned SAMPLE_W  = 9;   // neural sample
  localparam int unsigned COEF_W    = 9;   // FIR coefficient
  localparam int unsigned FEAT_W    = 22;  // filtered sample / filtered feature
  localparam int unsigned THR_W     = 16;  // detection threshold
  localparam int unsigned TS_W      = 16;  // timing information
  localparam int unsigned CHIDX_W   = 8;   // channel index in the record
  localparam int unsigned FCODE_W   = 16;  // coded feature field
  localparam int unsigned TAPS      = 32;  // noise shaping filter length
  localparam int unsigned NEO_WIN   = 7;   // samples seen by the spike detector
  localparam int unsigned LEN_W     = 6;   // spike length register, 1..32
  localparam int unsigned ENERGY_W  = 2*SAMPLE_W + 1;
  localparam int unsigned WORD_W    = 9;   // output word
  localparam int unsigned REC_W     = 3*FCODE_W + TS_W + CHIDX_W;  // 72
  localparam int unsigned WORDS_PER_REC = REC_W / WORD_W;          // 8

  // Reset values of the feature buffer (MaxMin extractor)
  localparam logic signed [FEAT_W-1:0]   FMAX_INIT = -22'sd2097152;
  localparam logic signed [FEAT_W-1:0]   FMIN_INIT =  22'sd2097151;
  localparam logic signed [SAMPLE_W-1:0] RMAX_INIT = -9'sd255;

  // Configuration register map
  localparam int unsigned CFG_ADDR_W = 6;
  localparam logic [CFG_ADDR_W-1:0] ADDR_THR = 6'd32;
  localparam logic [CFG_ADDR_W-1:0] ADDR_LEN = 6'd33;
  localparam int unsigned CFG_DATA_W = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [FEAT_W-1:0]   feat_t;

  typedef struct packed {
    logic                  we;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_wr_t;

  // One row of the second systolic cache buffer (feature buffer)
  typedef struct packed {
    logic             active;
    logic [LEN_W-1:0] cnt;
    feat_t            fmax;
    feat_t            fmin;
    sample_t          rmax;
    logic [TS_W-1:0]  ts;
  } feat_row_t;

  // Output record, most significant field first on the output stream
  typedef struct packed {
    logic signed [FCODE_W-1:0] fmax;
    logic signed [FCODE_W-1:0] fmin;
    logic signed [FCODE_W-1:0] rmax;
    logic [TS_W-1:0]           ts;
    logic [CHIDX_W-1:0]        ch;
  } spike_rec_t;

endpackage
